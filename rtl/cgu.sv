// cgu: control and generator unit of the test data decompressor.
//
// The CGU turns the stream of ATE symbols into R-TRC and scan-chain
// operations, switches between the ATE clock and the internal clock, and
// tells the ATE through ATE_SYNC when it may send. The document gives
// these duties and the unit's signals (TMS, TRST, TCK, data, valid, cnt, en,
// Sel, C_in, RCK, SE, SCK, ATE_SYNC); the protocol below is this design's
// own.
//
// One symbol is taken at each rising edge of TCK while ATE_SYNC is high:
//  * TMS high: capture - one SCK with SE = 0, the scan chain loads the
//    core's response.
//  * in LOAD, a driven bit b: one RCK with Sel = 0 and C_in = b, shifting
//    a new bit of test data into the R-TRC (paced by the ATE clock).
//  * in LOAD, Hi-Z: go to CMD; the next symbol is a command.
//  * in CMD, a driven bit: start an expansion, feedback mode for 0, twist
//    mode for 1. In CMD, Hi-Z cancels and returns to LOAD.
//  * EXPAND: for L_SC cycles of the internal clock RCK and SCK are both
//    high with SE = 1, so the R-TRC output streams into the scan chain while
//    the R-TRC recirculates its contents: Sel = 1 (feedback) in feedback
//    mode, Sel = 0 with C_in = NOT trc_out in twist mode. The k-bit counter,
//    enabled throughout, ends the expansion; ATE_SYNC is low meanwhile.
// TRST high, or rst_n low, returns to LOAD synchronously.
//
// Clocking: clk is the internal clock i_clk. TCK is asynchronous to it and
// passes a two-flop synchronizer; RCK and SCK are one-cycle enables of the
// clk domain. A TCK edge is acted on two or three clk cycles after it; TCK
// high and low phases must each last at least two clk cycles.
module cgu
  import trc_pkg::*;
#(
  parameter int unsigned L_SC = 16,
  localparam int unsigned K   = $clog2(L_SC + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tck,
  input  logic         tms,
  input  logic         trst,
  input  logic         data,
  input  logic         valid,
  input  logic [K-1:0] cnt,
  input  logic         trc_out,
  output logic         en,
  output logic         sel,
  output logic         c_in,
  output logic         rck,
  output logic         se,
  output logic         sck,
  output logic         ate_sync
);
  cgu_state_e state, state_next;
  trc_mode_e  mode, mode_next;
  logic [2:0] tck_sync;   // [1:0] synchronizer, [2] previous value
  logic       tck_rise;
  logic       sync_rst;

  assign sync_rst = !rst_n || trst;

  always_ff @(posedge clk) begin
    if (!rst_n) tck_sync <= '0;
    else        tck_sync <= {tck_sync[1:0], tck};
  end
  assign tck_rise = tck_sync[1] && !tck_sync[2];

  always_comb begin
    state_next = state;
    mode_next  = mode;
    sel        = 1'b0;
    c_in       = 1'b0;
    rck        = 1'b0;
    se         = 1'b1;
    sck        = 1'b0;
    unique case (state)
      ST_LOAD: if (tck_rise) begin
        if (tms) begin
          se  = 1'b0;
          sck = 1'b1;
        end else if (valid) begin
          c_in = data;
          rck  = 1'b1;
        end else begin
          state_next = ST_CMD;
        end
      end
      ST_CMD: if (tck_rise) begin
        if (tms) begin
          se         = 1'b0;
          sck        = 1'b1;
          state_next = ST_LOAD;
        end else if (valid) begin
          mode_next  = trc_mode_e'(data);
          state_next = ST_EXPAND;
        end else begin
          state_next = ST_LOAD;
        end
      end
      ST_EXPAND: begin
        rck  = 1'b1;
        sck  = 1'b1;
        sel  = (mode == MODE_FEEDBACK);
        c_in = !trc_out;
        if (cnt == K'(L_SC - 1)) state_next = ST_LOAD;
      end
      default: state_next = ST_LOAD;
    endcase
  end

  always_ff @(posedge clk) begin
    if (sync_rst) begin
      state <= ST_LOAD;
      mode  <= MODE_FEEDBACK;
    end else begin
      state <= state_next;
      mode  <= mode_next;
    end
  end

  assign en       = (state == ST_EXPAND);
  assign ate_sync = (state != ST_EXPAND);

  // An expansion never runs past the scan chain length.
  a_cnt_range: assert property (@(posedge clk) disable iff (sync_rst)
                                en |-> (cnt < K'(L_SC)));
endmodule
