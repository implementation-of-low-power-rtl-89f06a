// shift_register_reuse_top: the complete design, two parts side by side.
//
// Part 1 is the low-power shift register: N pulsed latches grouped into
// N/SUB sub shift registers that all reuse one set of SUB+1 delayed pulsed
// clocks, with a 16-bit pseudo-random pattern generator as an optional data
// source. The generator steps once per rising edge of sr_clk, at the same
// time the register shifts, and sr_use_rng selects it instead of sr_in
// (that selection is this design's choice).
//
// Part 2 is the test architecture that reuses stored test data: an
// L_TRC-bit reconfigurable twisted ring counter, its decompressor, and the
// L_SC-bit scan chain it feeds. The tri-state detector, the ATE and the
// core under test are outside; their signals are ports.
//
// Both parts run on clk. sr_clk must be synchronous to clk with a period of
// at least SUB+1 cycles; tck may be asynchronous (it is synchronized).
// rst_n is an active-low synchronous reset of the control logic.
module shift_register_reuse_top
  import trc_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned SUB   = 4,
  parameter int unsigned L_TRC = 10,
  parameter int unsigned L_SC  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // shift register
  input  logic             sr_clk,
  input  logic             sr_in,
  input  logic             sr_use_rng,
  output logic [N-1:0]     sr_q,
  output logic             sr_dout,
  output logic [15:0]      rng_q,
  // test architecture
  input  code_t            code,
  input  logic             tms,
  input  logic             trst,
  input  logic             tck,
  output logic             ate_sync,
  input  logic [L_SC-1:0]  core_pi,
  output logic [L_SC-1:0]  scan_q,
  output logic             scan_so,
  output logic [L_TRC-1:0] trc_q
);
  logic sr_clk_d, rng_bit, sr_din;

  always_ff @(posedge clk) begin
    if (!rst_n) sr_clk_d <= 1'b0;
    else        sr_clk_d <= sr_clk;
  end

  random_pulse_gen u_rng (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (sr_clk && !sr_clk_d),
    .q      (rng_q),
    .bit_out(rng_bit)
  );

  assign sr_din = sr_use_rng ? rng_bit : sr_in;

  pulsed_latch_shift_register #(.N(N), .SUB(SUB)) u_sr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_clk(sr_clk),
    .din      (sr_din),
    .q        (sr_q),
    .dout     (sr_dout)
  );

  trc_test_arch #(.L_TRC(L_TRC), .L_SC(L_SC)) u_test (
    .clk     (clk),
    .rst_n   (rst_n),
    .code    (code),
    .tms     (tms),
    .trst    (trst),
    .tck     (tck),
    .ate_sync(ate_sync),
    .core_pi (core_pi),
    .scan_q  (scan_q),
    .scan_so (scan_so),
    .trc_q   (trc_q)
  );
endmodule
