// decompressor: the test data decompressor between the ATE and the R-TRC.
//
// Holds the three units the document names: the code converter, which
// turns the tri-state detector's 2-bit code into data and valid; the k-bit
// counter, k = ceil(log2(L_SC + 1)), which counts the shifts from the R-TRC
// into the scan chain; and the CGU, which drives the R-TRC (Sel, C_in, RCK)
// and the scan chain (SE, SCK) and answers the ATE with ATE_SYNC. See cgu
// for the symbol protocol and timing.
//
// Interface: clk is the internal clock i_clk; code, tms, trst and tck come
// from the ATE through the tri-state detector; trc_out is the R-TRC output,
// used to form the twisted input.
module decompressor
  import trc_pkg::*;
#(
  parameter int unsigned L_SC = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t code,
  input  logic  tms,
  input  logic  trst,
  input  logic  tck,
  input  logic  trc_out,
  output logic  sel,
  output logic  c_in,
  output logic  rck,
  output logic  se,
  output logic  sck,
  output logic  ate_sync
);
  localparam int unsigned K = $clog2(L_SC + 1);

  logic         data, valid, en;
  logic [K-1:0] cnt;

  code_converter u_conv (
    .code (code),
    .data (data),
    .valid(valid)
  );

  kbit_counter #(.L_SC(L_SC)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .cnt  (cnt)
  );

  cgu #(.L_SC(L_SC)) u_cgu (
    .clk     (clk),
    .rst_n   (rst_n),
    .tck     (tck),
    .tms     (tms),
    .trst    (trst),
    .data    (data),
    .valid   (valid),
    .cnt     (cnt),
    .trc_out (trc_out),
    .en      (en),
    .sel     (sel),
    .c_in    (c_in),
    .rck     (rck),
    .se      (se),
    .sck     (sck),
    .ate_sync(ate_sync)
  );
endmodule
