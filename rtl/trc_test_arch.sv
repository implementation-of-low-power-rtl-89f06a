// trc_test_arch: on-chip test architecture built around the R-TRC.
//
// The ATE sends test data on one tri-state pin, TDI. A tri-state detector
// (an analog cell outside this RTL) turns each TDI symbol into a 2-bit
// code; the decompressor loads driven bits into the L_TRC-bit R-TRC and, on
// command, lets the R-TRC recirculate (feedback) or twist for L_SC cycles of
// the internal clock while its output fills the scan chain. Test data that
// repeats is thus sent once and reused from the R-TRC, which is the same
// idea of reusing stored register contents as in the shift register. The
// block structure follows the document; the symbol protocol is described in
// cgu.
//
// Interface: code, tms, trst, tck and ate_sync are the ATE side; core_pi
// is the core's response captured by the scan chain; scan_q, scan_so and
// trc_q expose the scan chain and the R-TRC.
module trc_test_arch
  import trc_pkg::*;
#(
  parameter int unsigned L_TRC = 10,
  parameter int unsigned L_SC  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
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
  logic sel, c_in, rck, se, sck, trc_out;

  decompressor #(.L_SC(L_SC)) u_decomp (
    .clk     (clk),
    .rst_n   (rst_n),
    .code    (code),
    .tms     (tms),
    .trst    (trst),
    .tck     (tck),
    .trc_out (trc_out),
    .sel     (sel),
    .c_in    (c_in),
    .rck     (rck),
    .se      (se),
    .sck     (sck),
    .ate_sync(ate_sync)
  );

  r_trc #(.L(L_TRC)) u_trc (
    .clk  (clk),
    .rst_n(rst_n),
    .rck  (rck),
    .sel  (sel),
    .c_in (c_in),
    .q    (trc_q),
    .out  (trc_out)
  );

  scan_chain #(.L_SC(L_SC)) u_scan (
    .clk(clk),
    .se (se),
    .sck(sck),
    .si (trc_out),
    .pi (core_pi),
    .q  (scan_q),
    .so (scan_so)
  );
endmodule
