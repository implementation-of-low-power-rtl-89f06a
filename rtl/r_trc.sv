// r_trc: reconfigurable twisted ring counter (R-TRC).
//
// An L-bit shift register whose input is chosen by a 2:1 multiplexer: with
// sel = 1 the last bit is fed back (the stored test data is reused as a
// ring), with sel = 0 the bit c_in from the decompressor is shifted in. The
// decompressor makes the counter twist (a Johnson counter) by driving c_in
// with the inverse of the last bit, or loads new data through c_in. The
// multiplexer, its input numbering (1 = feedback, 0 = C_in) and L = 10
// follow the document; the reset to zero is this design's choice.
//
// Interface: rck is the R-TRC clock, a one-cycle enable in the clk domain;
// q[0] is the input stage, out = q[L-1] drives the scan-in SI.
// Timing: q and out change at the clk edge that ends a cycle with rck high.
module r_trc #(
  parameter int unsigned L = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rck,
  input  logic         sel,
  input  logic         c_in,
  output logic [L-1:0] q,
  output logic         out
);
  logic mux_out;

  assign mux_out = sel ? q[L-1] : c_in;

  always_ff @(posedge clk) begin
    if (!rst_n)   q <= '0;
    else if (rck) q <= {q[L-2:0], mux_out};
  end

  assign out = q[L-1];
endmodule
