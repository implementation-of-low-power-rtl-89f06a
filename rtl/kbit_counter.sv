// kbit_counter: the k-bit counter of the decompressor.
//
// Counts the scan shifts of one expansion. Its width is
// k = ceil(log2(L_SC + 1)), the formula given in the document, so it can
// count up to the scan chain length L_SC. While en is high it counts up by
// one per clock; while en is low it is held at zero, so the CGU starts
// every expansion from zero without a separate clear (this behaviour is
// this design's choice).
//
// Interface: en from the CGU, cnt to the CGU; synchronous active-low reset.
module kbit_counter #(
  parameter int unsigned L_SC = 16,
  localparam int unsigned K   = $clog2(L_SC + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [K-1:0] cnt
);
  always_ff @(posedge clk) begin
    if (!rst_n || !en) cnt <= '0;
    else               cnt <= cnt + 1'b1;
  end
endmodule
