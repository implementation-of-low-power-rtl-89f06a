// scan_chain: the scan chain of the core under test.
//
// L_SC scan flip-flops. On a scan clock with se = 1 the chain shifts by one
// and takes si into its first flip-flop; with se = 0 every flip-flop
// captures its functional input pi (the core's response). The document
// shows the chain fed by the R-TRC and driven by SE and SCK; its length and
// the mux-D scan cell are this design's choices.
//
// Interface: sck is the scan clock, a one-cycle enable in the clk domain;
// q[0] is the flip-flop next to si, so = q[L_SC-1] the scan-out.
// The flip-flops have no reset, like ordinary scan cells: a capture or
// L_SC shifts define them.
module scan_chain #(
  parameter int unsigned L_SC = 16
) (
  input  logic            clk,
  input  logic            se,
  input  logic            sck,
  input  logic            si,
  input  logic [L_SC-1:0] pi,
  output logic [L_SC-1:0] q,
  output logic            so
);
  always_ff @(posedge clk) begin
    if (sck) q <= se ? {q[L_SC-2:0], si} : pi;
  end

  assign so = q[L_SC-1];
endmodule
