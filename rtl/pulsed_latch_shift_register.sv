// pulsed_latch_shift_register: N-bit serial-in, parallel-out shift register
// made of pulsed latches.
//
// The N latches are grouped into M = N/SUB sub shift registers, each with
// its own temporary storage latch, and every sub shift register reuses the
// same SUB+1 pulsed clocks from one delayed pulsed clock generator. So the
// clock network has SUB+1 pulse lines whatever N is, and each data bit
// costs one latch instead of a flip-flop; the price is one temporary latch
// per SUB bits. The grouping, the shared pulses and the temporary latches
// follow the document; N = 16 is the width of its simulations.
//
// Interface: shift_clk is the shift clock CLK (synchronous to clk, period of
// at least SUB+1 clk cycles); din is IN; q[i] is Q(i+1), so q[0] holds the
// newest bit and dout = q[N-1] the oldest.
// Timing: the shift started by a rising edge of shift_clk seen in cycle c
// is complete (all of q updated) after the clk edge that ends cycle c+SUB.
// din is sampled by CLK_pulse<1>, in cycle c+SUB. The data latches have no
// reset: after N shifts their contents are fully defined.
module pulsed_latch_shift_register #(
  parameter int unsigned N   = 16,
  parameter int unsigned SUB = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_clk,
  input  logic         din,
  output logic [N-1:0] q,
  output logic         dout
);
  localparam int unsigned M = N / SUB;

  if (N % SUB != 0 || N == 0) begin : g_bad_size
    $error("N must be a non-zero multiple of SUB");
  end

  logic [SUB:0] pulse;
  logic [M-1:0] t;

  pulsed_clock_gen #(.SUB(SUB)) u_pulse_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_clk(shift_clk),
    .pulse    (pulse)
  );

  for (genvar m = 0; m < M; m++) begin : g_sub
    logic sub_in;
    assign sub_in = (m == 0) ? din : t[(m == 0) ? 0 : m-1];
    sub_shift_register #(.SUB(SUB)) u_sub (
      .clk  (clk),
      .pulse(pulse),
      .din  (sub_in),
      .q    (q[m*SUB +: SUB]),
      .t    (t[m])
    );
  end

  assign dout = q[N-1];
endmodule
