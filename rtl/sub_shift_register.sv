// sub_shift_register: SUB-bit sub shift register of pulsed latches with its
// temporary storage latch.
//
// SUB data latches Q1..QSUB form a chain from din; a further latch T holds a
// copy of the last data bit. All sub shift registers of a shift register
// share the same SUB+1 pulsed clocks: latch Qk is written by CLK_pulse<k>
// and T by CLK_pulse<T>. Because the pulses come in the order T, SUB, ...,
// 1, T saves the old last bit first, then each latch takes its neighbour's
// value before that neighbour is overwritten. The next sub shift register
// reads T instead of QSUB, so its first latch, written last, still sees the
// bit that QSUB held before the shift. This structure follows the document.
//
// Interface: pulse[0] = CLK_pulse<T>, pulse[k] = CLK_pulse<k>; din is IN or
// the T output of the previous sub shift register; q[k-1] is Qk; t is T.
// Timing: one shift per pulse sequence; all outputs are settled after
// CLK_pulse<1>.
module sub_shift_register #(
  parameter int unsigned SUB = 4
) (
  input  logic           clk,
  input  logic [SUB:0]   pulse,
  input  logic           din,
  output logic [SUB-1:0] q,
  output logic           t
);
  logic [SUB-1:0] qb_unused;
  logic           tb_unused;

  for (genvar k = 0; k < SUB; k++) begin : g_latch
    logic d_in;
    assign d_in = (k == 0) ? din : q[(k == 0) ? 0 : k-1];
    ssaspl_latch u_latch (
      .clk  (clk),
      .pulse(pulse[k+1]),
      .d    (d_in),
      .db   (~d_in),
      .q    (q[k]),
      .qb   (qb_unused[k])
    );
  end

  ssaspl_latch u_temp (
    .clk  (clk),
    .pulse(pulse[0]),
    .d    (q[SUB-1]),
    .db   (~q[SUB-1]),
    .q    (t),
    .qb   (tb_unused)
  );
endmodule
