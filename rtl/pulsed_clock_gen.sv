// pulsed_clock_gen: delayed pulsed clock generator for the sub shift
// registers.
//
// A chain of SUB+1 clock-pulse circuits. Each circuit delays its clock input
// by one delay element, inverts the delayed copy and ANDs it with the
// undelayed input, which gives a short pulse at every rising edge of its
// input; the delayed copy, inverted twice, is the clock input of the next
// circuit. The first circuit gives CLK_pulse<T>, the following ones
// CLK_pulse<SUB>, ..., CLK_pulse<1>, so every rising edge of the shift clock
// produces SUB+1 non-overlapping pulses in the order T, SUB, ..., 1. The
// chain structure and the pulse order follow the document; building the
// delay element as one flip-flop of a faster system clock (so that one
// pulse lasts exactly one clk cycle) is this design's choice.
//
// Interface: shift_clk is the shift register clock CLK, synchronous to clk.
// pulse[0] is CLK_pulse<T>, pulse[k] (k = 1..SUB) is CLK_pulse<k>.
// Timing: if shift_clk rises in cycle c (first cycle it is seen high),
// CLK_pulse<T> is high in cycle c and CLK_pulse<k> in cycle c+SUB+1-k.
// shift_clk must stay high at least one cycle and low at least one cycle,
// and its period must be at least SUB+1 clk cycles, or the pulses of two
// shifts interleave.
module pulsed_clock_gen #(
  parameter int unsigned SUB = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_clk,
  output logic [SUB:0] pulse
);
  localparam int unsigned NST = SUB + 1;

  logic [NST-1:0] stage_in;  // clock input of each clock-pulse circuit
  logic [NST-1:0] delayed;   // output of each delay element

  always_comb begin
    stage_in[0] = shift_clk;
    for (int unsigned j = 1; j < NST; j++) stage_in[j] = delayed[j-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) delayed <= '0;
    else        delayed <= stage_in;
  end

  // Stage 0 drives CLK_pulse<T>; stage j >= 1 drives CLK_pulse<SUB+1-j>.
  always_comb begin
    pulse[0] = stage_in[0] & ~delayed[0];
    for (int unsigned j = 1; j < NST; j++)
      pulse[SUB+1-j] = stage_in[j] & ~delayed[j];
  end

  // The pulses never overlap.
  a_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pulse));
endmodule
