// random_pulse_gen: 16-bit pseudo-random pattern generator that supplies
// test data to the shift register.
//
// A Fibonacci linear-feedback shift register: on each step the state
// shifts up by one bit and the new bit 0 is the XOR of the state bits
// selected by TAPS. The default taps (bits 16, 14, 13 and 11 of the
// polynomial x^16 + x^14 + x^13 + x^11 + 1) give the maximal period of
// 65535 states. The document names the generator and shows a 16-bit
// output; its structure, the polynomial and the seed (the 16-bit value
// 0x6966 that appears in the document's waveforms) are this design's
// choices.
//
// Interface: step advances one state in the clk cycle it is high; q is the
// state, bit_out = q[W-1] its serial output. Synchronous active-low reset
// loads SEED, which must not be zero.
module random_pulse_gen #(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] TAPS = 16'hB400,
  parameter logic [W-1:0] SEED = 16'h6966
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [W-1:0] q,
  output logic         bit_out
);
  logic feedback;

  assign feedback = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= SEED;
    else if (step) q <= {q[W-2:0], feedback};
  end

  assign bit_out = q[W-1];
endmodule
