// tb_random_pulse_gen: checks the reset value, each step against the
// polynomial x^16 + x^14 + x^13 + x^11 + 1 written out bit by bit, that the
// state holds while step is low, and that the sequence returns to the seed
// after exactly 65535 steps without passing through zero.
module tb_random_pulse_gen;
  logic clk = 1'b0;
  logic rst_n, step, bit_out;
  logic [15:0] q, ref_q;
  int checks = 0, failures = 0;
  int period;

  random_pulse_gen dut (.clk(clk), .rst_n(rst_n), .step(step), .q(q), .bit_out(bit_out));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; step = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (q !== 16'h6966) begin failures++; $display("seed %h", q); end
    ref_q = q;
    for (int i = 0; i < 1000; i++) begin
      step = $urandom_range(0, 1) == 1;
      @(negedge clk);
      if (step) ref_q = {ref_q[14:0], ref_q[15] ^ ref_q[13] ^ ref_q[12] ^ ref_q[10]};
      checks++;
      if (q !== ref_q || bit_out !== ref_q[15]) begin
        failures++;
        $display("step %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    // period
    rst_n = 1'b0; step = 1'b0;
    @(negedge clk);
    rst_n = 1'b1; step = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      if (q == 16'h0) begin failures++; $display("zero state"); end
    end while (q != 16'h6966 && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
