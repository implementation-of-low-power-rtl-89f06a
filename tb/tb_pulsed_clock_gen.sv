// tb_pulsed_clock_gen: drives the shift clock with random high and low
// phases (period at least SUB+1 cycles) and checks every cycle that each
// pulse equals the rising-edge detection of the shift clock delayed by the
// pulse's place in the order T, SUB, ..., 1, computed from a history of the
// shift clock. Also checks that each shift gives each pulse exactly once.
module tb_pulsed_clock_gen;
  localparam int unsigned SUB = 4;
  logic clk = 1'b0;
  logic rst_n, shift_clk;
  logic [SUB:0] pulse;
  int checks = 0, failures = 0;
  logic hist [0:SUB+1];   // hist[i] = shift_clk i cycles ago
  int   pulse_count [0:SUB];
  int   shifts = 0;

  pulsed_clock_gen #(.SUB(SUB)) dut (.clk(clk), .rst_n(rst_n), .shift_clk(shift_clk), .pulse(pulse));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pulse of the circuit at depth j (0 = CLK_pulse<T>)
  function automatic logic expect_depth(int j);
    return hist[j] && !hist[j+1];
  endfunction

  task automatic check_cycle();
    // sampled just before the rising edge: hist[0] is the current shift_clk
    for (int j = 0; j <= SUB; j++) begin
      int idx;
      logic exp_p;
      idx = (j == 0) ? 0 : SUB + 1 - j;
      exp_p = expect_depth(j);
      checks++;
      if (pulse[idx] !== exp_p) begin
        failures++;
        $display("t=%0t pulse[%0d]=%b expected %b", $time, idx, pulse[idx], exp_p);
      end
      if (pulse[idx]) pulse_count[idx]++;
    end
  endtask

  initial begin
    rst_n = 1'b0; shift_clk = 1'b0;
    for (int i = 0; i <= SUB + 1; i++) hist[i] = 1'b0;
    for (int i = 0; i <= SUB; i++) pulse_count[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      int hi, lo;
      hi = $urandom_range(1, 4);
      lo = $urandom_range((hi >= SUB + 1) ? 1 : SUB + 1 - hi, 6);
      shifts++;
      shift_clk = 1'b1;
      for (int c = 0; c < hi + lo; c++) begin
        if (c == hi) shift_clk = 1'b0;
        for (int i = SUB + 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = shift_clk;
        #1;
        check_cycle();
        @(negedge clk);
      end
    end
    // drain: the last shift's pulses
    for (int c = 0; c < SUB + 2; c++) begin
      for (int i = SUB + 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = shift_clk;
      #1;
      check_cycle();
      @(negedge clk);
    end
    for (int i = 0; i <= SUB; i++) begin
      checks++;
      if (pulse_count[i] != shifts) begin
        failures++;
        $display("pulse %0d fired %0d times for %0d shifts", i, pulse_count[i], shifts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
