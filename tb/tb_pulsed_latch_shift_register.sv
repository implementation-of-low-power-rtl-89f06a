// tb_pulsed_latch_shift_register: shifts random bits through the N-bit
// register with random shift-clock periods (at least SUB+1 cycles) and
// checks the parallel contents against a reference shift model. It also
// checks the timing of one shift: SUB cycles after the shift clock is seen
// high the first latch still holds its old bit, and after SUB+1 cycles the
// whole register holds the new value.
module tb_pulsed_latch_shift_register;
  localparam int unsigned N   = 16;
  localparam int unsigned SUB = 4;
  logic clk = 1'b0;
  logic rst_n, shift_clk, din, dout;
  logic [N-1:0] q, ref_q;
  int checks = 0, failures = 0;

  pulsed_latch_shift_register #(.N(N), .SUB(SUB)) dut (
    .clk(clk), .rst_n(rst_n), .shift_clk(shift_clk), .din(din), .q(q), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one shift; shift_clk is seen high in the cycle after this negedge
  task automatic do_shift(input logic b, input bit check);
    logic old_q0;
    int hi, lo;
    old_q0 = q[0];
    hi = $urandom_range(1, 3);
    lo = $urandom_range(SUB + 1, SUB + 4) - hi;
    din = b;
    shift_clk = 1'b1;
    for (int c = 0; c < hi + lo; c++) begin
      if (c == hi) shift_clk = 1'b0;
      @(negedge clk);
      if (c == hi + lo - 1) din = 1'($urandom_range(0, 1)); // din only matters during the pulses
      if (check && c == SUB - 1) begin
        checks++;
        if (q[0] !== old_q0) begin
          failures++;
          $display("first latch changed before CLK_pulse<1>");
        end
      end
      if (check && c == SUB) begin
        checks++;
        if (q !== {ref_q[N-2:0], b}) begin
          failures++;
          $display("shift not complete after %0d cycles: q=%h expected %h", SUB + 1, q, {ref_q[N-2:0], b});
        end
      end
    end
    ref_q = {ref_q[N-2:0], b};
  endtask

  initial begin
    rst_n = 1'b0; shift_clk = 1'b0; din = 1'b0; ref_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N; i++) do_shift(1'($urandom_range(0, 1)), 1'b0);
    for (int i = 0; i < 400; i++) begin
      do_shift(1'($urandom_range(0, 1)), 1'b1);
      checks++;
      if (q !== ref_q || dout !== ref_q[N-1]) begin
        failures++;
        $display("shift %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
