// tb_sub_shift_register: applies the pulse sequence T, SUB, ..., 1 (one
// pulse per cycle) with random input bits and checks the data latches and
// the temporary latch against a reference shift model after each sequence:
// T must hold the last bit from before the shift.
module tb_sub_shift_register;
  localparam int unsigned SUB = 4;
  logic clk = 1'b0;
  logic [SUB:0]   pulse;
  logic           din, t;
  logic [SUB-1:0] q;
  logic [SUB-1:0] ref_q;
  logic           ref_t;
  int checks = 0, failures = 0;

  sub_shift_register #(.SUB(SUB)) dut (.clk(clk), .pulse(pulse), .din(din), .q(q), .t(t));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_shift(input logic b);
    din = b;
    pulse = '0; pulse[0] = 1'b1;
    @(negedge clk);
    for (int k = SUB; k >= 1; k--) begin
      pulse = '0; pulse[k] = 1'b1;
      @(negedge clk);
    end
    pulse = '0;
    ref_t = ref_q[SUB-1];
    ref_q = {ref_q[SUB-2:0], b};
  endtask

  initial begin
    pulse = '0; din = 1'b0;
    @(negedge clk);
    ref_q = 'x;
    // fill
    for (int i = 0; i < SUB + 1; i++) do_shift(1'($urandom_range(0, 1)));
    for (int i = 0; i < 500; i++) begin
      do_shift(1'($urandom_range(0, 1)));
      @(negedge clk);   // idle cycle: nothing may change
      checks++;
      if (q !== ref_q || t !== ref_t) begin
        failures++;
        $display("shift %0d: q=%b t=%b expected q=%b t=%b", i, q, t, ref_q, ref_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
