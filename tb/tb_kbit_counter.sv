// tb_kbit_counter: checks the counter width ceil(log2(L_SC+1)), counting
// while enabled, clearing while disabled, and reset, against a reference
// count, with random enable runs.
module tb_kbit_counter;
  localparam int unsigned L_SC = 16;
  localparam int unsigned K = 5;   // ceil(log2(17))
  logic clk = 1'b0;
  logic rst_n, en;
  logic [K-1:0] cnt;
  int ref_cnt;
  int checks = 0, failures = 0;

  kbit_counter #(.L_SC(L_SC)) dut (.clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if ($bits(cnt) != K) begin failures++; $display("width %0d", $bits(cnt)); end
    rst_n = 1'b0; en = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    ref_cnt = 0;
    for (int i = 0; i < 1000; i++) begin
      en = $urandom_range(0, 7) != 0;
      @(negedge clk);
      ref_cnt = en ? (ref_cnt + 1) % (1 << K) : 0;
      checks++;
      if (cnt !== K'(ref_cnt)) begin
        failures++;
        $display("cycle %0d: cnt=%0d expected %0d", i, cnt, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
