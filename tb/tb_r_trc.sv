// tb_r_trc: random rck, sel and c_in; checks the R-TRC contents every cycle
// against a reference: sel = 1 rotates the last bit back to the input,
// sel = 0 shifts c_in in; without rck nothing changes. Also checks reset.
module tb_r_trc;
  localparam int unsigned L = 10;
  logic clk = 1'b0;
  logic rst_n, rck, sel, c_in, out;
  logic [L-1:0] q, ref_q;
  int checks = 0, failures = 0;

  r_trc #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .rck(rck), .sel(sel), .c_in(c_in), .q(q), .out(out));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rck = 1'b1; sel = 1'b0; c_in = 1'b1;
    @(negedge clk);
    rst_n = 1'b1;
    ref_q = '0;
    checks++;
    if (q !== '0) begin failures++; $display("reset"); end
    for (int i = 0; i < 2000; i++) begin
      rck  = $urandom_range(0, 3) != 0;
      sel  = $urandom_range(0, 1) == 1;
      c_in = $urandom_range(0, 1) == 1;
      @(negedge clk);
      if (rck) ref_q = {ref_q[L-2:0], sel ? ref_q[L-1] : c_in};
      checks++;
      if (q !== ref_q || out !== ref_q[L-1]) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
