// tb_scan_chain: random scan clocks, scan enables, scan-in bits and core
// responses; checks the chain against a reference: shift with se = 1,
// capture pi with se = 0, hold without sck.
module tb_scan_chain;
  localparam int unsigned L_SC = 16;
  logic clk = 1'b0;
  logic se, sck, si, so;
  logic [L_SC-1:0] pi, q, ref_q;
  int checks = 0, failures = 0;

  scan_chain #(.L_SC(L_SC)) dut (.clk(clk), .se(se), .sck(sck), .si(si), .pi(pi), .q(q), .so(so));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // define the chain with one capture
    se = 1'b0; sck = 1'b1; si = 1'b0; pi = L_SC'($urandom);
    ref_q = pi;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      sck = $urandom_range(0, 3) != 0;
      se  = $urandom_range(0, 7) != 0;
      si  = $urandom_range(0, 1) == 1;
      pi  = L_SC'($urandom);
      @(negedge clk);
      if (sck) ref_q = se ? {ref_q[L_SC-2:0], si} : pi;
      checks++;
      if (q !== ref_q || so !== ref_q[L_SC-1]) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
