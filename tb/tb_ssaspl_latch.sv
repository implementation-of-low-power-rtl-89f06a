// tb_ssaspl_latch: random test of the pulsed latch cell against a
// reference: with a pulse and differential data the cell loads d, with
// equal d/db or no pulse it holds; qb is always the inverse of q.
module tb_ssaspl_latch;
  logic clk = 1'b0;
  logic pulse, d, db, q, qb;
  int   checks = 0, failures = 0;
  logic ref_q;

  ssaspl_latch dut (.clk(clk), .pulse(pulse), .d(d), .db(db), .q(q), .qb(qb));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise the cell with a clean write
    pulse = 1'b1; d = 1'b0; db = 1'b1;
    @(negedge clk);
    ref_q = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      pulse = $urandom_range(0, 1) == 1;
      d     = $urandom_range(0, 1) == 1;
      db    = ($urandom_range(0, 3) == 0) ? d : !d;
      @(negedge clk);
      if (pulse && d != db) ref_q = d;
      checks++;
      if (q !== ref_q || qb !== !ref_q) begin
        failures++;
        $display("mismatch at %0d: q=%b qb=%b expected %b", i, q, qb, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
