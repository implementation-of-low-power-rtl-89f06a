// tb_cgu: plays the ATE against the CGU. Symbols are sent on TCK (four
// cycles high, four low) whenever ATE_SYNC is high; a counter model stands
// in for the k-bit counter and trc_out is random. Every cycle in which RCK
// or SCK is high is logged, and after each symbol the log is compared with
// what the symbol must produce: one R-TRC load with Sel = 0 and C_in = the
// bit; one capture (SCK with SE = 0) for TMS; nothing for Hi-Z; and for a
// command exactly L_SC combined RCK/SCK cycles with SE = 1, Sel = 1 in
// feedback mode or Sel = 0 and C_in = NOT trc_out in twist mode, with
// ATE_SYNC low for exactly those L_SC cycles. TRST is checked to abort.
module tb_cgu;
  localparam int unsigned L_SC = 16;
  localparam int unsigned K = $clog2(L_SC + 1);
  logic clk = 1'b0;
  logic rst_n, tck, tms, trst, data, valid, trc_out;
  logic [K-1:0] cnt;
  logic en, sel, c_in, rck, se, sck, ate_sync;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic rck, sck, se, sel, c_in, trc_out;
  } ev_t;
  ev_t log_q[$];
  int  sync_low;

  cgu #(.L_SC(L_SC)) dut (
    .clk(clk), .rst_n(rst_n), .tck(tck), .tms(tms), .trst(trst), .data(data), .valid(valid),
    .cnt(cnt), .trc_out(trc_out), .en(en), .sel(sel), .c_in(c_in), .rck(rck), .se(se),
    .sck(sck), .ate_sync(ate_sync));

  always #5 clk = ~clk;

  // counter model and event log
  always_ff @(posedge clk) begin
    cnt <= (!rst_n || !en) ? '0 : cnt + 1'b1;
    if (rst_n && (rck || sck)) log_q.push_back('{rck, sck, se, sel, c_in, trc_out});
    if (rst_n && !ate_sync) sync_low++;
  end
  always @(negedge clk) trc_out = $urandom_range(0, 1) == 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("t=%0t %s", $time, msg);
  endtask

  // sym: 0, 1, or 2 for Hi-Z
  task automatic send(int sym, logic with_tms);
    while (!ate_sync) @(negedge clk);
    log_q.delete();
    sync_low = 0;
    tms = with_tms; valid = (sym != 2); data = (sym == 1);
    tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
    repeat (4) @(negedge clk);
    while (!ate_sync) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic expect_none(string what);
    checks++;
    if (log_q.size() != 0 || sync_low != 0) fail({what, ": unexpected activity"});
  endtask

  task automatic expect_load(logic b);
    checks++;
    if (log_q.size() != 1) fail($sformatf("load: %0d events", log_q.size()));
    else if (!log_q[0].rck || log_q[0].sck || log_q[0].sel || log_q[0].c_in != b) fail("load: wrong controls");
  endtask

  task automatic expect_capture();
    checks++;
    if (log_q.size() != 1) fail($sformatf("capture: %0d events", log_q.size()));
    else if (log_q[0].rck || !log_q[0].sck || log_q[0].se) fail("capture: wrong controls");
  endtask

  task automatic expect_expand(logic twist);
    checks++;
    if (log_q.size() != L_SC || sync_low != L_SC)
      fail($sformatf("expand: %0d events, ATE_SYNC low %0d cycles", log_q.size(), sync_low));
    foreach (log_q[i]) begin
      checks++;
      if (!log_q[i].rck || !log_q[i].sck || !log_q[i].se) fail("expand: clocks");
      else if (!twist && !log_q[i].sel) fail("expand: feedback mode needs Sel=1");
      else if (twist && (log_q[i].sel || log_q[i].c_in != !log_q[i].trc_out)) fail("expand: twist");
    end
  endtask

  initial begin
    rst_n = 1'b0; tck = 1'b0; tms = 1'b0; trst = 1'b0; data = 1'b0; valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      int kind;
      logic b;
      kind = $urandom_range(0, 5);
      b = $urandom_range(0, 1) == 1;
      case (kind)
        0, 1: begin send(int'(b), 1'b0); expect_load(b); end
        2:    begin send(0, 1'b1); expect_capture(); end
        3, 4: begin send(2, 1'b0); expect_none("hi-z"); send(int'(b), 1'b0); expect_expand(b); end
        default: begin send(2, 1'b0); expect_none("hi-z"); send(2, 1'b0); expect_none("cancel"); end
      endcase
    end
    // TRST aborts an expansion
    send(2, 1'b0);
    tms = 1'b0; valid = 1'b1; data = 1'b0; tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
    repeat (3) @(negedge clk);
    trst = 1'b1;
    @(negedge clk);
    trst = 1'b0;
    checks++;
    if (!ate_sync || en) fail("TRST did not return to LOAD");
    log_q.delete();
    repeat (5) @(negedge clk);
    checks++;
    if (log_q.size() != 0) fail("activity after TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
