// tb_shift_register_reuse_top: end-to-end test of the whole design at its
// default sizes (N = 16, SUB = 4, L_TRC = 10, L_SC = 16).
//
// Shift register part: shifts random bits from sr_in, then bits from the
// pseudo-random generator, checking the 16-bit contents after every shift
// against a reference shift register and a reference LFSR, and the shift
// latency of SUB+1 cycles. Test part: plays the ATE with random loads,
// captures, feedback and twist expansions, cancelled commands and a TRST,
// checking the R-TRC and scan chain contents against a reference model.
// Each mechanism is counted and must occur at least once.
module tb_shift_register_reuse_top;
  import trc_pkg::*;
  localparam int unsigned N = 16, SUB = 4, L_TRC = 10, L_SC = 16;
  logic clk = 1'b0;
  logic rst_n, sr_clk, sr_in, sr_use_rng, sr_dout, tms, trst, tck, ate_sync, scan_so;
  logic [N-1:0]     sr_q, ref_sr, old_sr;
  logic [15:0]      rng_q, ref_rng;
  code_t            code;
  logic [L_SC-1:0]  core_pi, scan_q, ref_scan;
  logic [L_TRC-1:0] trc_q, ref_trc;
  int checks = 0, failures = 0;
  int sync_low;
  // mechanism counters
  int n_shift = 0, n_cross = 0, n_rng = 0, n_load = 0, n_capture = 0;
  int n_feedback = 0, n_twist = 0, n_cancel = 0, n_trst = 0;

  shift_register_reuse_top dut (
    .clk(clk), .rst_n(rst_n), .sr_clk(sr_clk), .sr_in(sr_in), .sr_use_rng(sr_use_rng),
    .sr_q(sr_q), .sr_dout(sr_dout), .rng_q(rng_q), .code(code), .tms(tms), .trst(trst),
    .tck(tck), .ate_sync(ate_sync), .core_pi(core_pi), .scan_q(scan_q), .scan_so(scan_so),
    .trc_q(trc_q));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (!ate_sync) sync_low++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("t=%0t %s", $time, msg);
  endtask

  // ---------------- shift register part ----------------
  task automatic sr_shift(input logic b, input logic from_rng, input bit check);
    sr_use_rng = from_rng;
    sr_in = b;
    sr_clk = 1'b1;
    @(negedge clk);
    sr_clk = 1'b0;
    for (int c = 1; c <= SUB + 1; c++) begin
      @(negedge clk);
      if (check && c == SUB - 1) begin
        checks++;
        if (sr_q[0] !== ref_sr[0]) fail("first latch written before CLK_pulse<1>");
      end
    end
    if (from_rng) begin
      ref_rng = {ref_rng[14:0], ref_rng[15] ^ ref_rng[13] ^ ref_rng[12] ^ ref_rng[10]};
      b = ref_rng[15];
      n_rng++;
    end else begin
      ref_rng = {ref_rng[14:0], ref_rng[15] ^ ref_rng[13] ^ ref_rng[12] ^ ref_rng[10]};
    end
    old_sr = ref_sr;
    ref_sr = {ref_sr[N-2:0], b};
    if (check) begin
      checks++;
      if (sr_q !== ref_sr || sr_dout !== ref_sr[N-1]) fail($sformatf("shift: q=%h expected %h", sr_q, ref_sr));
      checks++;
      if (rng_q !== ref_rng) fail($sformatf("rng %h expected %h", rng_q, ref_rng));
      n_shift++;
      // a changed bit moved into sub shift register #2 through T1
      if (ref_sr[SUB] != old_sr[SUB]) n_cross++;
    end
  endtask

  // ---------------- test architecture part ----------------
  task automatic send(int sym, logic with_tms);
    while (!ate_sync) @(negedge clk);
    sync_low = 0;
    tms = with_tms;
    code = (sym == 2) ? CODE_HIZ : (sym == 1) ? CODE_ONE : CODE_ZERO;
    tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
    repeat (4) @(negedge clk);
    while (!ate_sync) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic model_expand(logic twist);
    for (int i = 0; i < L_SC; i++) begin
      logic o;
      o = ref_trc[L_TRC-1];
      ref_scan = {ref_scan[L_SC-2:0], o};
      ref_trc  = {ref_trc[L_TRC-2:0], twist ? !o : o};
    end
  endtask

  task automatic compare(string what);
    checks++;
    if (trc_q !== ref_trc || scan_q !== ref_scan || scan_so !== ref_scan[L_SC-1])
      fail($sformatf("%s: trc=%b (exp %b) scan=%h (exp %h)", what, trc_q, ref_trc, scan_q, ref_scan));
  endtask

  initial begin
    rst_n = 1'b0; sr_clk = 1'b0; sr_in = 1'b0; sr_use_rng = 1'b0;
    tms = 1'b0; trst = 1'b0; tck = 1'b0; code = CODE_HIZ; core_pi = L_SC'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ref_rng = 16'h6966;
    ref_sr = '0;
    checks++;
    if (rng_q !== ref_rng) fail("generator seed");

    // fill, then shift external and generated data
    for (int i = 0; i < N; i++) sr_shift(1'($urandom_range(0, 1)), 1'b0, 1'b0);
    for (int i = 0; i < 100; i++) sr_shift(1'($urandom_range(0, 1)), 1'b0, 1'b1);
    for (int i = 0; i < 100; i++) sr_shift(1'b0, 1'b1, 1'b1);

    // test architecture
    ref_trc = '0;
    send(0, 1'b1); ref_scan = core_pi; compare("first capture"); n_capture++;
    for (int i = 0; i < 100; i++) begin
      int kind;
      logic b;
      kind = $urandom_range(0, 6);
      b = $urandom_range(0, 1) == 1;
      case (kind)
        0, 1, 2: begin send(int'(b), 1'b0); ref_trc = {ref_trc[L_TRC-2:0], b}; compare("load"); n_load++; end
        3: begin
          core_pi = L_SC'($urandom);
          send(0, 1'b1); ref_scan = core_pi; compare("capture"); n_capture++;
        end
        4: begin send(2, 1'b0); send(2, 1'b0); compare("cancel"); n_cancel++; end
        default: begin
          send(2, 1'b0);
          send(int'(b), 1'b0);
          model_expand(b);
          compare(b ? "twist expansion" : "feedback expansion");
          checks++;
          if (sync_low != L_SC) fail($sformatf("ATE_SYNC low for %0d cycles", sync_low));
          if (b) n_twist++; else n_feedback++;
        end
      endcase
    end
    // TRST aborts an expansion; the R-TRC and scan chain keep what they hold
    send(2, 1'b0);
    code = CODE_ZERO; tck = 1'b1;
    repeat (4) @(negedge clk);
    tck = 1'b0;
    repeat (3) @(negedge clk);
    trst = 1'b1;
    @(negedge clk);
    trst = 1'b0;
    checks++;
    if (!ate_sync) fail("TRST did not end the expansion");
    else n_trst++;
    // the R-TRC still loads normally afterwards
    send(1, 1'b0);
    checks++;
    if (trc_q[0] !== 1'b1) fail("load after TRST");

    $display("mechanisms: shifts=%0d cross-sub-register=%0d rng-sourced=%0d loads=%0d captures=%0d feedback=%0d twist=%0d cancel=%0d trst=%0d",
             n_shift, n_cross, n_rng, n_load, n_capture, n_feedback, n_twist, n_cancel, n_trst);
    if (n_shift == 0)    fail("no shift");
    if (n_cross == 0)    fail("no transfer through a temporary latch");
    if (n_rng == 0)      fail("no generator-sourced shift");
    if (n_load == 0)     fail("no R-TRC load");
    if (n_capture == 0)  fail("no capture");
    if (n_feedback == 0) fail("no feedback expansion");
    if (n_twist == 0)    fail("no twist expansion");
    if (n_cancel == 0)   fail("no cancelled command");
    if (n_trst == 0)     fail("no TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
