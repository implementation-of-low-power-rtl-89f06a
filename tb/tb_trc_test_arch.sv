// tb_trc_test_arch: plays the ATE against the test architecture and checks
// the R-TRC and scan chain contents after every symbol against a reference
// model: a driven bit shifts into the R-TRC; Hi-Z then 0 streams L_SC
// R-TRC output bits into the scan chain while the R-TRC rotates; Hi-Z then
// 1 does the same while the R-TRC twists (inverted feedback); TMS captures
// the core response. Also checks that each expansion holds ATE_SYNC low for
// exactly L_SC cycles.
module tb_trc_test_arch;
  import trc_pkg::*;
  localparam int unsigned L_TRC = 10;
  localparam int unsigned L_SC  = 16;
  logic clk = 1'b0;
  logic rst_n, tms, trst, tck, ate_sync, scan_so;
  code_t code;
  logic [L_SC-1:0]  core_pi, scan_q, ref_scan;
  logic [L_TRC-1:0] trc_q, ref_trc;
  int checks = 0, failures = 0;
  int sync_low;

  trc_test_arch #(.L_TRC(L_TRC), .L_SC(L_SC)) dut (
    .clk(clk), .rst_n(rst_n), .code(code), .tms(tms), .trst(trst), .tck(tck),
    .ate_sync(ate_sync), .core_pi(core_pi), .scan_q(scan_q), .scan_so(scan_so), .trc_q(trc_q));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (!ate_sync) sync_low++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    if (trc_q !== ref_trc || scan_q !== ref_scan || scan_so !== ref_scan[L_SC-1]) begin
      failures++;
      $display("%s: trc=%b (exp %b) scan=%h (exp %h)", what, trc_q, ref_trc, scan_q, ref_scan);
    end
  endtask

  initial begin
    rst_n = 1'b0; tms = 1'b0; trst = 1'b0; tck = 1'b0; code = CODE_HIZ;
    core_pi = L_SC'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    ref_trc = '0;
    send(0, 1'b1);           // capture defines the scan chain
    ref_scan = core_pi;
    compare("first capture");
    for (int i = 0; i < 80; i++) begin
      int kind;
      logic b;
      kind = $urandom_range(0, 5);
      b = $urandom_range(0, 1) == 1;
      case (kind)
        0, 1, 2: begin send(int'(b), 1'b0); ref_trc = {ref_trc[L_TRC-2:0], b}; compare("load"); end
        3: begin
          core_pi = L_SC'($urandom);
          send(0, 1'b1); ref_scan = core_pi; compare("capture");
        end
        default: begin
          send(2, 1'b0);
          send(int'(b), 1'b0);
          model_expand(b);
          compare(b ? "twist expansion" : "feedback expansion");
          checks++;
          if (sync_low != L_SC) begin
            failures++;
            $display("ATE_SYNC low for %0d cycles", sync_low);
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
