// Self-checking testbench of threshold_tracker: loads endurances, drives
// random writes over a few pages and compares every report (page, write
// number, endurance, one cycle after the threshold-reaching write) and the
// scan port with a reference model of counters and growing thresholds kept
// in the testbench.
module tb_threshold_tracker;
  import sewl_pkg::*;

  localparam int unsigned NP = 8, SH = 2, DL = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             cfg_we, wr_valid, rep_valid;
  logic [2:0]       cfg_page, wr_page, rep_page, scan_page;
  logic [END_W-1:0] cfg_endurance, rep_endurance, scan_endurance;
  logic [WN_W-1:0]  rep_wn, scan_writes;

  threshold_tracker #(.NUM_PAGES(NP), .THR_SHIFT(SH), .DELTA(DL)) dut (.*);

  int checks = 0, failures = 0, reports = 0;
  int unsigned e_end [NP], e_thr [NP], e_cnt [NP], e_wn [NP];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cfg_we = 0; wr_valid = 0; cfg_page = '0; wr_page = '0; cfg_endurance = '0; scan_page = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // endurances 20..55: thresholds 5..13
    for (int p = 0; p < NP; p++) begin
      e_end[p] = 20 + 5 * p; e_thr[p] = e_end[p] >> SH; e_cnt[p] = 0; e_wn[p] = 0;
      cfg_we = 1; cfg_page = 3'(p); cfg_endurance = END_W'(e_end[p]);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int i = 0; i < 600; i++) begin
      int unsigned p;
      bit exp_rep;
      p = (i % 3 == 0) ? ($urandom % NP) : ($urandom % 2);   // pages 0, 1 are hot
      wr_valid = 1; wr_page = 3'(p);
      e_cnt[p]++;
      exp_rep = (e_cnt[p] >= e_thr[p]);
      if (exp_rep) begin
        e_cnt[p] = 0; e_wn[p] += e_thr[p]; e_thr[p] += DL;
      end
      @(negedge clk);
      wr_valid = 0;
      check(rep_valid == exp_rep, $sformatf("write %0d page %0d: report %0b expected %0b",
                                            i, p, rep_valid, exp_rep));
      if (exp_rep && rep_valid) begin
        reports++;
        check(rep_page == 3'(p), "report page");
        check(rep_wn == e_wn[p], $sformatf("write number %0d expected %0d", rep_wn, e_wn[p]));
        check(rep_endurance == END_W'(e_end[p]), "report endurance");
      end
      if ($urandom % 4 == 0) @(negedge clk);   // idle gap: no report
      scan_page = 3'($urandom % NP);
      #1;
      check(scan_writes == e_wn[scan_page] + e_cnt[scan_page], "scan write total");
      check(scan_endurance == END_W'(e_end[scan_page]), "scan endurance");
    end
    check(reports > 20, $sformatf("only %0d reports", reports));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
