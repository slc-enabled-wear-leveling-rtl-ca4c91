// Evaluation testbench: the nine configurations of the scheme's study - FIFO,
// LRU and least-worn replacement, each with 2 %, 4 % and 8 % additional SLC
// pages - run side by side on the same synthetic skewed trace of one million
// writes over 730 of 1024 pages (see sewl_wl_env). Each configuration must
// fill its SLC list, return the data written and make no PCM mode errors.
// Across SLC percentages, the least-worn configuration with 8 % must serve at
// least as large a share of writes in SLC mode as the one with 2 %. The table
// printed at the end gives, per configuration, the share of writes served in
// SLC mode and the worst MLC wear of any cell. A tenth run with every
// threshold at the full endurance is the swap-only reference the scheme is
// measured against; it must use no SLC page, and each configuration's worst
// wear is printed as a ratio to it (reference / configuration, above 1.00
// meaning the configuration wears its worst cell less). The ratio is reported,
// not checked: it is a measurement on a synthetic trace, not a correctness rule.
module tb_sewl_policies;
  import sewl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic        fin   [10];
  int          chk   [10], fl [10];
  int unsigned share [10], worst [10];

  for (genvar g = 0; g < 9; g++) begin : g_cfg
    localparam policy_e     POL = (g / 3 == 0) ? POL_FIFO : (g / 3 == 1) ? POL_LRU : POL_LW;
    localparam int unsigned PCT = (g % 3 == 0) ? 2 : (g % 3 == 1) ? 4 : 8;
    sewl_wl_env #(.POLICY(POL), .SLC_PCT(PCT)) u_env (
      .clk, .rst_n, .finished(fin[g]), .checks(chk[g]), .failures(fl[g]),
      .slc_share_pct(share[g]), .worst_mlc(worst[g]));
  end

  sewl_wl_env #(.POLICY(POL_LW), .SLC_PCT(2), .THR_SHIFT(0)) u_ref (
    .clk, .rst_n, .finished(fin[9]), .checks(chk[9]), .failures(fl[9]),
    .slc_share_pct(share[9]), .worst_mlc(worst[9]));

  int checks, failures;

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int g = 0; g < 10; g++) if (!fin[g]) all_done = 0;
    end while (!all_done);
    checks = 0; failures = 0;
    for (int g = 0; g < 10; g++) begin checks += chk[g]; failures += fl[g]; end
    for (int g = 0; g < 9; g++)
      $display("%-8s %0d%% SLC: reference worst wear / this worst wear = %0d.%02d",
               (g / 3 == 0) ? "POL_FIFO" : (g / 3 == 1) ? "POL_LRU" : "POL_LW",
               (g % 3 == 0) ? 2 : (g % 3 == 1) ? 4 : 8,
               worst[9] / worst[g], (worst[9] * 100 / worst[g]) % 100);
    checks++;
    if (share[8] < share[6]) begin
      failures++;
      $display("FAIL: LW with 8 %% SLC serves fewer writes in SLC mode (%0d%%) than with 2 %% (%0d%%)",
               share[8], share[6]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
