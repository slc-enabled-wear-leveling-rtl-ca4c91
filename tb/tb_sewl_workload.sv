// Workload testbench: sewl_top at its default parameters under a synthetic
// write trace shaped like a small embedded benchmark - one million writes
// over 730 pages, per-page counts from 1 to 27124, ten pages above 15000.
// Page quotas: the ten hot pages get 27124 - 1200 * i writes, the other 720
// pages a linearly falling share of the rest; each write picks a page at
// random with probability proportional to its quota. The testbench counts
// how many host writes were served in SLC mode and checks that the worst
// MLC wear of any physical page, counting the rewrites of transformations
// and swaps, stays below the hottest page's write count (the wear that page
// would see in a plain MLC memory), that the hot pages were
// moved into SLC mode, and that sampled reads return the written data.
module tb_sewl_workload;
  import sewl_pkg::*;

  localparam int unsigned NP = 1024, NS = 40, PWD = 512, WD = 64;
  localparam int unsigned PW = $clog2(NP), AW = $clog2(NP + NS), WW = $clog2(PWD);
  localparam int unsigned USED = 730, HOTP = 10, WRITES = 1000000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic             cfg_we;
  logic [PW-1:0]    cfg_page;
  logic [END_W-1:0] cfg_endurance;
  logic             host_req, host_we, host_ack, host_stall;
  logic [PW-1:0]    host_lpage;
  logic [WW-1:0]    host_word;
  logic [WD-1:0]    host_wdata, host_rdata;
  logic             pcm_req, pcm_we, pcm_slc, pcm_ack;
  logic [AW-1:0]    pcm_page;
  logic [WW-1:0]    pcm_word;
  logic [WD-1:0]    pcm_wdata, pcm_rdata;
  logic             ev_report, ev_decision, ev_swap;
  decision_e        ev_kind;
  logic [6:0]       slc_count;

  sewl_top dut (.*);

  pcm_model #(.NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD), .WORD_W(WD)) u_pcm (
    .clk, .req(pcm_req), .we(pcm_we), .slc(pcm_slc), .page(pcm_page), .word(pcm_word),
    .wdata(pcm_wdata), .ack(pcm_ack), .rdata(pcm_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned cum [USED];
  int unsigned total;
  int n_report = 0, n_swap = 0, n_slcwr = 0, n_hot_slc = 0;
  int n_dec [4] = '{0, 0, 0, 0};
  logic [WD-1:0] last_d [HOTP];
  logic [WW-1:0] last_w [HOTP];

  always @(posedge clk) begin
    if (ev_report) n_report++;
    if (ev_decision) n_dec[ev_kind]++;
    if (ev_swap) n_swap++;
  end

  task automatic access(bit we, int unsigned lp, int unsigned w, logic [WD-1:0] d,
                        output logic [WD-1:0] rd);
    host_req = 1; host_we = we; host_lpage = PW'(lp); host_word = WW'(w); host_wdata = d;
    do @(negedge clk); while (!host_ack);
    if (we && pcm_slc) n_slcwr++;
    rd = host_rdata;
    host_req = 0;
  endtask

  initial begin
    logic [WD-1:0] rd;
    int unsigned max_mlc;
    cfg_we = 0; cfg_page = '0; cfg_endurance = '0;
    host_req = 0; host_we = 0; host_lpage = '0; host_word = '0; host_wdata = '0;
    // quota table
    total = 0;
    for (int p = 0; p < USED; p++) begin
      int unsigned q;
      if (p < HOTP) q = 27124 - 1200 * p;
      else q = 1 + (783000 * 2 * (USED - 1 - p)) / ((USED - HOTP) * (USED - HOTP - 1));
      total += q;
      cum[p] = total;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      int e;
      e = 100000 - 4 * 8660;
      repeat (4) e += $urandom % (2 * 8660 + 1);
      cfg_we = 1; cfg_page = PW'(p); cfg_endurance = END_W'(e);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int n = 0; n < WRITES; n++) begin
      int unsigned r, lo, hi;
      logic [WD-1:0] d;
      r = $urandom % total;
      lo = 0; hi = USED - 1;
      while (lo < hi) begin
        int unsigned mid;
        mid = (lo + hi) / 2;
        if (cum[mid] > r) hi = mid; else lo = mid + 1;
      end
      d = {$urandom, $urandom};
      access(1, lo, n % PWD, d, rd);
      if (lo < HOTP) begin
        last_d[lo] = d; last_w[lo] = WW'(n % PWD);
      end
    end
    for (int h = 0; h < HOTP; h++) begin
      access(0, h, last_w[h], '0, rd);
      check(rd == last_d[h], $sformatf("hot page %0d last write read back", h));
      if (dut.u_remap.slc_v[dut.u_remap.l2p[h]]) n_hot_slc++;
    end
    max_mlc = 0;
    for (int p = 0; p < NP; p++)
      if (u_pcm.mlc_writes[p] > max_mlc) max_mlc = u_pcm.mlc_writes[p];
    $display("writes=%0d (quota total %0d) reports=%0d append=%0d replace=%0d refresh=%0d reject=%0d swaps=%0d",
             WRITES, total, n_report, n_dec[DEC_APPEND], n_dec[DEC_REPLACE], n_dec[DEC_REFRESH],
             n_dec[DEC_REJECT], n_swap);
    $display("host writes served in SLC mode: %0d (%0d %%); worst MLC writes on one page: %0d; hot pages in SLC at the end: %0d of %0d",
             n_slcwr, n_slcwr * 100 / WRITES, max_mlc, n_hot_slc, HOTP);
    check(total > 990000 && total < 1010000, "trace of about one million writes");
    check(n_dec[DEC_APPEND] > 0, "pages moved into SLC mode");
    check(n_slcwr > WRITES / 10, "a tenth or more of the writes served in SLC mode");
    // without the scheme the hottest page alone would take 27124 MLC writes
    check(max_mlc < 27124, "worst MLC wear below the hottest page's write count");
    check(n_hot_slc >= HOTP / 2, "most hot pages in SLC mode at the end");
    check(u_pcm.err_cnt == 0, "no PCM mode or range errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
