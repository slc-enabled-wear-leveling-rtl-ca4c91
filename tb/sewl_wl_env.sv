// Workload environment: one sewl_top (1024 pages, 4 KB pages) with a given
// replacement policy and SLC percentage, a PCM model, and a driver that
// replays a synthetic skewed trace: WRITES writes over 730 pages, each write
// picking a page with probability proportional to its weight. The weights
// follow the shape of a small embedded benchmark: the ten hot pages weigh
// 27124 - 1200 * i, the other 720 pages a linearly falling share of the
// remaining ~783000, so one million writes give the hot pages 16 000 to
// 27 000 writes each. At the end it reports the share of writes served in
// SLC mode and the worst MLC wear of any cell: the most MLC writes to one
// word of a physical page, divided by that page's endurance, in parts per
// million. Lifetime ends when the first cell reaches its endurance, so it is
// inversely proportional to this figure. It checks the last write of every
// hot page, that the SLC list filled (or, with THR_SHIFT 0, stayed empty),
// and that the PCM saw no mode errors.
module sewl_wl_env
  import sewl_pkg::*;
#(
  parameter policy_e     POLICY  = POL_LW,
  parameter int unsigned SLC_PCT = 4,
  parameter int unsigned WRITES  = 1000000,
  // 0 sets every threshold to the full endurance, so no page reaches it:
  // the scheme then reduces to MLC swapping alone, the reference design.
  parameter int unsigned THR_SHIFT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int          checks,
  output int          failures,
  output int unsigned slc_share_pct,
  output int unsigned worst_mlc
);

  localparam int unsigned NP = 1024, NS = NP * SLC_PCT / 100, PWD = 512, WD = 64;
  localparam int unsigned PW = $clog2(NP), AW = $clog2(NP + NS), WW = $clog2(PWD);
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned USED = 730, HOTP = 10;

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
  logic [SW:0]      slc_count;

  sewl_top #(.SLC_PCT(SLC_PCT), .POLICY(POLICY), .THR_SHIFT(THR_SHIFT)) dut (.*);

  pcm_model #(.NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD), .WORD_W(WD)) u_pcm (
    .clk, .req(pcm_req), .we(pcm_we), .slc(pcm_slc), .page(pcm_page), .word(pcm_word),
    .wdata(pcm_wdata), .ack(pcm_ack), .rdata(pcm_rdata));

  int unsigned endur [NP];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s %0d%%]: %s", POLICY.name(), SLC_PCT, what);
    end
  endtask

  int unsigned cum [USED];
  int unsigned total;
  int n_slcwr;
  int n_dec [4];
  logic [WD-1:0] last_d [HOTP];
  logic [WW-1:0] last_w [HOTP];
  bit            hot_written [HOTP];

  always @(posedge clk) if (ev_decision) n_dec[ev_kind]++;

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
    finished = 0; checks = 0; failures = 0; slc_share_pct = 0; worst_mlc = 0;
    n_slcwr = 0;
    for (int k = 0; k < 4; k++) n_dec[k] = 0;
    for (int h = 0; h < HOTP; h++) hot_written[h] = 0;
    cfg_we = 0; cfg_page = '0; cfg_endurance = '0;
    host_req = 0; host_we = 0; host_lpage = '0; host_word = '0; host_wdata = '0;
    total = 0;
    for (int p = 0; p < USED; p++) begin
      int unsigned q;
      if (p < HOTP) q = 27124 - 1200 * p;
      else q = 1 + (783000 * 2 * (USED - 1 - p)) / ((USED - HOTP) * (USED - HOTP - 1));
      total += q;
      cum[p] = total;
    end
    @(posedge rst_n);
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      int e;
      e = 100000 - 4 * 8660;
      repeat (4) e += $urandom % (2 * 8660 + 1);
      cfg_we = 1; cfg_page = PW'(p); cfg_endurance = END_W'(e);
      endur[p] = e;
      @(negedge clk);
    end
    cfg_we = 0;
    for (int n = 0; n < WRITES; n++) begin
      int unsigned r, lo, hi, mid;
      logic [WD-1:0] d;
      r = $urandom % total;
      lo = 0; hi = USED - 1;
      while (lo < hi) begin
        mid = (lo + hi) / 2;
        if (cum[mid] > r) hi = mid; else lo = mid + 1;
      end
      d = {$urandom, $urandom};
      access(1, lo, n % PWD, d, rd);
      if (lo < HOTP) begin
        last_d[lo] = d; last_w[lo] = WW'(n % PWD); hot_written[lo] = 1;
      end
    end
    for (int h = 0; h < HOTP; h++)
      if (hot_written[h]) begin
        access(0, h, int'(last_w[h]), '0, rd);
        check(rd == last_d[h], $sformatf("hot page %0d read back", h));
      end
    for (int p = 0; p < NP; p++)
      if (u_pcm.mlc_cell_max[p] * 1000000 / endur[p] > worst_mlc)
        worst_mlc = u_pcm.mlc_cell_max[p] * 1000000 / endur[p];
    slc_share_pct = n_slcwr * 100 / WRITES;
    if (THR_SHIFT > 0)
      check(n_dec[DEC_APPEND] == NS, $sformatf("SLC list filled (%0d of %0d)", n_dec[DEC_APPEND], NS));
    else
      check(n_dec[DEC_APPEND] + n_slcwr == 0, "swap-only reference uses no SLC page");
    check(u_pcm.err_cnt == 0, "no PCM mode or range errors");
    if (THR_SHIFT == 0)
      $display("swap-only reference (no page reaches its threshold): worst MLC cell wear %0d ppm of endurance", worst_mlc);
    else
    $display("%-8s %2d%% SLC (%2d pages): append=%0d replace=%0d refresh=%0d reject=%0d, writes in SLC mode %0d%%, worst MLC cell wear %0d ppm of endurance",
             POLICY.name(), SLC_PCT, NS, n_dec[DEC_APPEND], n_dec[DEC_REPLACE], n_dec[DEC_REFRESH],
             n_dec[DEC_REJECT], slc_share_pct, worst_mlc);
    finished = 1;
  end

endmodule
