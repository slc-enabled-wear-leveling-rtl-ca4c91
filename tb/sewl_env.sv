// Test environment for sewl_top at reduced size: the controller, a PCM model
// and a host driver with a shadow copy of the memory. The driver issues
// N_OPS random reads and writes, skewed towards a hot set of pages that moves
// every 1000 operations, checks every read against the shadow copy, and at
// the end reads back every word of every page. It counts how often each
// mechanism of the controller happened (threshold reports, SLC appends,
// replacements, refreshes, LW rejections, SLC writes, swaps, host stalls)
// and counts a failure for each that never did. `finished` rises when the
// environment is done; checks and failures are then final.
module sewl_env
  import sewl_pkg::*;
#(
  parameter policy_e     POLICY = POL_LW,
  parameter int unsigned N_OPS  = 4000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned NP = 16, NS = 2, PWD = 8, WD = 64;
  localparam int unsigned PW = $clog2(NP), AW = $clog2(NP + NS), WW = $clog2(PWD);

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
  logic [1:0]       slc_count;

  sewl_top #(
    .NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD), .WORD_W(WD), .POLICY(POLICY),
    .THR_SHIFT(2), .DELTA(4), .SWAP_INTERVAL(64), .SWAP_DISC_Q4(8)
  ) dut (.*);

  pcm_model #(.NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD), .WORD_W(WD)) u_pcm (
    .clk, .req(pcm_req), .we(pcm_we), .slc(pcm_slc), .page(pcm_page), .word(pcm_word),
    .wdata(pcm_wdata), .ack(pcm_ack), .rdata(pcm_rdata));

  function automatic logic [WD-1:0] iw(int unsigned p, int unsigned w);
    return {32'(p) ^ 32'h5A5A_0000, 32'(w) ^ 32'h0000_A5A5};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s]: %s", POLICY.name(), what);
    end
  endtask

  logic [WD-1:0] shadow [NP][PWD];
  int n_report = 0, n_swap = 0, n_stall = 0, n_slcwr = 0;
  int n_dec [4] = '{0, 0, 0, 0};

  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_report) n_report++;
      if (ev_decision) n_dec[ev_kind]++;
      if (ev_swap) n_swap++;
    end
  end

  task automatic access(bit we, int unsigned lp, int unsigned w, logic [WD-1:0] d,
                        output logic [WD-1:0] rd);
    int waited;
    waited = 0;
    host_req = 1; host_we = we; host_lpage = PW'(lp); host_word = WW'(w); host_wdata = d;
    do begin
      @(negedge clk);
      if (host_stall) waited++;
    end while (!host_ack);
    // more than the two cycles between back-to-back accesses: held off by maintenance
    if (waited > 2) n_stall++;
    if (we && pcm_slc) n_slcwr++;
    rd = host_rdata;
    host_req = 0;
  endtask

  initial begin
    logic [WD-1:0] rd;
    finished = 0; checks = 0; failures = 0;
    cfg_we = 0; cfg_page = '0; cfg_endurance = '0;
    host_req = 0; host_we = 0; host_lpage = '0; host_word = '0; host_wdata = '0;
    for (int p = 0; p < NP; p++)
      for (int w = 0; w < PWD; w++) shadow[p][w] = iw(p, w);
    @(posedge rst_n);
    @(negedge clk);
    // endurance 90..110 (scaled-down MLC endurance with 10 % spread)
    for (int p = 0; p < NP; p++) begin
      cfg_we = 1; cfg_page = PW'(p); cfg_endurance = END_W'(90 + $urandom % 21);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int n = 0; n < N_OPS; n++) begin
      int unsigned lp, w;
      bit we;
      lp = ($urandom % 2) ? ((n / 1000) * 3 + $urandom % 3) % NP : $urandom % NP;
      w  = $urandom % PWD;
      we = ($urandom % 10) < 7;
      if (we) begin
        logic [WD-1:0] d;
        d = {$urandom, $urandom};
        access(1, lp, w, d, rd);
        shadow[lp][w] = d;
      end else begin
        access(0, lp, w, '0, rd);
        check(rd == shadow[lp][w], $sformatf("op %0d read page %0d word %0d: %h expected %h",
                                             n, lp, w, rd, shadow[lp][w]));
      end
    end
    for (int p = 0; p < NP; p++)
      for (int w = 0; w < PWD; w++) begin
        access(0, p, w, '0, rd);
        check(rd == shadow[p][w], $sformatf("final read page %0d word %0d", p, w));
      end
    check(u_pcm.err_cnt == 0, $sformatf("PCM model saw %0d mode/range errors", u_pcm.err_cnt));
    $display("[%s] reports=%0d append=%0d replace=%0d refresh=%0d reject=%0d slc_writes=%0d swaps=%0d stalls=%0d",
             POLICY.name(), n_report, n_dec[DEC_APPEND], n_dec[DEC_REPLACE], n_dec[DEC_REFRESH],
             n_dec[DEC_REJECT], n_slcwr, n_swap, n_stall);
    check(n_report > 0, "threshold reports happened");
    check(n_dec[DEC_APPEND] == NS, "every SLC slot was filled once");
    check(n_dec[DEC_REPLACE] > 0, "SLC replacements happened");
    check(n_dec[DEC_REFRESH] > 0, "refreshes of SLC pages happened");
    if (POLICY == POL_LW) check(n_dec[DEC_REJECT] > 0, "LW rejections happened");
    else check(n_dec[DEC_REJECT] == 0, "FIFO and LRU never reject");
    check(n_slcwr > 0, "writes to SLC pages happened");
    check(n_swap > 0, "MLC swaps happened");
    check(n_stall > 0, "host stalls happened");
    check(slc_count == 2'(NS), "SLC list full");
    finished = 1;
  end

endmodule
