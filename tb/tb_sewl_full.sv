// Full-size testbench: sewl_top with all its default parameters (1024 MLC
// pages of 512 64-bit words, 40 additional SLC pages = 4 %, least-worn
// replacement) against the PCM model. Endurances are drawn around 1e5 writes
// with a 10 % standard deviation (sum of four uniform draws). The host
// writes mostly to a hot set of 48 pages (20 % of the writes go anywhere)
// until the SLC list is full and has replaced or rejected eight requests.
// MLC swaps every 16384 writes keep moving the hot pages, so the physical
// pages wear almost evenly and the first thresholds are reached only after
// several million writes. Afterwards every word of the memory is read back and compared
// with a shadow copy.
module tb_sewl_full;
  import sewl_pkg::*;

  localparam int unsigned NP = 1024, NS = 40, PWD = 512, WD = 64, HOT = 48;
  localparam int unsigned PW = $clog2(NP), AW = $clog2(NP + NS), WW = $clog2(PWD);

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

  function automatic logic [WD-1:0] iw(int unsigned p, int unsigned w);
    return {32'(p) ^ 32'h5A5A_0000, 32'(w) ^ 32'h0000_A5A5};
  endfunction

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [WD-1:0] shadow [NP][PWD];
  int unsigned   endur [NP];
  int n_report = 0, n_swap = 0, n_slcwr = 0, n_stall = 0;
  int n_dec [4] = '{0, 0, 0, 0};

  always @(posedge clk) begin
    if (ev_report) n_report++;
    if (ev_decision) n_dec[ev_kind]++;
    if (ev_swap) n_swap++;
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
    if (waited > 2) n_stall++;
    if (we && pcm_slc) n_slcwr++;
    rd = host_rdata;
    host_req = 0;
  endtask

  initial begin
    logic [WD-1:0] rd;
    bit done;
    int n;
    cfg_we = 0; cfg_page = '0; cfg_endurance = '0;
    host_req = 0; host_we = 0; host_lpage = '0; host_word = '0; host_wdata = '0;
    for (int p = 0; p < NP; p++)
      for (int w = 0; w < PWD; w++) shadow[p][w] = iw(p, w);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      int e;
      e = 100000 - 4 * 8660;
      repeat (4) e += $urandom % (2 * 8660 + 1);
      endur[p] = e;
      cfg_we = 1; cfg_page = PW'(p); cfg_endurance = END_W'(e);
      @(negedge clk);
    end
    cfg_we = 0;
    // skewed traffic until the SLC list is full and has replaced or rejected
    // eight times; the swaps spread the hot pages over the whole memory, so
    // this takes several million writes
    n = 0;
    do begin
      int unsigned lp;
      logic [WD-1:0] d;
      if ($urandom % 5 == 0) lp = $urandom % NP;
      else lp = $urandom % HOT;
      d = {$urandom, $urandom};
      access(1, lp, $urandom % PWD, d, rd);
      shadow[lp][host_word] = d;
      n++;
      if (n % 64 == 0) begin
        int unsigned lr;
        lr = $urandom % NP;
        access(0, lr, n % PWD, '0, rd);
        check(rd == shadow[lr][n % PWD], $sformatf("read page %0d word %0d", lr, n % PWD));
      end
      done = (n_dec[DEC_APPEND] == NS) && (n_dec[DEC_REPLACE] + n_dec[DEC_REJECT] >= 8);
    end while (!done && n < 12000000);
    $display("host writes=%0d reports=%0d append=%0d replace=%0d refresh=%0d reject=%0d slc_writes=%0d swaps=%0d stalls=%0d",
             n, n_report, n_dec[DEC_APPEND], n_dec[DEC_REPLACE], n_dec[DEC_REFRESH],
             n_dec[DEC_REJECT], n_slcwr, n_swap, n_stall);
    // read back everything
    for (int p = 0; p < NP; p++)
      for (int w = 0; w < PWD; w++) begin
        access(0, p, w, '0, rd);
        check(rd == shadow[p][w], $sformatf("final read page %0d word %0d", p, w));
      end
    check(u_pcm.err_cnt == 0, $sformatf("PCM model saw %0d mode/range errors", u_pcm.err_cnt));
    check(n_report >= HOT, "threshold reports");
    check(n_dec[DEC_APPEND] == NS, "SLC list filled");
    check(n_dec[DEC_REPLACE] + n_dec[DEC_REJECT] > 0, "full list: replace or reject");
    check(n_slcwr > 0, "writes to SLC pages");
    check(n_swap > 0, "MLC swaps");
    check(n_stall > 0, "host stalls");
    check(slc_count == 7'(NS), "SLC list full at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
