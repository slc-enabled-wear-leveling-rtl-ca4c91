// Self-checking testbench of slc_controller: one instance per replacement
// policy (FIFO, LRU, LW) receives the same random stream of requests and LRU
// touches. A reference list per policy, kept in the testbench, predicts each
// decision (refresh, append, replace with which victim, reject) and its slot;
// the decision latency of NUM_SLC + 1 cycles is checked too.
module tb_slc_controller;
  import sewl_pkg::*;

  localparam int unsigned NP = 32, NS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             req_valid, touch_valid;
  logic [4:0]       req_page;
  logic [WN_W-1:0]  req_wn;
  logic [END_W-1:0] req_endurance;
  logic [1:0]       touch_slot;

  logic       busy [3];
  logic       dec_valid [3];
  decision_e  dec_kind [3];
  logic [1:0] dec_slot [3];
  logic [4:0] dec_page [3], dec_victim [3];
  logic [2:0] slc_count [3];

  slc_controller #(.NUM_PAGES(NP), .NUM_SLC(NS), .POLICY(POL_FIFO)) u_fifo (
    .clk, .rst_n, .req_valid, .req_page, .req_wn, .req_endurance, .busy(busy[0]),
    .touch_valid, .touch_slot, .dec_valid(dec_valid[0]), .dec_kind(dec_kind[0]),
    .dec_slot(dec_slot[0]), .dec_page(dec_page[0]), .dec_victim(dec_victim[0]),
    .slc_count(slc_count[0]));
  slc_controller #(.NUM_PAGES(NP), .NUM_SLC(NS), .POLICY(POL_LRU)) u_lru (
    .clk, .rst_n, .req_valid, .req_page, .req_wn, .req_endurance, .busy(busy[1]),
    .touch_valid, .touch_slot, .dec_valid(dec_valid[1]), .dec_kind(dec_kind[1]),
    .dec_slot(dec_slot[1]), .dec_page(dec_page[1]), .dec_victim(dec_victim[1]),
    .slc_count(slc_count[1]));
  slc_controller #(.NUM_PAGES(NP), .NUM_SLC(NS), .POLICY(POL_LW)) u_lw (
    .clk, .rst_n, .req_valid, .req_page, .req_wn, .req_endurance, .busy(busy[2]),
    .touch_valid, .touch_slot, .dec_valid(dec_valid[2]), .dec_kind(dec_kind[2]),
    .dec_slot(dec_slot[2]), .dec_page(dec_page[2]), .dec_victim(dec_victim[2]),
    .slc_count(slc_count[2]));

  int checks = 0, failures = 0;
  int seen [3][4];   // decisions seen per policy and kind

  // reference lists
  bit          rv [3][NS];
  int unsigned rpg [3][NS], rst [3][NS], rwn [3][NS], ren [3][NS], rgs [3], rcnt [3];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit better(int k, int i, int m);
    if (k == 2) return longint'(rwn[k][i]) * ren[k][m] < longint'(rwn[k][m]) * ren[k][i];
    return rst[k][i] < rst[k][m];
  endfunction

  task automatic expect_dec(int k, int unsigned p, int unsigned wn, int unsigned en,
                            output decision_e kind, output int slot, output int unsigned victim);
    int hit = -1, fr = -1, mn = -1;
    for (int i = 0; i < NS; i++) begin
      if (rv[k][i]) begin
        if (rpg[k][i] == p && hit < 0) hit = i;
        if (mn < 0 || better(k, i, mn)) mn = i;
      end else if (fr < 0) fr = i;
    end
    victim = 0;
    if (hit >= 0) begin
      kind = DEC_REFRESH; slot = hit; rwn[k][hit] = wn; ren[k][hit] = en;
    end else if (fr >= 0) begin
      kind = DEC_APPEND; slot = fr; rv[k][fr] = 1; rpg[k][fr] = p; rwn[k][fr] = wn;
      ren[k][fr] = en; rst[k][fr] = rgs[k]++; rcnt[k]++;
    end else if (k == 2 && longint'(wn) * ren[k][mn] < longint'(rwn[k][mn]) * en) begin
      kind = DEC_REJECT; slot = mn;
    end else begin
      kind = DEC_REPLACE; slot = mn; victim = rpg[k][mn]; rpg[k][mn] = p;
      rwn[k][mn] = wn; ren[k][mn] = en; rst[k][mn] = rgs[k]++;
    end
  endtask

  initial begin
    req_valid = 0; touch_valid = 0; req_page = '0; req_wn = '0; req_endurance = '0;
    touch_slot = '0;
    for (int k = 0; k < 3; k++) begin
      rgs[k] = 0; rcnt[k] = 0;
      for (int i = 0; i < NS; i++) rv[k][i] = 0;
      for (int i = 0; i < 4; i++) seen[k][i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      int unsigned p, wn, en, victim;
      decision_e kind [3];
      int slot [3];
      int unsigned vic [3];
      int lat;
      // a few LRU touches of listed slots
      repeat ($urandom % 3) begin
        touch_valid = 1; touch_slot = 2'($urandom % NS);
        for (int k = 0; k < 3; k++)
          if (k == 1 && rv[k][touch_slot]) rst[k][touch_slot] = rgs[k]++;
        @(negedge clk);
        touch_valid = 0;
      end
      p  = $urandom % 10;
      wn = 1000 + $urandom % 50000;
      en = 80000 + $urandom % 40000;
      for (int k = 0; k < 3; k++) begin
        expect_dec(k, p, wn, en, kind[k], slot[k], victim);
        vic[k] = victim;
      end
      req_valid = 1; req_page = 5'(p); req_wn = wn; req_endurance = END_W'(en);
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!dec_valid[0]) begin @(negedge clk); lat++; end
      // request sampled at the first edge, decision NS + 1 edges later
      check(lat == NS + 2, $sformatf("decision after %0d cycles", lat));
      for (int k = 0; k < 3; k++) begin
        check(dec_valid[k], "all policies decide together");
        check(dec_kind[k] == kind[k], $sformatf("policy %0d request %0d: %s expected %s",
              k, n, dec_kind[k].name(), kind[k].name()));
        check(dec_page[k] == 5'(p), "decision page");
        if (kind[k] != DEC_REJECT) check(dec_slot[k] == 2'(slot[k]), $sformatf(
              "policy %0d request %0d slot %0d expected %0d", k, n, dec_slot[k], slot[k]));
        if (kind[k] == DEC_REPLACE) check(dec_victim[k] == 5'(vic[k]), $sformatf(
              "policy %0d victim %0d expected %0d", k, dec_victim[k], vic[k]));
        check(slc_count[k] == 3'(rcnt[k]), "slc_count");
        seen[k][dec_kind[k]]++;
      end
      @(negedge clk);
    end
    for (int k = 0; k < 3; k++) begin
      check(seen[k][DEC_APPEND] == NS, "every slot appended once");
      check(seen[k][DEC_REPLACE] > 10, $sformatf("policy %0d replaced %0d times", k, seen[k][DEC_REPLACE]));
      check(seen[k][DEC_REFRESH] > 10, "refreshes");
    end
    check(seen[2][DEC_REJECT] > 5, "LW rejects");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
