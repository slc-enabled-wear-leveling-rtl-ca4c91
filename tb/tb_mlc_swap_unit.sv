// Self-checking testbench of mlc_swap_unit: after each interval of writes the
// testbench sets random write totals, endurances and SLC flags, lets the unit
// scan, and compares the offered hot/cold pair (or the absence of an offer
// when the wear rates are within the discrepancy factor) with its own search.
// It also checks that nothing starts before the interval ends or without go,
// and the scan time of NUM_PAGES + 2 cycles.
module tb_mlc_swap_unit;
  import sewl_pkg::*;

  localparam int unsigned NP = 16, IV = 8, DQ = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             wr_valid, go, busy, scan_slc, swap_valid, swap_ready;
  logic [3:0]       scan_page, swap_pa, swap_pb;
  logic [WN_W-1:0]  scan_writes;
  logic [END_W-1:0] scan_endurance;

  mlc_swap_unit #(.NUM_PAGES(NP), .INTERVAL(IV), .DISC_Q4(DQ)) dut (.*);

  int unsigned wr [NP], en [NP];
  bit          sl [NP];
  always_comb begin
    scan_writes    = wr[scan_page];
    scan_endurance = END_W'(en[scan_page]);
    scan_slc       = sl[scan_page];
  end

  int checks = 0, failures = 0, swaps = 0, noswaps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wr_valid = 0; go = 0; swap_ready = 0;
    for (int p = 0; p < NP; p++) begin wr[p] = 0; en[p] = 100; sl[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      int hot, cold, lat;
      bit exp;
      hot = -1; cold = -1;
      // new wear picture; some rounds nearly uniform
      for (int p = 0; p < NP; p++) begin
        en[p] = 90000 + $urandom % 20000;
        wr[p] = (r % 4 == 3) ? en[p] / 10 + $urandom % 100 : $urandom % 100000;
        sl[p] = ($urandom % 5 == 0);
        if (!sl[p]) begin
          if (hot < 0 || longint'(wr[p]) * en[hot] > longint'(wr[hot]) * en[p]) hot = p;
          if (cold < 0 || longint'(wr[p]) * en[cold] < longint'(wr[cold]) * en[p]) cold = p;
        end
      end
      exp = hot >= 0 && hot != cold &&
            longint'(wr[hot]) * en[cold] * 16 > longint'(wr[cold]) * en[hot] * (16 + DQ);
      // IV - 1 writes: nothing yet
      go = 1;
      repeat (IV - 1) begin wr_valid = 1; @(negedge clk); end
      wr_valid = 0;
      @(negedge clk);
      check(!busy, "idle before the interval ends");
      go = 0;
      wr_valid = 1; @(negedge clk); wr_valid = 0;
      repeat (3) @(negedge clk);
      check(busy && !swap_valid, "interval ended: waiting for go");
      go = 1;
      lat = 0;
      while (busy && !swap_valid) begin @(negedge clk); lat++; end
      check(lat == NP + 2, $sformatf("scan took %0d cycles", lat));
      if (exp) begin
        check(swap_valid, $sformatf("round %0d: swap expected", r));
        check(swap_pa == 4'(hot) && swap_pb == 4'(cold), $sformatf(
              "round %0d: pair %0d/%0d expected %0d/%0d", r, swap_pa, swap_pb, hot, cold));
        repeat (2) @(negedge clk);
        check(swap_valid, "offer held until taken");
        swap_ready = 1; @(negedge clk); swap_ready = 0;
        check(!swap_valid && !busy, "offer taken");
        swaps++;
      end else begin
        check(!swap_valid, $sformatf("round %0d: no swap expected", r));
        noswaps++;
      end
    end
    check(swaps > 5 && noswaps > 5, $sformatf("%0d swaps, %0d without", swaps, noswaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
