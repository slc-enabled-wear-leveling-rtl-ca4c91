// Self-checking testbench of addr_remap: random sequences of SLC set/clear
// and page swaps, each followed by a check of the translation of every
// (logical page, word) pair and of the scan port against a reference map
// kept in the testbench.
module tb_addr_remap;
  localparam int unsigned NP = 8, NS = 2, PWD = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] lpage, ppage, upd_page, swap_pa, swap_pb, scan_page;
  logic [2:0] word, phys_word;
  logic       in_slc, set_slc, clr_slc, swap, scan_slc, init_busy;
  logic [0:0] slot, upd_slot;
  logic [3:0] phys_page;

  addr_remap #(.NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD)) dut (.*);

  int checks = 0, failures = 0, n_set = 0, n_clr = 0, n_swap = 0;
  int unsigned l2p [NP], p2l [NP], sl [NP];
  bit          sv [NP];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_all();
    for (int l = 0; l < NP; l++)
      for (int w = 0; w < PWD; w++) begin
        int unsigned p, ep, ew;
        lpage = 3'(l); word = 3'(w);
        #1;
        p = l2p[l];
        if (sv[p] && w >= PWD / 2) begin ep = NP + sl[p]; ew = w - PWD / 2; end
        else begin ep = p; ew = w; end
        check(ppage == 3'(p) && in_slc == sv[p] && phys_page == 4'(ep) && phys_word == 3'(ew),
              $sformatf("l%0d w%0d -> p%0d/%0d:%0d slc %0b, expected p%0d/%0d:%0d slc %0b",
                        l, w, ppage, phys_page, phys_word, in_slc, p, ep, ew, sv[p]));
        if (sv[p]) check(slot == 1'(sl[p]), "slot");
      end
    for (int p = 0; p < NP; p++) begin
      scan_page = 3'(p);
      #1;
      check(scan_slc == sv[p], "scan port");
    end
  endtask

  initial begin
    set_slc = 0; clr_slc = 0; swap = 0; upd_page = '0; upd_slot = '0; swap_pa = '0;
    swap_pb = '0; lpage = '0; word = '0; scan_page = '0;
    for (int i = 0; i < NP; i++) begin l2p[i] = i; p2l[i] = i; sv[i] = 0; sl[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(init_busy, "tables loading after reset");
    repeat (NP - 1) @(negedge clk);
    check(!init_busy, "tables loaded after NUM_PAGES cycles");
    check_all();
    for (int n = 0; n < 200; n++) begin
      int unsigned a, b, k;
      a = $urandom % NP; b = $urandom % NP; k = $urandom % 3;
      @(negedge clk);
      if (k == 0 && !sv[a]) begin
        set_slc = 1; upd_page = 3'(a); upd_slot = 1'($urandom % NS);
        sv[a] = 1; sl[a] = upd_slot; n_set++;
      end else if (k == 1 && sv[a]) begin
        clr_slc = 1; upd_page = 3'(a); sv[a] = 0; n_clr++;
      end else if (k == 2 && !sv[a] && !sv[b] && a != b) begin
        int unsigned la, lb;
        swap = 1; swap_pa = 3'(a); swap_pb = 3'(b);
        la = p2l[a]; lb = p2l[b];
        l2p[la] = b; l2p[lb] = a; p2l[a] = lb; p2l[b] = la; n_swap++;
      end
      @(negedge clk);
      set_slc = 0; clr_slc = 0; swap = 0;
      check_all();
    end
    check(n_set > 5 && n_clr > 5 && n_swap > 5, "all update kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
