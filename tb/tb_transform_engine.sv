// Self-checking testbench of transform_engine against the PCM model: spreads
// a page into SLC mode, compresses it back and swaps two pages, then checks
// every word and its programming mode in the model, the number of PCM
// accesses per operation and the absence of protocol or mode errors.
module tb_transform_engine;
  import sewl_pkg::*;

  localparam int unsigned NP = 8, NS = 2, PWD = 8, WD = 64;
  localparam int unsigned AW = $clog2(NP + NS), WW = $clog2(PWD);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          op_valid, op_ready, done;
  xop_e          op;
  logic [2:0]    op_pa, op_pb;
  logic [0:0]    op_slot;
  logic          m_req, m_we, m_slc, m_ack;
  logic [AW-1:0] m_page;
  logic [WW-1:0] m_word;
  logic [WD-1:0] m_wdata, m_rdata;

  int checks = 0, failures = 0;

  transform_engine #(.NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD), .WORD_W(WD)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op, .op_pa, .op_pb, .op_slot, .done,
    .m_req, .m_we, .m_slc, .m_page, .m_word, .m_wdata, .m_ack, .m_rdata);

  pcm_model #(.NUM_PAGES(NP), .NUM_SLC(NS), .PAGE_WORDS(PWD), .WORD_W(WD)) u_pcm (
    .clk, .req(m_req), .we(m_we), .slc(m_slc), .page(m_page), .word(m_word),
    .wdata(m_wdata), .ack(m_ack), .rdata(m_rdata));

  function automatic logic [WD-1:0] iw(int unsigned p, int unsigned w);
    return {32'(p) ^ 32'h5A5A_0000, 32'(w) ^ 32'h0000_A5A5};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_word(int unsigned p, int unsigned w, logic [WD-1:0] d, bit slc);
    check(u_pcm.mem[p * PWD + w] == d,
          $sformatf("page %0d word %0d = %h, expected %h", p, w, u_pcm.mem[p * PWD + w], d));
    check(u_pcm.wslc[p * PWD + w] == slc, $sformatf("page %0d word %0d mode", p, w));
  endtask

  task automatic run(xop_e o, int unsigned a, int unsigned b, int unsigned s,
                     int unsigned exp_acc);
    int unsigned acc0;
    acc0 = u_pcm.accesses;
    check(op_ready, "engine ready before operation");
    @(negedge clk);
    op_valid = 1'b1; op = o; op_pa = 3'(a); op_pb = 3'(b); op_slot = 1'(s);
    @(negedge clk);
    op_valid = 1'b0;
    check(!op_ready, "engine busy after accept");
    while (!done) @(negedge clk);
    check(u_pcm.accesses - acc0 == exp_acc,
          $sformatf("%s made %0d accesses, expected %0d", o.name(), u_pcm.accesses - acc0, exp_acc));
    @(negedge clk);
  endtask

  initial begin
    op_valid = 1'b0; op = OP_TO_SLC; op_pa = '0; op_pb = '0; op_slot = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // MLC -> SLC: page 3 into additional page 1 (physical 9)
    run(OP_TO_SLC, 3, 0, 1, 2 * PWD);
    for (int w = 0; w < PWD / 2; w++) begin
      expect_word(3, w, iw(3, w), 1'b1);
      expect_word(NP + 1, w, iw(3, w + PWD / 2), 1'b1);
    end
    // SLC -> MLC
    run(OP_TO_MLC, 3, 0, 1, 2 * PWD);
    for (int w = 0; w < PWD; w++) expect_word(3, w, iw(3, w), 1'b0);
    // spread into slot 0, then swap two other MLC pages
    run(OP_TO_SLC, 6, 0, 0, 2 * PWD);
    for (int w = 0; w < PWD / 2; w++) expect_word(NP, w, iw(6, w + PWD / 2), 1'b1);
    run(OP_SWAP, 2, 5, 0, 4 * PWD);
    for (int w = 0; w < PWD; w++) begin
      expect_word(2, w, iw(5, w), 1'b0);
      expect_word(5, w, iw(2, w), 1'b0);
    end
    run(OP_TO_MLC, 6, 0, 0, 2 * PWD);
    for (int w = 0; w < PWD; w++) expect_word(6, w, iw(6, w), 1'b0);
    check(u_pcm.err_cnt == 0, "PCM model saw no mode or range errors");

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
