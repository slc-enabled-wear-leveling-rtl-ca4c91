// End-to-end testbench of sewl_top at reduced size (16 pages, 2 SLC pages,
// 8-word pages, small thresholds and swap interval): one environment per
// replacement policy runs random host traffic against a PCM model and checks
// all data read back, the absence of mode errors in the PCM, and that every
// mechanism of the controller happened.
module tb_sewl_top;
  import sewl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge

  logic fin [3];
  int   chk [3], fl [3];

  sewl_env #(.POLICY(POL_FIFO)) e_fifo (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  sewl_env #(.POLICY(POL_LRU))  e_lru  (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  sewl_env #(.POLICY(POL_LW))   e_lw   (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2]);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end
endmodule
