// Dynamic threshold tracker: one write counter and one threshold per physical
// page of the MLC memory.
//
// Each page's first threshold is proportional to its endurance, which is
// measured after fabrication and loaded through the cfg port: weak pages get
// low thresholds and ask for SLC mode sooner. Every host write to a page
// increments its counter. When the counter reaches the threshold the page
// reports to the SLC controller, its counter restarts from zero and its
// threshold grows by one level (DELTA). The tracker also accumulates the sum
// of all thresholds reached so far, T0 + T1 + ... + Tn, which is the page's
// write number used by the least-worn policy, and reports it with the page.
//
// Following the scheme: per-page counters, endurance-proportional first
// threshold, clear-and-augment on every report whether or not the page is then
// transformed, write number as the sum of thresholds. This design's choices:
// the ratio endurance >> THR_SHIFT for the first threshold, a fixed DELTA, and
// a second asynchronous read port (scan_*) giving the total writes of a page
// for the MLC swap unit.
//
// Timing: a write on wr_valid is counted in the same clock edge; a report
// (rep_valid, one cycle) appears in the cycle after the write that reached the
// threshold. cfg_we has priority over wr_valid in the same cycle. A page must
// be configured before it is written; nothing else initialises the tables.
module threshold_tracker
  import sewl_pkg::*;
#(
  parameter int unsigned NUM_PAGES = 1024,
  parameter int unsigned THR_SHIFT = 6,
  parameter int unsigned DELTA     = 512,
  localparam int unsigned PW       = $clog2(NUM_PAGES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // endurance load
  input  logic             cfg_we,
  input  logic [PW-1:0]    cfg_page,
  input  logic [END_W-1:0] cfg_endurance,
  // host writes, by physical page
  input  logic             wr_valid,
  input  logic [PW-1:0]    wr_page,
  // threshold-reached report to the SLC controller
  output logic             rep_valid,
  output logic [PW-1:0]    rep_page,
  output logic [WN_W-1:0]  rep_wn,
  output logic [END_W-1:0] rep_endurance,
  // read port for the swap unit
  input  logic [PW-1:0]    scan_page,
  output logic [WN_W-1:0]  scan_writes,
  output logic [END_W-1:0] scan_endurance
);

  logic [END_W-1:0] endurance [NUM_PAGES];
  logic [WN_W-1:0]  thr       [NUM_PAGES];
  logic [WN_W-1:0]  cnt       [NUM_PAGES];
  logic [WN_W-1:0]  wn        [NUM_PAGES];

  logic [WN_W-1:0] cnt_inc;
  logic            hit;

  assign cnt_inc = cnt[wr_page] + 1'b1;
  assign hit     = (cnt_inc >= thr[wr_page]);

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      endurance[cfg_page] <= cfg_endurance;
      thr[cfg_page]       <= WN_W'(cfg_endurance >> THR_SHIFT);
      cnt[cfg_page]       <= '0;
      wn[cfg_page]        <= '0;
    end else if (wr_valid) begin
      if (hit) begin
        cnt[wr_page] <= '0;
        wn[wr_page]  <= wn[wr_page] + thr[wr_page];
        thr[wr_page] <= thr[wr_page] + WN_W'(DELTA);
      end else begin
        cnt[wr_page] <= cnt_inc;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_valid     <= 1'b0;
      rep_page      <= '0;
      rep_wn        <= '0;
      rep_endurance <= '0;
    end else begin
      rep_valid <= wr_valid && !cfg_we && hit;
      if (wr_valid && !cfg_we && hit) begin
        rep_page      <= wr_page;
        rep_wn        <= wn[wr_page] + thr[wr_page];
        rep_endurance <= endurance[wr_page];
      end
    end
  end

  assign scan_writes    = wn[scan_page] + cnt[scan_page];
  assign scan_endurance = endurance[scan_page];

endmodule
