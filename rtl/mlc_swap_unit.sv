// MLC swap unit: balances wear among the pages that stay in MLC mode by
// swapping the most and the least worn of them once per interval.
//
// Host writes are counted; after every INTERVAL writes the unit scans all
// physical pages one per cycle through the tracker's and the remapper's read
// ports, skipping pages in SLC mode. It keeps the page with the largest wear
// rate (total writes / endurance, the hot page) and the one with the smallest
// (the cold page). If the hot page's wear rate exceeds the cold page's by
// more than the factor (16 + DISC_Q4) / 16, it offers the pair for a swap,
// holding swap_valid until swap_ready.
//
// The scheme takes this swapping from wear-rate leveling: a fixed interval of
// writes, wear rates per page, and swaps only where the wear-rate discrepancy
// exceeds a preset threshold. This design's own choices: one pair per
// interval, no prediction of the next interval's writes, the discrepancy as a
// ratio, and wear rates compared by cross multiplication instead of division.
//
// Timing: a scan waits for `go` (the top grants it when no SLC transformation
// is pending) and takes NUM_PAGES cycles plus two; busy covers the time from
// the end of the interval until the offer is taken or dropped.
module mlc_swap_unit
  import sewl_pkg::*;
#(
  parameter int unsigned NUM_PAGES = 1024,
  parameter int unsigned INTERVAL  = 16384,
  parameter int unsigned DISC_Q4   = 8,
  localparam int unsigned PW       = $clog2(NUM_PAGES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  input  logic             go,
  output logic             busy,
  // page scan
  output logic [PW-1:0]    scan_page,
  input  logic [WN_W-1:0]  scan_writes,
  input  logic [END_W-1:0] scan_endurance,
  input  logic             scan_slc,
  // swap offer: pa is the hot page, pb the cold page
  output logic             swap_valid,
  input  logic             swap_ready,
  output logic [PW-1:0]    swap_pa,
  output logic [PW-1:0]    swap_pb
);

  localparam int unsigned MW = WN_W + END_W + 6;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DECIDE, S_OFFER} state_e;
  state_e state;

  logic [$clog2(INTERVAL+1)-1:0] wcnt;
  logic                          pending;
  logic                          have;
  logic [WN_W-1:0]               hot_wn, cold_wn;
  logic [END_W-1:0]              hot_end, cold_end;

  // scan_writes / scan_endurance compared with the hot and cold records
  logic hotter, colder, disc_ok;
  assign hotter  = (MW'(scan_writes) * MW'(hot_end))  > (MW'(hot_wn)  * MW'(scan_endurance));
  assign colder  = (MW'(scan_writes) * MW'(cold_end)) < (MW'(cold_wn) * MW'(scan_endurance));
  assign disc_ok = (MW'(hot_wn) * MW'(cold_end) * MW'(16)) >
                   (MW'(cold_wn) * MW'(hot_end) * MW'(16 + DISC_Q4));

  assign busy       = pending || (state != S_IDLE);
  assign swap_valid = (state == S_OFFER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wcnt      <= '0;
      pending   <= 1'b0;
      have      <= 1'b0;
      scan_page <= '0;
      hot_wn    <= '0;
      cold_wn   <= '0;
      hot_end   <= '0;
      cold_end  <= '0;
      swap_pa   <= '0;
      swap_pb   <= '0;
    end else begin
      if (wr_valid) begin
        if (wcnt == ($bits(wcnt))'(INTERVAL - 1)) begin
          wcnt    <= '0;
          pending <= 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (pending && go) begin
            pending   <= 1'b0;
            have      <= 1'b0;
            scan_page <= '0;
            state     <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (!scan_slc) begin
            if (!have || hotter) begin
              hot_wn  <= scan_writes;
              hot_end <= scan_endurance;
              swap_pa <= scan_page;
            end
            if (!have || colder) begin
              cold_wn  <= scan_writes;
              cold_end <= scan_endurance;
              swap_pb  <= scan_page;
            end
            have <= 1'b1;
          end
          if (scan_page == PW'(NUM_PAGES - 1)) state <= S_DECIDE;
          else                                 scan_page <= scan_page + 1'b1;
        end
        S_DECIDE: begin
          if (have && swap_pa != swap_pb && disc_ok) state <= S_OFFER;
          else                                       state <= S_IDLE;
        end
        S_OFFER: begin
          if (swap_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
