// SLC controller: keeps the SLC list, the bounded set of physical pages that
// currently run in SLC mode, and decides what happens to each transformation
// request coming from the threshold tracker.
//
// The list has NUM_SLC slots, one per page of additional memory. A request
// from a page already in the list only refreshes its record. Otherwise a free
// slot is given to the requester at once. When the list is full the
// replacement policy picks a victim, which goes back to MLC mode while the
// requester takes its slot:
//   FIFO - the page that entered the list first;
//   LRU  - the page written least recently (every host write to an SLC page
//          is signalled on touch_* and moves that page to the front);
//   LW   - the page with the smallest wear rate writeNumber / endurance, where
//          writeNumber is the sum of the thresholds the page has reached.
// Under LW the requester is rejected instead if its own wear rate is smaller
// than that of every listed page: this rejection rule, the stamp counters that
// order FIFO and LRU, and the comparison of wear rates by cross
// multiplication (wn_a * end_b < wn_b * end_a, no divider) are this design's
// choices; the three policies and the list itself follow the scheme.
//
// Timing: a request is taken when busy is low. The list is then scanned one
// slot per cycle, and dec_valid pulses NUM_SLC + 1 cycles after the request
// with the decision; the list is already updated in that cycle. Ties among
// equal wear rates go to the lowest slot. A request while busy is a protocol
// error, flagged by an assertion (rst_n therefore also appears in a
// synchronous context, which lint reports; the flops reset asynchronously).
module slc_controller
  import sewl_pkg::*;
#(
  parameter int unsigned NUM_PAGES = 1024,
  parameter int unsigned NUM_SLC   = 40,
  parameter policy_e     POLICY    = POL_LW,
  localparam int unsigned PW       = $clog2(NUM_PAGES),
  localparam int unsigned SW       = (NUM_SLC > 1) ? $clog2(NUM_SLC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // transformation request (threshold reached)
  input  logic             req_valid,
  input  logic [PW-1:0]    req_page,
  input  logic [WN_W-1:0]  req_wn,
  input  logic [END_W-1:0] req_endurance,
  output logic             busy,
  // host write to an SLC page (LRU bookkeeping)
  input  logic             touch_valid,
  input  logic [SW-1:0]    touch_slot,
  // decision
  output logic             dec_valid,
  output decision_e        dec_kind,
  output logic [SW-1:0]    dec_slot,
  output logic [PW-1:0]    dec_page,
  output logic [PW-1:0]    dec_victim,
  output logic [SW:0]      slc_count
);

  localparam int unsigned MW = WN_W + END_W;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DECIDE} state_e;
  state_e state;

  logic             v     [NUM_SLC];
  logic [PW-1:0]    pg    [NUM_SLC];
  logic [WN_W-1:0]  stamp [NUM_SLC];
  logic [WN_W-1:0]  wn    [NUM_SLC];
  logic [END_W-1:0] en    [NUM_SLC];

  logic [WN_W-1:0]  gstamp;
  logic [SW-1:0]    idx;
  // latched request
  logic [PW-1:0]    r_page;
  logic [WN_W-1:0]  r_wn;
  logic [END_W-1:0] r_end;
  // scan results
  logic             hit, free_found, have_min;
  logic [SW-1:0]    hit_slot, free_slot, min_slot;
  logic [WN_W-1:0]  min_stamp, min_wn;
  logic [END_W-1:0] min_end;

  // is slot idx less worn / older than the best so far?
  logic idx_better;
  always_comb begin
    if (!have_min) begin
      idx_better = 1'b1;
    end else if (POLICY == POL_LW) begin
      idx_better = (MW'(wn[idx]) * MW'(min_end)) < (MW'(min_wn) * MW'(en[idx]));
    end else begin
      idx_better = stamp[idx] < min_stamp;
    end
  end

  logic req_least_worn;
  assign req_least_worn = (MW'(r_wn) * MW'(min_end)) < (MW'(min_wn) * MW'(r_end));

  assign busy = (state != S_IDLE);

  // A request arriving during a scan would be lost.
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    req_valid |-> !busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      gstamp     <= '0;
      idx        <= '0;
      r_page     <= '0;
      r_wn       <= '0;
      r_end      <= '0;
      hit        <= 1'b0;
      free_found <= 1'b0;
      have_min   <= 1'b0;
      hit_slot   <= '0;
      free_slot  <= '0;
      min_slot   <= '0;
      min_stamp  <= '0;
      min_wn     <= '0;
      min_end    <= '0;
      dec_valid  <= 1'b0;
      dec_kind   <= DEC_REJECT;
      dec_slot   <= '0;
      dec_page   <= '0;
      dec_victim <= '0;
      slc_count  <= '0;
      for (int i = 0; i < NUM_SLC; i++) begin
        v[i]     <= 1'b0;
        pg[i]    <= '0;
        stamp[i] <= '0;
        wn[i]    <= '0;
        en[i]    <= '0;
      end
    end else begin
      dec_valid <= 1'b0;

      if (POLICY == POL_LRU && touch_valid && v[touch_slot]) begin
        stamp[touch_slot] <= gstamp;
        gstamp            <= gstamp + 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            r_page     <= req_page;
            r_wn       <= req_wn;
            r_end      <= req_endurance;
            idx        <= '0;
            hit        <= 1'b0;
            free_found <= 1'b0;
            have_min   <= 1'b0;
            state      <= S_SCAN;
          end
        end

        S_SCAN: begin
          if (v[idx]) begin
            if (pg[idx] == r_page && !hit) begin
              hit      <= 1'b1;
              hit_slot <= idx;
            end
            if (idx_better) begin
              have_min  <= 1'b1;
              min_slot  <= idx;
              min_stamp <= stamp[idx];
              min_wn    <= wn[idx];
              min_end   <= en[idx];
            end
          end else if (!free_found) begin
            free_found <= 1'b1;
            free_slot  <= idx;
          end
          if (idx == SW'(NUM_SLC - 1)) state <= S_DECIDE;
          else                         idx   <= idx + 1'b1;
        end

        S_DECIDE: begin
          dec_valid <= 1'b1;
          dec_page  <= r_page;
          state     <= S_IDLE;
          if (hit) begin
            dec_kind     <= DEC_REFRESH;
            dec_slot     <= hit_slot;
            wn[hit_slot] <= r_wn;
            en[hit_slot] <= r_end;
          end else if (free_found) begin
            dec_kind         <= DEC_APPEND;
            dec_slot         <= free_slot;
            v[free_slot]     <= 1'b1;
            pg[free_slot]    <= r_page;
            wn[free_slot]    <= r_wn;
            en[free_slot]    <= r_end;
            stamp[free_slot] <= gstamp;
            gstamp           <= gstamp + 1'b1;
            slc_count        <= slc_count + 1'b1;
          end else if (POLICY == POL_LW && req_least_worn) begin
            dec_kind <= DEC_REJECT;
            dec_slot <= min_slot;
          end else begin
            dec_kind        <= DEC_REPLACE;
            dec_slot        <= min_slot;
            dec_victim      <= pg[min_slot];
            pg[min_slot]    <= r_page;
            wn[min_slot]    <= r_wn;
            en[min_slot]    <= r_end;
            stamp[min_slot] <= gstamp;
            gstamp          <= gstamp + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
