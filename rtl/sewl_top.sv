// SLC-enabled wear leveling (SEWL) controller for an MLC phase-change memory.
//
// Sits between a host and a PCM made of NUM_PAGES MLC pages plus NUM_SLC
// additional pages that always run in SLC mode (NUM_SLC defaults to
// SLC_PCT percent of NUM_PAGES). Hot or weak pages are moved into SLC mode,
// which survives about a thousand times more writes, while the remaining MLC
// pages are balanced by swapping:
//   threshold_tracker - per page write counter and endurance-based dynamic
//                       threshold; reports pages that reach it;
//   slc_controller    - SLC list with FIFO, LRU or least-worn replacement;
//   transform_engine  - spreads a page into SLC mode over itself and an
//                       additional page, compresses it back, swaps pages;
//   addr_remap        - page map and SLC links, translates host accesses;
//   mlc_swap_unit     - periodic hot/cold swap among the MLC pages.
//
// Operation: before use, every page's endurance (from post-fabrication test)
// is loaded on cfg_*. A host access (host_req held with stable fields until
// host_ack) is translated and sent to the PCM port; the host's data is the
// PCM's. A host write is counted by the tracker; if it reaches the page's
// threshold the controller decides, and an APPEND runs TO_SLC on the page
// while a REPLACE first runs TO_MLC on the victim and then TO_SLC on the
// requester in the freed additional page. Every INTERVAL host writes the swap
// unit may swap the hottest and coldest MLC pages. While any of this is under
// way host requests wait (host_stall). Only host writes count toward
// thresholds and intervals; rewrites by the engine do not.
//
// PCM port: pcm_req and fields stable until pcm_ack (one-cycle pulse, with
// pcm_rdata for reads). pcm_slc selects SLC programming; pcm_page counts
// regular pages first, then the additional pages.
//
// The structure (dynamic thresholds, SLC list and policies, additional SLC
// memory with links, swapping of the remaining MLC pages) follows the scheme.
// Sizes other than the 4 % SLC share, the port protocol, the stalling of the
// host and the order of operations are this design's choices. An assertion
// checks that the sequencer never offers the engine a second operation; lint
// reports its use of rst_n as synchronous, while all flops reset
// asynchronously.
module sewl_top
  import sewl_pkg::*;
#(
  parameter int unsigned NUM_PAGES     = 1024,
  parameter int unsigned SLC_PCT       = 4,
  parameter int unsigned NUM_SLC       = NUM_PAGES * SLC_PCT / 100,
  parameter int unsigned PAGE_WORDS    = 512,
  parameter int unsigned WORD_W        = 64,
  parameter policy_e     POLICY        = POL_LW,
  parameter int unsigned THR_SHIFT     = 6,
  parameter int unsigned DELTA         = 512,
  parameter int unsigned SWAP_INTERVAL = 16384,
  parameter int unsigned SWAP_DISC_Q4  = 8,
  localparam int unsigned PW           = $clog2(NUM_PAGES),
  localparam int unsigned SW           = (NUM_SLC > 1) ? $clog2(NUM_SLC) : 1,
  localparam int unsigned AW           = $clog2(NUM_PAGES + NUM_SLC),
  localparam int unsigned WW           = $clog2(PAGE_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // endurance load
  input  logic              cfg_we,
  input  logic [PW-1:0]     cfg_page,
  input  logic [END_W-1:0]  cfg_endurance,
  // host port
  input  logic              host_req,
  input  logic              host_we,
  input  logic [PW-1:0]     host_lpage,
  input  logic [WW-1:0]     host_word,
  input  logic [WORD_W-1:0] host_wdata,
  output logic              host_ack,
  output logic [WORD_W-1:0] host_rdata,
  output logic              host_stall,
  // PCM port
  output logic              pcm_req,
  output logic              pcm_we,
  output logic              pcm_slc,
  output logic [AW-1:0]     pcm_page,
  output logic [WW-1:0]     pcm_word,
  output logic [WORD_W-1:0] pcm_wdata,
  input  logic              pcm_ack,
  input  logic [WORD_W-1:0] pcm_rdata,
  // status
  output logic              ev_report,
  output logic              ev_decision,
  output decision_e         ev_kind,
  output logic              ev_swap,
  output logic [SW:0]       slc_count
);

  typedef enum logic [3:0] {
    T_IDLE, T_HOST, T_POST,
    T_EV_START, T_EV_WAIT, T_AD_START, T_AD_WAIT,
    T_SW_START, T_SW_WAIT
  } tstate_e;
  tstate_e state;

  // ---- translation ----
  logic [PW-1:0] tr_ppage;
  logic          tr_slc;
  logic [SW-1:0] tr_slot;
  logic [AW-1:0] tr_page;
  logic [WW-1:0] tr_word;

  // ---- tracker ----
  logic             trk_wr;
  logic             rep_valid;
  logic [PW-1:0]    rep_page;
  logic [WN_W-1:0]  rep_wn;
  logic [END_W-1:0] rep_end;
  logic [PW-1:0]    scan_page;
  logic [WN_W-1:0]  scan_writes;
  logic [END_W-1:0] scan_end;
  logic             scan_slc;

  // ---- controller ----
  logic          ctrl_busy, dec_valid;
  decision_e     dec_kind;
  logic [SW-1:0] dec_slot;
  logic [PW-1:0] dec_page, dec_victim;
  logic          touch;

  // ---- pending transformation ----
  logic          d_pend;
  decision_e     d_kind;
  logic [SW-1:0] d_slot;
  logic [PW-1:0] d_page, d_victim;

  // ---- swap unit ----
  logic          sw_busy, sw_go, sw_valid, sw_ready;
  logic [PW-1:0] sw_pa, sw_pb, s_pa, s_pb;

  // ---- engine ----
  logic              op_valid, op_ready, op_done;
  xop_e              op;
  logic [PW-1:0]     op_pa, op_pb;
  logic [SW-1:0]     op_slot;
  logic              m_req, m_we, m_slc;
  logic [AW-1:0]     m_page;
  logic [WW-1:0]     m_word;
  logic [WORD_W-1:0] m_wdata;

  // ---- remap updates ----
  logic set_slc, clr_slc, do_swap;
  logic [PW-1:0] upd_page;

  logic remap_init;
  logic maint;
  assign maint = ctrl_busy || dec_valid || d_pend || sw_busy || remap_init;

  addr_remap #(
    .NUM_PAGES(NUM_PAGES), .NUM_SLC(NUM_SLC), .PAGE_WORDS(PAGE_WORDS)
  ) u_remap (
    .clk, .rst_n,
    .lpage(host_lpage), .word(host_word),
    .ppage(tr_ppage), .in_slc(tr_slc), .slot(tr_slot),
    .phys_page(tr_page), .phys_word(tr_word),
    .set_slc, .clr_slc, .upd_page, .upd_slot(d_slot),
    .swap(do_swap), .swap_pa(s_pa), .swap_pb(s_pb),
    .scan_page, .scan_slc, .init_busy(remap_init)
  );

  threshold_tracker #(
    .NUM_PAGES(NUM_PAGES), .THR_SHIFT(THR_SHIFT), .DELTA(DELTA)
  ) u_trk (
    .clk, .rst_n,
    .cfg_we, .cfg_page, .cfg_endurance,
    .wr_valid(trk_wr), .wr_page(tr_ppage),
    .rep_valid, .rep_page, .rep_wn, .rep_endurance(rep_end),
    .scan_page, .scan_writes, .scan_endurance(scan_end)
  );

  slc_controller #(
    .NUM_PAGES(NUM_PAGES), .NUM_SLC(NUM_SLC), .POLICY(POLICY)
  ) u_ctrl (
    .clk, .rst_n,
    .req_valid(rep_valid), .req_page(rep_page), .req_wn(rep_wn),
    .req_endurance(rep_end), .busy(ctrl_busy),
    .touch_valid(touch), .touch_slot(tr_slot),
    .dec_valid, .dec_kind, .dec_slot, .dec_page, .dec_victim,
    .slc_count
  );

  mlc_swap_unit #(
    .NUM_PAGES(NUM_PAGES), .INTERVAL(SWAP_INTERVAL), .DISC_Q4(SWAP_DISC_Q4)
  ) u_swap (
    .clk, .rst_n,
    .wr_valid(trk_wr), .go(sw_go), .busy(sw_busy),
    .scan_page, .scan_writes, .scan_endurance(scan_end), .scan_slc,
    .swap_valid(sw_valid), .swap_ready(sw_ready),
    .swap_pa(sw_pa), .swap_pb(sw_pb)
  );

  transform_engine #(
    .NUM_PAGES(NUM_PAGES), .NUM_SLC(NUM_SLC),
    .PAGE_WORDS(PAGE_WORDS), .WORD_W(WORD_W)
  ) u_eng (
    .clk, .rst_n,
    .op_valid, .op_ready, .op, .op_pa, .op_pb, .op_slot, .done(op_done),
    .m_req, .m_we, .m_slc, .m_page, .m_word, .m_wdata,
    .m_ack(pcm_ack), .m_rdata(pcm_rdata)
  );

  // ---- sequencing ----
  assign sw_go    = (state == T_IDLE) && !ctrl_busy && !dec_valid && !d_pend && !remap_init;
  assign sw_ready = (state == T_SW_START);
  assign trk_wr   = (state == T_HOST) && pcm_ack && host_we;
  assign touch    = trk_wr && tr_slc;
  assign host_ack = (state == T_HOST) && pcm_ack;
  assign host_rdata = pcm_rdata;
  assign host_stall = host_req && (state != T_HOST);

  always_comb begin
    op_valid = 1'b0;
    op       = OP_TO_SLC;
    op_pa    = d_page;
    op_pb    = sw_pb;
    op_slot  = d_slot;
    unique case (state)
      T_EV_START: begin op_valid = 1'b1; op = OP_TO_MLC; op_pa = d_victim; end
      T_AD_START: begin op_valid = 1'b1; op = OP_TO_SLC; op_pa = d_page;   end
      T_SW_START: begin op_valid = 1'b1; op = OP_SWAP;   op_pa = sw_pa;    end
      default: ;
    endcase
  end

  // The sequencer starts an operation only when the engine is idle.
  a_engine_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  op_valid |-> op_ready);

  assign clr_slc  = (state == T_EV_WAIT) && op_done;
  assign set_slc  = (state == T_AD_WAIT) && op_done;
  assign do_swap  = (state == T_SW_WAIT) && op_done;
  assign upd_page = (state == T_EV_WAIT) ? d_victim : d_page;

  // PCM port: host path in T_HOST, engine otherwise
  always_comb begin
    if (state == T_HOST) begin
      pcm_req   = 1'b1;
      pcm_we    = host_we;
      pcm_slc   = tr_slc;
      pcm_page  = tr_page;
      pcm_word  = tr_word;
      pcm_wdata = host_wdata;
    end else begin
      pcm_req   = m_req;
      pcm_we    = m_we;
      pcm_slc   = m_slc;
      pcm_page  = m_page;
      pcm_word  = m_word;
      pcm_wdata = m_wdata;
    end
  end

  assign ev_report   = rep_valid;
  assign ev_decision = dec_valid;
  assign ev_kind     = dec_kind;
  assign ev_swap     = do_swap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      d_pend   <= 1'b0;
      d_kind   <= DEC_REJECT;
      d_slot   <= '0;
      d_page   <= '0;
      d_victim <= '0;
      s_pa     <= '0;
      s_pb     <= '0;
    end else begin
      if (dec_valid && (dec_kind == DEC_APPEND || dec_kind == DEC_REPLACE)) begin
        d_pend   <= 1'b1;
        d_kind   <= dec_kind;
        d_slot   <= dec_slot;
        d_page   <= dec_page;
        d_victim <= dec_victim;
      end
      unique case (state)
        T_IDLE: begin
          if (d_pend) begin
            state <= (d_kind == DEC_REPLACE) ? T_EV_START : T_AD_START;
          end else if (sw_valid) begin
            state <= T_SW_START;
          end else if (host_req && !maint) begin
            state <= T_HOST;
          end
        end
        T_HOST:     if (pcm_ack) state <= T_POST;
        T_POST:     state <= T_IDLE;
        T_EV_START: state <= T_EV_WAIT;
        T_EV_WAIT:  if (op_done) state <= T_AD_START;
        T_AD_START: state <= T_AD_WAIT;
        T_AD_WAIT: begin
          if (op_done) begin
            d_pend <= 1'b0;
            state  <= T_IDLE;
          end
        end
        T_SW_START: begin
          s_pa  <= sw_pa;
          s_pb  <= sw_pb;
          state <= T_SW_WAIT;
        end
        T_SW_WAIT:  if (op_done) state <= T_IDLE;
        default:    state <= T_IDLE;
      endcase
    end
  end

endmodule
