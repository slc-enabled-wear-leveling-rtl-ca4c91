// Transform engine: rewrites page contents when a page changes mode or two
// MLC pages are swapped, through the single PCM access port.
//
// MLC -> SLC (OP_TO_SLC, page p, additional page H): the whole MLC page is
// read into a page buffer, then its lower half is written back into p as SLC
// and its upper half into H as SLC - the contents are spread over p and H.
// SLC -> MLC (OP_TO_MLC): both SLC halves are read into the buffer and the
// page is written back into p in MLC format - the contents are compressed
// and H is free again. OP_SWAP exchanges two MLC pages a and b: a is read
// into the buffer, each word of b is copied into a, then the buffer is
// written into b.
//
// The spread/compress operations and the use of one additional page per SLC
// page follow the scheme; reading through a full page buffer before any
// rewrite (so no word is lost whatever the cell layout), the half split and
// the swap order are this design's choices.
//
// Every operation is at most three segments of word accesses; a segment
// reads or writes `count` consecutive words. PCM port handshake: m_req and
// the fields stay stable until m_ack, which pulses for one cycle and carries
// m_rdata for reads; a new request may follow in the next cycle. An operation
// is accepted when op_valid and op_ready are high; done pulses one cycle
// after the last access is acknowledged. TO_SLC and TO_MLC each make
// 2 * PAGE_WORDS accesses (reads plus writes), SWAP makes 4 * PAGE_WORDS.
module transform_engine
  import sewl_pkg::*;
#(
  parameter int unsigned NUM_PAGES  = 1024,
  parameter int unsigned NUM_SLC    = 40,
  parameter int unsigned PAGE_WORDS = 512,
  parameter int unsigned WORD_W     = 64,
  localparam int unsigned PW        = $clog2(NUM_PAGES),
  localparam int unsigned SW        = (NUM_SLC > 1) ? $clog2(NUM_SLC) : 1,
  localparam int unsigned AW        = $clog2(NUM_PAGES + NUM_SLC),
  localparam int unsigned WW        = $clog2(PAGE_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // operation
  input  logic              op_valid,
  output logic              op_ready,
  input  xop_e              op,
  input  logic [PW-1:0]     op_pa,
  input  logic [PW-1:0]     op_pb,
  input  logic [SW-1:0]     op_slot,
  output logic              done,
  // PCM port
  output logic              m_req,
  output logic              m_we,
  output logic              m_slc,
  output logic [AW-1:0]     m_page,
  output logic [WW-1:0]     m_word,
  output logic [WORD_W-1:0] m_wdata,
  input  logic              m_ack,
  input  logic [WORD_W-1:0] m_rdata
);

  localparam int unsigned HALF = PAGE_WORDS / 2;

  typedef struct packed {
    logic          rd;     // read into buffer (else write from buffer)
    logic          copy;   // read page2, write page (SWAP middle segment)
    logic [AW-1:0] page;
    logic [AW-1:0] page2;
    logic          slc;
    logic [WW:0]   count;
    logic [WW-1:0] boff;   // buffer offset
  } seg_t;

  xop_e          r_op;
  logic [AW-1:0] r_pa, r_pb, r_h;
  logic [1:0]    s;
  logic [WW:0]   w;
  logic          sub;      // copy segment: 0 = reading, 1 = writing
  logic          running;
  logic [WORD_W-1:0] tmp;
  logic [WORD_W-1:0] pbuf [PAGE_WORDS];

  seg_t seg;
  always_comb begin
    seg = '0;
    unique case (r_op)
      OP_TO_SLC: unique case (s)
        2'd0:    seg = '{rd: 1'b1, copy: 1'b0, page: r_pa, page2: r_pa, slc: 1'b0,
                         count: (WW+1)'(PAGE_WORDS), boff: '0};
        2'd1:    seg = '{rd: 1'b0, copy: 1'b0, page: r_pa, page2: r_pa, slc: 1'b1,
                         count: (WW+1)'(HALF), boff: '0};
        default: seg = '{rd: 1'b0, copy: 1'b0, page: r_h, page2: r_h, slc: 1'b1,
                         count: (WW+1)'(HALF), boff: WW'(HALF)};
      endcase
      OP_TO_MLC: unique case (s)
        2'd0:    seg = '{rd: 1'b1, copy: 1'b0, page: r_pa, page2: r_pa, slc: 1'b1,
                         count: (WW+1)'(HALF), boff: '0};
        2'd1:    seg = '{rd: 1'b1, copy: 1'b0, page: r_h, page2: r_h, slc: 1'b1,
                         count: (WW+1)'(HALF), boff: WW'(HALF)};
        default: seg = '{rd: 1'b0, copy: 1'b0, page: r_pa, page2: r_pa, slc: 1'b0,
                         count: (WW+1)'(PAGE_WORDS), boff: '0};
      endcase
      default: unique case (s)
        2'd0:    seg = '{rd: 1'b1, copy: 1'b0, page: r_pa, page2: r_pa, slc: 1'b0,
                         count: (WW+1)'(PAGE_WORDS), boff: '0};
        2'd1:    seg = '{rd: 1'b0, copy: 1'b1, page: r_pa, page2: r_pb, slc: 1'b0,
                         count: (WW+1)'(PAGE_WORDS), boff: '0};
        default: seg = '{rd: 1'b0, copy: 1'b0, page: r_pb, page2: r_pb, slc: 1'b0,
                         count: (WW+1)'(PAGE_WORDS), boff: '0};
      endcase
    endcase
  end

  logic [WW-1:0] bidx;
  assign bidx = seg.boff + WW'(w);

  assign op_ready = !running;

  // An operation offered while one is running would be lost.
  a_op_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                    op_valid |-> op_ready);
  // The PCM request holds its fields until acknowledged.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (m_req && !m_ack) |=> (m_req && $stable(m_page) &&
                                 $stable(m_word) && $stable(m_we) && $stable(m_slc)));
  assign m_req    = running;
  assign m_we     = seg.copy ? sub : !seg.rd;
  assign m_slc    = seg.slc;
  assign m_page   = (seg.copy && !sub) ? seg.page2 : seg.page;
  assign m_word   = WW'(w);
  assign m_wdata  = seg.copy ? tmp : pbuf[bidx];

  logic last_word;
  assign last_word = (w == seg.count - 1'b1) && (!seg.copy || sub);

  always_ff @(posedge clk) begin
    if (running && m_ack && seg.rd) pbuf[bidx] <= m_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      r_op    <= OP_TO_SLC;
      r_pa    <= '0;
      r_pb    <= '0;
      r_h     <= '0;
      s       <= '0;
      w       <= '0;
      sub     <= 1'b0;
      tmp     <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (op_valid) begin
          running <= 1'b1;
          r_op    <= op;
          r_pa    <= AW'(op_pa);
          r_pb    <= AW'(op_pb);
          r_h     <= AW'(NUM_PAGES) + AW'(op_slot);
          s       <= '0;
          w       <= '0;
          sub     <= 1'b0;
        end
      end else if (m_ack) begin
        if (seg.copy && !sub) begin
          tmp <= m_rdata;
          sub <= 1'b1;
        end else begin
          sub <= 1'b0;
          if (last_word) begin
            w <= '0;
            if (s == 2'd2) begin
              running <= 1'b0;
              done    <= 1'b1;
            end else begin
              s <= s + 1'b1;
            end
          end else begin
            w <= w + 1'b1;
          end
        end
      end
    end
  end

endmodule
