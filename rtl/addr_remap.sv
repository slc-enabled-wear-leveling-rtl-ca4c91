// Address remapper: translates a host access (logical page, word) into the
// physical location and programming mode the PCM must use.
//
// Two tables are kept. The page map (logical <-> physical, both directions)
// is changed only by swaps among MLC pages. The mode table says, per physical
// page, whether it runs in SLC mode and which additional page holds the
// other half of its contents; this is the link each additional SLC page keeps
// to its original page. A page in SLC mode keeps words 0 .. PAGE_WORDS/2-1 in
// its own cells and words PAGE_WORDS/2 .. PAGE_WORDS-1 in additional page
// `slot`, both programmed as SLC. Additional page k has physical index
// NUM_PAGES + k.
//
// The scheme gives the split of a page over itself and one additional page
// and the link; the table layout, the lower/upper half split and the indexing
// of the additional pages are this design's choices.
//
// Timing: translation and the scan read port are combinational. Updates
// (set_slc, clr_slc, swap) take effect at the next clock edge; at most one
// may be asserted per cycle, and none while init_busy is high: after reset
// the tables are loaded with the identity map and every page in MLC mode, one
// entry per cycle, so that they can be built as RAM.
module addr_remap #(
  parameter int unsigned NUM_PAGES  = 1024,
  parameter int unsigned NUM_SLC    = 40,
  parameter int unsigned PAGE_WORDS = 512,
  localparam int unsigned PW        = $clog2(NUM_PAGES),
  localparam int unsigned SW        = (NUM_SLC > 1) ? $clog2(NUM_SLC) : 1,
  localparam int unsigned AW        = $clog2(NUM_PAGES + NUM_SLC),
  localparam int unsigned WW        = $clog2(PAGE_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // translation
  input  logic [PW-1:0] lpage,
  input  logic [WW-1:0] word,
  output logic [PW-1:0] ppage,      // physical page that owns the data
  output logic          in_slc,     // ppage runs in SLC mode
  output logic [SW-1:0] slot,       // its additional page, when in_slc
  output logic [AW-1:0] phys_page,  // page actually accessed
  output logic [WW-1:0] phys_word,
  // updates
  input  logic          set_slc,
  input  logic          clr_slc,
  input  logic [PW-1:0] upd_page,
  input  logic [SW-1:0] upd_slot,
  input  logic          swap,
  input  logic [PW-1:0] swap_pa,
  input  logic [PW-1:0] swap_pb,
  // mode read port for the swap unit
  input  logic [PW-1:0] scan_page,
  output logic          scan_slc,
  // high for NUM_PAGES cycles after reset while the tables are loaded
  output logic          init_busy
);

  localparam int unsigned HALF = PAGE_WORDS / 2;

  logic [PW-1:0] l2p    [NUM_PAGES];
  logic [PW-1:0] p2l    [NUM_PAGES];
  logic          slc_v  [NUM_PAGES];
  logic [SW-1:0] slc_sl [NUM_PAGES];

  always_comb begin
    ppage  = l2p[lpage];
    in_slc = slc_v[ppage];
    slot   = slc_sl[ppage];
    if (in_slc && word >= WW'(HALF)) begin
      phys_page = AW'(NUM_PAGES) + AW'(slot);
      phys_word = word - WW'(HALF);
    end else begin
      phys_page = AW'(ppage);
      phys_word = word;
    end
  end

  assign scan_slc = slc_v[scan_page];

  // Table initialisation after reset: one entry per cycle.
  logic          init;
  logic [PW-1:0] init_idx;

  assign init_busy = init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init     <= 1'b1;
      init_idx <= '0;
    end else if (init) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == PW'(NUM_PAGES - 1)) init <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init) begin
      l2p[init_idx]    <= init_idx;
      p2l[init_idx]    <= init_idx;
      slc_v[init_idx]  <= 1'b0;
      slc_sl[init_idx] <= '0;
    end else if (set_slc) begin
      slc_v[upd_page]  <= 1'b1;
      slc_sl[upd_page] <= upd_slot;
    end else if (clr_slc) begin
      slc_v[upd_page]  <= 1'b0;
    end else if (swap) begin
      l2p[p2l[swap_pa]] <= swap_pb;
      l2p[p2l[swap_pb]] <= swap_pa;
      p2l[swap_pa]      <= p2l[swap_pb];
      p2l[swap_pb]      <= p2l[swap_pa];
    end
  end

endmodule
