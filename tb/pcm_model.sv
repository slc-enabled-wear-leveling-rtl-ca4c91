// Behavioural model of the PCM device: NUM_PAGES regular pages that can be
// programmed as MLC or SLC, followed by NUM_SLC additional pages used in SLC
// mode only. Not synthesizable logic; used by the testbenches only.
//
// Contents: every word starts with init_word(page, word), written as MLC on
// regular pages and as SLC on additional pages. The model remembers the mode
// each word was last written in and counts as an error (err_cnt) any read in
// another mode, any SLC access to the upper half of a regular page (an SLC
// page holds only half the data), and any MLC access to an additional page.
// It counts writes per page and mode (mlc_writes, slc_writes), MLC writes per
// word (mlc_word), and per page the largest MLC write count of any of its words
// (mlc_cell_max): a cell wears out by its own writes, so that is the wear that
// limits a page's lifetime.
//
// Port: req and the fields are held until ack; ack is a one-cycle pulse
// RD_LAT (reads), WR_LAT_SLC or WR_LAT_MLC (writes) cycles after the request
// was seen, with rdata for reads. MLC writes are slower than SLC writes
// because MLC cells are programmed and verified iteratively.
module pcm_model #(
  parameter int unsigned NUM_PAGES  = 16,
  parameter int unsigned NUM_SLC    = 2,
  parameter int unsigned PAGE_WORDS = 8,
  parameter int unsigned WORD_W     = 64,
  parameter int unsigned RD_LAT     = 2,
  parameter int unsigned WR_LAT_SLC = 3,
  parameter int unsigned WR_LAT_MLC = 6,
  localparam int unsigned NP        = NUM_PAGES + NUM_SLC,
  localparam int unsigned AW        = $clog2(NP),
  localparam int unsigned WW        = $clog2(PAGE_WORDS)
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic              slc,
  input  logic [AW-1:0]     page,
  input  logic [WW-1:0]     word,
  input  logic [WORD_W-1:0] wdata,
  output logic              ack,
  output logic [WORD_W-1:0] rdata
);

  function automatic logic [WORD_W-1:0] init_word(int unsigned p, int unsigned w);
    return WORD_W'({32'(p) ^ 32'h5A5A_0000, 32'(w) ^ 32'h0000_A5A5});
  endfunction

  logic [WORD_W-1:0] mem   [NP * PAGE_WORDS];
  logic              wslc  [NP * PAGE_WORDS];
  int unsigned       mlc_writes [NP];
  int unsigned       slc_writes [NP];
  int unsigned       mlc_word   [NP * PAGE_WORDS];
  int unsigned       mlc_cell_max [NP];
  int unsigned       err_cnt;
  int unsigned       accesses;

  logic              busy;
  int unsigned       lat;

  initial begin
    for (int unsigned p = 0; p < NP; p++) begin
      mlc_writes[p] = 0;
      slc_writes[p] = 0;
      mlc_cell_max[p] = 0;
      for (int unsigned w = 0; w < PAGE_WORDS; w++) begin
        mlc_word[p * PAGE_WORDS + w] = 0;
        mem[p * PAGE_WORDS + w]  = init_word(p, w);
        wslc[p * PAGE_WORDS + w] = (p >= NUM_PAGES);
      end
    end
    err_cnt  = 0;
    accesses = 0;
    busy     = 1'b0;
    ack      = 1'b0;
    rdata    = '0;
    lat      = 0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (!busy) begin
      if (req && !ack) begin
        busy <= 1'b1;
        lat  <= !we ? RD_LAT : (slc ? WR_LAT_SLC : WR_LAT_MLC);
      end
    end else if (lat > 1) begin
      lat <= lat - 1;
    end else begin
      busy     <= 1'b0;
      ack      <= 1'b1;
      accesses <= accesses + 1;
      if (32'(page) >= NP) err_cnt <= err_cnt + 1;
      else begin
        if (32'(page) < NUM_PAGES && slc && 32'(word) >= PAGE_WORDS / 2) err_cnt <= err_cnt + 1;
        if (32'(page) >= NUM_PAGES && !slc) err_cnt <= err_cnt + 1;
        if (we) begin
          mem[32'(page) * PAGE_WORDS + 32'(word)]  <= wdata;
          wslc[32'(page) * PAGE_WORDS + 32'(word)] <= slc;
          if (slc) slc_writes[page] <= slc_writes[page] + 1;
          else begin
            mlc_writes[page] <= mlc_writes[page] + 1;
            mlc_word[32'(page) * PAGE_WORDS + 32'(word)] <= mlc_word[32'(page) * PAGE_WORDS + 32'(word)] + 1;
            if (mlc_word[32'(page) * PAGE_WORDS + 32'(word)] + 1 > mlc_cell_max[page])
              mlc_cell_max[page] <= mlc_word[32'(page) * PAGE_WORDS + 32'(word)] + 1;
          end
        end else begin
          rdata <= mem[32'(page) * PAGE_WORDS + 32'(word)];
          if (wslc[32'(page) * PAGE_WORDS + 32'(word)] != slc) err_cnt <= err_cnt + 1;
        end
      end
    end
  end

  // The master must hold its request steady until it is acknowledged.
  logic              p_req, p_we, p_slc;
  logic [AW-1:0]     p_page;
  logic [WW-1:0]     p_word;
  logic [WORD_W-1:0] p_wdata;
  logic              p_ack;
  initial p_req = 1'b0;
  always @(posedge clk) begin
    p_req <= req; p_we <= we; p_slc <= slc; p_page <= page; p_word <= word;
    p_wdata <= wdata; p_ack <= ack;
    if (p_req && !p_ack && busy)
      assert (req && we == p_we && slc == p_slc && page == p_page && word == p_word &&
              (!we || wdata == p_wdata))
        else $error("PCM request changed before it was acknowledged");
  end

endmodule
