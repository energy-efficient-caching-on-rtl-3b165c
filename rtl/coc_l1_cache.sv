// Direct-mapped L1 data cache with a caching-on-cache (CoC) buffer.
//
// The CoC is a tiny fully associative buffer of whole cache lines (four by
// default) placed in front of the tag and data arrays. Every request is first
// compared against the CoC address buffer with the hierarchical address
// comparison (HAC): the low LSB_BITS bits of the block address are compared
// first and, in the CAM-REG model, enable the comparison of the upper bits.
// When a load hits the CoC the index tri-state keeps the array decoders shut,
// so neither the tag nor the data array is read, and the word comes from the
// CoC data lines through the output multiplexer. On a CoC miss the arrays are
// read as in an ordinary cache; a hit there is served and the line is copied
// into the CoC in FIFO order, a miss refills the line from the next level over
// the 32-bit bus. A store that hits the CoC invalidates that entry.
//
// Address split (defaults): tag [31:13] 19 bits, index [12:5] 8 bits, block
// offset [4:0]; the CoC keeps the 27-bit block address, LSB field [9:5],
// MSB field [31:10].
//
// HAC_LEVELS = 2 selects the two-level comparison in which the page number
// (address bits above PAGE_BYTES) and the block address inside the page each
// have their own LSB and MSB fields; the default is the single split that the
// evaluated configurations use.
//
// Timing: loads that hit the CoC or the arrays are accepted in the cycle they
// are presented (req_ready high) and their word is on rsp_rdata with
// rsp_valid one cycle later. A load that misses takes one lookup cycle, one
// bus transfer per word of the line, and one more lookup cycle. A store takes
// one lookup cycle plus its write-through transfer.
//
// The organisation (CoC in front of the arrays, tri-state, MUX, OR gate and
// data-out register), the sizes, the FIFO policy and the store handling
// follow the design description. The handshakes, the write policy of the
// L1 and the event outputs (for counting the accesses that the energy model
// weighs) are this design's choices.
module coc_l1_cache
  import coc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned WORD_W      = 32,
  parameter int unsigned COC_ENTRIES = 4,
  parameter int unsigned LSB_BITS    = 5,
  parameter hac_mode_e   HAC_MODE    = HAC_CAM_REG,
  parameter int unsigned HAC_LEVELS  = 1,
  parameter int unsigned PAGE_BYTES  = 4096,
  parameter int unsigned LSB_HI_BITS = 5,
  localparam int unsigned CNT_W      = $clog2(HAC_LEVELS * COC_ENTRIES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0] req_wdata,
  output logic              req_ready,
  output logic              rsp_valid,
  output logic [WORD_W-1:0] rsp_rdata,
  // next-level memory side
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [WORD_W-1:0] mem_rdata,
  // access events
  output logic              ev_coc_hit,
  output logic              ev_l1_hit,
  output logic              ev_l1_miss,
  output logic              ev_coc_inv,
  output logic              ev_array_access,
  output logic [CNT_W-1:0]  ev_msb_cmps
);

  localparam int unsigned LINES  = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned WORDS  = LINE_BYTES * 8 / WORD_W;
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned LINE_W = LINE_BYTES * 8;
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W  = $clog2(LINES);
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - OFF_W;
  localparam int unsigned BLK_W  = ADDR_W - OFF_W;
  localparam int unsigned BOFF_W = $clog2(WORD_W / 8);

  wire [TAG_W-1:0]  req_tag  = req_addr[ADDR_W-1:IDX_W+OFF_W];
  wire [IDX_W-1:0]  req_idx  = req_addr[IDX_W+OFF_W-1:OFF_W];
  wire [BLK_W-1:0]  req_blk  = req_addr[ADDR_W-1:OFF_W];
  wire [WSEL_W-1:0] req_word = req_addr[OFF_W-1:BOFF_W];

  logic              coc_hit, tag_hit;
  logic [LINE_W-1:0] coc_line, array_line;
  logic [TAG_W-1:0]  rd_tag;
  logic              rd_valid;
  logic              array_en, load_done, coc_update, coc_inv;
  logic              data_wr_en, data_wr_from_mem, tag_wr_en;
  logic [WSEL_W-1:0] data_wr_word;
  logic [COC_ENTRIES-1:0] coc_hit_vec, coc_valid;
  logic [idx_w(COC_ENTRIES)-1:0] coc_fifo_ptr;
  logic [CNT_W-1:0]  msb_cmp_cnt;

  coc #(
    .ENTRIES(COC_ENTRIES), .BLK_W(BLK_W), .LSB_BITS(LSB_BITS),
    .LINE_W(LINE_W), .MODE(HAC_MODE), .HAC_LEVELS(HAC_LEVELS),
    .PAGE_SEG_W($clog2(PAGE_BYTES) - OFF_W), .LSB_HI_BITS(LSB_HI_BITS)
  ) u_coc (
    .clk, .rst_n,
    .lookup_blk(req_blk),
    .hit(coc_hit), .hit_vec(coc_hit_vec), .hit_line(coc_line),
    .msb_cmp_cnt,
    .update_en(coc_update), .update_blk(req_blk), .update_line(array_line),
    .inv_en(coc_inv),
    .fifo_ptr(coc_fifo_ptr), .valid(coc_valid)
  );

  // Index tri-state: the arrays see the index only while array_en is high.
  tag_array #(.LINES(LINES), .TAG_W(TAG_W)) u_tag (
    .clk, .rst_n,
    .rd_en(array_en), .rd_idx(req_idx), .rd_tag, .rd_valid,
    .wr_en(tag_wr_en), .wr_idx(req_idx), .wr_tag(req_tag), .wr_valid(1'b1)
  );

  data_array #(.LINES(LINES), .WORDS(WORDS), .WORD_W(WORD_W)) u_data (
    .clk,
    .rd_en(array_en), .rd_idx(req_idx), .rd_line(array_line),
    .wr_en(data_wr_en), .wr_idx(req_idx), .wr_word(data_wr_word),
    .wr_data(data_wr_from_mem ? mem_rdata : req_wdata)
  );

  tag_comparator #(.TAG_W(TAG_W)) u_cmp (
    .en(array_en), .stored_tag(rd_tag), .stored_valid(rd_valid),
    .req_tag, .hit(tag_hit)
  );

  coc_out_path #(.WORDS(WORDS), .WORD_W(WORD_W)) u_out (
    .clk, .rst_n,
    .coc_hit, .tag_hit, .load_done,
    .coc_line, .array_line, .word_sel(req_word),
    .rdata(rsp_rdata), .rvalid(rsp_valid)
  );

  l1_ctrl #(.ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .WORD_W(WORD_W)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_we, .req_addr, .req_ready,
    .coc_hit, .tag_hit,
    .array_en, .load_done, .coc_update, .coc_inv,
    .data_wr_en, .data_wr_from_mem, .data_wr_word, .tag_wr_en,
    .mem_req, .mem_we, .mem_addr, .mem_ack,
    .ev_coc_hit, .ev_l1_hit, .ev_l1_miss, .ev_coc_inv
  );

  assign mem_wdata       = req_wdata;
  assign ev_array_access = array_en;
  // MSB comparator activity of a load lookup
  assign ev_msb_cmps     = (req_valid && !req_we && req_ready) ? msb_cmp_cnt : '0;

  // CPU must hold its request until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (req_valid && !req_ready) |=> req_valid && $stable(req_addr) && $stable(req_we))
    else $error("coc_l1_cache: request changed before it was accepted");
  // a load that hits the CoC never causes an L1 miss
  assert property (@(posedge clk) disable iff (!rst_n) ev_l1_miss |-> !coc_hit)
    else $error("coc_l1_cache: refill started although the CoC hit");
  // memory request must stay stable until acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   (mem_req && !mem_ack) |=> mem_req && $stable(mem_addr) && $stable(mem_we))
    else $error("coc_l1_cache: memory request changed before acknowledge");

endmodule
