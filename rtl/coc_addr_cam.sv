// CoC address buffer with hierarchical address comparison (HAC).
//
// Holds the block address (request address without the block offset) of each
// CoC entry. With HAC_LEVELS = 1 the block address is split into a low LSB
// field of LSB_BITS bits and the MSB field above it. A lookup first compares
// the LSB field of every valid entry (the CAM part). In HAC_CAM_REG mode the
// MSB comparator of an entry is enabled only when that entry's LSB matched,
// so the number of MSB comparisons equals the number of LSB hits; in
// HAC_CAM_CAM mode every valid entry compares its MSB field at the same time.
// An entry hits when all fields match; the result is the same in both modes,
// only msb_cmp_en and msb_cmp_cnt (the comparator activity, the N_LSB_hit
// term of the HAC energy model) differ.
//
// With HAC_LEVELS = 2 the block address is first cut at the page boundary:
// the low PAGE_SEG_W bits (block address bits inside a page) and the page
// number above them each get their own LSB field (LSB_BITS and LSB_HI_BITS
// wide, at the bottom of each part) and MSB field. Each level's LSB match
// enables that level's MSB comparator, and the entry hits when both levels
// match. msb_cmp_en and lsb_match then describe the lower level, and
// msb_cmp_cnt counts the enabled MSB comparators of both levels.
//
// Lookup is combinational. Writes and invalidations take effect at the next
// clock edge; a write to an entry makes it valid, an invalidation clears the
// valid bits given as a mask; invalidation wins when both name the same
// entry. Reset clears all valid bits.
//
// The LSB-first comparison, the two storage models, the default of five LSB
// bits and the two-level page/block split follow the design description; the
// evaluated configurations use one level, which is the default. The page
// segment width (4 KB pages with 32-byte blocks), the upper LSB width, the
// combinational lookup and the write/invalidate ports are this design's
// choices.
module coc_addr_cam
  import coc_pkg::*;
#(
  parameter int unsigned ENTRIES     = 4,
  parameter int unsigned BLK_W       = 27,
  parameter int unsigned LSB_BITS    = 5,
  parameter hac_mode_e   MODE        = HAC_CAM_REG,
  parameter int unsigned HAC_LEVELS  = 1,
  parameter int unsigned PAGE_SEG_W  = 7,
  parameter int unsigned LSB_HI_BITS = 5,
  localparam int unsigned EIDX_W     = idx_w(ENTRIES),
  localparam int unsigned CNT_W      = $clog2(HAC_LEVELS * ENTRIES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic [BLK_W-1:0]   lookup_blk,
  output logic [ENTRIES-1:0] lsb_match,
  output logic [ENTRIES-1:0] msb_cmp_en,
  output logic [ENTRIES-1:0] hit_vec,
  output logic               hit,
  output logic [CNT_W-1:0]   msb_cmp_cnt,
  // update
  input  logic               wr_en,
  input  logic [EIDX_W-1:0]  wr_idx,
  input  logic [BLK_W-1:0]   wr_blk,
  input  logic               inv_en,
  input  logic [ENTRIES-1:0] inv_mask,
  output logic [ENTRIES-1:0] valid
);

  // width of the lower level: the whole block address with one level
  localparam int unsigned LO_W = (HAC_LEVELS == 2) ? PAGE_SEG_W : BLK_W;

  logic [BLK_W-1:0]   blk_q [ENTRIES];
  logic [ENTRIES-1:0] msb_match, hi_lsb_match, hi_msb_en, hi_msb_match;

  // lower level: LSB field [LSB_BITS-1:0], MSB field [LO_W-1:LSB_BITS]
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      lsb_match[i]  = valid[i] &&
                      (blk_q[i][LSB_BITS-1:0] == lookup_blk[LSB_BITS-1:0]);
      msb_cmp_en[i] = (MODE == HAC_CAM_REG) ? lsb_match[i] : valid[i];
      // a disabled comparator does not evaluate and reports no match
      msb_match[i]  = msb_cmp_en[i] &&
                      (blk_q[i][LO_W-1:LSB_BITS] == lookup_blk[LO_W-1:LSB_BITS]);
    end
  end

  // upper (page number) level, present only with two levels
  if (HAC_LEVELS == 2) begin : g_hi
    localparam int unsigned HL = PAGE_SEG_W + LSB_HI_BITS;
    always_comb begin
      for (int i = 0; i < ENTRIES; i++) begin
        hi_lsb_match[i] = valid[i] &&
                          (blk_q[i][HL-1:PAGE_SEG_W] == lookup_blk[HL-1:PAGE_SEG_W]);
        hi_msb_en[i]    = (MODE == HAC_CAM_REG) ? hi_lsb_match[i] : valid[i];
        hi_msb_match[i] = hi_msb_en[i] &&
                          (blk_q[i][BLK_W-1:HL] == lookup_blk[BLK_W-1:HL]);
      end
    end
  end else begin : g_one
    assign hi_lsb_match = '1;
    assign hi_msb_en    = '0;
    assign hi_msb_match = '1;
  end

  always_comb begin
    msb_cmp_cnt = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      hit_vec[i]  = lsb_match[i] && msb_match[i] && hi_lsb_match[i] && hi_msb_match[i];
      msb_cmp_cnt = msb_cmp_cnt + CNT_W'(msb_cmp_en[i]) + CNT_W'(hi_msb_en[i]);
    end
    hit = |hit_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (inv_en && inv_mask[i])
          valid[i] <= 1'b0;
        else if (wr_en && wr_idx == EIDX_W'(i))
          valid[i] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) blk_q[wr_idx] <= wr_blk;
  end

  // at most one entry may hold a given block address
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_vec))
    else $error("coc_addr_cam: several entries hit");

  initial begin
    assert (HAC_LEVELS == 1 || HAC_LEVELS == 2)
      else $fatal(1, "coc_addr_cam: HAC_LEVELS must be 1 or 2");
    assert (LSB_BITS >= 1 && LSB_BITS < LO_W)
      else $fatal(1, "coc_addr_cam: LSB_BITS must be in 1..(lower level width - 1)");
    assert (HAC_LEVELS == 1 || (LSB_HI_BITS >= 1 && PAGE_SEG_W + LSB_HI_BITS < BLK_W))
      else $fatal(1, "coc_addr_cam: LSB_HI_BITS does not fit the page number");
    assert (ENTRIES >= 1) else $fatal(1, "coc_addr_cam: ENTRIES must be at least 1");
  end

endmodule
