// Caching-on-cache (CoC) buffer.
//
// A small fully associative buffer of ENTRIES cache lines that sits in front
// of the L1 tag and data arrays. It combines the HAC address buffer
// (coc_addr_cam) with the data register lines (coc_data_regs) and a FIFO
// replacement pointer. A lookup is combinational: hit, the one-hot hit
// vector and the hit line are valid in the same cycle as lookup_blk.
// update_en writes {update_blk, update_line} into the entry the FIFO
// pointer names at the next clock edge and advances the pointer (wrapping
// after ENTRIES-1). inv_en clears the valid bit of the entry that currently
// hits, which is how a store that hits the CoC is handled. Reset clears the
// valid bits and the FIFO pointer.
//
// HAC_LEVELS, PAGE_SEG_W and LSB_HI_BITS are passed to the address buffer
// (one or two comparison levels, see coc_addr_cam).
//
// The FIFO replacement and the store invalidation follow the design
// description; the port set is this design's choice.
module coc
  import coc_pkg::*;
#(
  parameter int unsigned ENTRIES  = 4,
  parameter int unsigned BLK_W    = 27,
  parameter int unsigned LSB_BITS = 5,
  parameter int unsigned LINE_W   = 256,
  parameter hac_mode_e   MODE     = HAC_CAM_REG,
  parameter int unsigned HAC_LEVELS  = 1,
  parameter int unsigned PAGE_SEG_W  = 7,
  parameter int unsigned LSB_HI_BITS = 5,
  localparam int unsigned EIDX_W  = idx_w(ENTRIES),
  localparam int unsigned CNT_W   = $clog2(HAC_LEVELS * ENTRIES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [BLK_W-1:0]   lookup_blk,
  output logic               hit,
  output logic [ENTRIES-1:0] hit_vec,
  output logic [LINE_W-1:0]  hit_line,
  output logic [CNT_W-1:0]   msb_cmp_cnt,
  input  logic               update_en,
  input  logic [BLK_W-1:0]   update_blk,
  input  logic [LINE_W-1:0]  update_line,
  input  logic               inv_en,
  output logic [EIDX_W-1:0]  fifo_ptr,
  output logic [ENTRIES-1:0] valid
);

  coc_addr_cam #(
    .ENTRIES(ENTRIES), .BLK_W(BLK_W), .LSB_BITS(LSB_BITS), .MODE(MODE),
    .HAC_LEVELS(HAC_LEVELS), .PAGE_SEG_W(PAGE_SEG_W), .LSB_HI_BITS(LSB_HI_BITS)
  ) u_addr (
    .clk, .rst_n,
    .lookup_blk,
    .lsb_match(), .msb_cmp_en(), .hit_vec, .hit, .msb_cmp_cnt,
    .wr_en(update_en), .wr_idx(fifo_ptr), .wr_blk(update_blk),
    .inv_en, .inv_mask(hit_vec),
    .valid
  );

  coc_data_regs #(.ENTRIES(ENTRIES), .LINE_W(LINE_W)) u_data (
    .clk,
    .wr_en(update_en), .wr_idx(fifo_ptr), .wr_line(update_line),
    .rd_sel(hit_vec), .rd_line(hit_line)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      fifo_ptr <= '0;
    else if (update_en)
      fifo_ptr <= (fifo_ptr == EIDX_W'(ENTRIES - 1)) ? '0 : fifo_ptr + 1'b1;
  end

endmodule
