// L1 tag array with valid bits.
//
// LINES entries of TAG_W tag bits plus one valid bit, one entry per line of
// the direct-mapped cache. The read port is combinational and gated by
// rd_en, which models the word line enable that the CoC drives through the
// index tri-state: with rd_en low the array is not accessed and rd_valid and
// rd_tag read as zero. One write port, written at the clock edge. Reset
// clears the valid bits only; the tag cells keep whatever they hold.
//
// The size (256 x 19 for an 8 KB cache of 32-byte lines and 32-bit
// addresses) follows the design description. The asynchronous read, chosen
// so that the tag compare and the data-out register fit in one cycle as the
// described critical path does, is this design's choice.
module tag_array #(
  parameter int unsigned LINES  = 256,
  parameter int unsigned TAG_W  = 19,
  localparam int unsigned IDX_W = $clog2(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_valid,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic             wr_valid
);

  logic [TAG_W-1:0] tag_mem [LINES];
  logic [LINES-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (wr_en) tag_mem[wr_idx] <= wr_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q         <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_valid;
  end

  assign rd_tag   = rd_en ? tag_mem[rd_idx] : '0;
  assign rd_valid = rd_en && valid_q[rd_idx];

endmodule
