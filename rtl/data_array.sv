// L1 data array.
//
// LINES lines of WORDS words of WORD_W bits (256 lines x 256 bits for the
// 8 KB cache of 32-byte lines). The read port returns a whole line and is
// combinational and gated by rd_en, the word line enable driven through the
// CoC's index tri-state; with rd_en low nothing is read and rd_line is zero.
// The write port writes one word of a line at the clock edge, which serves
// both the word-by-word refill over the 32-bit bus and write-through stores.
// The array is not reset.
//
// The array geometry follows the design description. Sub-banking and divided
// word lines are circuit techniques with no effect on the logic and are not
// modelled; the word write port is this design's choice.
module data_array #(
  parameter int unsigned LINES   = 256,
  parameter int unsigned WORDS   = 8,
  parameter int unsigned WORD_W  = 32,
  localparam int unsigned IDX_W  = $clog2(LINES),
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned LINE_W = WORDS * WORD_W
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  rd_idx,
  output logic [LINE_W-1:0] rd_line,
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [WSEL_W-1:0] wr_word,
  input  logic [WORD_W-1:0] wr_data
);

  logic [LINE_W-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx][wr_word*WORD_W +: WORD_W] <= wr_data;
  end

  assign rd_line = rd_en ? mem[rd_idx] : '0;

endmodule
