// CoC data register lines.
//
// ENTRIES registers, each holding one full cache line of LINE_W bits. A line
// is written at the clock edge when wr_en is set. The read port is
// combinational: the line selected by the one-hot hit vector of the address
// buffer is driven onto rd_line through an AND-OR multiplexer, and rd_line
// is zero when no entry is selected, so an idle CoC drives no data.
//
// Keeping whole lines in plain registers follows the design description;
// the AND-OR read and the write port are this design's choices.
module coc_data_regs
  import coc_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned LINE_W  = 256,
  localparam int unsigned EIDX_W = idx_w(ENTRIES)
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [EIDX_W-1:0]  wr_idx,
  input  logic [LINE_W-1:0]  wr_line,
  input  logic [ENTRIES-1:0] rd_sel,
  output logic [LINE_W-1:0]  rd_line
);

  logic [LINE_W-1:0] line_q [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) line_q[wr_idx] <= wr_line;
  end

  always_comb begin
    rd_line = '0;
    for (int i = 0; i < ENTRIES; i++)
      rd_line = rd_line | (line_q[i] & {LINE_W{rd_sel[i]}});
  end

endmodule
