// Output path of the CoC cache: line multiplexer, hit OR gate and data-out
// register.
//
// The multiplexer picks the CoC hit line when the CoC hits and the data
// array line otherwise; the word named by word_sel is then taken from the
// chosen line. The OR of the CoC hit and the tag comparator hit enables the
// data-out register, and only for a load being completed (load_done). The
// register is loaded at the clock edge, so the word is on rdata one cycle
// after the request is accepted, with rvalid set for that one cycle.
// Reset clears rvalid and rdata.
//
// The MUX with its select from the CoC, the OR gate and the registered
// output follow the block diagram of the design; the word selection and
// rvalid are this design's choices.
module coc_out_path #(
  parameter int unsigned WORDS   = 8,
  parameter int unsigned WORD_W  = 32,
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned LINE_W = WORDS * WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              coc_hit,
  input  logic              tag_hit,
  input  logic              load_done,
  input  logic [LINE_W-1:0] coc_line,
  input  logic [LINE_W-1:0] array_line,
  input  logic [WSEL_W-1:0] word_sel,
  output logic [WORD_W-1:0] rdata,
  output logic              rvalid
);

  logic [LINE_W-1:0] sel_line;
  logic              out_en;

  assign sel_line = coc_hit ? coc_line : array_line;
  assign out_en   = load_done && (coc_hit || tag_hit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= out_en;
      if (out_en) rdata <= sel_line[word_sel*WORD_W +: WORD_W];
    end
  end

endmodule
