// Behavioural model of the next level of the memory hierarchy (an L2 cache
// or main memory) for the cache testbenches; not synthesizable design logic.
//
// Word-wide req/ack port. A request held on mem_req is acknowledged LATENCY
// cycles later for one cycle; a write is performed and read data are
// presented with the acknowledge. The contents start as a fixed function of
// the word address (init_word) and only written words are stored.
module next_level_mem #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned WORD_W  = 32,
  parameter int unsigned LATENCY = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [WORD_W-1:0] mem_wdata,
  output logic              mem_ack,
  output logic [WORD_W-1:0] mem_rdata
);

  logic [WORD_W-1:0] store [logic [ADDR_W-1:0]];
  int unsigned       cnt;
  int unsigned       n_reads, n_writes;

  function automatic logic [WORD_W-1:0] init_word(input logic [ADDR_W-1:0] a);
    return WORD_W'(a * 32'h9E37_79B1) ^ WORD_W'(32'h5A5A_0F0F);
  endfunction

  function automatic logic [WORD_W-1:0] peek(input logic [ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : init_word(a);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_ack   <= 1'b0;
      mem_rdata <= '0;
      cnt       <= 0;
      n_reads   <= 0;
      n_writes  <= 0;
    end else begin
      mem_ack <= 1'b0;
      if (mem_req && !mem_ack) begin
        if (cnt + 1 >= LATENCY) begin
          cnt     <= 0;
          mem_ack <= 1'b1;
          if (mem_we) begin
            store[mem_addr] = mem_wdata;
            n_writes        <= n_writes + 1;
          end else begin
            mem_rdata <= peek(mem_addr);
            n_reads   <= n_reads + 1;
          end
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end

endmodule
