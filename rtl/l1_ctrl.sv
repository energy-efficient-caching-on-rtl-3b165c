// Controller of the CoC L1 data cache.
//
// Three states:
//   S_LOOKUP  A request is looked up in the CoC and, unless the CoC hits a
//             load, in the tag and data arrays (array_en is the enable of the
//             index tri-state in front of the array decoders). A load that
//             hits the CoC completes at once with the arrays left idle. A load
//             that misses the CoC but hits the tag array completes at once and
//             copies the line into the CoC (coc_update). A load that misses
//             both starts a refill. A store goes to S_WRITE.
//   S_REFILL  The line is fetched from the next level as WORDS bus words, one
//             request per word on a req/ack handshake; each word is written
//             into the data array as it arrives and the tag is written with
//             the last one. The controller then returns to S_LOOKUP, where
//             the held load now hits the arrays and is served and copied into
//             the CoC.
//   S_WRITE   Write-through store: the word is written to the next level. On
//             the acknowledge the store completes, the word is also written
//             into the data array if the line is present, and a CoC entry
//             holding the line is invalidated instead of being updated.
//
// CPU side: req_valid/req_ready handshake, the CPU holds the request until
// req_ready; load data follow one cycle later from the data-out register.
// Memory side: mem_req is held with a stable address until mem_ack.
//
// The event outputs pulse once per access: ev_coc_hit and ev_l1_hit for a
// load served by the CoC or by the arrays, ev_l1_miss when a refill starts,
// ev_coc_inv when a store invalidates a CoC entry. The load that completes
// after its refill counts only as a miss.
//
// The CoC-first lookup, the array disable on a CoC hit, the FIFO update on a
// CoC miss and the store invalidation follow the design description. The
// write-through, no-write-allocate store policy, the word-wide stores, the
// fill of the CoC only by loads and the handshakes are this design's
// choices; the description does not state them.
module l1_ctrl #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned WORD_W     = 32,
  localparam int unsigned WORDS     = LINE_BYTES * 8 / WORD_W,
  localparam int unsigned WSEL_W    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned BOFF_W    = $clog2(WORD_W / 8)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU request
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              req_ready,
  // lookup results
  input  logic              coc_hit,
  input  logic              tag_hit,
  // datapath control
  output logic              array_en,
  output logic              load_done,
  output logic              coc_update,
  output logic              coc_inv,
  output logic              data_wr_en,
  output logic              data_wr_from_mem,
  output logic [WSEL_W-1:0] data_wr_word,
  output logic              tag_wr_en,
  // next-level memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_ack,
  // events
  output logic              ev_coc_hit,
  output logic              ev_l1_hit,
  output logic              ev_l1_miss,
  output logic              ev_coc_inv
);

  typedef enum logic [1:0] {S_LOOKUP, S_REFILL, S_WRITE} state_e;

  state_e            state_q, state_d;
  logic [WSEL_W-1:0] beat_q, beat_d;
  logic              replay_q, replay_d;

  wire [WSEL_W-1:0] req_word = req_addr[OFF_W-1:BOFF_W];
  wire              last_beat = (beat_q == WSEL_W'(WORDS - 1));

  always_comb begin
    state_d          = state_q;
    beat_d           = beat_q;
    replay_d         = replay_q;
    req_ready        = 1'b0;
    array_en         = 1'b0;
    load_done        = 1'b0;
    coc_update       = 1'b0;
    coc_inv          = 1'b0;
    data_wr_en       = 1'b0;
    data_wr_from_mem = 1'b0;
    data_wr_word     = req_word;
    tag_wr_en        = 1'b0;
    mem_req          = 1'b0;
    mem_we           = 1'b0;
    mem_addr         = {req_addr[ADDR_W-1:BOFF_W], BOFF_W'(0)};
    ev_coc_hit       = 1'b0;
    ev_l1_hit        = 1'b0;
    ev_l1_miss       = 1'b0;
    ev_coc_inv       = 1'b0;

    unique case (state_q)
      S_LOOKUP: begin
        if (req_valid) begin
          // the tri-state opens the array decoders unless a load hits the CoC
          array_en = req_we || !coc_hit;
          if (req_we) begin
            state_d = S_WRITE;
          end else if (coc_hit) begin
            req_ready  = 1'b1;
            load_done  = 1'b1;
            ev_coc_hit = !replay_q;
            replay_d   = 1'b0;
          end else if (tag_hit) begin
            req_ready  = 1'b1;
            load_done  = 1'b1;
            coc_update = 1'b1;
            ev_l1_hit  = !replay_q;
            replay_d   = 1'b0;
          end else begin
            state_d    = S_REFILL;
            beat_d     = '0;
            ev_l1_miss = 1'b1;
          end
        end
      end

      S_REFILL: begin
        mem_req          = 1'b1;
        mem_addr         = {req_addr[ADDR_W-1:OFF_W], beat_q, BOFF_W'(0)};
        data_wr_word     = beat_q;
        data_wr_from_mem = 1'b1;
        if (mem_ack) begin
          data_wr_en = 1'b1;
          beat_d     = beat_q + 1'b1;
          if (last_beat) begin
            tag_wr_en = 1'b1;
            replay_d  = 1'b1;
            state_d   = S_LOOKUP;
          end
        end
      end

      S_WRITE: begin
        array_en = 1'b1;
        mem_req  = 1'b1;
        mem_we   = 1'b1;
        if (mem_ack) begin
          req_ready  = 1'b1;
          data_wr_en = tag_hit;
          coc_inv    = coc_hit;
          ev_coc_inv = coc_hit;
          state_d    = S_LOOKUP;
        end
      end

      default: state_d = S_LOOKUP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_LOOKUP;
      beat_q   <= '0;
      replay_q <= 1'b0;
    end else begin
      state_q  <= state_d;
      beat_q   <= beat_d;
      replay_q <= replay_d;
    end
  end

  // a refill and a write-through always end in S_LOOKUP again
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_WRITE && mem_ack) |=> state_q == S_LOOKUP)
    else $error("l1_ctrl: store did not complete");

endmodule
