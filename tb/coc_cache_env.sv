// Self-checking environment for one configuration of the CoC L1 cache, used
// by the configuration sweep. It holds the cache, a next-level memory model,
// a reference model of the direct-mapped tags and of the FIFO CoC, and a
// random access generator with spatial locality. Each access is checked for
// its data, its acceptance cycle, its hit/miss classification and the number
// of MSB comparators the HAC enabled (LSB hits in the CAM-REG model, all
// valid entries in the CAM-CAM model, summed over both levels when the
// two-level comparison is selected). When done rises, checks and failures
// hold the totals and the counters give the access mix.
module coc_cache_env
  import coc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned COC_ENTRIES = 4,
  parameter int unsigned LSB_BITS    = 5,
  parameter hac_mode_e   HAC_MODE    = HAC_CAM_REG,
  parameter int unsigned HAC_LEVELS  = 1,
  parameter int unsigned N_ACCESS    = 2000,
  parameter int unsigned LAT         = 4
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned LINES = CACHE_BYTES / 32;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = 32 - IDX_W - 5;
  localparam int unsigned CNT_W = $clog2(HAC_LEVELS * COC_ENTRIES + 1);

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req_valid = 1'b0, req_we = 1'b0;
  logic [31:0] req_addr = '0, req_wdata = '0;
  logic        req_ready, rsp_valid;
  logic [31:0] rsp_rdata;
  logic        mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        ev_coc_hit, ev_l1_hit, ev_l1_miss, ev_coc_inv, ev_array_access;
  logic [CNT_W-1:0] ev_msb_cmps;

  always #5 clk = ~clk;

  coc_l1_cache #(
    .CACHE_BYTES(CACHE_BYTES), .COC_ENTRIES(COC_ENTRIES), .LSB_BITS(LSB_BITS),
    .HAC_MODE(HAC_MODE), .HAC_LEVELS(HAC_LEVELS)
  ) dut (.*);

  next_level_mem #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata
  );

  int n_coc_hit = 0, n_l1_hit = 0, n_l1_miss = 0, n_coc_inv = 0, n_loads = 0;
  longint n_msb_cmps = 0;

  logic [TAG_W-1:0] ref_tag [LINES];
  logic             ref_v   [LINES];
  logic [26:0]      ref_blk [COC_ENTRIES];
  logic             ref_cv  [COC_ENTRIES];
  int               ref_ptr = 0;
  logic [31:0]      ref_mem [logic [31:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0dB/%0de/%0db/%s] %s", CACHE_BYTES, COC_ENTRIES,
                                  LSB_BITS, HAC_MODE.name(), what);
    end
  endtask

  task automatic coc_insert(input logic [26:0] blk);
    ref_blk[ref_ptr] = blk;
    ref_cv[ref_ptr]  = 1'b1;
    ref_ptr = (ref_ptr + 1) % COC_ENTRIES;
  endtask

  task automatic access(input bit we, input logic [31:0] addr, input logic [31:0] wdata);
    logic [26:0]      blk = addr[31:5];
    logic [IDX_W-1:0] idx = addr[IDX_W+4:5];
    logic [TAG_W-1:0] tag = addr[31:IDX_W+5];
    int  coc_e = -1, lsb_hits = 0, hi_hits = 0, n_valid = 0, exp_wait, waited = 0, exp_cmps;
    bit  l1hit, seen_miss = 0, seen_coc, seen_l1, seen_inv;
    logic [CNT_W-1:0] msb_seen;
    logic [31:0] exp_data;
    addr[1:0] = 2'b00;
    for (int i = 0; i < COC_ENTRIES; i++) if (ref_cv[i]) begin
      n_valid++;
      // upper-level LSB field: page-number bits [16:12] (4 KB pages, 5 bits)
      if (ref_blk[i][11:7] == blk[11:7]) hi_hits++;
      if (ref_blk[i][LSB_BITS-1:0] == blk[LSB_BITS-1:0]) begin
        lsb_hits++;
        if (ref_blk[i] == blk) coc_e = i;
      end
    end
    if (HAC_LEVELS == 2) exp_cmps = (HAC_MODE == HAC_CAM_REG) ? lsb_hits + hi_hits : 2 * n_valid;
    else                 exp_cmps = (HAC_MODE == HAC_CAM_REG) ? lsb_hits : n_valid;
    l1hit = ref_v[idx] && ref_tag[idx] == tag;
    if (we) exp_wait = LAT + 1;
    else if (coc_e >= 0 || l1hit) exp_wait = 0;
    else exp_wait = 1 + 8 * (LAT + 1);

    req_valid <= 1'b1; req_we <= we; req_addr <= addr; req_wdata <= wdata;
    #1;
    while (!req_ready) begin
      if (ev_l1_miss) seen_miss = 1;
      waited++;
      @(negedge clk);
      #1;
      if (waited > 200) break;
    end
    seen_coc = ev_coc_hit; seen_l1 = ev_l1_hit; seen_inv = ev_coc_inv; msb_seen = ev_msb_cmps;
    @(posedge clk);
    #1 req_valid <= 1'b0;
    check(waited == exp_wait, $sformatf("%h accepted after %0d cycles, expected %0d", addr, waited, exp_wait));
    if (we) begin
      check(seen_inv == (coc_e >= 0), $sformatf("store %h CoC invalidation", addr));
      if (coc_e >= 0) begin ref_cv[coc_e] = 1'b0; n_coc_inv++; end
      ref_mem[addr] = wdata;
    end else begin
      n_loads++;
      exp_data = ref_mem.exists(addr) ? ref_mem[addr] : u_mem.init_word(addr);
      check(int'(msb_seen) == exp_cmps, $sformatf("load %h MSB comparisons %0d, expected %0d",
                                                  addr, msb_seen, exp_cmps));
      n_msb_cmps += msb_seen;
      if (coc_e >= 0) begin
        check(seen_coc && !seen_l1 && !seen_miss, $sformatf("load %h CoC hit", addr));
        n_coc_hit++;
      end else if (l1hit) begin
        check(!seen_coc && seen_l1 && !seen_miss, $sformatf("load %h array hit", addr));
        n_l1_hit++;
        coc_insert(blk);
      end else begin
        check(!seen_coc && !seen_l1 && seen_miss, $sformatf("load %h miss", addr));
        n_l1_miss++;
        ref_v[idx] = 1'b1; ref_tag[idx] = tag;
        coc_insert(blk);
      end
      @(negedge clk);
      check(rsp_valid && rsp_rdata == exp_data, $sformatf("load %h data %h expected %h",
                                                          addr, rsp_rdata, exp_data));
    end
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] a;
    int r;
    done = 1'b0; checks = 0; failures = 0;
    for (int i = 0; i < LINES; i++) ref_v[i] = 1'b0;
    for (int i = 0; i < COC_ENTRIES; i++) ref_cv[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    a = 32'h0001_0000;
    for (int n = 0; n < N_ACCESS; n++) begin
      r = $urandom_range(0, 99);
      if (r < 70)      a = a + 4;
      else if (r < 80) a = a - 32;
      else if (r < 92) a = a ^ (32'h1 << $urandom_range(5, 17));
      else             a = {14'h0, 18'($urandom())};
      access($urandom_range(0, 9) == 0, a, $urandom());
    end
    check(n_coc_hit > 0 && n_l1_hit > 0 && n_l1_miss > 0 && n_coc_inv > 0,
          "every access kind must occur");
    $display("config %0dB entries=%0d lsb=%0d levels=%0d %s: loads=%0d coc_hit=%0d l1_hit=%0d l1_miss=%0d msb_cmps=%0d",
             CACHE_BYTES, COC_ENTRIES, LSB_BITS, HAC_LEVELS, HAC_MODE.name(), n_loads, n_coc_hit, n_l1_hit,
             n_l1_miss, n_msb_cmps);
    done = 1'b1;
  end
endmodule
