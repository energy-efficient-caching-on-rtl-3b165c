// End-to-end testbench of the CoC L1 data cache at its default size
// (8 KB direct-mapped, 32-byte lines, four CoC entries, five HAC LSB bits,
// CAM-REG model).
//
// A CPU driver issues loads and stores; next_level_mem stands for the next
// level of the hierarchy. Every load's data are compared with the contents
// the memory must hold (the cache writes through, so memory is always
// current). A reference model of the direct-mapped tags and of the FIFO CoC
// predicts for each access whether it hits the CoC, hits the arrays or
// misses, how many MSB comparators the HAC enables, and so the exact number
// of cycles until the request is accepted. A directed phase makes each
// mechanism happen (CoC hit with arrays idle, CoC miss and fill, FIFO
// wrap-around, conflict refill, LSB match with MSB mismatch, store that
// invalidates a CoC entry, store hit and miss in the arrays); a random phase
// with spatial locality follows. Each mechanism is counted and one that never
// happened is a failure.
module tb_coc_l1_cache;
  import coc_pkg::*;

  localparam int unsigned LAT     = 4;
  localparam int unsigned ENTRIES = 4;
  localparam int unsigned LSBB    = 5;
  localparam int unsigned WORDS   = 8;
  localparam int unsigned LINES   = 256;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req_valid = 1'b0, req_we = 1'b0;
  logic [31:0] req_addr = '0, req_wdata = '0;
  logic        req_ready, rsp_valid;
  logic [31:0] rsp_rdata;
  logic        mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        ev_coc_hit, ev_l1_hit, ev_l1_miss, ev_coc_inv, ev_array_access;
  logic [2:0]  ev_msb_cmps;

  always #5 clk = ~clk;

  coc_l1_cache dut (.*);

  next_level_mem #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata
  );

  int checks = 0, failures = 0;
  int n_coc_hit = 0, n_l1_hit = 0, n_l1_miss = 0, n_coc_inv = 0, n_fifo_wrap = 0;
  int n_conflict = 0, n_hac_msb_miss = 0, n_hac_filtered = 0;
  int n_store_hit = 0, n_store_miss = 0, n_array_idle = 0;
  longint n_msb_cmps = 0;

  // reference model
  logic [18:0] ref_tag   [LINES];
  logic        ref_v     [LINES];
  logic [26:0] ref_blk   [ENTRIES];
  logic        ref_cv    [ENTRIES];
  int          ref_ptr = 0;
  int          n_updates = 0;
  logic [31:0] ref_mem [logic [31:0]];

  function automatic logic [31:0] ref_read(input logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : u_mem.init_word(a);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic coc_insert(input logic [26:0] blk);
    ref_blk[ref_ptr] = blk;
    ref_cv[ref_ptr]  = 1'b1;
    ref_ptr = (ref_ptr + 1) % ENTRIES;
    n_updates++;
    if (n_updates > ENTRIES) n_fifo_wrap++;
  endtask

  // one access: predict, drive, wait for acceptance, check everything
  task automatic access(input bit we, input logic [31:0] addr, input logic [31:0] wdata);
    logic [26:0] blk = addr[31:5];
    logic [7:0]  idx = addr[12:5];
    logic [18:0] tag = addr[31:13];
    int  coc_e = -1, lsb_hits = 0, exp_wait, waited;
    bit  l1hit, seen_miss = 0, seen_coc = 0, seen_l1 = 0, seen_inv = 0;
    bit  arrays_used = 0;
    logic [2:0] msb_seen = '0;
    logic [31:0] exp_data;
    addr[1:0] = 2'b00;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ref_cv[i] && ref_blk[i][LSBB-1:0] == blk[LSBB-1:0]) begin
        lsb_hits++;
        if (ref_blk[i] == blk) coc_e = i;
      end
    end
    l1hit = ref_v[idx] && ref_tag[idx] == tag;
    if (we) exp_wait = LAT + 1;
    else if (coc_e >= 0 || l1hit) exp_wait = 0;
    else exp_wait = 1 + WORDS * (LAT + 1);

    req_valid <= 1'b1; req_we <= we; req_addr <= addr; req_wdata <= wdata;
    waited = 0;
    #1;
    while (!req_ready) begin
      if (ev_l1_miss) seen_miss = 1;
      if (ev_array_access) arrays_used = 1;
      waited++;
      @(negedge clk);
      #1;
      if (waited > 200) break;
    end
    if (ev_array_access) arrays_used = 1;
    seen_coc = ev_coc_hit; seen_l1 = ev_l1_hit; seen_inv = ev_coc_inv;
    msb_seen = ev_msb_cmps;
    @(posedge clk);
    #1 req_valid <= 1'b0;
    check(waited == exp_wait, $sformatf("%s %h accepted after %0d cycles, expected %0d",
                                        we ? "store" : "load", addr, waited, exp_wait));
    if (we) begin
      check(seen_inv == (coc_e >= 0), $sformatf("store %h CoC invalidation", addr));
      if (coc_e >= 0) begin
        ref_cv[coc_e] = 1'b0;
        n_coc_inv++;
      end
      if (l1hit) n_store_hit++; else n_store_miss++;
      ref_mem[addr] = wdata;
    end else begin
      exp_data = ref_read(addr);
      check(msb_seen == 3'(lsb_hits), $sformatf("load %h MSB comparisons %0d, expected %0d",
                                                addr, msb_seen, lsb_hits));
      n_msb_cmps += msb_seen;
      if (lsb_hits > 0 && coc_e < 0) n_hac_msb_miss++;
      for (int i = 0; i < ENTRIES; i++)
        if (ref_cv[i] && ref_blk[i][LSBB-1:0] != blk[LSBB-1:0]) n_hac_filtered++;
      if (coc_e >= 0) begin
        check(seen_coc && !seen_l1 && !seen_miss && !arrays_used,
              $sformatf("load %h should hit the CoC with the arrays idle", addr));
        n_coc_hit++;
        n_array_idle++;
      end else if (l1hit) begin
        check(!seen_coc && seen_l1 && !seen_miss, $sformatf("load %h should hit the arrays", addr));
        n_l1_hit++;
        coc_insert(blk);
      end else begin
        check(!seen_coc && !seen_l1 && seen_miss, $sformatf("load %h should miss", addr));
        n_l1_miss++;
        if (ref_v[idx]) n_conflict++;
        ref_v[idx]   = 1'b1;
        ref_tag[idx] = tag;
        coc_insert(blk);
      end
      @(negedge clk);
      check(rsp_valid && rsp_rdata == exp_data,
            $sformatf("load %h returned %h (valid %b), expected %h", addr, rsp_rdata,
                      rsp_valid, exp_data));
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a;
    for (int i = 0; i < LINES; i++) ref_v[i] = 1'b0;
    for (int i = 0; i < ENTRIES; i++) ref_cv[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed: miss, then CoC hits along the line
    access(0, 32'h0000_1000, 0);
    for (int w = 1; w < 8; w++) access(0, 32'h0000_1000 + 4 * w, 0);
    // fill the remaining CoC entries, then wrap the FIFO
    access(0, 32'h0000_1020, 0);
    access(0, 32'h0000_1040, 0);
    access(0, 32'h0000_1060, 0);
    access(0, 32'h0000_1080, 0);         // evicts 0x1000 from the CoC
    access(0, 32'h0000_1004, 0);         // CoC miss, array hit
    // LSB field [9:5] equal, MSB differs: 0x1020 vs 0x1420
    access(0, 32'h0000_1420, 0);
    access(0, 32'h0000_1420, 0);
    // conflict in the direct-mapped array: same index, other tag
    access(0, 32'h0000_3000, 0);
    access(0, 32'h0000_1000, 0);
    // stores: hit in CoC (invalidate), hit in arrays only, miss
    access(1, 32'h0000_1008, 32'hDEAD_BEEF);
    access(0, 32'h0000_1008, 0);
    access(1, 32'h0000_3010, 32'h1234_5678);
    access(0, 32'h0000_3010, 0);
    access(1, 32'h0007_7770, 32'hCAFE_F00D);
    access(0, 32'h0007_7770, 0);

    // random accesses with spatial locality
    a = 32'h0000_2000;
    for (int n = 0; n < 3000; n++) begin
      automatic int r = $urandom_range(0, 99);
      if (r < 70)      a = a + 4;
      else if (r < 80) a = a - 32;
      else if (r < 90) a = {$urandom_range(0, 3) == 0 ? 19'h00003 : 19'h00001,
                            8'($urandom_range(0, 15)), 5'($urandom_range(0, 31))};
      else             a = {16'h0000, 16'($urandom())};
      access($urandom_range(0, 9) == 0, a, $urandom());
    end

    check(n_coc_hit > 0,      "no load hit the CoC");
    check(n_array_idle > 0,   "arrays were never left idle");
    check(n_l1_hit > 0,       "no load missed the CoC and hit the arrays");
    check(n_l1_miss > 0,      "no refill");
    check(n_conflict > 0,     "no conflict refill");
    check(n_fifo_wrap > 0,    "CoC FIFO never wrapped");
    check(n_hac_msb_miss > 0, "no LSB match with MSB mismatch");
    check(n_hac_filtered > 0, "no MSB comparator filtered by the LSB");
    check(n_coc_inv > 0,      "no store invalidated a CoC entry");
    check(n_store_hit > 0,    "no store hit the arrays");
    check(n_store_miss > 0,   "no store missed the arrays");
    $display("coc_hit=%0d l1_hit=%0d l1_miss=%0d conflict=%0d fifo_wrap=%0d coc_inv=%0d",
             n_coc_hit, n_l1_hit, n_l1_miss, n_conflict, n_fifo_wrap, n_coc_inv);
    $display("store_hit=%0d store_miss=%0d lsb_match_msb_miss=%0d msb_filtered=%0d msb_cmps=%0d",
             n_store_hit, n_store_miss, n_hac_msb_miss, n_hac_filtered, n_msb_cmps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
