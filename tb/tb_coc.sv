// Testbench of the CoC buffer at its default sizes. Lines are inserted with
// update_en; the test checks that entries are filled and replaced in FIFO
// order (the fifth insertion replaces the first), that a hit returns the
// line stored with its block address, that an invalidation removes exactly
// the hitting entry, and the HAC MSB comparison count in the CAM-REG model.
module tb_coc;
  import coc_pkg::*;

  localparam int unsigned N = 4, BW = 27, LW = 256;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [BW-1:0] lookup_blk = '0, update_blk = '0;
  logic [LW-1:0] update_line = '0, hit_line;
  logic          update_en = 1'b0, inv_en = 1'b0, hit;
  logic [N-1:0]  hit_vec, valid;
  logic [2:0]    msb_cmp_cnt;
  logic [1:0]    fifo_ptr;

  always #5 clk = ~clk;

  coc dut (.*);

  int checks = 0, failures = 0;
  logic [BW-1:0] ref_blk [N];
  logic [LW-1:0] ref_line [N];
  logic          ref_v [N];
  int            ref_ptr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [LW-1:0] rnd_line();
    logic [LW-1:0] l;
    for (int k = 0; k < LW / 32; k++) l[k*32 +: 32] = $urandom();
    return l;
  endfunction

  // compare a lookup with the reference
  task automatic probe(input logic [BW-1:0] b);
    int e = -1, lsb = 0;
    @(negedge clk);
    update_en = 1'b0; inv_en = 1'b0; lookup_blk = b;
    #1;
    for (int i = 0; i < N; i++) if (ref_v[i]) begin
      if (ref_blk[i][4:0] == b[4:0]) lsb++;
      if (ref_blk[i] == b) e = i;
    end
    check(hit == (e >= 0), $sformatf("hit for %h", b));
    check(int'(msb_cmp_cnt) == lsb, $sformatf("MSB comparisons for %h", b));
    if (e >= 0) begin
      check(hit_vec == N'(1) << e, $sformatf("hit entry for %h", b));
      check(hit_line == ref_line[e], $sformatf("hit line for %h", b));
    end
  endtask

  task automatic insert(input logic [BW-1:0] b);
    @(negedge clk);
    inv_en = 1'b0; update_en = 1'b1; update_blk = b; update_line = rnd_line();
    lookup_blk = b;
    check(fifo_ptr == 2'(ref_ptr), "FIFO pointer");
    @(posedge clk);
    ref_blk[ref_ptr] = b; ref_line[ref_ptr] = update_line; ref_v[ref_ptr] = 1'b1;
    ref_ptr = (ref_ptr + 1) % N;
    #1 update_en = 1'b0;
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) ref_v[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    probe(27'h10);
    // fill in FIFO order
    for (int i = 0; i < N; i++) insert(27'h100 + 27'(i));
    for (int i = 0; i < N; i++) probe(27'h100 + 27'(i));
    // same LSB field, different MSB field: LSB match without hit
    probe(27'h100 + 27'h20);
    // fifth insertion replaces the oldest
    insert(27'h200);
    probe(27'h100);
    check(!hit, "oldest entry replaced");
    probe(27'h200);
    check(hit && hit_vec == 4'b0001, "new entry in slot 0");
    // invalidate the entry that hits
    @(negedge clk);
    lookup_blk = 27'h102; inv_en = 1'b1;
    @(posedge clk);
    ref_v[2] = 1'b0;
    #1 inv_en = 1'b0;
    probe(27'h102);
    check(!hit && valid == 4'b1011, "invalidated entry");
    // random phase
    for (int n = 0; n < 3000; n++) begin
      automatic logic [BW-1:0] b = {22'($urandom_range(0, 3)), 5'($urandom_range(0, 7))};
      automatic int e = -1;
      for (int i = 0; i < N; i++) if (ref_v[i] && ref_blk[i] == b) e = i;
      if (e < 0 && $urandom_range(0, 1) == 0) insert(b);
      else probe(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
