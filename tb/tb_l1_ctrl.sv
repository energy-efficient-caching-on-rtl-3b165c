// Testbench of the cache controller on its own. The CoC and tag hit inputs
// are driven directly and the memory acknowledge comes a fixed number of
// cycles after each request. Checks, for every kind of access, the array
// enable (index tri-state), the completion cycle, the CoC update and
// invalidation, the refill address and word sequence, the tag write and the
// event pulses; random sequences of all kinds follow the directed ones.
module tb_l1_ctrl;
  localparam int unsigned LAT = 3, WORDS = 8;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req_valid = 1'b0, req_we = 1'b0;
  logic [31:0] req_addr = '0;
  logic        req_ready, coc_hit = 1'b0, tag_hit = 1'b0;
  logic        array_en, load_done, coc_update, coc_inv;
  logic        data_wr_en, data_wr_from_mem, tag_wr_en;
  logic [2:0]  data_wr_word;
  logic        mem_req, mem_we, mem_ack = 1'b0;
  logic [31:0] mem_addr;
  logic        ev_coc_hit, ev_l1_hit, ev_l1_miss, ev_coc_inv;

  always #5 clk = ~clk;

  l1_ctrl dut (.*);

  // acknowledge LAT cycles after a request is first seen
  int unsigned acnt = 0;
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (acnt + 1 >= LAT) begin acnt <= 0; mem_ack <= 1'b1; end
      else acnt <= acnt + 1;
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // kind: 0 CoC-hit load, 1 array-hit load, 2 missing load, 3 store
  task automatic access(input int kind, input logic [31:0] addr, input bit s_coc, input bit s_tag);
    int cyc = 0, beats = 0, exp_cyc;
    bit saw_miss = 0, saw_tagwr = 0;
    @(negedge clk);
    req_valid = 1'b1; req_addr = addr; req_we = (kind == 3);
    coc_hit = (kind == 0) || (kind == 3 && s_coc);
    tag_hit = (kind == 1) || (kind == 3 && s_tag);
    #1;
    while (!req_ready) begin
      if (kind != 3 && cyc == 0) check(array_en == !coc_hit, "array enable on lookup");
      if (ev_l1_miss) saw_miss = 1;
      if (mem_req) begin
        check(mem_we == (kind == 3), "memory write flag");
        if (kind == 2)
          check(mem_addr == {addr[31:5], 3'(beats), 2'b00},
                $sformatf("refill address %h beat %0d", mem_addr, beats));
        else
          check(mem_addr == {addr[31:2], 2'b00}, "write-through address");
      end
      if (data_wr_en && kind == 2) begin
        check(data_wr_from_mem && data_wr_word == 3'(beats), "refill word write");
        beats++;
      end
      if (tag_wr_en) begin
        saw_tagwr = 1;
        check(beats == WORDS, "tag written with the last word");
        tag_hit = 1'b1;   // the line is present from now on
      end
      @(negedge clk);
      #1;
      cyc++;
      if (cyc > 200) break;
    end
    // accepting cycle
    case (kind)
      0: exp_cyc = 0;
      1: exp_cyc = 0;
      2: exp_cyc = 1 + WORDS * (LAT + 1);
      default: exp_cyc = LAT + 1;
    endcase
    check(cyc == exp_cyc, $sformatf("kind %0d done after %0d cycles, expected %0d", kind, cyc, exp_cyc));
    check(load_done == (kind != 3), "load_done");
    check(array_en == (kind != 0), "array enable when done");
    check(coc_update == (kind == 1 || kind == 2), "CoC update");
    check(coc_inv == (kind == 3 && s_coc) && ev_coc_inv == coc_inv, "CoC invalidation");
    check(ev_coc_hit == (kind == 0), "CoC hit event");
    check(ev_l1_hit == (kind == 1), "array hit event");
    if (kind == 3) check(data_wr_en == s_tag && !data_wr_from_mem, "store array write");
    if (kind == 2) check(saw_miss && saw_tagwr && beats == WORDS, "refill sequence");
    else check(!saw_miss, "no miss event");
    @(posedge clk);
    #1 req_valid = 1'b0;
    coc_hit = 1'b0; tag_hit = 1'b0;
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!req_ready && !mem_req && !array_en, "idle without request");
    access(0, 32'h0000_1004, 0, 0);
    access(1, 32'h0000_1008, 0, 0);
    access(2, 32'h1234_5678, 0, 0);
    access(3, 32'h0000_1004, 1, 1);
    access(3, 32'h0000_2004, 0, 1);
    access(3, 32'h0000_3004, 0, 0);
    for (int n = 0; n < 500; n++) begin
      automatic int k = $urandom_range(0, 3);
      access(k, $urandom(), $urandom_range(0, 1), $urandom_range(0, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
