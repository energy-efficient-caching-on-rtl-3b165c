// Testbench of the output path: the data-out register must load the word
// selected from the CoC line on a CoC hit and from the array line on a tag
// hit, one cycle after load_done, and hold its value otherwise.
module tb_coc_out_path;
  localparam int unsigned W = 8, WW = 32, LW = W * WW;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          coc_hit = 1'b0, tag_hit = 1'b0, load_done = 1'b0;
  logic [LW-1:0] coc_line = '0, array_line = '0;
  logic [2:0]    word_sel = '0;
  logic [WW-1:0] rdata;
  logic          rvalid;

  always #5 clk = ~clk;

  coc_out_path dut (.*);

  int checks = 0, failures = 0;
  logic [WW-1:0] exp_q = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!rvalid && rdata == '0, "reset state");
    for (int n = 0; n < 4000; n++) begin
      bit en;
      @(negedge clk);
      coc_hit = $urandom_range(0, 1);
      tag_hit = !coc_hit && $urandom_range(0, 1);
      load_done = $urandom_range(0, 3) != 0;
      for (int k = 0; k < W; k++) begin
        coc_line[k*WW +: WW] = $urandom();
        array_line[k*WW +: WW] = $urandom();
      end
      word_sel = 3'($urandom_range(0, W - 1));
      en = load_done && (coc_hit || tag_hit);
      if (en) exp_q = coc_hit ? coc_line[word_sel*WW +: WW] : array_line[word_sel*WW +: WW];
      @(posedge clk);
      #1;
      check(rvalid == en, "rvalid");
      check(rdata == exp_q, $sformatf("rdata %h expected %h", rdata, exp_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
