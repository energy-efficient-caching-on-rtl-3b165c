// Testbench of the CoC data register lines: random line writes into a
// reference copy, then reads through every one-hot select and through the
// empty select, which must return zero.
module tb_coc_data_regs;
  localparam int unsigned N = 4, LW = 256;

  logic          clk = 1'b0;
  logic          wr_en = 1'b0;
  logic [1:0]    wr_idx = '0;
  logic [LW-1:0] wr_line = '0;
  logic [N-1:0]  rd_sel = '0;
  logic [LW-1:0] rd_line;

  always #5 clk = ~clk;

  coc_data_regs dut (.*);

  int checks = 0, failures = 0;
  logic [LW-1:0] ref_line [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [LW-1:0] rnd_line();
    logic [LW-1:0] l;
    for (int k = 0; k < LW / 32; k++) l[k*32 +: 32] = $urandom();
    return l;
  endfunction

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_idx = 2'(i); wr_line = rnd_line(); ref_line[i] = wr_line;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_idx = 2'($urandom_range(0, N - 1));
      wr_line = rnd_line();
      if ($urandom_range(0, 4) == 0) rd_sel = '0;
      else rd_sel = N'(1) << $urandom_range(0, N - 1);
      #1;
      if (rd_sel == '0) check(rd_line == '0, "empty select must read zero");
      else for (int i = 0; i < N; i++)
        if (rd_sel[i]) check(rd_line == ref_line[i], $sformatf("read of line %0d", i));
      @(posedge clk);
      if (wr_en) ref_line[wr_idx] = wr_line;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
