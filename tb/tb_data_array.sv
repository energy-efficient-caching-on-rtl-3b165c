// Testbench of the data array at its default size (256 lines of eight
// 32-bit words). Random word writes go into a reference copy; line reads
// through the gated read port are compared with it, and a disabled read must
// return zero.
module tb_data_array;
  localparam int unsigned L = 256, W = 8, WW = 32, LW = W * WW;

  logic          clk = 1'b0;
  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [7:0]    rd_idx = '0, wr_idx = '0;
  logic [2:0]    wr_word = '0;
  logic [WW-1:0] wr_data = '0;
  logic [LW-1:0] rd_line;

  always #5 clk = ~clk;

  data_array dut (.*);

  int checks = 0, failures = 0;
  logic [LW-1:0] ref_line [L];

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
    // initialise lines 0..15 word by word
    for (int i = 0; i < 16; i++)
      for (int w = 0; w < W; w++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_idx = 8'(i); wr_word = 3'(w); wr_data = $urandom();
        ref_line[i][w*WW +: WW] = wr_data;
      end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_idx = 8'($urandom_range(0, 15));
      wr_word = 3'($urandom_range(0, W - 1)); wr_data = $urandom();
      rd_en = $urandom_range(0, 3) != 0; rd_idx = 8'($urandom_range(0, 15));
      #1;
      if (!rd_en) check(rd_line == '0, "disabled read must return zero");
      else check(rd_line == ref_line[rd_idx], $sformatf("line %0d", rd_idx));
      @(posedge clk);
      if (wr_en) ref_line[wr_idx][wr_word*WW +: WW] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
