// Testbench of the tag array at its default size (256 x 19). Checks that
// reset leaves every entry invalid, that written tags and valid bits read
// back through the gated read port, and that a disabled read returns zero.
module tb_tag_array;
  localparam int unsigned L = 256, TW = 19;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          rd_en = 1'b0, wr_en = 1'b0, wr_valid = 1'b0, rd_valid;
  logic [7:0]    rd_idx = '0, wr_idx = '0;
  logic [TW-1:0] wr_tag = '0, rd_tag;

  always #5 clk = ~clk;

  tag_array dut (.*);

  int checks = 0, failures = 0;
  logic [TW-1:0] ref_tag [L];
  logic          ref_v [L];

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
    for (int i = 0; i < L; i++) ref_v[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_idx = 8'(i);
      #1 check(!rd_valid, $sformatf("entry %0d valid after reset", i));
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_idx = 8'($urandom_range(0, 15));
      wr_tag = TW'($urandom()); wr_valid = $urandom_range(0, 3) != 0;
      rd_en = $urandom_range(0, 3) != 0; rd_idx = 8'($urandom_range(0, 15));
      #1;
      if (!rd_en) check(rd_tag == '0 && !rd_valid, "disabled read must return zero");
      else begin
        check(rd_valid == ref_v[rd_idx], $sformatf("valid of %0d", rd_idx));
        if (ref_v[rd_idx]) check(rd_tag == ref_tag[rd_idx], $sformatf("tag of %0d", rd_idx));
      end
      @(posedge clk);
      if (wr_en) begin ref_tag[wr_idx] = wr_tag; ref_v[wr_idx] = wr_valid; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
