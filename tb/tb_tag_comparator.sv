// Testbench of the tag comparator: random tags, with equal tags and tags
// differing in a single bit forced often, against the expected
// en && valid && equal.
module tb_tag_comparator;
  localparam int unsigned TW = 19;

  logic          en, stored_valid, hit;
  logic [TW-1:0] stored_tag, req_tag;

  tag_comparator dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic int r = $urandom_range(0, 2);
      en = $urandom_range(0, 3) != 0;
      stored_valid = $urandom_range(0, 3) != 0;
      stored_tag = TW'($urandom());
      if (r == 0)      req_tag = stored_tag;
      else if (r == 1) req_tag = stored_tag ^ (TW'(1) << $urandom_range(0, TW - 1));
      else             req_tag = TW'($urandom());
      #1;
      checks++;
      if (hit != (en && stored_valid && stored_tag == req_tag)) begin
        failures++;
        $display("FAIL en=%b v=%b %h vs %h hit=%b", en, stored_valid, stored_tag, req_tag, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
