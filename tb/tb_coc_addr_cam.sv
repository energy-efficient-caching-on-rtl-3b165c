// Testbench of the HAC address buffer. The same random writes, invalidations
// and lookups drive four instances: the CAM-REG and the CAM-CAM model, each
// with the single-level split (defaults: four entries, 27-bit block address,
// five LSB bits) and with the two-level page/block split (7-bit in-page
// segment, five LSB bits in each level). Block addresses come from a small set so that LSB fields often
// match while MSB fields differ. A reference copy of the entries predicts
// the LSB matches, the enabled MSB comparators, the count of MSB comparisons
// and the hit vector of each model.
module tb_coc_addr_cam;
  import coc_pkg::*;

  localparam int unsigned N = 4, BW = 27, LB = 5;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [BW-1:0] lookup_blk = '0, wr_blk = '0;
  logic          wr_en = 1'b0, inv_en = 1'b0;
  logic [1:0]    wr_idx = '0;
  logic [N-1:0]  inv_mask = '0;
  logic [N-1:0]  lsb_r, en_r, hv_r, v_r, lsb_c, en_c, hv_c, v_c;
  logic          hit_r, hit_c;
  logic [2:0]    cnt_r, cnt_c;
  logic [N-1:0]  lsb_r2, en_r2, hv_r2, v_r2, lsb_c2, en_c2, hv_c2, v_c2;
  logic          hit_r2, hit_c2;
  logic [3:0]    cnt_r2, cnt_c2;

  always #5 clk = ~clk;

  coc_addr_cam #(.MODE(HAC_CAM_REG)) dut_reg (
    .clk, .rst_n, .lookup_blk, .lsb_match(lsb_r), .msb_cmp_en(en_r), .hit_vec(hv_r),
    .hit(hit_r), .msb_cmp_cnt(cnt_r), .wr_en, .wr_idx, .wr_blk, .inv_en, .inv_mask,
    .valid(v_r));
  coc_addr_cam #(.MODE(HAC_CAM_CAM)) dut_cam (
    .clk, .rst_n, .lookup_blk, .lsb_match(lsb_c), .msb_cmp_en(en_c), .hit_vec(hv_c),
    .hit(hit_c), .msb_cmp_cnt(cnt_c), .wr_en, .wr_idx, .wr_blk, .inv_en, .inv_mask,
    .valid(v_c));
  coc_addr_cam #(.MODE(HAC_CAM_REG), .HAC_LEVELS(2)) dut_reg2 (
    .clk, .rst_n, .lookup_blk, .lsb_match(lsb_r2), .msb_cmp_en(en_r2), .hit_vec(hv_r2),
    .hit(hit_r2), .msb_cmp_cnt(cnt_r2), .wr_en, .wr_idx, .wr_blk, .inv_en, .inv_mask,
    .valid(v_r2));
  coc_addr_cam #(.MODE(HAC_CAM_CAM), .HAC_LEVELS(2)) dut_cam2 (
    .clk, .rst_n, .lookup_blk, .lsb_match(lsb_c2), .msb_cmp_en(en_c2), .hit_vec(hv_c2),
    .hit(hit_c2), .msb_cmp_cnt(cnt_c2), .wr_en, .wr_idx, .wr_blk, .inv_en, .inv_mask,
    .valid(v_c2));

  int checks = 0, failures = 0, n_hit = 0, n_lsb_only = 0;
  logic [BW-1:0] ref_blk [N];
  logic [N-1:0]  ref_v = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [BW-1:0] pick();
    // page-number MSB, page-number LSB, in-page MSB, in-page LSB
    return {15'($urandom_range(0, 1)), 5'($urandom_range(0, 1)),
            2'($urandom_range(0, 1)), 5'($urandom_range(0, 3))};
  endfunction

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
    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] e_lsb, e_hv;
      int e_cnt, e_hi;
      @(negedge clk);
      // update for the next edge
      wr_en = 1'b0; inv_en = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        automatic logic [BW-1:0] b = pick();
        automatic int slot = $urandom_range(0, N - 1);
        automatic bit dup = 0;
        for (int i = 0; i < N; i++) if (i != slot && ref_v[i] && ref_blk[i] == b) dup = 1;
        if (!dup) begin
          wr_en = 1'b1; wr_idx = 2'(slot); wr_blk = b;
        end
      end else if ($urandom_range(0, 7) == 0) begin
        inv_en = 1'b1; inv_mask = N'($urandom());
      end
      lookup_blk = pick();
      #1;
      e_lsb = '0; e_hv = '0; e_cnt = 0; e_hi = 0;
      for (int i = 0; i < N; i++) begin
        e_lsb[i] = ref_v[i] && ref_blk[i][LB-1:0] == lookup_blk[LB-1:0];
        e_hv[i]  = e_lsb[i] && ref_blk[i] == lookup_blk;
        e_cnt   += e_lsb[i];
        e_hi    += int'(ref_v[i] && ref_blk[i][11:7] == lookup_blk[11:7]);
      end
      check(v_r == ref_v && v_c == ref_v, "valid bits");
      check(lsb_r == e_lsb && lsb_c == e_lsb, $sformatf("lsb match %b/%b exp %b", lsb_r, lsb_c, e_lsb));
      check(hv_r == e_hv && hv_c == e_hv, $sformatf("hit vector %b/%b exp %b", hv_r, hv_c, e_hv));
      check(hit_r == |e_hv && hit_c == |e_hv, "hit");
      check(en_r == e_lsb, $sformatf("CAM-REG MSB enables %b exp %b", en_r, e_lsb));
      check(en_c == ref_v, "CAM-CAM MSB enables");
      check(int'(cnt_r) == e_cnt, $sformatf("CAM-REG MSB count %0d exp %0d", cnt_r, e_cnt));
      check(int'(cnt_c) == $countones(ref_v), "CAM-CAM MSB count");
      // two-level instances
      check(v_r2 == ref_v && v_c2 == ref_v, "two-level valid bits");
      check(lsb_r2 == e_lsb && lsb_c2 == e_lsb, "two-level lower LSB match");
      check(hv_r2 == e_hv && hv_c2 == e_hv, $sformatf("two-level hit vector %b/%b exp %b", hv_r2, hv_c2, e_hv));
      check(hit_r2 == |e_hv && hit_c2 == |e_hv, "two-level hit");
      check(en_r2 == e_lsb && en_c2 == ref_v, "two-level lower MSB enables");
      check(int'(cnt_r2) == e_cnt + e_hi, $sformatf("two-level CAM-REG MSB count %0d exp %0d", cnt_r2, e_cnt + e_hi));
      check(int'(cnt_c2) == 2 * $countones(ref_v), "two-level CAM-CAM MSB count");
      if (|e_hv) n_hit++;
      if (|e_lsb && !(|e_hv)) n_lsb_only++;
      // model the edge
      @(posedge clk);
      if (inv_en) ref_v = ref_v & ~inv_mask;
      else if (wr_en) begin ref_v[wr_idx] = 1'b1; ref_blk[wr_idx] = wr_blk; end
    end
    check(n_hit > 0, "no hit seen");
    check(n_lsb_only > 0, "no LSB-only match seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
