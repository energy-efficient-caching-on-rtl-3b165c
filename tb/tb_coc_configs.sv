// Configuration sweep of the CoC L1 cache over the ranges the design was
// evaluated at: cache sizes 8 KB to 64 KB, one to eight CoC entries, one to
// twelve HAC LSB bits, both the CAM-CAM and the CAM-REG model, and the
// single-level as well as the two-level address comparison. Each
// configuration runs the same self-checking random access stream
// (coc_cache_env) side by side; the result sums all of them.
module tb_coc_configs;
  import coc_pkg::*;

  localparam int NCFG = 8;
  logic [NCFG-1:0] done;
  int c [NCFG];
  int f [NCFG];

  coc_cache_env #(.CACHE_BYTES(16384), .COC_ENTRIES(1), .LSB_BITS(1),  .HAC_MODE(HAC_CAM_CAM))
    e0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  coc_cache_env #(.CACHE_BYTES(32768), .COC_ENTRIES(2), .LSB_BITS(12), .HAC_MODE(HAC_CAM_REG))
    e1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  coc_cache_env #(.CACHE_BYTES(65536), .COC_ENTRIES(8), .LSB_BITS(6),  .HAC_MODE(HAC_CAM_CAM))
    e2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  coc_cache_env #(.CACHE_BYTES(8192),  .COC_ENTRIES(8), .LSB_BITS(3),  .HAC_MODE(HAC_CAM_REG))
    e3 (.done(done[3]), .checks(c[3]), .failures(f[3]));
  coc_cache_env #(.CACHE_BYTES(65536), .COC_ENTRIES(4), .LSB_BITS(5),  .HAC_MODE(HAC_CAM_REG))
    e4 (.done(done[4]), .checks(c[4]), .failures(f[4]));
  coc_cache_env #(.CACHE_BYTES(8192),  .COC_ENTRIES(3), .LSB_BITS(5),  .HAC_MODE(HAC_CAM_CAM))
    e5 (.done(done[5]), .checks(c[5]), .failures(f[5]));
  // two-level page/block comparison in both storage models
  coc_cache_env #(.CACHE_BYTES(8192),  .COC_ENTRIES(4), .LSB_BITS(5),  .HAC_MODE(HAC_CAM_REG),
                  .HAC_LEVELS(2))
    e6 (.done(done[6]), .checks(c[6]), .failures(f[6]));
  coc_cache_env #(.CACHE_BYTES(32768), .COC_ENTRIES(8), .LSB_BITS(3),  .HAC_MODE(HAC_CAM_CAM),
                  .HAC_LEVELS(2))
    e7 (.done(done[7]), .checks(c[7]), .failures(f[7]));

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
