// Shared types and helpers of the caching-on-cache (CoC) L1 data cache.
//
// hac_mode_e selects how the CoC address buffer stores the upper (MSB) part
// of each address for the hierarchical address comparison (HAC):
//   HAC_CAM_CAM : MSB and LSB both in CAM, both compared on every lookup.
//   HAC_CAM_REG : LSB in CAM, MSB in plain registers; an entry's MSB
//                 comparator is enabled only when its LSB matched.
// Both models give the same hit result; they differ in how many MSB
// comparators switch per lookup, which the cache reports for energy
// accounting. CAM_REG with four entries is the recommended configuration.
package coc_pkg;

  typedef enum logic {
    HAC_CAM_CAM = 1'b0,
    HAC_CAM_REG = 1'b1
  } hac_mode_e;

  // Width of an index into n items, at least one bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
