// csd_pkg: shared types and structure functions of the conveyor sorting device.
//
// A conveyor tier is described by a lane mask: bit c set means that a basic
// sorting element (BSE) joins lanes c+1 and c of that tier, the larger value
// leaving on lane c and the smaller on lane c+1. Lane 0 is the first input
// (x1) and the first output (y1, the largest value). The functions below give
// the masks of the modified-bubble conveyor (each half of the improved device)
// and of the merge conveyor that follows it, exactly as the structure drawing
// of the 8-value device places its 22 elements; for other even sizes the same
// pattern is continued, which is this package's own generalisation.
// The functions also give the latency (number of register ranks) and element
// counts that the testbenches hold against the closed-form counts.
package csd_pkg;

  // Largest number of lanes a tier mask can describe.
  localparam int unsigned MAX_LANES = 256;

  typedef logic [MAX_LANES-1:0] lane_mask_t;

  // Pairs (1,0), (3,2), ... of an n-lane tier; a default for a lone tier.
  function automatic lane_mask_t even_pairs(int unsigned n);
    lane_mask_t m = '0;
    for (int unsigned c = 0; c + 1 < n; c += 2) m[c] = 1'b1;
    return m;
  endfunction

  // Bubble (insertion-triangle) conveyor of m values, tier t = 1 .. 2m-3.
  // Insertion round r (r = 1 .. m-1) walks the new value from lane r down to
  // lane 0; its element on lanes (c+1, c) works in tier 2r-1-c.
  function automatic lane_mask_t bubble_mask(int unsigned m, int unsigned t);
    lane_mask_t k = '0;
    for (int unsigned c = 0; c + 1 < m; c++) begin
      if (((t + 1 + c) % 2 == 0) && (c + 1 <= t) && (t + 1 + c <= 2 * m - 2))
        k[c] = 1'b1;
    end
    return k;
  endfunction

  // Merge triangle of n lanes, tier j = 1 .. n/2-1 (tier 0 is the cross tier):
  // elements on lanes (c+1, c) for c = j, j+2, ..., n-j-2.
  function automatic lane_mask_t merge_mask(int unsigned n, int unsigned j);
    lane_mask_t k = '0;
    for (int unsigned c = j; c + j + 2 <= n; c += 2) k[c] = 1'b1;
    return k;
  endfunction

  // Number of BSEs named by a mask.
  function automatic int unsigned mask_count(lane_mask_t k);
    int unsigned s = 0;
    for (int unsigned c = 0; c < MAX_LANES; c++) s += int'(k[c]);
    return s;
  endfunction

  // Register ranks of the bubble conveyor of m values: input rank + 2m-3 tiers.
  function automatic int unsigned bubble_ranks(int unsigned m);
    return 2 * m - 2;
  endfunction

  // Register ranks of the improved device of n values: 3n/2 - 2.
  function automatic int unsigned improved_ranks(int unsigned n);
    return bubble_ranks(n / 2) + n / 2;
  endfunction

endpackage
