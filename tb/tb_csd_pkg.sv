// tb_csd_pkg: checks the structure functions of csd_pkg.
// The tier masks for 8 values are compared with the element placement of the
// published 8-value structure, written out literally below, and the element
// and register-rank counts for even sizes 4 .. 128 are compared with the
// closed-form counts: M(M-1)/2 elements per bubble conveyor,
// ((N/2)^2 - N/2)/2 + N/2 in the merge, 3((N/2)^2 - N/2)/2 + N/2 in all,
// and 3N/2 - 2 register ranks.
module tb_csd_pkg;
  import csd_pkg::*;
  int unsigned checks = 0, failures = 0;

  task automatic check(int unsigned got, int unsigned exp, string tag);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Half sorter of 4 values, tiers 1..5: pairs (2,1); (3,2); (2,1)+(4,3);
    // (3,2); (2,1) in 1-based lane numbers -> bit c for pair (c+2, c+1).
    static logic [3:0] bub [1:5] = '{4'b0001, 4'b0010, 4'b0101, 4'b0010, 4'b0001};
    // Merge of 8 values, tiers 1..3: (3,2)+(5,4)+(7,6); (4,3)+(6,5); (5,4).
    static logic [7:0] mrg [1:3] = '{8'b0010_1010, 8'b0001_0100, 8'b0000_1000};
    for (int t = 1; t <= 5; t++)
      check(int'(bubble_mask(4, t)), int'(bub[t]), $sformatf("bubble_mask(4,%0d)", t));
    for (int j = 1; j <= 3; j++)
      check(int'(merge_mask(8, j)), int'(mrg[j]), $sformatf("merge_mask(8,%0d)", j));
    check(int'(even_pairs(8)), 32'h55, "even_pairs(8)");

    for (int n = 4; n <= 128; n += 2) begin
      automatic int unsigned m = n / 2;
      automatic int unsigned bsum = 0;
      automatic int unsigned msum = 0;
      for (int t = 1; t <= int'(2 * m - 3); t++) bsum += mask_count(bubble_mask(m, t));
      msum = mask_count(even_pairs(n));
      for (int j = 1; j < int'(m); j++) msum += mask_count(merge_mask(n, j));
      check(bsum, m * (m - 1) / 2, $sformatf("bubble elements m=%0d", m));
      check(msum, (m * m - m) / 2 + m, $sformatf("merge elements n=%0d", n));
      check(2 * bsum + msum, 3 * (m * m - m) / 2 + m, $sformatf("total elements n=%0d", n));
      check(improved_ranks(n), 3 * n / 2 - 2, $sformatf("ranks n=%0d", n));
    end
    check(improved_ranks(8), 10, "ranks of the 8-value device");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
