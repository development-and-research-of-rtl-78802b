// tb_csd_tier: self-checking test of one conveyor tier.
// Two tiers of 8 lanes are tested: the default one (elements on lanes
// (1,0), (3,2), (5,4), (7,6)) and one with elements on (2,1), (4,3), (6,5) and
// lanes 0 and 7 passed straight. The expected lanes are worked out in the
// testbench from literal pair lists; results must appear one cycle later.
module tb_csd_tier;
  localparam int unsigned N = 8;
  localparam int unsigned W = 8;
  typedef logic [N-1:0][W-1:0] lanes_t;

  logic   clk, rst;
  lanes_t d, q_a, q_b;
  int unsigned checks = 0, failures = 0;

  csd_tier #(.N(N), .W(W)) dut_a (.clk(clk), .rst(rst), .d(d), .q(q_a));
  csd_tier #(.N(N), .W(W), .PAIRS(csd_pkg::lane_mask_t'(8'b0010_1010)))
    dut_b (.clk(clk), .rst(rst), .d(d), .q(q_b));

  initial begin
    clk = 1'b0;
    rst = 1'b1;
    d   = '0;
  end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply a compare-exchange on (hi_lane, lo_lane): larger value to lo_lane.
  function automatic lanes_t cx(lanes_t v, int lo);
    lanes_t r = v;
    if (v[lo+1] > v[lo]) begin
      r[lo]   = v[lo+1];
      r[lo+1] = v[lo];
    end
    return r;
  endfunction

  task automatic check(lanes_t got, lanes_t exp, string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", tag, got, exp);
    end
  endtask

  initial begin
    lanes_t v, ea, eb;
    @(posedge clk); #1;
    check(q_a, '0, "reset a");
    check(q_b, '0, "reset b");
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      for (int c = 0; c < N; c++) v[c] = W'($urandom_range(0, (i < 100) ? 3 : 255));
      ea = cx(cx(cx(cx(v, 0), 2), 4), 6);
      eb = cx(cx(cx(v, 1), 3), 5);
      d = v;
      @(posedge clk); #1;
      check(q_a, ea, "tier a");
      check(q_b, eb, "tier b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
