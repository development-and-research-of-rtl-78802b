// tb_csd_merge: self-checking test of the conveyor merge network.
// Each cycle two random halves, each already in descending order, enter the
// 8-lane merge (and a 6-lane one, the same pattern at another size). The
// output must be all values in descending order, worked out by the
// testbench, exactly N/2 rising edges after the edge that sampled the input.
// Cases where the larger values all sit in one half, and interleaved cases,
// are both counted and must both occur.
module tb_csd_merge;
  localparam int unsigned W = 8;
  localparam int unsigned ARRAYS = 400;

  logic clk, rst;
  logic [7:0][W-1:0] in8, out8;
  logic [5:0][W-1:0] in6, out6;
  int unsigned checks = 0, failures = 0;
  int unsigned one_sided = 0, interleaved = 0;

  csd_merge #(.N(8), .W(W)) dut8 (.clk(clk), .rst(rst), .d_in(in8), .d_out(out8));
  csd_merge #(.N(6), .W(W)) dut6 (.clk(clk), .rst(rst), .d_in(in6), .d_out(out6));

  initial begin
    clk = 1'b0;
    rst = 1'b1;
    in8 = '0;
    in6 = '0;
  end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (ARRAYS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist8 [ARRAYS][8];
  logic [W-1:0] hist6 [ARRAYS][6];

  // Fill one array with two descending halves of h values each.
  function automatic void halves(ref logic [W-1:0] a [8], input int h, input int unsigned hi);
    logic [W-1:0] x [4];
    logic [W-1:0] y [4];
    for (int i = 0; i < 4; i++) begin
      x[i] = W'($urandom_range(0, hi));
      y[i] = W'($urandom_range(0, hi));
    end
    x.rsort();
    y.rsort();
    a = '{default: '0};
    for (int i = 0; i < h; i++) begin
      a[i]   = x[i];
      a[h+i] = y[i];
    end
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < ARRAYS + 4; k++) begin
      automatic int unsigned hi = (k < 100) ? 3 : 255;
      automatic logic [W-1:0] a8 [8];
      automatic logic [W-1:0] a6 [8];
      halves(a8, 4, hi);
      halves(a6, 3, hi);
      if (k % 7 == 3)           // every seventh array: half B all larger
        for (int i = 0; i < 4; i++) a8[4+i] = W'(8'd255 - 8'(i));
      for (int c = 0; c < 8; c++) begin
        hist8[k % ARRAYS][c] = a8[c];
        in8[c] = a8[c];
      end
      for (int c = 0; c < 6; c++) begin
        hist6[k % ARRAYS][c] = a6[c];
        in6[c] = a6[c];
      end
      if (k < ARRAYS) begin
        if (a8[3] >= a8[4] || a8[7] >= a8[0]) one_sided++;
        else interleaved++;
      end
      @(posedge clk); #1;
      begin
        automatic int s8 = k - 3;
        automatic int s6 = k - 2;
        automatic logic [W-1:0] e8 [8];
        automatic logic [W-1:0] e6 [6];
        if (s8 >= 0) begin e8 = hist8[s8]; e8.rsort(); end else e8 = '{default: '0};
        if (s6 >= 0) begin e6 = hist6[s6]; e6.rsort(); end else e6 = '{default: '0};
        if (s8 < int'(ARRAYS)) begin
          checks++;
          for (int c = 0; c < 8; c++)
            if (out8[c] !== e8[c]) begin
              failures++;
              if (failures < 10) $display("FAIL N=8 cycle %0d lane %0d got %0d exp %0d", k, c, out8[c], e8[c]);
              break;
            end
        end
        if (s6 < int'(ARRAYS)) begin
          checks++;
          for (int c = 0; c < 6; c++)
            if (out6[c] !== e6[c]) begin
              failures++;
              if (failures < 10) $display("FAIL N=6 cycle %0d lane %0d got %0d exp %0d", k, c, out6[c], e6[c]);
              break;
            end
        end
      end
    end
    $display("one-sided merges=%0d interleaved merges=%0d", one_sided, interleaved);
    if (one_sided == 0 || interleaved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
