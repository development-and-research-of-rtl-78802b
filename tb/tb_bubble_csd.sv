// tb_bubble_csd: self-checking test of the bubble conveyor sorter.
// Two instances are streamed with a new random array every clock cycle: the
// 4-value conveyor used for each half of the improved device (latency 6) and
// an 8-value one, the single-conveyor structure for 8 values (latency 14).
// Each output must equal the input array sorted in descending order by the
// testbench, exactly latency rising edges after the edge that loaded it, and
// all-zero before that (the ranks were reset).
module tb_bubble_csd;
  localparam int unsigned W = 8;
  localparam int unsigned ARRAYS = 400;

  logic clk, rst;

  initial begin
    clk = 1'b0;
    rst = 1'b1;
  end
  logic [3:0][W-1:0] in4 = '0, out4;
  logic [7:0][W-1:0] in8 = '0, out8;
  int unsigned checks = 0, failures = 0;

  bubble_csd #(.M(4), .W(W)) dut4 (.clk(clk), .rst(rst), .d_in(in4), .d_out(out4));
  bubble_csd #(.M(8), .W(W)) dut8 (.clk(clk), .rst(rst), .d_in(in8), .d_out(out8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (ARRAYS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist4 [ARRAYS][4];
  logic [W-1:0] hist8 [ARRAYS][8];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < ARRAYS + 14; k++) begin
      // values drawn from a small range at first, so that equal values occur
      automatic int unsigned hi = (k < 100) ? 3 : 255;
      for (int c = 0; c < 4; c++) begin
        hist4[k % ARRAYS][c] = W'($urandom_range(0, hi));
        in4[c] = hist4[k % ARRAYS][c];
      end
      for (int c = 0; c < 8; c++) begin
        hist8[k % ARRAYS][c] = W'($urandom_range(0, hi));
        in8[c] = hist8[k % ARRAYS][c];
      end
      @(posedge clk); #1;
      // edge k loaded array k; after edge k, out shows array k - (ranks - 1)
      begin
        automatic int src4 = k - 5;
        automatic int src8 = k - 13;
        logic [W-1:0] e4 [4];
        logic [W-1:0] e8 [8];
        if (src4 >= 0 && src4 < ARRAYS) begin
          e4 = hist4[src4]; e4.rsort();
        end else e4 = '{default: '0};
        if (src8 >= 0 && src8 < ARRAYS) begin
          e8 = hist8[src8]; e8.rsort();
        end else e8 = '{default: '0};
        if (src4 < ARRAYS) begin
          checks++;
          for (int c = 0; c < 4; c++)
            if (out4[c] !== e4[c]) begin
              failures++;
              if (failures < 10) $display("FAIL M=4 cycle %0d lane %0d got %0d exp %0d", k, c, out4[c], e4[c]);
              break;
            end
        end
        if (src8 < ARRAYS) begin
          checks++;
          for (int c = 0; c < 8; c++)
            if (out8[c] !== e8[c]) begin
              failures++;
              if (failures < 10) $display("FAIL M=8 cycle %0d lane %0d got %0d exp %0d", k, c, out8[c], e8[c]);
              break;
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
