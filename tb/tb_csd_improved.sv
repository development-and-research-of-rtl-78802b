// tb_csd_improved: end-to-end test of the improved conveyor sorting device at
// its default size (8 values of 8 bits), with no parameter overridden.
//
// A new array enters on every clock cycle. The testbench keeps every array it
// applied and expects, after each rising edge k, the array loaded at edge
// k-9 sorted into descending order (sorted by the testbench itself), and all
// zeros while the conveyor still holds reset values. The stream holds:
//   - the example array 01 07 15 36 42 08 88 12 (hex), expected out as
//     88 42 36 15 12 08 07 01;
//   - all 256 arrays of 0/1 values, which by the 0-1 principle prove that the
//     network sorts every input;
//   - random arrays, first from a small range (many equal values), then full;
//   - arrays whose halves are each sorted the wrong way round and arrays
//     whose whole upper half is larger than the lower half;
//   - a reset in the middle of the stream, after which every array in flight
//     is lost and the outputs are zero until the next array arrives.
// Each of these events is counted, and one that never happened is a failure.
module tb_csd_improved;
  localparam int unsigned N = 8;
  localparam int unsigned W = 8;
  localparam int unsigned LAT = 9;          // rising edges after the loading edge
  localparam int unsigned ARRAYS = 2000;

  logic clk, rst;
  logic [N-1:0][W-1:0] d_in, d_out;
  int unsigned checks = 0, failures = 0;

  csd_improved dut (.clk(clk), .rst(rst), .d_in(d_in), .d_out(d_out));

  initial begin
    clk  = 1'b0;
    rst  = 1'b1;
    d_in = '0;
  end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (ARRAYS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Arrays applied, indexed by the edge that loaded them.
  logic [W-1:0] hist [ARRAYS][N];

  int unsigned n_example = 0, n_zero_one = 0, n_dup = 0, n_upper_high = 0;
  int unsigned n_reversed = 0, n_reset = 0, n_after_reset_zero = 0;
  int unsigned n_overlap = 0, n_full_range = 0;

  function automatic void make(int k, ref logic [W-1:0] a [N]);
    logic [W-1:0] ex [N] = '{8'h01, 8'h07, 8'h15, 8'h36, 8'h42, 8'h08, 8'h88, 8'h12};
    if (k == 0) begin
      a = ex;
      n_example++;
    end else if (k <= 256) begin
      for (int c = 0; c < N; c++) a[c] = W'(((k - 1) >> c) & 1);
      n_zero_one++;
    end else if (k < 700) begin
      for (int c = 0; c < N; c++) a[c] = W'($urandom_range(0, 5));
    end else if (k % 11 == 0) begin
      // upper half entirely above the lower half
      for (int c = 0; c < N / 2; c++) a[c] = W'($urandom_range(0, 99));
      for (int c = N / 2; c < N; c++) a[c] = W'($urandom_range(100, 255));
      n_upper_high++;
    end else if (k % 11 == 5) begin
      // each half ascending (worst case for the half sorters)
      logic [W-1:0] lo [N/2];
      logic [W-1:0] up [N/2];
      for (int c = 0; c < N / 2; c++) begin
        lo[c] = W'($urandom);
        up[c] = W'($urandom);
      end
      lo.sort();
      up.sort();
      for (int c = 0; c < N / 2; c++) begin
        a[c] = lo[c];
        a[N/2+c] = up[c];
      end
      n_reversed++;
    end else begin
      for (int c = 0; c < N; c++) a[c] = W'($urandom);
      n_full_range++;
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (a[i] == a[j] && k > 256) begin
          n_dup++;
          return;
        end
  endfunction

  initial begin
    static int reset_at = 1000;
    static int last_reset = -1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < int'(ARRAYS); k++) begin
      automatic logic [W-1:0] a [N];
      automatic logic [W-1:0] e [N];
      automatic int src = k - int'(LAT);
      make(k, a);
      for (int c = 0; c < N; c++) d_in[c] = a[c];
      hist[k] = a;
      if (k == reset_at) begin
        rst = 1'b1;
        n_reset++;
        last_reset = k;
      end
      @(posedge clk); #1;
      if (rst) begin
        // the reset edge clears every rank, including the one loaded now
        rst = 1'b0;
      end
      // arrays loaded before the last reset edge were lost
      if (src >= 0 && src > last_reset) begin
        e = hist[src];
        e.rsort();
        if (src + int'(LAT) == k && k > int'(LAT)) n_overlap++;
      end else begin
        e = '{default: '0};
        if (last_reset >= 0 && k > last_reset) n_after_reset_zero++;
      end
      checks++;
      for (int c = 0; c < N; c++)
        if (d_out[c] !== e[c]) begin
          failures++;
          if (failures < 10)
            $display("FAIL edge %0d lane %0d got %02h expected %02h", k, c, d_out[c], e[c]);
          break;
        end
      if (src == 0) begin
        $display("example array out: %02h %02h %02h %02h %02h %02h %02h %02h",
                 d_out[0], d_out[1], d_out[2], d_out[3], d_out[4], d_out[5], d_out[6], d_out[7]);
        checks++;
        if (d_out !== {8'h01, 8'h07, 8'h08, 8'h12, 8'h15, 8'h36, 8'h42, 8'h88}) failures++;
      end
    end
    $display("example=%0d zero_one=%0d duplicates=%0d upper_high=%0d reversed_halves=%0d full_range=%0d",
             n_example, n_zero_one, n_dup, n_upper_high, n_reversed, n_full_range);
    $display("pipelined_overlap=%0d resets=%0d zero_after_reset=%0d",
             n_overlap, n_reset, n_after_reset_zero);
    if (n_example == 0)    failures++;
    if (n_zero_one != 256) failures++;
    if (n_dup == 0)        failures++;
    if (n_upper_high == 0) failures++;
    if (n_reversed == 0)   failures++;
    if (n_full_range == 0) failures++;
    if (n_overlap == 0)    failures++;
    if (n_reset == 0)      failures++;
    if (n_after_reset_zero != LAT) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
