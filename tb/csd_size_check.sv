// csd_size_check: drives and checks one csd_improved instance of N lanes.
//
// Used by tb_csd_sizes to run the device at several array sizes side by side.
// After reset it streams one array per clock cycle: for N <= ZERO_ONE_MAX
// every one of the 2^N arrays of 0/1 values (which proves the network by the
// 0-1 principle), then RANDOM random arrays (values from a small range first,
// so that equal values occur). The array loaded by rising edge k must appear,
// sorted in descending order by this checker, after edge k + 3N/2 - 3, and
// the outputs must be zero before the first array arrives. When the stream
// has drained, done rises and checks/failures hold the totals.
module csd_size_check #(
  parameter int unsigned N            = 8,
  parameter int unsigned W            = 8,
  parameter int unsigned RANDOM       = 300,
  parameter int unsigned ZERO_ONE_MAX = 12
) (
  input  logic        clk,
  input  logic        rst,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);
  localparam int unsigned LAT    = 3 * N / 2 - 3;
  localparam int unsigned ZO     = (N <= ZERO_ONE_MAX) ? (1 << N) : 0;
  localparam int unsigned ARRAYS = ZO + RANDOM;

  logic [N-1:0][W-1:0] d_in, d_out;
  logic [W-1:0]        hist [ARRAYS][N];

  csd_improved #(.N(N), .W(W)) dut (.clk(clk), .rst(rst), .d_in(d_in), .d_out(d_out));

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    d_in     = '0;
    @(negedge rst);
    for (int k = 0; k < int'(ARRAYS + LAT); k++) begin
      automatic int src = k - int'(LAT);
      automatic logic [W-1:0] e [N];
      if (k < int'(ARRAYS)) begin
        for (int c = 0; c < int'(N); c++) begin
          if (k < int'(ZO))
            hist[k][c] = W'((k >> c) & 1);
          else if (k < int'(ZO) + 100)
            hist[k][c] = W'($urandom_range(0, 3));
          else
            hist[k][c] = W'($urandom);
          d_in[c] = hist[k][c];
        end
      end
      @(posedge clk); #1;
      if (src >= 0) begin
        e = hist[src];
        e.rsort();
      end else e = '{default: '0};
      checks++;
      for (int c = 0; c < int'(N); c++)
        if (d_out[c] !== e[c]) begin
          failures++;
          if (failures < 5)
            $display("FAIL N=%0d edge %0d lane %0d got %0d expected %0d", N, k, c, d_out[c], e[c]);
          break;
        end
    end
    done = 1'b1;
  end
endmodule
