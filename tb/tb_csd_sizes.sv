// tb_csd_sizes: the improved sorting device at the array sizes of the
// published complexity sweep other than the default 8 values: 4, 16, 24, 32,
// 48 and 64 values of 8 bits (96 and 128 work the same way but take several
// minutes to build, so they are left out). Each size runs in its own
// csd_size_check instance: exhaustive 0/1 arrays where that is small enough
// (N = 4 and 16), then random arrays, all streamed back to back with the
// latency 3N/2 - 3 checked on every cycle.
module tb_csd_sizes;
  localparam int unsigned SIZES = 6;
  localparam int unsigned NS [SIZES] = '{4, 16, 24, 32, 48, 64};

  logic clk, rst;
  logic        done [SIZES];
  int unsigned chk  [SIZES];
  int unsigned fail [SIZES];

  initial begin
    clk = 1'b0;
    rst = 1'b1;
    #22 rst = 1'b0;
  end
  always #5 clk = ~clk;

  for (genvar i = 0; i < SIZES; i++) begin : g_size
    csd_size_check #(.N(NS[i]), .W(8), .RANDOM(300), .ZERO_ONE_MAX(16)) u_chk (
      .clk(clk), .rst(rst), .done(done[i]), .checks(chk[i]), .failures(fail[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < SIZES; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : finish_or_watchdog
    int unsigned checks, failures;
    int unsigned cycles;
    cycles = 0;
    @(negedge rst);
    @(posedge clk);
    while (!all_done() && cycles < 70000) begin
      @(posedge clk);
      cycles++;
    end
    checks = 0;
    failures = 0;
    for (int i = 0; i < SIZES; i++) begin
      $display("N=%0d checks=%0d failures=%0d", NS[i], chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
      if (!done[i] || chk[i] == 0) failures++;  // watchdog: size never finished
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
