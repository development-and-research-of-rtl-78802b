// tb_bse: exhaustive self-checking test of the basic sorting element.
// For every pair of 8-bit inputs, y_min must be the smaller and y_max the
// larger value; with equal inputs both outputs carry that value.
module tb_bse;
  localparam int unsigned W = 8;
  logic [W-1:0] x1, x2, y_min, y_max;
  int unsigned  checks = 0, failures = 0;
  int unsigned  swaps = 0, passes = 0;

  bse #(.W(W)) dut (.x1(x1), .x2(x2), .y_min(y_min), .y_max(y_max));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << W); a++) begin
      for (int b = 0; b < (1 << W); b++) begin
        int lo, hi;
        x1 = W'(a);
        x2 = W'(b);
        lo = (a < b) ? a : b;
        hi = (a < b) ? b : a;
        if (a > b) swaps++; else passes++;
        #1;
        checks++;
        if (int'(y_min) != lo || int'(y_max) != hi) begin
          failures++;
          if (failures < 10)
            $display("FAIL x1=%0d x2=%0d -> min=%0d max=%0d", a, b, y_min, y_max);
        end
      end
    end
    if (swaps == 0 || passes == 0) failures++;
    $display("exchanged=%0d passed=%0d", swaps, passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
