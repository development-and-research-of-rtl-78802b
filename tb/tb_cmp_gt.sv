// tb_cmp_gt: exhaustive self-checking test of the comparison scheme.
// Every pair of 8-bit operands is applied; gt must equal x1 > x2 worked out
// on integers in the testbench.
module tb_cmp_gt;
  localparam int unsigned W = 8;
  logic [W-1:0] x1, x2;
  logic         gt;
  int unsigned  checks = 0, failures = 0;

  cmp_gt #(.W(W)) dut (.x1(x1), .x2(x2), .gt(gt));

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
        x1 = W'(a);
        x2 = W'(b);
        #1;
        checks++;
        if (gt !== (a > b)) begin
          failures++;
          if (failures < 10) $display("FAIL x1=%0d x2=%0d gt=%0b", a, b, gt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
