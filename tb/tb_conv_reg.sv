// tb_conv_reg: self-checking test of the conveyor register.
// Random data is applied each cycle; q must show the value applied before the
// previous rising edge, and zero after a synchronous reset.
module tb_conv_reg;
  localparam int unsigned W = 8;
  logic         clk, rst;
  logic [W-1:0] d, q;
  int unsigned  checks = 0, failures = 0;

  conv_reg #(.W(W)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

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

  task automatic check(logic [W-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL q=%0h expected %0h", q, exp);
    end
  endtask

  initial begin
    logic [W-1:0] v;
    d = 8'h5a;
    @(posedge clk); #1;
    check('0);                  // reset wins over data
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      v = W'($urandom);
      d = v;
      @(posedge clk); #1;
      check(v);
      if (i == 100) begin       // reset in the middle of a stream
        rst = 1'b1;
        d = 8'hff;
        @(posedge clk); #1;
        check('0);
        rst = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
