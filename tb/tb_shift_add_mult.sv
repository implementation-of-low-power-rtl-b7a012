// tb_shift_add_mult: exhaustive check of the shift/add constant multipliers
// for the constants 159, -53 and 15 (3.75 with two fraction bits) and a few
// others, against ordinary multiplication.
module tb_shift_add_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [7:0]  x;
  logic signed [17:0] y159, yn53, y15, y1, yn128, y0;
  int checks = 0, failures = 0;

  shift_add_mult #(.XW(8), .COEF(159),  .YW(18)) m159  (.x(x), .y(y159));
  shift_add_mult #(.XW(8), .COEF(-53),  .YW(18)) mn53  (.x(x), .y(yn53));
  shift_add_mult #(.XW(8), .COEF(15),   .YW(18)) m15   (.x(x), .y(y15));
  shift_add_mult #(.XW(8), .COEF(1),    .YW(18)) m1    (.x(x), .y(y1));
  shift_add_mult #(.XW(8), .COEF(-128), .YW(18)) mn128 (.x(x), .y(yn128));
  shift_add_mult #(.XW(8), .COEF(0),    .YW(18)) m0    (.x(x), .y(y0));

  task automatic chk(input int got, input int expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: x=%0d got %0d expected %0d", what, x, got, expv);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      chk(int'(y159), 159 * v, "159");
      chk(int'(yn53), -53 * v, "-53");
      chk(int'(y15), 15 * v, "3.75*4");
      chk(int'(y1), v, "1");
      chk(int'(yn128), -128 * v, "-128");
      chk(int'(y0), 0, "0");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
