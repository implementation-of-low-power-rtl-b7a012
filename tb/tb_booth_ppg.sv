// tb_booth_ppg: exhaustive check of one Booth partial-product row.
// For every 8-bit multiplicand x and every 3-bit Booth group, the row value
// pp (signed) plus the correction bit neg must equal m * x, where m is the
// radix-4 multiple of the group (0, +-1, +-2).
module tb_booth_ppg;
  localparam int XW = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [XW-1:0] x;
  logic dir, sht, add, neg;
  logic [XW:0] pp;
  int checks = 0, failures = 0;

  booth_ppg #(.XW(XW)) dut (.x(x), .dir(dir), .sht(sht), .add(add), .pp(pp), .neg(neg));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      for (int v = 0; v < 256; v++) begin
        int m, got, expv;
        logic [2:0] grp;
        grp = g[2:0];
        m   = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
        dir = grp[2];
        sht = grp[2] ^ grp[1];
        add = grp[1] ^ grp[0];
        x   = v[XW-1:0];
        #1;
        got  = int'($signed(pp)) + int'(neg);
        expv = m * int'($signed(x));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL group %b x=%0d: pp=%0d neg=%b, expected %0d", grp, $signed(x), $signed(pp), neg, expv);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
