// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder.
// For all 256 values of an 8-bit y, every group's (dir, sht, add) must encode
// the multiple -2*y[2i+1] + y[2i] + y[2i-1] from the radix-4 recoding table,
// and the weighted multiples sum_i m_i 4^i must give back y as a signed value.
module tb_booth_encoder;
  localparam int YW = 8;
  localparam int G  = YW / 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [YW-1:0] y;
  logic [G-1:0]  dir, sht, add;
  int checks = 0, failures = 0;

  booth_encoder #(.YW(YW)) dut (.y(y), .dir(dir), .sht(sht), .add(add));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int recon;
      y = v[YW-1:0];
      #1;
      recon = 0;
      for (int i = 0; i < G; i++) begin
        int b2, b1, b0, m_exp, m_got;
        b2 = y[2*i+1];
        b1 = y[2*i];
        b0 = (i == 0) ? 0 : y[2*i-1];
        m_exp = -2 * b2 + b1 + b0;
        m_got = add[i] ? 1 : (sht[i] ? 2 : 0);
        if (dir[i]) m_got = -m_got;
        checks++;
        if (m_got != m_exp) begin
          failures++;
          $display("FAIL y=%b group %0d: dir=%b sht=%b add=%b -> %0d, expected %0d",
                   y, i, dir[i], sht[i], add[i], m_got, m_exp);
        end
        // direction is exactly the top bit of the group
        checks++;
        if (dir[i] != y[2*i+1]) failures++;
        recon += m_exp * (4 ** i);
      end
      checks++;
      if (recon != int'($signed(y))) failures++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
