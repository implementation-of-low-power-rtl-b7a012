// tb_serial_multiplier: exhaustive 8x8 signed check of the bit-serial
// multiplier.  After a clear cycle the sample is streamed LSB first and
// sign-extended for 16 cycles; the 16 output bits, LSB first, must form the
// product a * b.
module tb_serial_multiplier;
  localparam int AW = 8;
  localparam int N  = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clr, b_in, p_out;
  logic [AW-1:0] a;
  int checks = 0, failures = 0;

  serial_multiplier #(.AW(AW)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b_in(b_in), .p_out(p_out));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clr = 0; a = 0; b_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int av = -128; av < 128; av++) begin
      for (int bv = -128; bv < 128; bv++) begin
        logic [N-1:0] bext, prod;
        bext = N'(bv);
        @(negedge clk);
        a = AW'(av); clr = 1;
        @(negedge clk);
        clr = 0;
        for (int j = 0; j < N; j++) begin
          b_in = bext[j];
          #1;
          prod[j] = p_out;
          @(negedge clk);
        end
        checks++;
        if (prod != N'(av * bv)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", av, bv, $signed(prod));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
