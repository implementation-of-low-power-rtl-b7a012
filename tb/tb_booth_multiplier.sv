// tb_booth_multiplier: exhaustive 8x8 signed check plus a random 9x8 check.
// Operands are loaded into the input buffers on one edge; the product must be
// correct in the following cycle (one cycle latency) and must hold while
// load is low.
module tb_booth_multiplier;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic load;
  logic signed [7:0]  x8, y8;
  logic signed [15:0] p8;
  logic signed [8:0]  x9;
  logic signed [16:0] p9;
  int checks = 0, failures = 0;

  booth_multiplier #(.XW(8), .YW(8)) dut8 (.clk(clk), .rst_n(rst_n), .load(load), .x(x8), .y(y8), .p(p8));
  booth_multiplier #(.XW(9), .YW(8)) dut9 (.clk(clk), .rst_n(rst_n), .load(load), .x(x9), .y(y8), .p(p9));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; x8 = 0; y8 = 0; x9 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        @(negedge clk);
        x8 = 8'(a); y8 = 8'(b); x9 = 9'($urandom_range(0, 511)); load = 1;
        @(negedge clk);
        load = 0;
        // scramble the inputs: the buffered operands must hold
        x8 = 8'($urandom); y8 = 8'($urandom);
        #1;
        checks++;
        if (p8 != 16'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p8);
        end
      end
    end
    // random 9x8
    for (int i = 0; i < 2000; i++) begin
      int a, b;
      @(negedge clk);
      a = $urandom_range(0, 511) - 256;
      b = $urandom_range(0, 255) - 128;
      x9 = 9'(a); y8 = 8'(b); load = 1;
      @(negedge clk);
      load = 0;
      #1;
      checks++;
      if (p9 != 17'(a * b)) begin
        failures++;
        if (failures < 10) $display("FAIL 9x8 %0d * %0d = %0d", a, b, p9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
