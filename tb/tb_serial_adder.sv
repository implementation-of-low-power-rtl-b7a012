// tb_serial_adder: random 16-bit additions through the bit-serial adder.
// After a start cycle the operands are streamed LSB first; ready must rise
// exactly 16 cycles after start and sum must equal a + b mod 2^16.
module tb_serial_adder;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, a, b, ready;
  logic [W-1:0] sum;
  int checks = 0, failures = 0;

  serial_adder #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .ready(ready), .sum(sum));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] av, bv;
      av = W'($urandom); bv = W'($urandom);
      if (n == 0) begin av = '1; bv = 16'h0001; end   // full carry ripple
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int j = 0; j < W; j++) begin
        a = av[j]; b = bv[j];
        checks++;
        if (ready) begin
          failures++;
          $display("FAIL ready high during bit %0d", j);
        end
        @(negedge clk);
      end
      checks++;
      if (!ready) begin
        failures++;
        $display("FAIL ready low after %0d bits", W);
      end
      checks++;
      if (sum != av + bv) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h = %h", av, bv, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
