// tb_shift_add_fir: checks the transposed shift/add filter in three
// configurations against a direct convolution: the default two-tap form-1
// filter (159, -53), the one-tap form-2 filter (15 = 3.75 with two fraction
// bits) and a five-tap filter with mixed-sign coefficients.  Samples arrive
// with random gaps of in_valid; out_valid must follow in_valid by one cycle.
module tb_shift_add_fir;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid;
  logic signed [7:0] in_data;
  logic v1, v2, v5;
  logic signed [18:0] y1;
  logic signed [13:0] y2;
  logic signed [17:0] y5;
  int checks = 0, failures = 0, outputs = 0;

  localparam int C5 [5] = '{3, -7, 100, -128, 1};

  shift_add_fir dut1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
                      .out_valid(v1), .out_data(y1));
  shift_add_fir #(.TAPS(1), .COEFS(32'sd15), .PW(14), .YW(14)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data), .out_valid(v2), .out_data(y2));
  shift_add_fir #(.TAPS(5), .COEFS({32'sd3, -32'sd7, 32'sd100, -32'sd128, 32'sd1}), .PW(17), .YW(18)) dut5 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data), .out_valid(v5), .out_data(y5));

  int hist [5];
  logic prev_valid;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (v1 != prev_valid || v2 != prev_valid || v5 != prev_valid) begin
        failures++;
        $display("FAIL out_valid does not follow in_valid");
      end
      if (prev_valid) begin
        int e1, e5;
        e1 = 159 * hist[0] - 53 * hist[1];
        e5 = 0;
        for (int k = 0; k < 5; k++) e5 += C5[k] * hist[k];
        outputs++;
        checks += 3;
        if (int'(y1) != e1) begin failures++; if (failures < 10) $display("FAIL form1 got %0d exp %0d", y1, e1); end
        if (int'(y2) != 15 * hist[0]) begin failures++; if (failures < 10) $display("FAIL form2 got %0d exp %0d", y2, 15 * hist[0]); end
        if (int'(y5) != e5) begin failures++; if (failures < 10) $display("FAIL 5-tap got %0d exp %0d", y5, e5); end
      end
      prev_valid <= in_valid;
      if (in_valid) begin
        for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(in_data);
      end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; in_data = 0; prev_valid = 0;
    for (int k = 0; k < 5; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = 8'($urandom);
      if (n < 6) begin in_valid = 1; in_data = (n % 2) ? 8'sd127 : -8'sd128; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (outputs < 1000) begin failures++; $display("FAIL only %0d outputs", outputs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
