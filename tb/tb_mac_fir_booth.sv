// tb_mac_fir_booth: random-stimulus check of mac_fir_booth against a convolution computed in the
// testbench.  Random coefficients (including -128 and 127) are written through
// the coefficient port, then samples are offered with random gaps; in_valid is
// also held high while the filter is busy, so the in_ready stall is exercised.
// Every output is compared with sum c[k] x[n-k], and the number of clock
// edges from the accepting edge to out_valid must be TAPS + 1.
module tb_mac_fir_booth;
  localparam int TAPS = 8;
  localparam int NC   = TAPS;
  localparam int LAT  = TAPS + 1;
  localparam int NS   = 300;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic coef_we;
  logic [$clog2(NC)-1:0] coef_addr;
  logic signed [7:0] coef_data;
  logic in_valid, in_ready, out_valid;
  logic signed [7:0] in_data;
  logic signed [19-1:0] out_data;

  int checks = 0, failures = 0, stalls = 0, outputs = 0;
  int cyc = 0, acc_cyc = -1;
  int c [TAPS];
  int hist [TAPS];

  mac_fir_booth dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  initial begin
    repeat ((LAT + 3) * (NS + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: handshakes, latency and results
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && out_valid) begin
      int expv;
      expv = 0;
      for (int k = 0; k < TAPS; k++) expv += c[k] * hist[k];
      outputs++;
      checks++;
      if (int'(out_data) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d: got %0d expected %0d", outputs, out_data, expv);
      end
      checks++;
      if (cyc - acc_cyc - 1 != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d, expected %0d", cyc - acc_cyc - 1, LAT);
      end
    end
    // a sample accepted on the same edge belongs to the next output
    if (rst_n && in_valid && in_ready) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(in_data);
      acc_cyc <= cyc;
    end
  end

  initial begin
    rst_n = 0; coef_we = 0; coef_addr = 0; coef_data = 0; in_valid = 0; in_data = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NC; k++) begin
      int v;
      v = $urandom_range(0, 255) - 128;
      if (k == 0) v = -128;
      if (k == 1) v = 127;
      @(negedge clk);
      coef_we = 1; coef_addr = k[$clog2(NC)-1:0]; coef_data = 8'(v);
      c[k] = v;

    end
    @(negedge clk);
    coef_we = 0;
    for (int n = 0; n < NS; n++) begin
      int v;
      v = $urandom_range(0, 255) - 128;
      if (n < 8) v = -128;               // full-scale negative burst
      in_data  = 8'(v);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (outputs != NS) begin
      failures++;
      $display("FAIL %0d outputs for %0d samples", outputs, NS);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL in_ready never stalled a waiting sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
