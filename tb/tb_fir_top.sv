// tb_fir_top: end-to-end test of the whole filter family at its default sizes.
// One random 8-bit sample stream (starting with a full-scale burst) is fed to
// all five filters, each by its own driver that honours that filter's
// in_ready.  The three programmable filters get random coefficients (the
// folded one symmetric ones) chosen so that every radix-4 Booth group code
// occurs.  Every output of every filter is compared with a convolution
// computed here, with the fixed coefficients 159, -53 (form 1) and 3.75
// (form 2, two fraction bits) for the shift/add filters.
// Counted mechanisms, each of which must occur at least once: an in_ready
// stall of each time-shared filter, a result of each filter, each Booth
// group code in the coefficients, and a folded pre-addition whose sum leaves
// the 8-bit range.
module tb_fir_top;
  localparam int TAPS = 8;
  localparam int NS   = 40;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic              mac_coef_we, fold_coef_we, ser_coef_we;
  logic [2:0]        mac_coef_addr, ser_coef_addr;
  logic [1:0]        fold_coef_addr;
  logic signed [7:0] mac_coef_data, fold_coef_data, ser_coef_data;
  logic              mac_in_valid, fold_in_valid, ser_in_valid, sa1_in_valid, sa2_in_valid;
  logic              mac_in_ready, fold_in_ready, ser_in_ready;
  logic signed [7:0] mac_in_data, fold_in_data, ser_in_data, sa1_in_data, sa2_in_data;
  logic              mac_out_valid, fold_out_valid, ser_out_valid, sa1_out_valid, sa2_out_valid;
  logic signed [18:0] mac_out_data, fold_out_data, ser_out_data, sa1_out_data;
  logic signed [13:0] sa2_out_data;

  fir_top dut (.*);

  int checks = 0, failures = 0;
  int samples [NS];
  int c_mac [TAPS], c_fold [TAPS], c_ser [TAPS];
  // per-filter sample history, index 0 newest
  int h_mac [TAPS], h_fold [TAPS], h_ser [TAPS], h_sa [2];
  int n_out [5];          // results per filter: mac, fold, ser, sa1, sa2
  int n_stall [3];        // in_ready stalls: mac, fold, ser
  int n_booth [8];        // Booth group codes seen in the coefficients
  int n_wide_pre;         // folded pre-additions outside the 8-bit range
  logic sa_prev;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(input int c [TAPS], input int h [TAPS]);
    int s = 0;
    for (int k = 0; k < TAPS; k++) s += c[k] * h[k];
    return s;
  endfunction

  task automatic chk(input int got, input int expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic count_booth(input int v);
    logic [8:0] yx;
    yx = {8'(v), 1'b0};
    for (int i = 0; i < 4; i++) n_booth[yx[2*i +: 3]]++;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      // results first: a sample accepted on this edge belongs to a later output
      if (mac_out_valid)  begin n_out[0]++; chk(int'(mac_out_data),  conv(c_mac, h_mac),   "mac");  end
      if (fold_out_valid) begin n_out[1]++; chk(int'(fold_out_data), conv(c_fold, h_fold), "fold"); end
      if (ser_out_valid)  begin n_out[2]++; chk(int'(ser_out_data),  conv(c_ser, h_ser),   "ser");  end
      if (sa_prev) begin
        if (sa1_out_valid) n_out[3]++;
        if (sa2_out_valid) n_out[4]++;
        chk(int'(sa1_out_valid) + int'(sa2_out_valid), 2, "shift/add out_valid");
        chk(int'(sa1_out_data), 159 * h_sa[0] - 53 * h_sa[1], "shift/add form 1");
        chk(int'(sa2_out_data), 15 * h_sa[0], "shift/add form 2 (x4)");
      end
      sa_prev <= sa1_in_valid;
      if (mac_in_valid && !mac_in_ready)   n_stall[0]++;
      if (fold_in_valid && !fold_in_ready) n_stall[1]++;
      if (ser_in_valid && !ser_in_ready)   n_stall[2]++;
      if (mac_in_valid && mac_in_ready) begin
        for (int k = TAPS - 1; k > 0; k--) h_mac[k] = h_mac[k-1];
        h_mac[0] = int'(mac_in_data);
      end
      if (fold_in_valid && fold_in_ready) begin
        for (int k = TAPS - 1; k > 0; k--) h_fold[k] = h_fold[k-1];
        h_fold[0] = int'(fold_in_data);
        for (int k = 0; k < TAPS / 2; k++) begin
          int s;
          s = h_fold[k] + h_fold[TAPS-1-k];
          if (s > 127 || s < -128) n_wide_pre++;
        end
      end
      if (ser_in_valid && ser_in_ready) begin
        for (int k = TAPS - 1; k > 0; k--) h_ser[k] = h_ser[k-1];
        h_ser[0] = int'(ser_in_data);
      end
      if (sa1_in_valid) begin
        h_sa[1] = h_sa[0];
        h_sa[0] = int'(sa1_in_data);
      end
    end
  end

  initial begin
    rst_n = 0;
    mac_coef_we = 0; fold_coef_we = 0; ser_coef_we = 0;
    mac_coef_addr = 0; fold_coef_addr = 0; ser_coef_addr = 0;
    mac_coef_data = 0; fold_coef_data = 0; ser_coef_data = 0;
    mac_in_valid = 0; fold_in_valid = 0; ser_in_valid = 0; sa1_in_valid = 0; sa2_in_valid = 0;
    mac_in_data = 0; fold_in_data = 0; ser_in_data = 0; sa1_in_data = 0; sa2_in_data = 0;
    sa_prev = 0; n_wide_pre = 0;
    for (int k = 0; k < TAPS; k++) begin h_mac[k] = 0; h_fold[k] = 0; h_ser[k] = 0; end
    h_sa[0] = 0; h_sa[1] = 0;
    for (int i = 0; i < NS; i++) samples[i] = (i < 8) ? ((i % 2) ? 127 : -128) : $urandom_range(0, 255) - 128;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // coefficients: fixed values that cover all Booth group codes, then random
    for (int k = 0; k < TAPS; k++) begin
      int vm, vf, vs;
      case (k)
        0: vm = -128;   // groups 100, 000 ...
        1: vm = 127;    // 110, 111, 011
        2: vm = 85;     // 010, 101 (01010101)
        3: vm = -86;    // 10101010 -> 100, 101, 010
        default: vm = $urandom_range(0, 255) - 128;
      endcase
      vf = (k < 2) ? vm : $urandom_range(0, 255) - 128;
      vs = $urandom_range(0, 255) - 128;
      @(negedge clk);
      mac_coef_we = 1; mac_coef_addr = 3'(k); mac_coef_data = 8'(vm); c_mac[k] = vm;
      ser_coef_we = 1; ser_coef_addr = 3'(k); ser_coef_data = 8'(vs); c_ser[k] = vs;
      count_booth(vm);
      if (k < TAPS / 2) begin
        fold_coef_we = 1; fold_coef_addr = 2'(k); fold_coef_data = 8'(vf);
        c_fold[k] = vf; c_fold[TAPS-1-k] = vf;
        count_booth(vf);
      end else begin
        fold_coef_we = 0;
      end
    end
    @(negedge clk);
    mac_coef_we = 0; fold_coef_we = 0; ser_coef_we = 0;

    fork
      for (int n = 0; n < NS; n++) begin
        mac_in_data = 8'(samples[n]); mac_in_valid = 1;
        @(posedge clk); while (!mac_in_ready) @(posedge clk);
        @(negedge clk); mac_in_valid = 0;
        if (n % 3 == 2) @(negedge clk);
      end
      for (int n = 0; n < NS; n++) begin
        fold_in_data = 8'(samples[n]); fold_in_valid = 1;
        @(posedge clk); while (!fold_in_ready) @(posedge clk);
        @(negedge clk); fold_in_valid = 0;
        if (n % 3 == 2) @(negedge clk);
      end
      for (int n = 0; n < NS; n++) begin
        ser_in_data = 8'(samples[n]); ser_in_valid = 1;
        @(posedge clk); while (!ser_in_ready) @(posedge clk);
        @(negedge clk); ser_in_valid = 0;
      end
      for (int n = 0; n < NS; n++) begin
        sa1_in_data = 8'(samples[n]); sa2_in_data = 8'(samples[n]);
        sa1_in_valid = 1; sa2_in_valid = 1;
        @(negedge clk);
        if (n % 4 == 3) begin
          sa1_in_valid = 0; sa2_in_valid = 0;
          @(negedge clk);
        end
      end
    join
    sa1_in_valid = 0; sa2_in_valid = 0;
    repeat (200) @(negedge clk);

    for (int f = 0; f < 5; f++) chk(n_out[f], NS, $sformatf("result count of filter %0d", f));
    for (int f = 0; f < 3; f++) begin
      checks++;
      if (n_stall[f] == 0) begin failures++; $display("FAIL filter %0d never stalled", f); end
    end
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (n_booth[g] == 0) begin failures++; $display("FAIL Booth group %b never used", 3'(g)); end
    end
    checks++;
    if (n_wide_pre == 0) begin failures++; $display("FAIL no pre-addition beyond 8 bits"); end
    $display("results mac=%0d fold=%0d ser=%0d sa1=%0d sa2=%0d; stalls mac=%0d fold=%0d ser=%0d; wide pre-adds=%0d",
             n_out[0], n_out[1], n_out[2], n_out[3], n_out[4], n_stall[0], n_stall[1], n_stall[2], n_wide_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
