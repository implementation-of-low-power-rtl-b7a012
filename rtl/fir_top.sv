// fir_top: the family of low-power 8-tap FIR filters, side by side.
//
// Five alternative filter implementations of y[n] = sum c[k] x[n-k] for 8-bit
// samples and 8-bit coefficients, each trading area, speed and switching
// activity differently:
//   mac_*  : one Booth multiplier and one accumulator time-shared over the
//            8 taps (mac_fir_booth), one sample every 10 cycles;
//   fold_* : linear-phase (symmetric) filter, pre-adder plus one Booth
//            multiplier folded over the 4 coefficient pairs (fold_fir_booth),
//            one sample every 6 cycles;
//   ser_*  : bit-serial multiplier and bit-serial adder MAC (serial_fir), one
//            sample every 169 cycles;
//   sa1_*  : transposed filter with shift/add constant multipliers and integer
//            coefficients 159, -53 (shift_add_fir, form 1), one sample per
//            cycle;
//   sa2_*  : shift/add filter with the fractional coefficient 3.75 = 15/4
//            (form 2; out_data has two fraction bits), one sample per cycle.
// The filters share only the clock and the active-low asynchronous reset;
// every filter has its own sample, coefficient and result ports.  The three
// programmable filters take their coefficients through a write port
// (coefficients reset to zero); the shift/add filters have them hard-wired.
module fir_top
  import fir_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // MAC filter with Booth multiplier
  input  logic                        mac_coef_we,
  input  logic [2:0]                  mac_coef_addr,
  input  logic signed [COEF_W-1:0]    mac_coef_data,
  input  logic                        mac_in_valid,
  output logic                        mac_in_ready,
  input  logic signed [DATA_W-1:0]    mac_in_data,
  output logic                        mac_out_valid,
  output logic signed [18:0]          mac_out_data,
  // linear-phase folded filter with Booth multiplier
  input  logic                        fold_coef_we,
  input  logic [1:0]                  fold_coef_addr,
  input  logic signed [COEF_W-1:0]    fold_coef_data,
  input  logic                        fold_in_valid,
  output logic                        fold_in_ready,
  input  logic signed [DATA_W-1:0]    fold_in_data,
  output logic                        fold_out_valid,
  output logic signed [18:0]          fold_out_data,
  // serial multiplier / serial adder MAC filter
  input  logic                        ser_coef_we,
  input  logic [2:0]                  ser_coef_addr,
  input  logic signed [COEF_W-1:0]    ser_coef_data,
  input  logic                        ser_in_valid,
  output logic                        ser_in_ready,
  input  logic signed [DATA_W-1:0]    ser_in_data,
  output logic                        ser_out_valid,
  output logic signed [18:0]          ser_out_data,
  // shift/add filter, form 1 (integer coefficients 159, -53)
  input  logic                        sa1_in_valid,
  input  logic signed [DATA_W-1:0]    sa1_in_data,
  output logic                        sa1_out_valid,
  output logic signed [18:0]          sa1_out_data,
  // shift/add filter, form 2 (coefficient 3.75, two fraction bits out)
  input  logic                        sa2_in_valid,
  input  logic signed [DATA_W-1:0]    sa2_in_data,
  output logic                        sa2_out_valid,
  output logic signed [13:0]          sa2_out_data
);

  mac_fir_booth u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .coef_we  (mac_coef_we),
    .coef_addr(mac_coef_addr),
    .coef_data(mac_coef_data),
    .in_valid (mac_in_valid),
    .in_ready (mac_in_ready),
    .in_data  (mac_in_data),
    .out_valid(mac_out_valid),
    .out_data (mac_out_data)
  );

  fold_fir_booth u_fold (
    .clk      (clk),
    .rst_n    (rst_n),
    .coef_we  (fold_coef_we),
    .coef_addr(fold_coef_addr),
    .coef_data(fold_coef_data),
    .in_valid (fold_in_valid),
    .in_ready (fold_in_ready),
    .in_data  (fold_in_data),
    .out_valid(fold_out_valid),
    .out_data (fold_out_data)
  );

  serial_fir u_ser (
    .clk      (clk),
    .rst_n    (rst_n),
    .coef_we  (ser_coef_we),
    .coef_addr(ser_coef_addr),
    .coef_data(ser_coef_data),
    .in_valid (ser_in_valid),
    .in_ready (ser_in_ready),
    .in_data  (ser_in_data),
    .out_valid(ser_out_valid),
    .out_data (ser_out_data)
  );

  shift_add_fir u_sa1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sa1_in_valid),
    .in_data  (sa1_in_data),
    .out_valid(sa1_out_valid),
    .out_data (sa1_out_data)
  );

  // 3.75 = 2^1 + 2^0 + 2^-1 + 2^-2, held as 15 with two fraction bits
  shift_add_fir #(
    .XW   (DATA_W),
    .TAPS (1),
    .COEFS(32'sd15),
    .PW   (14),
    .YW   (14)
  ) u_sa2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sa2_in_valid),
    .in_data  (sa2_in_data),
    .out_valid(sa2_out_valid),
    .out_data (sa2_out_data)
  );

endmodule
