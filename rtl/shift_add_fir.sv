// shift_add_fir: transposed-form FIR filter with shift/add constant multipliers.
//
// In the transposed structure every coefficient multiplies the current input
// sample x[n]; the products are added into a chain of registers that carries
// partial sums towards the output:
//   r[TAPS-1] <= c[TAPS-1]*x[n];   r[k] <= c[k]*x[n] + r[k+1];
//   y[n]       = c[0]*x[n] + r[1]
// Because the coefficients are constants, each product is a shift_add_mult
// (hard-wired shifts and adders only).  COEFS holds the coefficients as
// 32-bit signed integers, c[0] first; for fixed-point coefficients they are
// scaled by 2^F and the output carries F fraction bits (form 2).  Defaults are the integer form-1
// coefficients c[0] = 159, c[1] = -53 (0.159 and -0.053 scaled by 1000); the
// original design gives no other coefficient values, so the default filter has
// two taps.
// Interface/timing: on every cycle with in_valid = 1 the sample is taken, the
// partial-sum registers advance and y[n] is registered into out_data;
// out_valid follows in_valid by one cycle.  One sample per clock.
// The transposed structure and the shift/add multipliers follow the
// original design; the valid signalling and the output register are design
// choices.
module shift_add_fir #(
  parameter int XW   = 8,
  parameter int TAPS = 2,
  parameter logic signed [0:TAPS-1][31:0] COEFS = {32'sd159, -32'sd53},
  parameter int PW   = 18,                         // product width
  parameter int YW   = PW + ((TAPS > 1) ? $clog2(TAPS) : 0)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [YW-1:0] out_data
);

  logic signed [PW-1:0] prod [TAPS];
  logic signed [YW-1:0] y_now;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    shift_add_mult #(.XW(XW), .COEF(int'(COEFS[k])), .YW(PW)) u_mult (
      .x(in_data),
      .y(prod[k])
    );
  end

  if (TAPS > 1) begin : g_chain
    // r[k] is the partial sum entering tap k-1; index 0 is not used
    logic signed [YW-1:0] r [1:TAPS-1];

    assign y_now = YW'(prod[0]) + r[1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 1; k < TAPS; k++) r[k] <= '0;
      end else if (in_valid) begin
        r[TAPS-1] <= YW'(prod[TAPS-1]);
        for (int k = 1; k < TAPS - 1; k++) r[k] <= YW'(prod[k]) + r[k+1];
      end
    end
  end else begin : g_single
    assign y_now = YW'(prod[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= y_now;
    end
  end

endmodule
