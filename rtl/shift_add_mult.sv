// shift_add_mult: multiplierless constant multiplier, y = COEF * x.
//
// The constant is decomposed into powers of two, greedily from the largest
// power not above |COEF| downwards, which is its binary expansion.  Each power
// 2^i becomes a hard-wired left shift of x, and the shifted copies are merged
// by a chain of adders (subtractors when COEF is negative).  For example
// 159 = 2^7 + 2^4 + 2^3 + 2^2 + 2^1 + 2^0 uses five adders and
// -53 = -(2^5 + 2^4 + 2^2 + 2^0) four subtractors after the first term.
// Fractional coefficients are handled by the caller with a fixed binary point:
// 3.75 = 2^1 + 2^0 + 2^-1 + 2^-2 is COEF = 15 with two fraction bits.
// Purely combinational; only shifts and additions, no multiplier.
// The decomposition and the shift/add graph follow the original design;
// handling the sign by subtracting every term is a design choice.
module shift_add_mult #(
  parameter int          XW   = 8,
  parameter int          COEF = 159,
  parameter int          YW   = 18     // must hold XW + bits of |COEF| + 1
) (
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  localparam int MAG = (COEF < 0) ? -COEF : COEF;
  localparam int NB  = (MAG > 0) ? $clog2(MAG + 1) : 1;   // bits of |COEF|

  logic signed [YW-1:0] xe;
  logic signed [YW-1:0] chain [NB+1];

  assign xe       = YW'(x);
  assign chain[0] = '0;

  for (genvar i = 0; i < NB; i++) begin : g_term
    if (((MAG >> i) & 1) == 1) begin : g_on
      if (COEF < 0) begin : g_sub
        assign chain[i+1] = chain[i] - (xe <<< i);
      end else begin : g_add
        assign chain[i+1] = chain[i] + (xe <<< i);
      end
    end else begin : g_off
      assign chain[i+1] = chain[i];
    end
  end

  assign y = chain[NB];

  initial assert (YW >= XW + NB + 1) else $error("shift_add_mult: YW too small for COEF");

endmodule
