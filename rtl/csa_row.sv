// csa_row: W-bit 3:2 compressor (carry-save adder row).
//
// Reduces three addends to a sum vector and a carry vector with
// a + b + c == s + cy (mod 2^W); the carry vector is already shifted left by
// one position.  One full adder per bit, no carry propagation.  Used by the
// Booth multiplier to merge its partial products before the final adder.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  // majority of the lower W-1 bits; the carry out of bit W-1 is dropped
  logic [W-2:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign cy  = {maj, 1'b0};

endmodule
