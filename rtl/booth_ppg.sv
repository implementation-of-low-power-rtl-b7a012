// booth_ppg: one row of the Booth partial-product generator.
//
// For every bit m of the row, three 2:1 multiplexers and an inverter form the
// selected multiple of the multiplicand x from the Booth control bits of one
// group:
//   xd[m]  = dir ? ~xe[m] : xe[m]          direction MUX (with the inverter)
//   sm[m]  = sht ? xd[m-1] : 0             shift MUX (second input grounded)
//   pp[m]  = add ? xd[m]   : sm[m]         addition MUX
// where xe is x sign-extended by one bit so that 2x fits, and xd[-1] = dir so
// that a shifted negative multiple is the exact one's complement of 2x.
// A negative multiple is formed as one's complement plus one; the "plus one"
// leaves the row as the separate output neg = dir & (sht | add) and is added
// by the compressor stage.  The group 111 (-0x) therefore gives an all-zero
// row with neg = 0.  The MUX arrangement follows the encoder/PPG schematic;
// the MUX input order, the xd[-1] bit and the neg output are design choices.
// Purely combinational.
module booth_ppg #(
  parameter int unsigned XW = 8
) (
  input  logic [XW-1:0] x,     // multiplicand, two's complement
  input  logic          dir,
  input  logic          sht,
  input  logic          add,
  output logic [XW:0]   pp,    // row value, two's complement, XW+1 bits
  output logic          neg    // +1 correction for a negative multiple
);

  logic [XW:0] xe;
  logic [XW:0] xd;

  assign xe = {x[XW-1], x};

  always_comb begin
    for (int unsigned m = 0; m <= XW; m++) begin
      xd[m] = dir ? ~xe[m] : xe[m];
    end
    for (int unsigned m = 0; m <= XW; m++) begin
      logic lower;
      lower = (m == 0) ? dir : xd[m-1];
      pp[m] = add ? xd[m] : (sht ? lower : 1'b0);
    end
    neg = dir & (sht | add);
  end

endmodule
