// booth_encoder: radix-4 (modified) Booth recoder.
//
// The multiplier operand y is split into YW/2 overlapping groups
// {y[2i+1], y[2i], y[2i-1]} with y[-1] = 0.  Each group selects one of the
// multiples 0, +-1x, +-2x of the multiplicand, expressed as three control bits:
//   dir[i] = y[2i+1]               1: the multiple is negative
//   sht[i] = y[2i+1] ^ y[2i]       1: the multiple is 2x (used when add = 0)
//   add[i] = y[2i]   ^ y[2i-1]     1: the multiple is 1x
// so the encoder costs two XOR gates per group and the rest are buffers.
// The three control bits and their truth table (A = 1 exactly for the groups
// 001, 010, 101, 110) follow the original design of the encoder.
// Purely combinational; YW must be even.
module booth_encoder #(
  parameter int unsigned YW = 8
) (
  input  logic [YW-1:0]   y,
  output logic [YW/2-1:0] dir,
  output logic [YW/2-1:0] sht,
  output logic [YW/2-1:0] add
);

  localparam int unsigned G = YW / 2;

  // y with the implicit y[-1] = 0 appended below the LSB
  logic [YW:0] yx;
  assign yx = {y, 1'b0};

  always_comb begin
    for (int unsigned i = 0; i < G; i++) begin
      dir[i] = yx[2*i+2];
      sht[i] = yx[2*i+2] ^ yx[2*i+1];
      add[i] = yx[2*i+1] ^ yx[2*i];
    end
  end

  initial assert (YW % 2 == 0) else $error("booth_encoder: YW must be even");

endmodule
