// booth_multiplier: signed radix-4 Booth multiplier with input buffers.
//
// Structure, from operand to product:
//   1. X and Y input buffers: registers loaded when load = 1.
//   2. Booth encoder: recodes the buffered y into YW/2 groups of
//      (direction, shift, addition) control bits.
//   3. Partial product generators: one booth_ppg row per group, each row the
//      selected multiple 0, +-x, +-2x, weighted by 4^i.
//   4. Compressors: the YW/2 rows plus the vector of negation "+1" bits are
//      reduced to a sum and a carry vector by a linear chain of 3:2 carry-save
//      rows.
//   5. Carry propagation adder: adds sum and carry to give the product.
// For 8x8 operands only four partial products are formed instead of eight.
// Steps 2-5 are combinational, so p is valid in the cycle after load (one
// cycle of latency) and stays valid until the next load.  The buffer/encoder/
// PPG/compressor/CPA split follows the original design's block diagram; the
// chain shape of the compressor stage and the reset value of the buffers are
// design choices.  YW must be even.
module booth_multiplier #(
  parameter int unsigned XW = 8,   // multiplicand width (samples)
  parameter int unsigned YW = 8,   // multiplier width (coefficients), even
  localparam int unsigned PW = XW + YW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [XW-1:0] x,
  input  logic signed [YW-1:0] y,
  output logic signed [PW-1:0] p
);

  localparam int unsigned G = YW / 2;   // partial-product rows
  localparam int unsigned R = G + 1;    // rows including the +1 vector

  // ---- input buffers -------------------------------------------------------
  logic [XW-1:0] xb;
  logic [YW-1:0] yb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xb <= '0;
      yb <= '0;
    end else if (load) begin
      xb <= x;
      yb <= y;
    end
  end

  // ---- Booth encoder -------------------------------------------------------
  logic [G-1:0] dir, sht, add;

  booth_encoder #(.YW(YW)) u_enc (
    .y  (yb),
    .dir(dir),
    .sht(sht),
    .add(add)
  );

  // ---- partial product generators -----------------------------------------
  logic [XW:0]   pp  [G];
  logic [G-1:0]  neg;
  logic [PW-1:0] rows [R];

  for (genvar i = 0; i < G; i++) begin : g_ppg
    booth_ppg #(.XW(XW)) u_ppg (
      .x  (xb),
      .dir(dir[i]),
      .sht(sht[i]),
      .add(add[i]),
      .pp (pp[i]),
      .neg(neg[i])
    );
  end

  always_comb begin
    for (int unsigned i = 0; i < G; i++) begin
      // sign-extend the row to PW bits and weight it by 4^i
      rows[i] = PW'($signed(pp[i])) << (2 * i);
    end
    rows[G] = '0;
    for (int unsigned i = 0; i < G; i++) begin
      rows[G][2*i] = neg[i];
    end
  end

  // ---- compressors: chain of 3:2 rows --------------------------------------
  logic [PW-1:0] s_v [R-1];
  logic [PW-1:0] c_v [R-1];

  assign s_v[0] = rows[0];
  assign c_v[0] = rows[1];

  for (genvar r = 2; r < R; r++) begin : g_csa
    csa_row #(.W(PW)) u_csa (
      .a (s_v[r-2]),
      .b (c_v[r-2]),
      .c (rows[r]),
      .s (s_v[r-1]),
      .cy(c_v[r-1])
    );
  end

  // ---- carry propagation adder ---------------------------------------------
  assign p = $signed(s_v[R-2] + c_v[R-2]);

  initial assert (YW % 2 == 0 && YW >= 2) else $error("booth_multiplier: YW must be even");

endmodule
