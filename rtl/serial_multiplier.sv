// serial_multiplier: bit-serial x parallel two's-complement multiplier.
//
// The coefficient a (AW bits) is applied in parallel; the other operand enters
// one bit per clock, LSB first, on b_in.  The serial operand runs along a chain
// of delay flip-flops, so cell i sees it delayed by i cycles (weight 2^i).
// Cell i ANDs that bit with a[i] and adds it, in one full adder, to the sum
// bit arriving from cell i-1; the adder's carry-out is fed back through a
// flip-flop to its own carry-in.  The sum bit of the last cell is the product
// output p_out, LSB first.  The sum path between cells is not registered, so
// the critical path is AW full adders.
// Signed operation (a design choice; the original design shows the unsigned
// cell array): the most significant cell carries weight -2^(AW-1), so it adds
// the inverted AND bit and its carry flip-flop is preset to 1; over a run of
// N output bits this adds -a[AW-1]*2^(AW-1)*b modulo 2^N.  The caller
// sign-extends the serial operand for the whole run.
// Timing: clr = 1 for one cycle clears the delay chain and the carries.  In
// the j-th cycle after clr the caller drives bit j of b on b_in and p_out is
// bit j of a*b (combinational from b_in and the flip-flops).  A run of
// N >= AW + BW cycles gives the full product of an AW-bit by BW-bit operand.
// The cell structure (AND, full adder, fed-back carry, operand delay chain)
// follows the original design's serial multiplier figure, with AW = 8 as used by
// its 8-bit coefficients (the figure draws four cells).
module serial_multiplier #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic [AW-1:0] a,
  input  logic          b_in,
  output logic          p_out
);

  logic [AW-1:0] bd;      // serial operand as seen by each cell
  logic [AW-1:1] bdly;    // operand delay chain
  logic [AW-1:0] carry;   // fed-back carries
  logic [AW:0]   chain;   // sum bits passed from cell to cell
  logic [AW-1:0] ppb;     // AND outputs
  logic [AW-1:0] cnext;

  // reset/clear value of the carries: 1 for the (subtracting) sign cell
  localparam logic [AW-1:0] CARRY_INIT = {1'b1, {(AW-1){1'b0}}};

  assign bd[0]    = b_in;
  assign chain[0] = 1'b0;

  for (genvar i = 0; i < AW; i++) begin : g_cell
    if (i > 0) begin : g_tap
      assign bd[i] = bdly[i];
    end
    // the sign cell (i = AW-1) adds the inverted AND bit
    assign ppb[i]     = (i == AW - 1) ? ~(a[i] & bd[i]) : (a[i] & bd[i]);
    assign chain[i+1] = chain[i] ^ ppb[i] ^ carry[i];
    assign cnext[i]   = (chain[i] & ppb[i]) | (chain[i] & carry[i]) | (ppb[i] & carry[i]);
  end

  assign p_out = chain[AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bdly  <= '0;
      carry <= CARRY_INIT;
    end else if (clr) begin
      bdly  <= '0;
      carry <= CARRY_INIT;
    end else begin
      bdly[1] <= b_in;
      for (int unsigned i = 2; i < AW; i++) bdly[i] <= bdly[i-1];
      carry <= cnext;
    end
  end

  initial assert (AW >= 2) else $error("serial_multiplier: AW must be at least 2");

endmodule
