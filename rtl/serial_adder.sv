// serial_adder: bit-serial adder with start/ready handshake.
//
// Adds two W-bit numbers presented LSB first, one bit of each per clock, using
// a single full adder and one carry flip-flop.  Each sum bit is shifted into
// the top of the W-bit register sum, so after W bits sum holds a + b (mod 2^W)
// in normal bit order.
// Timing: a cycle with start = 1 clears the bit counter and the carry.  The
// operand bits a and b of weight 2^j are sampled in the j-th cycle after
// start (j = 0 .. W-1).  ready is 1 while the counter stands at W, i.e. from
// the cycle after the last bit until the next start; sum is then complete.
// Behaviour, widths (W = 16) and the start/ready protocol follow the
// original design's behavioural serial adder; out of reset the adder is idle
// with ready = 1 and sum = 0, which is a design choice.
module serial_adder #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         a,
  input  logic         b,
  output logic         ready,
  output logic [W-1:0] sum
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] count;
  logic          carry;
  logic          s;

  assign s     = a ^ b ^ carry;
  assign ready = (count == CW'(W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= CW'(W);
      carry <= 1'b0;
      sum   <= '0;
    end else if (start) begin
      count <= '0;
      carry <= 1'b0;
    end else if (count < CW'(W)) begin
      count <= count + 1'b1;
      carry <= (a & b) | (a & carry) | (b & carry);
      sum   <= {s, sum[W-1:1]};
    end
  end

endmodule
