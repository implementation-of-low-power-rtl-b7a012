// fold_fir_booth: folded linear-phase FIR filter on one Booth multiplier.
//
// A linear-phase filter has symmetric coefficients, c[k] = c[TAPS-1-k], so
//   y[n] = sum_{k=0}^{TAPS/2-1} c[k] * (x[n-k] + x[n-(TAPS-1-k)]).
// Only the TAPS/2 distinct coefficients are stored.  The folded datapath
// holds the TAPS most recent samples in a delay line; two TAPS/2-input
// multiplexers (select sel1 = sel2 = k) pick the symmetric pair x[n-k] and
// x[n-(TAPS-1-k)], a pre-adder sums them (DW+1 bits), one booth_multiplier
// multiplies the sum by c[k], and an adder with an accumulator register
// collects the TAPS/2 products.  The pre-adder halves the number of products
// and the folding maps all of them onto a single multiplier and adder.
// Interface: as mac_fir_booth, but coef_addr addresses the TAPS/2 stored
// coefficients c[0..TAPS/2-1].  TAPS must be even.
// Timing: counting the accepting clock edge as edge 0, the sample pairs are
// loaded into the multiplier at edges 1..TAPS/2 and edge TAPS/2+1 sets
// out_valid and out_data (latency 5 cycles for 8 taps); the next sample can be
// taken at edge TAPS/2+2, i.e. one sample every TAPS/2+2 cycles (6 for 8 taps).
// The symmetric delay line, the two 4-input MUXes with shared select, the
// pre-adder, multiplier and accumulator register follow the folded
// architecture of the original design; the MUX input order, the handshake and
// the widths of the pre-adder and accumulator are design choices.
module fold_fir_booth
  import fir_pkg::*;
#(
  parameter int unsigned TAPS_P = TAPS,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned CW     = COEF_W,
  localparam int unsigned H     = TAPS_P / 2,
  localparam int unsigned AW    = DW + 1 + CW + guard_bits(H),
  localparam int unsigned KW    = (H > 1) ? $clog2(H) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_we,
  input  logic [KW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [AW-1:0] out_data
);

  logic signed [CW-1:0] coef [H];
  logic signed [DW-1:0] taps [TAPS_P];   // taps[k] = x[n-k]

  logic          busy;
  logic [KW:0]   cnt;
  logic          load;
  logic [KW-1:0] sel;                    // sel1 = sel2
  logic signed [DW-1:0]      mux1, mux2;
  logic signed [DW:0]        pre;
  logic signed [DW+1+CW-1:0] prod;
  logic signed [AW-1:0]      acc;

  assign in_ready = !busy;
  assign load     = busy && (cnt < (KW+1)'(H));
  assign sel      = cnt[KW-1:0];

  always_comb begin
    mux1 = taps[(KW+1)'(sel)];
    mux2 = taps[(KW+1)'(TAPS_P - 1) - (KW+1)'(sel)];
    pre  = (DW+1)'(mux1) + (DW+1)'(mux2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(H); i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  booth_multiplier #(.XW(DW + 1), .YW(CW)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .x    (pre),
    .y    (coef[sel]),
    .p    (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int i = 0; i < int'(TAPS_P); i++) taps[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          taps[0] <= in_data;
          for (int i = 1; i < int'(TAPS_P); i++) taps[i] <= taps[i-1];
          busy <= 1'b1;
          cnt  <= '0;
        end
      end else begin
        if (cnt == 0) begin
          acc <= '0;
        end else begin
          acc <= acc + AW'(prod);
        end
        if (cnt == (KW+1)'(H)) begin
          out_data  <= acc + AW'(prod);
          out_valid <= 1'b1;
          busy      <= 1'b0;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (TAPS_P % 2 == 0 && TAPS_P >= 2) else $error("fold_fir_booth: TAPS must be even");

  // handshake rules: a result is a single-cycle pulse, and no sample is
  // accepted while one is being processed
  a_out_pulse: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid)
    else $error("out_valid held for more than one cycle");
  a_busy_no_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                     (in_valid && in_ready) |=> !in_ready)
    else $error("in_ready high right after a sample was accepted");

endmodule
