// mac_fir_booth: TAPS-tap FIR filter on a single Booth multiply-accumulate unit.
//
// y[n] = sum_{k=0}^{TAPS-1} c[k] * x[n-k] is computed one product per clock:
// the filter keeps the last TAPS samples in a tapped delay line, and a tap
// counter steps a single booth_multiplier (with its X/Y input buffers) and one
// accumulator through the taps.  This replaces TAPS multipliers and TAPS-1
// adders of a fully parallel filter with one of each.
// Interface: coefficients are written one at a time through coef_we /
// coef_addr / coef_data (a small register file, reset to zero).  A sample is
// accepted when in_valid & in_ready; in_ready is low while a sample is being
// processed.  out_valid pulses for one cycle with the full-precision result.
// Timing: counting the accepting clock edge as edge 0, the multiplier
// buffers are loaded at edges 1..TAPS, the products are accumulated at edges
// 2..TAPS+1, and edge TAPS+1 sets out_valid and out_data (latency TAPS+1
// cycles).  in_ready is high again in that same cycle, so the next sample
// can be taken at edge TAPS+2: one sample every TAPS+2 cycles (10 for 8 taps).
// The MAC structure with a Booth multiplier follows the original design; the
// handshake, the coefficient port and the accumulator width are design
// choices.
module mac_fir_booth
  import fir_pkg::*;
#(
  parameter int unsigned TAPS_P = TAPS,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned CW     = COEF_W,
  localparam int unsigned AW    = DW + CW + guard_bits(TAPS_P),
  localparam int unsigned KW    = (TAPS_P > 1) ? $clog2(TAPS_P) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient write port
  input  logic                 coef_we,
  input  logic [KW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_data,
  // sample input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  // filter output
  output logic                 out_valid,
  output logic signed [AW-1:0] out_data
);

  logic signed [CW-1:0] coef [TAPS_P];
  logic signed [DW-1:0] taps [TAPS_P];   // taps[k] = x[n-k]

  logic          busy;
  logic [KW:0]   cnt;        // 0..TAPS_P : load index / accumulate index + 1
  logic          load;
  logic [KW-1:0] k;
  logic signed [DW+CW-1:0] prod;
  logic signed [AW-1:0]    acc;

  assign in_ready = !busy;
  assign load     = busy && (cnt < (KW+1)'(TAPS_P));
  assign k        = cnt[KW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS_P); i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  booth_multiplier #(.XW(DW), .YW(CW)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .x    (taps[k]),
    .y    (coef[k]),
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
        // the product loaded in the previous cycle is accumulated now
        if (cnt == 0) begin
          acc <= '0;
        end else begin
          acc <= acc + AW'(prod);
        end
        if (cnt == (KW+1)'(TAPS_P)) begin
          out_data  <= acc + AW'(prod);
          out_valid <= 1'b1;
          busy      <= 1'b0;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  // handshake rules: a result is a single-cycle pulse, and no sample is
  // accepted while one is being processed
  a_out_pulse: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid)
    else $error("out_valid held for more than one cycle");
  a_busy_no_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                     (in_valid && in_ready) |=> !in_ready)
    else $error("in_ready high right after a sample was accepted");

endmodule
