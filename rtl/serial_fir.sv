// serial_fir: TAPS-tap MAC FIR filter built from bit-serial arithmetic.
//
// y[n] = sum_{k} c[k] * x[n-k] is accumulated one tap at a time, and each tap
// one bit at a time: a serial_multiplier forms c[k] * x[n-k] LSB first from the
// parallel coefficient and the serially shifted sample, and a serial_adder adds
// that product stream to the running sum, which is itself shifted out LSB
// first.  All arithmetic is done on SW-bit words, SW = DW + CW + log2(TAPS),
// so no intermediate result can overflow.  Only single-bit adders toggle, which
// is what makes the structure attractive for low power at moderate rates.
// Per tap the controller spends one cycle in START (clear the multiplier's
// delay line and carries, start the adder, load the sample shift register
// and the running-sum shift register) and SW+1 cycles in RUN (SW bit cycles
// and one cycle in which the adder reports ready and its sum is taken).
// Interface: as mac_fir_booth (coefficient write port, valid/ready sample
// input, one-cycle out_valid pulse).
// Timing: counting the accepting clock edge as edge 0, edge TAPS*(SW+2) sets
// out_valid and out_data (168 cycles for 8 taps of 8x8 bits, SW = 19); the
// next sample can be taken on the following edge, one sample every
// TAPS*(SW+2)+1 cycles.
// The use of the serial multiplier and the serial adder for a MAC filter
// follows the original design; the word length, the control sequence and the
// handshake are design choices.
module serial_fir
  import fir_pkg::*;
#(
  parameter int unsigned TAPS_P = TAPS,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned CW     = COEF_W,
  localparam int unsigned SW    = DW + CW + guard_bits(TAPS_P),
  localparam int unsigned KW    = (TAPS_P > 1) ? $clog2(TAPS_P) : 1
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
  output logic signed [SW-1:0] out_data
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} state_t;

  state_t state;
  logic signed [CW-1:0] coef [TAPS_P];
  logic signed [DW-1:0] taps [TAPS_P];
  logic [KW-1:0]        k;
  logic signed [DW-1:0] dsh;      // sample, shifted right arithmetically
  logic [SW-1:0]        accsh;    // running sum, shifted out LSB first

  logic          start;
  logic          pbit;
  logic          add_ready;
  logic [SW-1:0] add_sum;
  logic          last_tap;

  assign in_ready = (state == S_IDLE);
  assign start    = (state == S_START);
  assign last_tap = (k == KW'(TAPS_P - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS_P); i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  serial_multiplier #(.AW(CW)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start),
    .a    (coef[k]),
    .b_in (dsh[0]),
    .p_out(pbit)
  );

  serial_adder #(.W(SW)) u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .a    (pbit),
    .b    (accsh[0]),
    .ready(add_ready),
    .sum  (add_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      dsh       <= '0;
      accsh     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int i = 0; i < int'(TAPS_P); i++) taps[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            taps[0] <= in_data;
            for (int i = 1; i < int'(TAPS_P); i++) taps[i] <= taps[i-1];
            k     <= '0;
            state <= S_START;
          end
        end
        S_START: begin
          dsh   <= taps[k];
          accsh <= (k == '0) ? '0 : add_sum;
          state <= S_RUN;
        end
        S_RUN: begin
          if (!add_ready) begin
            dsh   <= dsh >>> 1;
            accsh <= accsh >> 1;
          end else if (last_tap) begin
            out_data  <= add_sum;
            out_valid <= 1'b1;
            state     <= S_IDLE;
          end else begin
            k     <= k + 1'b1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
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
