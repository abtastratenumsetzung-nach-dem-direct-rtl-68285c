// freq_to_phase_inc: converts a mixer frequency in Hz into the DDS phase step.
//
// Software writes the wanted local-oscillator frequency f in Hz; the DDS needs
// the phase increment inc = f * 2^PHASE_W / F_clk (F_out = F_clk*inc/2^B).
// The division by the constant F_clk is done as a multiplication by
// K = round(2^(PHASE_W+SHIFT) / F_clk) (a 48-bit constant for SHIFT = 34)
// followed by a right shift of SHIFT bits. The result is within one increment
// step of the exact quotient for every 32-bit f. Frequencies above F_clk wrap,
// as an aliased oscillator would: 89.45 MHz gives the same increment as
// 9.45 MHz at 80 MS/s, which is what band-pass undersampling needs.
//
// Timing: product registered, inc_valid pulses two clocks after freq_we.
// That the increment is computed in hardware from a value in Hz follows the
// reference design; the constant-multiplier arithmetic is this design's.
module freq_to_phase_inc #(
  parameter int unsigned FCLK_HZ = 80_000_000,
  parameter int unsigned PHASE_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               freq_we,
  input  logic [31:0]        freq_hz,
  output logic               inc_valid,
  output logic [PHASE_W-1:0] phase_inc
);

  localparam int unsigned SHIFT = 34;
  localparam int unsigned KW    = 48;
  localparam logic [127:0] NUM  = 128'd1 << (PHASE_W + SHIFT);
  localparam logic [127:0] KL   = (NUM + 128'(FCLK_HZ / 2)) / 128'(FCLK_HZ);
  localparam logic [KW-1:0] K   = KW'(KL);

  logic [32+KW-1:0] prod_q;
  logic        v1_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q      <= 1'b0;
      inc_valid <= 1'b0;
    end else begin
      v1_q      <= freq_we;
      inc_valid <= v1_q;
    end
    if (freq_we) prod_q <= (32+KW)'(freq_hz) * (32+KW)'(K);
    if (v1_q)    phase_inc <= prod_q[SHIFT +: PHASE_W];
  end

endmodule
