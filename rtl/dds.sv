// dds: direct digital synthesizer producing the cosine/sine pair for the mixer.
//
// Structure (after the DDS architecture of the reference design): a phase
// increment register feeds a PHASE_W-bit phase accumulator; a phase offset is
// added, dither noise is added to the bits below the quantizer, the top LUT_AW
// bits address a full-wave sine table and the cosine is read a quarter period
// further on. The output frequency is F_out = F_clk * inc / 2^PHASE_W, so with
// an 80 MHz clock one increment step is 0.018626 Hz.
//
// Programming interface: while `we` is high, `data` is written to the phase
// increment register (reg_select = 0) or the phase offset register
// (reg_select = 1); `ce` does not matter for writes. `sclr` clears the
// accumulator and the output pipeline; the programmed registers keep their
// values. With `ce` high the first valid output (phase_out = offset) appears
// two clock cycles after `sclr` is released, marked by `rdy`. phase_out is the
// undithered phase belonging to the cosine/sine on the same cycle.
//
// Follows the reference design: the interface signals, the 32-bit accumulator,
// latency 2 and the use of phase dithering (no multipliers). Own choices: the
// table size (1024 x 16 bit), the dither source (a 32-bit Galois LFSR whose
// low bits give uniform noise over the discarded phase bits) and the `rst`
// input that clears the programmed registers at power-up.
module dds #(
  parameter int unsigned PHASE_W  = 32,
  parameter int unsigned LUT_AW   = 10,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned DITHER_W = PHASE_W - LUT_AW
) (
  input  logic                      clk,
  input  logic                      rst,         // clears increment/offset registers
  input  logic                      ce,
  input  logic                      sclr,
  input  logic                      we,
  input  logic                      reg_select,  // 0: phase increment, 1: phase offset
  input  logic [PHASE_W-1:0]        data,
  output logic                      rdy,
  output logic [PHASE_W-1:0]        phase_out,
  output logic signed [OUT_W-1:0]   cosine,
  output logic signed [OUT_W-1:0]   sine
);

  localparam int unsigned LUT_N = 2 ** LUT_AW;
  typedef logic signed [OUT_W-1:0] lut_t [LUT_N];

  // sin(2*pi*k/LUT_N) scaled to the full output range, by a Taylor series on
  // the angle reduced to [-pi, pi] (evaluated at elaboration).
  function automatic lut_t make_lut();
    lut_t t;
    real pi, x, term, s, amp;
    pi  = 3.14159265358979323846;
    amp = real'((2 ** (OUT_W - 1)) - 1);
    for (int k = 0; k < int'(LUT_N); k++) begin
      x = 2.0 * pi * real'(k) / real'(LUT_N);
      if (x > pi) x = x - 2.0 * pi;
      term = x;
      s    = x;
      for (int n = 1; n < 12; n++) begin
        term = -term * x * x / real'((2 * n) * (2 * n + 1));
        s    = s + term;
      end
      t[k] = OUT_W'($rtoi(s * amp + ((s >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam lut_t SIN_LUT = make_lut();

  logic [PHASE_W-1:0] inc_q, off_q, acc_q;
  logic [PHASE_W-1:0] ph1_q, dq1_q;
  logic [31:0]        lfsr_q;
  logic               v1_q;

  // Programming registers
  always_ff @(posedge clk) begin
    if (rst) begin
      inc_q <= '0;
      off_q <= '0;
    end else if (we) begin
      if (reg_select) off_q <= data;
      else            inc_q <= data;
    end
  end

  // Dither source: 32-bit Galois LFSR, taps 32,22,2,1
  always_ff @(posedge clk) begin
    if (rst)     lfsr_q <= 32'h1;
    else if (ce) lfsr_q <= {1'b0, lfsr_q[31:1]} ^ (lfsr_q[0] ? 32'h8020_0003 : 32'h0);
  end

  logic [PHASE_W-1:0] dither;
  assign dither = PHASE_W'(lfsr_q[DITHER_W-1:0]);

  // Phase accumulator and stage 1: offset, dither, quantize
  always_ff @(posedge clk) begin
    if (sclr) begin
      acc_q <= '0;
      v1_q  <= 1'b0;
      rdy   <= 1'b0;
    end else if (ce) begin
      acc_q <= acc_q + inc_q;
      ph1_q <= acc_q + off_q;
      dq1_q <= acc_q + off_q + dither;
      v1_q  <= 1'b1;
      rdy   <= v1_q;
    end
  end

  // Stage 2: table look-up
  logic [LUT_AW-1:0] sin_addr, cos_addr;
  assign sin_addr = dq1_q[PHASE_W-1 -: LUT_AW];
  assign cos_addr = sin_addr + LUT_AW'(LUT_N / 4);

  always_ff @(posedge clk) begin
    if (ce) begin
      phase_out <= ph1_q;
      sine      <= SIN_LUT[sin_addr];
      cosine    <= SIN_LUT[cos_addr];
    end
  end

endmodule
