// fir_mac_decimator: time-multiplexed FIR filter with optional decimation.
//
// Input samples are written into a circular buffer of 2^ceil(log2(TAPS+1))
// words. After every DECIM-th input the unit computes one output
//   y = sum_{k=0}^{TAPS-1} COEF[k] * x[newest - k]
// with a single multiplier, one tap per clock, so a new computation may start
// every TAPS clocks. With SYMMETRIC set (linear-phase filters, COEF[k] =
// COEF[TAPS-1-k]) the two samples that share a coefficient are added before
// the multiplier, so a computation takes only ceil(TAPS/2) clocks. The buffer is one word longer than the filter, so a
// sample arriving during a computation does not disturb it. Buffer words not
// written since reset count as zero, so the first outputs after a reset are
// those of a filter started from rest. The Q1.15 result is rounded and
// saturated to W bits.
//
// Timing: a computation takes NI issue cycles (TAPS, or ceil(TAPS/2) when
// symmetric) plus three pipeline stages (buffer/coefficient read, multiply,
// accumulate); out_valid pulses NI + 3 clocks after the input that started
// it. Inputs must come at least NI/DECIM clocks apart on average and a start must not fall into a running
// computation (checked by an assertion).
module fir_mac_decimator #(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DECIM  = 1,
  parameter int unsigned W      = 16,
  parameter int unsigned COEF_W = 16,
  parameter bit          SYMMETRIC = 1'b0,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = '{default: '0}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned NI    = SYMMETRIC ? (TAPS + 1) / 2 : TAPS;  // issue cycles
  localparam int unsigned AW    = $clog2(TAPS + 1);
  localparam int unsigned KW    = $clog2(TAPS + 1);
  localparam int unsigned PW    = (DECIM > 1) ? $clog2(DECIM) : 1;
  localparam int unsigned ACC_W = W + 1 + COEF_W + $clog2(TAPS + 1);
  localparam int unsigned FRAC  = COEF_W - 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [W-1:0] buf_q [2 ** AW];
  logic [AW-1:0] wp_q, base_q;
  logic [PW-1:0] ph_q;
  logic [KW-1:0] k_q;
  logic          busy_q;
  logic          start;
  logic [KW-1:0] fill_q, nvalid_q;   // samples written since reset (saturating)

  // Sample buffer and decimation phase
  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q   <= '0;
      ph_q   <= '0;
      fill_q <= '0;
    end else if (in_valid) begin
      wp_q <= wp_q + 1'b1;
      if (fill_q != KW'(TAPS)) fill_q <= fill_q + 1'b1;
      ph_q <= (ph_q == PW'(DECIM - 1)) ? '0 : ph_q + 1'b1;
    end
    if (in_valid) buf_q[wp_q] <= in_data;
  end

  assign start = in_valid && (ph_q == PW'(DECIM - 1));

  // Tap sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q   <= 1'b0;
      k_q      <= '0;
      base_q   <= '0;
      nvalid_q <= '0;
    end else if (start) begin
      busy_q   <= 1'b1;
      k_q      <= '0;
      base_q   <= wp_q;
      nvalid_q <= (fill_q == KW'(TAPS)) ? fill_q : fill_q + 1'b1;
    end else if (busy_q) begin
      if (k_q == KW'(NI - 1)) busy_q <= 1'b0;
      k_q <= k_q + 1'b1;
    end
  end

  // Stage A: read sample(s) and coefficient; in symmetric mode the two
  // samples sharing a coefficient, x[n-k] and x[n-(TAPS-1-k)], are pre-added
  // (the middle tap of an odd-length filter only once).
  logic [KW-1:0]            km;
  logic signed [W-1:0]      x0, x1;
  logic signed [W:0]        xa_q;
  logic signed [COEF_W-1:0] ca_q;
  logic                     va_q, firsta_q, lasta_q;
  assign km = KW'(TAPS - 1) - k_q;
  assign x0 = (k_q < nvalid_q) ? buf_q[base_q - AW'(k_q)] : '0;
  assign x1 = (SYMMETRIC && km != k_q && km < nvalid_q) ? buf_q[base_q - AW'(km)] : '0;
  always_ff @(posedge clk) begin
    if (rst) va_q <= 1'b0;
    else     va_q <= busy_q;
    xa_q     <= (W+1)'(x0) + (W+1)'(x1);
    ca_q     <= (k_q < KW'(TAPS)) ? COEF[int'(k_q)] : '0;
    firsta_q <= (k_q == '0);
    lasta_q  <= (k_q == KW'(NI - 1));
  end

  // Stage B: multiply
  logic signed [W+COEF_W:0] pb_q;
  logic                       vb_q, firstb_q, lastb_q;
  always_ff @(posedge clk) begin
    if (rst) vb_q <= 1'b0;
    else     vb_q <= va_q;
    pb_q     <= xa_q * ca_q;
    firstb_q <= firsta_q;
    lastb_q  <= lasta_q;
  end

  // Stage C: accumulate, round, saturate
  acc_t acc_q, acc_next, rounded;
  assign acc_next = (firstb_q ? acc_t'(0) : acc_q) + acc_t'(pb_q);
  assign rounded  = (acc_next + acc_t'(2 ** (FRAC - 1))) >>> FRAC;

  localparam acc_t MAXV = acc_t'((2 ** (W - 1)) - 1);
  localparam acc_t MINV = -acc_t'(2 ** (W - 1));

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= vb_q && lastb_q;
    if (vb_q) acc_q <= acc_next;
    if (vb_q && lastb_q) begin
      if (rounded > MAXV)      out_data <= MAXV[W-1:0];
      else if (rounded < MINV) out_data <= MINV[W-1:0];
      else                     out_data <= rounded[W-1:0];
    end
  end

  // A new computation must not start while the previous one is issuing taps.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    start |-> !busy_q || (k_q == KW'(NI - 1)));

endmodule
