// cic_decimator: Hogenauer cascaded integrator-comb decimator.
//
// N integrators run at the input rate, the rate changer keeps every R-th
// integrator output, and N combs y[m] = x[m] - x[m-M] run at the output rate
// (the rate changer moved in front of the combs, which shortens the comb
// delay lines from R*M to M words). The DC gain is (R*M)^N; every register is
// B_IN + ceil(N*log2(R*M)) bits wide, so modular two's-complement wrap-around in
// the integrators is harmless. The output is the full-precision result divided
// by the gain, i.e. its top OUT_W bits when (R*M)^N is a power of two.
//
// Defaults are the reference configuration R=32, N=5, M=2 (first zero at
// Fs/64 = 1.25 MHz for Fs = 80 MHz), which gives 16 + 30 = 46-bit registers.
// Timing: the integrators have one register each; out_valid pulses once per R
// accepted inputs, N+1 clocks after the input that completes the group.
// GAIN_LOG2 adds a power-of-two gain after the division by (R*M)^N, with
// saturation to OUT_W bits (0 gives the plain top bits of the register).
// Output truncation (rather than rounding) and GAIN_LOG2 are this design's
// choices.
module cic_decimator #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned R     = 32,
  parameter int unsigned N     = 5,
  parameter int unsigned M     = 2,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned GAIN_LOG2 = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned GROWTH = $clog2((R * M) ** N);
  localparam int unsigned ACC_W  = IN_W + GROWTH;
  localparam int unsigned CNT_W  = (R > 1) ? $clog2(R) : 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t integ_q [N];
  acc_t comb_q  [N];
  acc_t dly_q   [N][M];
  logic [CNT_W-1:0] cnt_q;
  logic             dec_valid_q;
  acc_t             dec_q;
  logic [N-1:0]     comb_v_q;

  // Integrators at the input rate
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(N); k++) integ_q[k] <= '0;
    end else if (in_valid) begin
      integ_q[0] <= integ_q[0] + acc_t'(in_data);
      for (int k = 1; k < int'(N); k++) integ_q[k] <= integ_q[k] + integ_q[k-1];
    end
  end

  // Rate changer: keep every R-th value of the last integrator
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q       <= '0;
      dec_valid_q <= 1'b0;
    end else begin
      dec_valid_q <= 1'b0;
      if (in_valid) begin
        if (cnt_q == CNT_W'(R - 1)) begin
          cnt_q       <= '0;
          dec_valid_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
    if (in_valid && cnt_q == CNT_W'(R - 1)) dec_q <= integ_q[N-1];
  end

  // Combs at the output rate, one pipeline stage each
  always_ff @(posedge clk) begin
    if (rst) begin
      comb_v_q <= '0;
      for (int k = 0; k < int'(N); k++)
        for (int d = 0; d < int'(M); d++) dly_q[k][d] <= '0;
    end else begin
      comb_v_q <= {comb_v_q[N-2:0], dec_valid_q};
      if (dec_valid_q) begin
        comb_q[0]   <= dec_q - dly_q[0][M-1];
        dly_q[0][0] <= dec_q;
        for (int d = 1; d < int'(M); d++) dly_q[0][d] <= dly_q[0][d-1];
      end
      for (int k = 1; k < int'(N); k++) begin
        if (comb_v_q[k-1]) begin
          comb_q[k]   <= comb_q[k-1] - dly_q[k][M-1];
          dly_q[k][0] <= comb_q[k-1];
          for (int d = 1; d < int'(M); d++) dly_q[k][d] <= dly_q[k][d-1];
        end
      end
    end
  end

  assign out_valid = comb_v_q[N-1];

  // Output scaling: divide by (R*M)^N, multiply by 2^GAIN_LOG2, saturate.
  localparam int unsigned SHIFT = GROWTH - GAIN_LOG2;
  localparam acc_t OUT_MAX = acc_t'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam acc_t OUT_MIN = -acc_t'(64'sd1 <<< (OUT_W - 1));
  acc_t scaled;
  always_comb begin
    scaled = comb_q[N-1] >>> SHIFT;
    if (scaled > OUT_MAX)      out_data = OUT_MAX[OUT_W-1:0];
    else if (scaled < OUT_MIN) out_data = OUT_MIN[OUT_W-1:0];
    else                       out_data = scaled[OUT_W-1:0];
  end

endmodule
