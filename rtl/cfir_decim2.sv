// cfir_decim2: CIC droop compensation filter, decimating by two.
//
// The CIC pass band falls off like (sin x / x)^5; this filter rises like the
// inverse over the 0..200 kHz channel and suppresses 1.0..1.25 MHz, so that after
// decimation from 2.5 MS/s to 1.25 MS/s nothing aliases into the channel.
// It is a 31-tap symmetric (linear-phase) FIR evaluated by one serial
// multiply-accumulate unit (fir_mac_decimator): one output every second
// input, TAPS + 3 clocks after that input.
//
// The role of the stage (droop equaliser that also decimates by 2) follows
// the reference design. Its coefficients are this design's own: a
// least-squares fit of 1/|H_CIC(f)| (R=32, N=5, M=2, input rate 80 MS/s) on
// 0..200 kHz with weight 1, and 0 on 1.0..1.25 MHz with weight 20, quantised
// to Q1.15 (h[k] = round(32768 * h_ls[k])).
module cfir_decim2 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned TAPS = 31;
  localparam logic signed [15:0] COEF [TAPS] = '{
    16'sd6, 16'sd11, -16'sd53, -16'sd120, 16'sd205, 16'sd627, -16'sd385, -16'sd2042,
    -16'sd44, 16'sd4483, 16'sd2504, -16'sd6291, -16'sd8259, 16'sd2180, 16'sd14219, 16'sd18687,
    16'sd14219, 16'sd2180, -16'sd8259, -16'sd6291, 16'sd2504, 16'sd4483, -16'sd44, -16'sd2042,
    -16'sd385, 16'sd627, 16'sd205, -16'sd120, -16'sd53, 16'sd11, 16'sd6
  };

  fir_mac_decimator #(
    .TAPS(TAPS), .DECIM(2), .W(W), .COEF_W(16), .COEF(COEF)
  ) u_mac (
    .clk, .rst, .in_valid, .in_data, .out_valid, .out_data
  );

endmodule
