// channel_fir: channel-selection low-pass filter at the 1.25 MS/s output rate.
//
// Last stage of the CIC -> CFIR -> FIR cascade: it sets the 200 kHz channel
// edge and the final stop-band attenuation while running at the lowest
// sample rate. 125-tap symmetric (linear-phase) FIR, no decimation, evaluated
// by one serial multiply-accumulate unit with a pre-adder for the sample
// pairs that share a coefficient: 63 multiplies fit into the 64 ADC clocks
// between two samples; out_valid follows in_valid by 63 + 3 clocks.
//
// The position and purpose of the stage follow the reference design. The
// coefficients are this design's own: a Parks-McClellan (equiripple) design
// with pass band 0..200 kHz, stop band 235..625 kHz, stop-band weight 30,
// quantised to Q1.15 (70 dB on its own). Together with the CIC and the CFIR
// the cascade has 0.07 dB pass-band ripple and 71 dB stop-band attenuation
// from 235 kHz, a 35 kHz transition band (the reference design reports
// 22.5 kHz, which would take about 190 taps).
module channel_fir #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned TAPS = 125;
  localparam logic signed [15:0] COEF [TAPS] = '{
    16'sd7, 16'sd10, 16'sd6, -16'sd9, -16'sd27, -16'sd33, -16'sd17, 16'sd9,
    16'sd22, 16'sd7, -16'sd23, -16'sd36, -16'sd13, 16'sd29, 16'sd45, 16'sd13,
    -16'sd41, -16'sd59, -16'sd14, 16'sd56, 16'sd75, 16'sd12, -16'sd76, -16'sd93,
    -16'sd8, 16'sd101, 16'sd113, -16'sd1, -16'sd132, -16'sd135, 16'sd15, 16'sd171,
    16'sd158, -16'sd36, -16'sd219, -16'sd182, 16'sd67, 16'sd278, 16'sd207, -16'sd110,
    -16'sd351, -16'sd231, 16'sd171, 16'sd442, 16'sd253, -16'sd257, -16'sd560, -16'sd274,
    16'sd381, 16'sd721, 16'sd292, -16'sd571, -16'sd962, -16'sd307, 16'sd898, 16'sd1381,
    16'sd318, -16'sd1598, -16'sd2381, -16'sd325, 16'sd4334, 16'sd9187, 16'sd11250, 16'sd9187,
    16'sd4334, -16'sd325, -16'sd2381, -16'sd1598, 16'sd318, 16'sd1381, 16'sd898, -16'sd307,
    -16'sd962, -16'sd571, 16'sd292, 16'sd721, 16'sd381, -16'sd274, -16'sd560, -16'sd257,
    16'sd253, 16'sd442, 16'sd171, -16'sd231, -16'sd351, -16'sd110, 16'sd207, 16'sd278,
    16'sd67, -16'sd182, -16'sd219, -16'sd36, 16'sd158, 16'sd171, 16'sd15, -16'sd135,
    -16'sd132, -16'sd1, 16'sd113, 16'sd101, -16'sd8, -16'sd93, -16'sd76, 16'sd12,
    16'sd75, 16'sd56, -16'sd14, -16'sd59, -16'sd41, 16'sd13, 16'sd45, 16'sd29,
    -16'sd13, -16'sd36, -16'sd23, 16'sd7, 16'sd22, 16'sd9, -16'sd17, -16'sd33,
    -16'sd27, -16'sd9, 16'sd6, 16'sd10, 16'sd7
  };

  fir_mac_decimator #(
    .TAPS(TAPS), .DECIM(1), .W(W), .COEF_W(16), .SYMMETRIC(1'b1), .COEF(COEF)
  ) u_mac (
    .clk, .rst, .in_valid, .in_data, .out_valid, .out_data
  );

endmodule
