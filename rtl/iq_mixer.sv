// iq_mixer: the two real multipliers that shift the ADC spectrum to baseband.
//
// Each valid input sample x is multiplied by the DDS cosine to form the
// in-phase channel and by the DDS sine to form the quadrature channel
// (I = x*cos, Q = x*sin). The W x W signed products are scaled back to W bits
// by an arithmetic shift of W-1 (the DDS amplitude is full scale) and
// saturated, which only matters for the product -FS * -FS.
// Timing: one register stage, out_valid follows in_valid by one clock.
// The two-multiplier I/Q structure is the reference design's; the scaling and
// the single pipeline stage are this design's choices.
module iq_mixer #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] cosine,
  input  logic signed [W-1:0] sine,
  output logic                out_valid,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);

  localparam logic signed [2*W-1:0] MAXV = (2*W)'((2 ** (W - 1)) - 1);
  localparam logic signed [2*W-1:0] MINV = -(2*W)'(2 ** (W - 1));

  function automatic logic signed [W-1:0] scale(input logic signed [2*W-1:0] p);
    logic signed [2*W-1:0] s;
    s = p >>> (W - 1);
    if (s > MAXV)      return MAXV[W-1:0];
    else if (s < MINV) return MINV[W-1:0];
    else               return s[W-1:0];
  endfunction

  logic signed [2*W-1:0] pi, pq;
  assign pi = x * cosine;
  assign pq = x * sine;

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) begin
      i_out <= scale(pi);
      q_out <= scale(pq);
    end
  end

endmodule
