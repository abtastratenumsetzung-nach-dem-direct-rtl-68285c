// ddc_datapath: the digital down converter proper, in the ADC clock domain.
//
// Every ADC clock one 16-bit sample is registered and multiplied by the DDS
// cosine and sine (I and Q channel). Each channel is low-pass filtered and
// decimated by 64 in three steps:
//   CIC (R=32, N=5, M=2)     80 MS/s  -> 2.5 MS/s, no multipliers
//   CFIR (droop comp., /2)   2.5 MS/s -> 1.25 MS/s
//   channel FIR              1.25 MS/s, 200 kHz channel
// The mixer halves the wanted component (x*cos = A/2 at the difference
// frequency); the CIC stages add a gain of 2, so a tone of peak amplitude A
// at the ADC comes out with |I + jQ| = A, saturating at full scale.
// The two 16-bit results are packed into one 32-bit word {I, Q}, which is
// what one NPI data beat carries. With test_pattern_en high the word is a
// 32-bit counter instead (see test_counter), one count per output sample.
//
// `run` (the synchronised ADC enable) gates everything: while it is low the
// DDS is held in synchronous clear and all filter state is reset, so each run
// starts from a clean state. dds_we/dds_inc load a new phase increment at any
// time (mixer frequency f = F_clk * inc / 2^32).
// Timing: out_valid pulses once every 64 ADC clocks, after a fixed latency of
// about 140 clocks through the cascade.
//
// Chain, rates and widths follow the reference design; the ADC number format
// option, the gain of 2 in the CIC stage, the I-high/Q-low packing and the reset-on-disable are this design's.
module ddc_datapath
  import ddc_pkg::*;
#(
  parameter bit ADC_OFFSET_BINARY = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  input  logic [SAMPLE_W-1:0] adc_din,
  input  logic                dds_we,
  input  logic [PHASE_W-1:0]  dds_inc,
  input  logic                test_pattern_en,
  output logic                out_valid,
  output logic [WORD_W-1:0]   out_word
);

  logic    clr;
  sample_t x_q;
  assign clr = rst || !run;

  // ADC input register (two's complement inside)
  always_ff @(posedge clk) begin
    x_q <= ADC_OFFSET_BINARY ? sample_t'({~adc_din[SAMPLE_W-1], adc_din[SAMPLE_W-2:0]})
                             : sample_t'(adc_din);
  end

  // Local oscillator
  logic               dds_rdy;
  logic [PHASE_W-1:0] dds_phase;
  sample_t            lo_cos, lo_sin;

  dds #(.PHASE_W(PHASE_W), .LUT_AW(10), .OUT_W(SAMPLE_W)) u_dds (
    .clk, .rst,
    .ce         (run),
    .sclr       (clr),
    .we         (dds_we),
    .reg_select (1'b0),
    .data       (dds_inc),
    .rdy        (dds_rdy),
    .phase_out  (dds_phase),
    .cosine     (lo_cos),
    .sine       (lo_sin)
  );

  // Mixer
  logic    mix_v;
  sample_t mix_i, mix_q;

  iq_mixer #(.W(SAMPLE_W)) u_mix (
    .clk, .rst(clr),
    .in_valid (dds_rdy),
    .x        (x_q),
    .cosine   (lo_cos),
    .sine     (lo_sin),
    .out_valid(mix_v),
    .i_out    (mix_i),
    .q_out    (mix_q)
  );

  // Filter cascade, one per channel
  logic    cic_v_i, cic_v_q, cf_v_i, cf_v_q, fir_v_i, fir_v_q;
  sample_t cic_i, cic_q, cf_i, cf_q, fir_i, fir_q;

  cic_decimator #(.IN_W(SAMPLE_W), .R(CIC_R), .N(CIC_N), .M(CIC_M), .OUT_W(SAMPLE_W), .GAIN_LOG2(1)) u_cic_i (
    .clk, .rst(clr), .in_valid(mix_v), .in_data(mix_i), .out_valid(cic_v_i), .out_data(cic_i));
  cic_decimator #(.IN_W(SAMPLE_W), .R(CIC_R), .N(CIC_N), .M(CIC_M), .OUT_W(SAMPLE_W), .GAIN_LOG2(1)) u_cic_q (
    .clk, .rst(clr), .in_valid(mix_v), .in_data(mix_q), .out_valid(cic_v_q), .out_data(cic_q));

  cfir_decim2 #(.W(SAMPLE_W)) u_cfir_i (
    .clk, .rst(clr), .in_valid(cic_v_i), .in_data(cic_i), .out_valid(cf_v_i), .out_data(cf_i));
  cfir_decim2 #(.W(SAMPLE_W)) u_cfir_q (
    .clk, .rst(clr), .in_valid(cic_v_q), .in_data(cic_q), .out_valid(cf_v_q), .out_data(cf_q));

  channel_fir #(.W(SAMPLE_W)) u_fir_i (
    .clk, .rst(clr), .in_valid(cf_v_i), .in_data(cf_i), .out_valid(fir_v_i), .out_data(fir_i));
  channel_fir #(.W(SAMPLE_W)) u_fir_q (
    .clk, .rst(clr), .in_valid(cf_v_q), .in_data(cf_q), .out_valid(fir_v_q), .out_data(fir_q));

  // Validation counter
  logic [WORD_W-1:0] cnt_value;
  test_counter #(.W(WORD_W)) u_cnt (
    .clk, .clr, .tick(fir_v_i && test_pattern_en), .value(cnt_value));

  // Output packing
  iq_word_t iq;
  assign iq = '{i: fir_i, q: fir_q};

  always_ff @(posedge clk) begin
    if (clr) out_valid <= 1'b0;
    else     out_valid <= fir_v_i;
    if (fir_v_i) out_word <= test_pattern_en ? cnt_value : WORD_W'(iq);
  end

  // Both channels run in lock step.
  a_iq_lockstep: assert property (@(posedge clk) disable iff (clr) fir_v_i == fir_v_q);

endmodule
