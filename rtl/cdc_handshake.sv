// cdc_handshake: carries a W-bit word from one clock domain to another with a
// toggle request / toggle acknowledge handshake. Used to hand a new DDS phase
// increment from the processor-side clock to the ADC clock.
//
// Source side: `send` stores src_data. When no transfer is running the word
// is copied to a hold register that stays stable until acknowledged and the
// request toggle flips. A word sent during a transfer waits and is launched
// when the transfer finishes; only the newest waiting word is kept.
// `src_done` pulses when the destination has acknowledged; `src_busy` is high
// while a word waits or is in flight.
// Destination side: the request toggle passes two flip-flops; on its change
// dst_pulse is high for one clock with the word on dst_data, and the toggle
// is returned as acknowledge through two source-clock flip-flops.
// Latency about 3 destination clocks plus 3 source clocks for the round trip.
module cdc_handshake #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic         send,
  input  logic [W-1:0] src_data,
  output logic         src_busy,
  output logic         src_done,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic         dst_pulse,
  output logic [W-1:0] dst_data
);

  logic [W-1:0] wait_q, hold_q;
  logic         pending_q, inflight_q, req_q;
  logic         ack_s1_q, ack_s2_q;
  logic         req_s1_q, req_s2_q, req_s3_q;

  // Source domain
  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      pending_q  <= 1'b0;
      inflight_q <= 1'b0;
      req_q      <= 1'b0;
      ack_s1_q   <= 1'b0;
      ack_s2_q   <= 1'b0;
      src_done   <= 1'b0;
    end else begin
      ack_s1_q <= req_s3_q;
      ack_s2_q <= ack_s1_q;
      src_done <= 1'b0;
      if (inflight_q && ack_s2_q == req_q) begin
        inflight_q <= 1'b0;
        src_done   <= 1'b1;
      end
      if (send) pending_q <= 1'b1;
      if (pending_q && !inflight_q && !send) begin
        hold_q     <= wait_q;
        req_q      <= ~req_q;
        inflight_q <= 1'b1;
        pending_q  <= 1'b0;
      end
    end
    if (send) wait_q <= src_data;
  end

  assign src_busy = pending_q || inflight_q;

  // Destination domain
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      req_s1_q  <= 1'b0;
      req_s2_q  <= 1'b0;
      req_s3_q  <= 1'b0;
      dst_pulse <= 1'b0;
    end else begin
      req_s1_q  <= req_q;
      req_s2_q  <= req_s1_q;
      req_s3_q  <= req_s2_q;
      dst_pulse <= req_s2_q != req_s3_q;
    end
    if (req_s2_q != req_s3_q) dst_data <= hold_q;
  end

endmodule
