// async_fifo: dual-clock FIFO between the ADC clock domain and the NPI clock.
//
// The DDC produces one 32-bit {I,Q} word every 64 ADC clocks; the NPI write
// engine runs on the memory controller clock. Write and read pointers are
// kept in binary and Gray code; each Gray pointer crosses into the other
// clock domain through two flip-flops, so `full` and `empty` are pessimistic
// for two clocks after the other side moved but never wrong.
//
// Write side: wr_data is stored on a clock edge with wr_en high and full low;
// a write while full is dropped and sets the sticky `overflow` flag.
// Read side: rd_en may be held high continuously; a read is accepted when the
// FIFO is not empty, and the word appears on rd_data with `valid` high on the
// next clock (the read-enable / valid-flag convention of the reference
// design's synchronisation FIFO). DEPTH must be a power of two.
// The use of a dual-clock FIFO follows the reference design, which takes it
// from a vendor core generator; this implementation and its depth are this
// design's.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wr_clk,
  input  logic         wr_rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         overflow,
  input  logic         rd_clk,
  input  logic         rd_rst,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         valid,
  output logic         empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1_q, rgray_w2_q;   // read pointer seen by the write side
  logic [AW:0] wgray_r1_q, wgray_r2_q;   // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain
  logic        do_write;
  logic [AW:0] wbin_next;
  assign do_write  = wr_en && !full;
  assign wbin_next = wbin_q + (AW+1)'(do_write);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin_q     <= '0;
      wgray_q    <= '0;
      rgray_w1_q <= '0;
      rgray_w2_q <= '0;
      overflow   <= 1'b0;
    end else begin
      wbin_q     <= wbin_next;
      wgray_q    <= bin2gray(wbin_next);
      rgray_w1_q <= rgray_q;
      rgray_w2_q <= rgray_w1_q;
      if (wr_en && full) overflow <= 1'b1;
    end
    if (do_write) mem[wbin_q[AW-1:0]] <= wr_data;
  end

  assign full = (wgray_q == {~rgray_w2_q[AW:AW-1], rgray_w2_q[AW-2:0]});

  // Read domain
  logic        do_read;
  logic [AW:0] rbin_next;
  assign empty     = (rgray_q == wgray_r2_q);
  assign do_read   = rd_en && !empty;
  assign rbin_next = rbin_q + (AW+1)'(do_read);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin_q     <= '0;
      rgray_q    <= '0;
      wgray_r1_q <= '0;
      wgray_r2_q <= '0;
      valid      <= 1'b0;
    end else begin
      rbin_q     <= rbin_next;
      rgray_q    <= bin2gray(rbin_next);
      wgray_r1_q <= wgray_q;
      wgray_r2_q <= wgray_r1_q;
      valid      <= do_read;
    end
    if (do_read) rd_data <= mem[rbin_q[AW-1:0]];
  end

endmodule
