// npi_irq_gen: interrupt generator of the NPI write engine.
//
// Watches the ring-buffer write offset and raises a one-clock interrupt pulse
// whenever a transaction completes a BLOCK_BYTES (32 KB) block, i.e. when the
// offset the address generator moves to is a multiple of 32 KB (including the
// wrap to 0). At 1.25 MS/s and 4 bytes per sample that is one interrupt every
// 6.5536 ms; the firmware counts them to know how much of the buffer is full.
// The boundary test is a plain compare of the low address bits against zero.
// Timing: irq is registered, one clock after `advance`.
// The rule follows the reference design; measuring the boundary relative to
// the region start (not the absolute address) is this design's choice.
module npi_irq_gen #(
  parameter int unsigned BLOCK_BYTES = 32768
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        advance,
  input  logic [31:0] next_offset,
  output logic        irq
);

  localparam int unsigned BW = $clog2(BLOCK_BYTES);

  always_ff @(posedge clk) begin
    if (rst) irq <= 1'b0;
    else     irq <= advance && (next_offset[BW-1:0] == '0);
  end

endmodule
