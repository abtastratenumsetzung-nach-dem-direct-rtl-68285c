// npi_addr_gen: ring-buffer address generator of the NPI write engine.
//
// The samples go to a region of DDR2 memory that starts at `start_addr` and
// is `fat_sectors` x 512 bytes long (20 MB = 40960 sectors in the reference
// set-up). The generator holds a byte offset into that region; addr =
// start_addr + offset is the address of the next 8-word (32-byte) cacheline.
// On `advance` (the memory controller acknowledged the address) the offset
// moves on by LINE_BYTES and returns to 0 once the region end is reached, so
// old data is overwritten when the reader falls behind. `clr` restarts at the
// region start. `next_offset` is the offset the next `advance` will load.
// A region size of 0 keeps the offset at 0.
// Behaviour as in the reference design; reading "FAT data sectors" as the
// region size in sectors is this design's interpretation.
module npi_addr_gen #(
  parameter int unsigned LINE_BYTES   = 32,
  parameter int unsigned SECTOR_BYTES = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        advance,
  input  logic [31:0] start_addr,
  input  logic [15:0] fat_sectors,
  output logic [31:0] addr,
  output logic [31:0] offset,
  output logic [31:0] next_offset
);

  logic [31:0] limit;
  logic [31:0] stepped;

  assign limit       = 32'(fat_sectors) * 32'(SECTOR_BYTES);
  assign stepped     = offset + 32'(LINE_BYTES);
  assign next_offset = (stepped >= limit) ? 32'd0 : stepped;
  assign addr        = start_addr + offset;

  always_ff @(posedge clk) begin
    if (rst || clr)   offset <= '0;
    else if (advance) offset <= next_offset;
  end

endmodule
