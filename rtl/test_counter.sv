// test_counter: validation pattern generator for the memory/USB transfer path.
//
// Instead of I/Q pairs the core can store a 32-bit counter that advances by one
// for every output sample (`tick`). Reading the ring buffer back must then
// show consecutive values, e.g. 0x00000000..0x0013FFFF in the first 5 MB
// block, so any lost or duplicated word is visible. `clr` restarts at 0.
// The counter as a validation source is the reference design's; advancing it
// at the DDC output rate is this design's choice.
module test_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         tick,
  output logic [W-1:0] value
);

  always_ff @(posedge clk) begin
    if (clr)       value <= '0;
    else if (tick) value <= value + 1'b1;
  end

endmodule
