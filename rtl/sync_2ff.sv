// sync_2ff: two-flip-flop synchroniser for slow level signals entering a
// clock domain (ADC enable, test-pattern select, reset). Each bit is
// synchronised on its own, so use it only for independent levels, not buses.
// Latency two clocks of the destination domain. RESET_VAL is loaded by rst.
module sync_2ff #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta_q <= RESET_VAL;
      q      <= RESET_VAL;
    end else begin
      meta_q <= d;
      q      <= meta_q;
    end
  end

endmodule
