// tb_test_counter: random ticks; the value must equal the number of ticks
// since the last clear, wrapping at 2^32 (checked from a preset near the top).
module tb_test_counter;
  logic clk = 1'b0, clr = 1'b1, tick = 1'b0;
  logic [31:0] value;
  int checks = 0, failures = 0;
  longint unsigned n = 0;

  test_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) clr = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      tick = ($urandom_range(0, 2) == 0);
      if (k == 1500) begin clr = 1'b1; n = 0; end
      else begin clr = 1'b0; if (tick) n++; end
      @(posedge clk); #1;
      checks++;
      if (value != 32'(n)) begin failures++; if (failures < 10) $display("FAIL %0d vs %0d", value, n); end
    end
    // wrap-around
    @(negedge clk) tick = 1'b0; force dut.value = 32'hFFFF_FFFE; @(negedge clk) release dut.value;
    @(negedge clk) tick = 1'b1; @(negedge clk); @(negedge clk) tick = 1'b0;
    checks++;
    if (value != 32'h0) begin failures++; $display("FAIL wrap %h", value); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
