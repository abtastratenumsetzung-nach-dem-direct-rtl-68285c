// tb_npi_irq_gen: steps an offset through a region by 32 bytes per advance and
// checks that irq pulses exactly when the new offset is a multiple of 32 KB
// (every 1024 transactions), one clock after advance.
module tb_npi_irq_gen;
  logic clk = 1'b0, rst = 1'b1, advance = 1'b0, irq;
  logic [31:0] next_offset = '0;
  int checks = 0, failures = 0, nirq = 0;

  npi_irq_gen dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (irq && !rst) nirq++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] off;
    bit exp_irq;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    off = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      advance = 1'b1;
      off = (off + 32) % (3 * 32768);
      next_offset = off;
      exp_irq = (off % 32768) == 0;
      @(negedge clk);
      advance = 1'b0;
      next_offset = 32'h0;   // a boundary value without advance must not fire
      checks++;
      if (irq != exp_irq) begin failures++; if (failures < 10) $display("FAIL irq=%0d at offset %h", irq, off); end
      @(negedge clk);
      checks++;
      if (irq) begin failures++; $display("FAIL irq without advance"); end
    end
    checks++;
    if (nirq != 5000 / 1024) begin failures++; $display("FAIL %0d interrupts", nirq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
