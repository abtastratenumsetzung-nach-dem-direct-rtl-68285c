// tb_npi_addr_gen: checks address = start + offset, the 32-byte step, the wrap
// after fat_sectors*512 bytes (here 2 sectors, i.e. 32 lines, and the 20 MB
// set-up of 40960 sectors near its end), clr, and a region size of 0.
module tb_npi_addr_gen;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, advance = 1'b0;
  logic [31:0] start_addr = 32'h0100_0000, addr, offset, next_offset;
  logic [15:0] fat_sectors = 16'd2;
  int checks = 0, failures = 0;

  npi_addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    longint unsigned exp_off;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    exp_off = 0;
    for (int k = 0; k < 100; k++) begin
      check(addr == start_addr + 32'(exp_off), $sformatf("addr %h expected %h", addr, start_addr + 32'(exp_off)));
      @(negedge clk) advance = ($urandom_range(0, 1) == 1);
      if (advance) exp_off = (exp_off + 32) % 1024;
      @(negedge clk) advance = 1'b0;
    end
    // 20 MB region: check the wrap at 0x1400000 bytes
    fat_sectors = 16'd40960; start_addr = 32'h0;
    @(negedge clk) clr = 1'b1; @(negedge clk) clr = 1'b0;
    check(addr == 0, "clr");
    force dut.offset = 32'h013F_FFC0; @(negedge clk) release dut.offset;
    check(next_offset == 32'h013F_FFE0, "step below the end");
    @(negedge clk) advance = 1'b1; @(negedge clk) advance = 1'b0;
    check(addr == 32'h013F_FFE0, $sformatf("last line %h", addr));
    check(next_offset == 0, "wrap at 20 MB");
    @(negedge clk) advance = 1'b1; @(negedge clk) advance = 1'b0;
    check(addr == 0, "wrapped");
    fat_sectors = 16'd0;
    @(negedge clk) advance = 1'b1; @(negedge clk) advance = 1'b0;
    check(offset == 0, "size 0 stays at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
