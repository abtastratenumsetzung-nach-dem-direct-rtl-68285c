// tb_slv_regs: checks reset values, the field layout of the three registers
// (FAT data sectors 15:0, reserved 29:16, DDS synced 30, ADC enable 31; start
// address; DDS frequency), read-back, the read-only status bit and the
// one-clock dds_freq_we pulse on every write of register 2.
module tb_slv_regs;
  logic clk = 1'b0, rst = 1'b1, reg_wr = 1'b0, reg_rd = 1'b0, dds_synced = 1'b0;
  logic [1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic adc_enable, dds_freq_we;
  logic [15:0] fat_sectors;
  logic [31:0] start_addr, dds_freq;
  int checks = 0, failures = 0, we_pulses = 0;

  slv_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (dds_freq_we && !rst) we_pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 1'b0;
  endtask
  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1'b1; reg_addr = a;
    @(negedge clk); reg_rd = 1'b0; d = reg_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int a = 0; a < 3; a++) begin rd(2'(a), d); check(d == 0, $sformatf("reset value of %0d: %h", a, d)); end
    check(!adc_enable && fat_sectors == 0 && start_addr == 0 && dds_freq == 0, "reset outputs");
    wr(2'd0, 32'hFFFF_A000);
    check(adc_enable && fat_sectors == 16'hA000, "control fields");
    rd(2'd0, d);
    check(d == 32'h8000_A000, $sformatf("control read %h (reserved and status must read 0)", d));
    dds_synced = 1'b1;
    rd(2'd0, d);
    check(d == 32'hC000_A000, $sformatf("status bit read %h", d));
    wr(2'd0, 32'h4000_0001);
    check(!adc_enable && fat_sectors == 16'h0001, "bit 30 (read-only status) must not enable");
    wr(2'd0, 32'h8000_0002);
    check(adc_enable && fat_sectors == 16'h0002, "bit 31 alone enables");
    wr(2'd0, 32'h0000_1234);
    check(!adc_enable && fat_sectors == 16'h1234, "enable cleared");
    wr(2'd1, 32'h0050_0000);
    rd(2'd1, d);
    check(d == 32'h0050_0000 && start_addr == 32'h0050_0000, "start address");
    check(we_pulses == 0, "dds_freq_we without freq write");
    wr(2'd2, 32'd10_700_000);
    @(negedge clk);
    check(we_pulses == 1 && dds_freq == 32'd10_700_000, "frequency write");
    wr(2'd2, 32'd9_450_000);
    rd(2'd2, d);
    check(we_pulses == 2 && d == 32'd9_450_000, "second frequency write");
    wr(2'd3, 32'hFFFF_FFFF);
    rd(2'd3, d);
    check(d == 0 && start_addr == 32'h0050_0000 && fat_sectors == 16'h1234, "unused index");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
