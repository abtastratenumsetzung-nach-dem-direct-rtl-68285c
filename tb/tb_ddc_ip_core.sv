// tb_ddc_ip_core: end-to-end test of the DDC IP core with its default
// parameters, an 80 MHz ADC clock, a 100 MHz system clock and the behavioural
// memory controller npi_mem_model (random address acknowledge latency and
// random WrFIFO_AlmostFull back-pressure).
//
// Sequence, as firmware would run it:
//  1. registers: frequency write -> "DDS synced" low, then high once the
//     phase increment has crossed into the ADC clock domain; read-back;
//  2. validation mode (test pattern): 64 KB ring buffer (128 sectors),
//     enable, let 2600 cachelines run so the buffer wraps, disable; every
//     word of the buffer must hold the counter value of the last pass, and
//     exactly two interrupts (32 KB and 64 KB) must have come;
//  3. mode switch to I/Q: an 89.5 MHz tone (band-pass undersampled, alias at
//     9.5 MHz) with the mixer at 9.45 MHz must come out of memory as a
//     50 kHz complex tone of amplitude A; a retune to 9.40 MHz while running
//     must change it to 100 kHz;
//  4. with the memory controller not ready (InitDone low) the engine waits
//     in RST and the FIFO overflows; a reset clears the sticky flag.
// Every mechanism is counted (register sync, AlmostFull stall, same-clock
// acknowledge, wrap, interrupt, disable/enable, mode switch, retune,
// FIFO overflow); one
// that never happened counts as a failure.
module tb_ddc_ip_core;
  import ddc_pkg::*;
  localparam real PI = 3.14159265358979;
  logic sys_clk = 1'b0, adc_clk = 1'b0, sys_rst = 1'b1;
  logic [15:0] adc_din = '0;
  logic adc_en_out;
  logic reg_wr = 1'b0, reg_rd = 1'b0;
  logic [1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic npi_InitDone = 1'b0, npi_AddrReq, npi_AddrAck, npi_RNW, npi_RdModWr;
  logic [31:0] npi_Addr, npi_WrFIFO_Data;
  logic [3:0] npi_Size, npi_WrFIFO_BE;
  logic npi_WrFIFO_Push, npi_WrFIFO_Flush, npi_WrFIFO_AlmostFull;
  logic irq, test_pattern_en = 1'b0, fifo_overflow;
  int checks = 0, failures = 0;

  ddc_ip_core dut (.*);
  npi_mem_model #(.ACK_PCT(40), .ALMOST_FULL_PCT(15)) mpmc (
    .clk(sys_clk), .rst(sys_rst), .Addr(npi_Addr), .AddrReq(npi_AddrReq), .AddrAck(npi_AddrAck),
    .RNW(npi_RNW), .Size(npi_Size), .RdModWr(npi_RdModWr), .WrFIFO_Data(npi_WrFIFO_Data),
    .WrFIFO_BE(npi_WrFIFO_BE), .WrFIFO_Push(npi_WrFIFO_Push), .WrFIFO_Flush(npi_WrFIFO_Flush),
    .WrFIFO_AlmostFull(npi_WrFIFO_AlmostFull));

  always #5 sys_clk = ~sys_clk;
  always #6.25 adc_clk = ~adc_clk;

  initial begin
    #80ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ADC: cosine tone
  real f_in = 0.0, amp = 0.0;
  longint unsigned n = 0;
  always @(posedge adc_clk) begin
    adc_din <= 16'($rtoi(amp * $cos(2.0 * PI * (f_in / 80.0e6) * real'(n % 64'd80000000))));
    n++;
  end

  // register bus
  task automatic reg_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge sys_clk);
    reg_addr = a; reg_wdata = d; reg_wr = 1'b1;
    @(negedge sys_clk) reg_wr = 1'b0;
  endtask
  task automatic reg_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge sys_clk);
    reg_addr = a; reg_rd = 1'b1;
    @(negedge sys_clk) reg_rd = 1'b0;
    d = reg_rdata;
  endtask

  // mechanism counters
  int n_overflow = 0, n_irq = 0, n_stall = 0, n_wrap = 0, n_sync = 0, n_disable = 0, n_mode = 0, n_retune = 0;
  logic [31:0] region_start = '0;
  logic first_line = 1'b1;
  always @(posedge sys_clk) if (!sys_rst) begin
    if (irq) n_irq++;
    if (dut.u_npi.state == NPI_TX_DATA && npi_WrFIFO_AlmostFull) n_stall++;
    if (npi_AddrReq && npi_AddrAck) begin
      if (npi_Addr == region_start && !first_line) n_wrap++;
      first_line <= 1'b0;
    end
  end

  task automatic wait_synced();
    logic [31:0] r;
    int k = 0;
    reg_read(REG_CTRL, r);
    check(r[30] == 1'b0, "DDS synced must drop after a frequency write");
    do begin reg_read(REG_CTRL, r); k++; end while (!r[30] && k < 100);
    check(r[30] == 1'b1, "DDS synced never set");
    if (r[30]) n_sync++;
  endtask

  task automatic measure(input logic [31:0] base, input int from, input int cnt,
                         output real mag, output real step);
    real s = 0.0, d = 0.0, i0, q0, i1, q1, dp;
    logic [31:0] w;
    for (int k = from; k < from + cnt; k++) begin
      w = mpmc.read_word(base + 32'(4 * (k - 1)));
      i0 = real'($signed(w[31:16])); q0 = real'($signed(w[15:0]));
      w = mpmc.read_word(base + 32'(4 * k));
      i1 = real'($signed(w[31:16])); q1 = real'($signed(w[15:0]));
      s += $sqrt(i1 * i1 + q1 * q1);
      dp = $atan2(q1, i1) - $atan2(q0, i0);
      if (dp > PI) dp -= 2.0 * PI;
      if (dp < -PI) dp += 2.0 * PI;
      d += (dp < 0.0) ? -dp : dp;
    end
    mag = s / cnt;
    step = d / cnt;
  endtask

  initial begin
    logic [31:0] r;
    int words, bad, lines0;
    real mag, step, st50, st100;
    repeat (10) @(negedge sys_clk);
    sys_rst = 1'b0;
    repeat (20) @(negedge sys_clk);
    npi_InitDone = 1'b1;

    // 1. registers
    reg_read(REG_CTRL, r);
    check(r == 32'h0, "reset value of reg 0");
    reg_write(REG_FREQ, 32'd10_000_000);
    wait_synced();
    reg_read(REG_FREQ, r);
    check(r == 32'd10_000_000, "frequency read-back");
    check(dut.u_ddc.u_dds.inc_q >= 32'h1FFF_FFFF && dut.u_ddc.u_dds.inc_q <= 32'h2000_0001,
          $sformatf("phase increment for 10 MHz: %h", dut.u_ddc.u_dds.inc_q));

    // 2. validation mode, 64 KB ring buffer
    region_start = 32'h0100_0000;
    first_line = 1'b1;
    reg_write(REG_START, region_start);
    test_pattern_en = 1'b1;
    reg_write(REG_CTRL, 32'h8000_0080);
    @(negedge sys_clk);
    check(adc_en_out == 1'b1, "ADC enable output");
    reg_read(REG_CTRL, r);
    check(r == 32'hC000_0080, $sformatf("reg 0 read-back %h", r));
    reg_read(REG_START, r);
    check(r == region_start, "start address read-back");
    wait (mpmc.lines >= 2600);
    reg_write(REG_CTRL, 32'h0000_0080);
    n_disable++;
    repeat (500) @(negedge sys_clk);
    check(adc_en_out == 1'b0, "ADC enable output off");
    words = mpmc.lines * 8;
    bad = 0;
    for (int k = 0; k < 16384; k++) begin
      int expv;
      expv = (k < words - 16384) ? k + 16384 : k;
      if (mpmc.read_word(region_start + 32'(4 * k)) != 32'(expv)) bad++;
    end
    check(bad == 0, $sformatf("test pattern: %0d of 16384 words wrong (%0d words written)", bad, words));
    check(n_irq == 2, $sformatf("%0d interrupts for %0d bytes", n_irq, words * 4));
    check(n_wrap == 1, $sformatf("%0d wraps", n_wrap));
    check(dut.u_npi.state == NPI_RST, "engine in RST while disabled");
    lines0 = mpmc.lines;

    // 3. mode switch to I/Q, undersampled 89.5 MHz tone
    test_pattern_en = 1'b0;
    f_in = 89.5e6; amp = 16000.0;
    reg_write(REG_FREQ, 32'd9_450_000);
    wait_synced();
    region_start = 32'h0200_0000;
    first_line = 1'b1;
    reg_write(REG_START, region_start);
    reg_write(REG_CTRL, 32'h8000_0080);
    n_mode++;
    wait (mpmc.lines >= lines0 + 50);
    reg_write(REG_FREQ, 32'd9_400_000);   // retune while running
    wait_synced();
    n_retune++;
    wait (mpmc.lines >= lines0 + 100);
    reg_write(REG_CTRL, 32'h0000_0080);
    n_disable++;
    repeat (500) @(negedge sys_clk);
    st50 = 2.0 * PI * 50.0e3 / 1.25e6;
    st100 = 2.0 * PI * 100.0e3 / 1.25e6;
    measure(region_start, 200, 180, mag, step);
    $display("I/Q at 50 kHz offset: |IQ| = %f, step %f (expect %f)", mag, step, st50);
    check(mag > 15200.0 && mag < 16800.0, "I/Q amplitude from memory (50 kHz)");
    check(step > 0.97 * st50 && step < 1.03 * st50, "I/Q frequency from memory (50 kHz)");
    measure(region_start, 600, 180, mag, step);
    $display("I/Q at 100 kHz offset: |IQ| = %f, step %f (expect %f)", mag, step, st100);
    check(mag > 15200.0 && mag < 16800.0, "I/Q amplitude from memory (100 kHz)");
    check(step > 0.97 * st100 && step < 1.03 * st100, "I/Q frequency after retune (100 kHz)");

    check(mpmc.errors == 0, $sformatf("%0d NPI protocol errors", mpmc.errors));
    check(fifo_overflow == 1'b0, "FIFO overflow");

    // 4. memory controller not ready: the engine waits in RST, the FIFO
    //    overflows (sticky flag), a reset clears flag and registers
    npi_InitDone = 1'b0;
    lines0 = mpmc.lines;
    reg_write(REG_CTRL, 32'h8000_0080);
    repeat (3000) @(negedge sys_clk);
    check(dut.u_npi.state == NPI_RST && mpmc.lines == lines0, "must wait for InitDone");
    check(fifo_overflow == 1'b1, "FIFO overflow flag while memory is not ready");
    if (fifo_overflow) n_overflow++;
    sys_rst = 1'b1;
    repeat (10) @(negedge sys_clk);
    sys_rst = 1'b0;
    repeat (10) @(negedge sys_clk);
    check(fifo_overflow == 1'b0 && adc_en_out == 1'b0, "reset clears overflow flag and enable");
    reg_read(REG_CTRL, r);
    check(r == 32'h0, "reg 0 after reset");
    // every mechanism must have happened
    check(n_sync >= 3, "DDS synced handshake");
    check(n_stall > 0, "AlmostFull stall");
    check(mpmc.same_cycle_acks > 0, "same-clock acknowledge");
    check(n_wrap > 0, "ring buffer wrap");
    check(n_irq > 0, "interrupt");
    check(n_disable >= 2, "disable");
    check(n_mode > 0, "mode switch");
    check(n_retune > 0, "retune");
    check(n_overflow > 0, "FIFO overflow");
    $display("mechanisms: sync=%0d stall=%0d same_cycle_ack=%0d wrap=%0d irq=%0d disable=%0d mode_switch=%0d retune=%0d overflow=%0d",
             n_sync, n_stall, mpmc.same_cycle_acks, n_wrap, n_irq, n_disable, n_mode, n_retune, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
