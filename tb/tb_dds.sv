// tb_dds: self-checking test of the DDS.
// 1. Programs increment 0x20 and offset 0x100 (the values of the programming
//    example of the DDS core), releases SCLR and checks that RDY rises exactly
//    two clocks later and that PHASE_OUT runs 0x100, 0x120, 0x140, ...
// 2. Programs several increments and compares SINE/COSINE with
//    32767*sin/cos(2*pi*phase/2^32), allowing one table step of phase error
//    (dithering moves the table address by up to one step).
// 3. Checks that a new increment takes effect without SCLR.
module tb_dds;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, sclr = 1'b1, we = 1'b0, reg_select = 1'b0;
  logic [31:0] data = '0;
  logic rdy;
  logic [31:0] phase_out;
  logic signed [15:0] cosine, sine;
  int checks = 0, failures = 0;

  dds dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic write_reg(input bit sel, input logic [31:0] v);
    @(negedge clk); we = 1'b1; reg_select = sel; data = v;
    @(negedge clk); we = 1'b0; reg_select = 1'b0;
  endtask

  localparam real PI = 3.14159265358979;
  real tol = 2.0 * PI / 1024.0 * 32767.0 + 3.0;

  task automatic check_wave(input int n);
    real ph, es, ec;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      ph = 2.0 * PI * real'(phase_out) / 4294967296.0;
      es = 32767.0 * $sin(ph);
      ec = 32767.0 * $cos(ph);
      check((real'(sine) - es <= tol) && (es - real'(sine) <= tol),
            $sformatf("sine %0d expected %f at phase %h", sine, es, phase_out));
      check((real'(cosine) - ec <= tol) && (ec - real'(cosine) <= tol),
            $sformatf("cosine %0d expected %f at phase %h", cosine, ec, phase_out));
    end
  endtask

  initial begin
    int lat;
    logic [31:0] prev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    write_reg(1'b0, 32'h20);
    write_reg(1'b1, 32'h100);
    @(negedge clk) ce = 1'b1;
    repeat (2) @(negedge clk);
    sclr = 1'b0;
    // RDY latency
    lat = 0;
    while (!rdy && lat < 10) begin @(posedge clk); #1; lat++; end
    check(lat == 2, $sformatf("RDY latency %0d, expected 2", lat));
    for (int k = 0; k < 40; k++) begin
      check(phase_out == 32'h100 + 32'h20 * k, $sformatf("phase_out %h at step %0d", phase_out, k));
      @(posedge clk); #1;
    end
    // waveforms at several frequencies
    write_reg(1'b1, 32'h0);
    write_reg(1'b0, 32'd1 << 22);          // 1/1024 of the clock: one table step per clock
    repeat (3) @(posedge clk);
    check_wave(2048);
    write_reg(1'b0, 32'h0123_4567);
    repeat (3) @(posedge clk);
    check_wave(2048);
    // increment change without SCLR: successive phases differ by the new step
    write_reg(1'b0, 32'h3000_0001);
    repeat (3) @(posedge clk); #1;
    prev = phase_out;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #1;
      check(phase_out - prev == 32'h3000_0001, $sformatf("step %h", phase_out - prev));
      prev = phase_out;
    end
    check_wave(512);
    // CE low freezes the output
    @(negedge clk) ce = 1'b0;
    @(posedge clk); #1 prev = phase_out;
    repeat (5) @(posedge clk); #1;
    check(phase_out == prev, "phase moved with CE low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
