// tb_ddc_datapath: the DDC chain (DDS, mixer, CIC, CFIR, channel FIR, output
// packing) driven with synthetic ADC tones.
// Checks:
//  - out_valid comes exactly once every 64 clocks (80 MS/s -> 1.25 MS/s);
//  - a tone 50 kHz above the 10 MHz local oscillator comes out as a complex
//    tone of amplitude A (mixer factor 1/2, CIC gain 2) at 50 kHz;
//  - tones 250 kHz and 400 kHz off (beyond the 235 kHz stop-band edge) are
//    suppressed by more than 60 dB;
//  - with run low no output appears; with test_pattern_en the words count
//    0, 1, 2, ... from every fresh start; a mode switch back gives I/Q again.
module tb_ddc_datapath;
  import ddc_pkg::*;
  localparam real FS = 80.0e6;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst = 1'b1, run = 1'b0, dds_we = 1'b0, test_pattern_en = 1'b0;
  logic [15:0] adc_din = '0;
  logic [31:0] dds_inc = '0;
  logic out_valid;
  logic [31:0] out_word;
  int checks = 0, failures = 0;

  ddc_datapath dut (.*);

  always #6.25 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // ADC stimulus: cosine of frequency f_in and amplitude amp
  real f_in = 0.0, amp = 0.0;
  longint unsigned n = 0;
  always @(posedge clk) begin
    adc_din <= 16'($rtoi(amp * $cos(2.0 * PI * f_in * real'(n) / FS)));
    n++;
  end

  // output capture
  real oi[$], oq[$];
  logic [31:0] ow[$];
  longint unsigned last_t = 0;
  int gap_err = 0, ngap = 0;
  always @(posedge clk) if (out_valid) begin
    if (last_t != 0) begin
      ngap++;
      if (n - last_t != 64) gap_err++;
    end
    last_t = n;
    oi.push_back(real'($signed(out_word[31:16])));
    oq.push_back(real'($signed(out_word[15:0])));
    ow.push_back(out_word);
  end

  task automatic measure(input int skip, input int cnt, output real mag, output real step);
    real s = 0.0, d = 0.0;
    for (int k = skip; k < skip + cnt; k++) begin
      real p0, p1, dp;
      s += $sqrt(oi[k] * oi[k] + oq[k] * oq[k]);
      p0 = $atan2(oq[k - 1], oi[k - 1]);
      p1 = $atan2(oq[k], oi[k]);
      dp = p1 - p0;
      if (dp > PI) dp -= 2.0 * PI;
      if (dp < -PI) dp += 2.0 * PI;
      d += (dp < 0.0) ? -dp : dp;
    end
    mag = s / cnt;
    step = d / cnt;
  endtask

  task automatic start_run(input real f, input real a, input bit pattern);
    @(negedge clk) run = 1'b0;
    repeat (4) @(negedge clk);
    oi.delete(); oq.delete(); ow.delete();
    last_t = 0;
    f_in = f; amp = a;
    test_pattern_en = pattern;
    run = 1'b1;
  endtask

  initial begin
    real mag, step, expect_step;
    int cnt_ok;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    // mixer at 10 MHz: inc = 10e6 * 2^32 / 80e6 = 2^29
    dds_inc = 32'h2000_0000;
    dds_we = 1'b1;
    @(negedge clk) dds_we = 1'b0;
    // run low: nothing comes out
    amp = 10000.0; f_in = 10.05e6;
    repeat (2000) @(negedge clk);
    check(oi.size() == 0, "output while run is low");

    // in-band tone, 50 kHz offset
    start_run(10.05e6, 16000.0, 1'b0);
    wait (oi.size() == 300);
    measure(150, 149, mag, step);
    expect_step = 2.0 * PI * 50.0e3 / 1.25e6;
    $display("in-band: |IQ| = %f (expect %f), phase step %f (expect %f)", mag, 16000.0, step, expect_step);
    check(mag > 15200.0 && mag < 16800.0, "in-band amplitude");
    check(step > expect_step * 0.97 && step < expect_step * 1.03, "in-band frequency");
    check(gap_err == 0 && ngap > 250, $sformatf("output spacing: %0d of %0d gaps not 64", gap_err, ngap));

    // out-of-band tone, 400 kHz offset
    start_run(10.4e6, 16000.0, 1'b0);
    wait (oi.size() == 300);
    measure(150, 149, mag, step);
    $display("stopband: |IQ| = %f (in-band 16000)", mag);
    check(mag < 16.0, "stopband attenuation below 60 dB");

    // tone 250 kHz off: beyond the 235 kHz stop-band edge of the cascade
    start_run(10.25e6, 16000.0, 1'b0);
    wait (oi.size() == 300);
    measure(150, 149, mag, step);
    $display("250 kHz offset: |IQ| = %f", mag);
    check(mag < 16.0, "attenuation at 250 kHz below 60 dB");

    // test pattern mode
    start_run(10.05e6, 16000.0, 1'b1);
    wait (ow.size() == 100);
    cnt_ok = 0;
    foreach (ow[k]) if (ow[k] == 32'(k)) cnt_ok++;
    check(cnt_ok == ow.size(), $sformatf("test pattern: %0d of %0d words match", cnt_ok, ow.size()));

    // and back to I/Q
    start_run(10.05e6, 16000.0, 1'b0);
    wait (oi.size() == 300);
    measure(150, 149, mag, step);
    check(mag > 15200.0 && mag < 16800.0, "I/Q after mode switch");
    check(gap_err == 0, "output spacing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
