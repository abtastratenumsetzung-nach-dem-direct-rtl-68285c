// tb_channel_fir: self-checking test of channel_fir.
// Reads the coefficient table of the block, then checks
//  - the coefficients against the filter specification: pass band 0..200 kHz within 0.1 dB, >= 69.5 dB from 235 kHz to 625 kHz
//  - every output against a direct-form convolution computed here
//    (sum of h[k]*x[n-k], rounded from Q1.15 and saturated), for an impulse,
//    a full-scale step and random input, keeping one output per 1 inputs;
//  - the output rate (one per 1 inputs) and latency ((TAPS+1)/2, one multiply per coefficient pair + 3 clocks).
// Inputs arrive every 64 clocks, the spacing they have inside the DDC.
module tb_channel_fir;
  localparam int DECIM = 1, GAP = 64;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [15:0] in_data = '0, out_data;
  int checks = 0, failures = 0;

  channel_fir dut (.*);
  always #5 clk = ~clk;

  localparam int TAPS = $size(dut.COEF);
  localparam int NI = (TAPS + 1) / 2;   // multiplier cycles per output

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  localparam real PI = 3.14159265358979;
  function automatic real mag(input real f, input real fs);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      re += real'(dut.COEF[k]) * $cos(2.0 * PI * f * k / fs);
      im -= real'(dut.COEF[k]) * $sin(2.0 * PI * f * k / fs);
    end
    return $sqrt(re * re + im * im) / 32768.0;
  endfunction
  function automatic real cic(input real f);  // R=32, N=5, M=2 at 80 MS/s
    real x = PI * f / 80.0e6;
    if (f == 0.0) return 1.0;
    return ($sin(64.0 * x) / (64.0 * $sin(x))) ** 5;
  endfunction
  function automatic real db(input real v); return 20.0 * $log10(v); endfunction

  // reference
  longint hist [$];
  longint expq [$];
  int nin = 0, nout = 0;
  task automatic ref_in(input longint x);
    longint acc = 0, r;
    hist.push_front(x);
    if (hist.size() > TAPS) void'(hist.pop_back());
    nin++;
    if (nin % DECIM == 0) begin
      for (int k = 0; k < hist.size(); k++) acc += longint'(dut.COEF[k]) * hist[k];
      r = (acc + 16384) >>> 15;
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      expq.push_back(r);
    end
  endtask

  always @(posedge clk) begin : mon
    longint e;
    if (out_valid && !rst) begin
      nout++;
      if (expq.size() == 0) check(0, "unexpected output");
      else begin
        e = expq.pop_front();
        check(longint'(out_data) == e, $sformatf("out %0d expected %0d (output %0d)", out_data, e, nout));
      end
    end
  end

  task automatic drive(input logic signed [15:0] v);
    @(negedge clk); in_valid = 1'b1; in_data = v; ref_in(longint'(v));
    @(negedge clk); in_valid = 1'b0;
    repeat (GAP - 2) @(negedge clk);
  endtask

  initial begin
    int lat;
    // specification checks on the coefficients
    for (int k = 0; k < TAPS; k++)
      check(dut.COEF[k] == dut.COEF[TAPS-1-k], $sformatf("coefficient %0d not symmetric", k));
    for (int i = 0; i <= 20; i++) begin
      real f = 10.0e3 * i;
      check(db(mag(f, 1.25e6)) < 0.1 && db(mag(f, 1.25e6)) > -0.1, $sformatf("pass band %f dB at %f Hz", db(mag(f, 1.25e6)), f));
    end
    for (int i = 0; i <= 78; i++) begin
      real f = 235.0e3 + 5.0e3 * i;
      check(db(mag(f, 1.25e6)) < -69.5, $sformatf("stop band %f dB at %f Hz", db(mag(f, 1.25e6)), f));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // latency of the first output
    @(negedge clk); in_valid = 1'b1; in_data = 16'sd0; ref_in(0);
    for (int k = 1; k < DECIM; k++) begin
      @(negedge clk); in_valid = 1'b0;
      repeat (GAP - 1) @(negedge clk);
      in_valid = 1'b1; in_data = 16'sd0; ref_in(0);
    end
    @(negedge clk) in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 200) begin @(posedge clk); #1; lat++; end
    check(lat == NI + 3, $sformatf("latency %0d, expected %0d", lat, NI + 3));
    repeat (GAP) @(negedge clk);
    // impulse, step, random
    drive(16'sd32767);
    for (int k = 0; k < TAPS + 4; k++) drive(16'sd0);
    for (int k = 0; k < TAPS + 4; k++) drive(-16'sd32768);
    for (int k = 0; k < 2000; k++) drive(16'($urandom));
    repeat (GAP * 4) @(posedge clk);
    check(nout == nin / DECIM, $sformatf("rate: %0d outputs for %0d inputs", nout, nin));
    check(expq.size() == 0, "outputs missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
