// tb_cic_decimator: drives random and constant input into the R=32, N=5, M=2
// CIC and compares every output with a behavioural reference computed in
// 64-bit arithmetic (N running sums, keep every 32nd, N differences with delay
// 2, divide by 2^30). Also checks the output rate (one per 32 inputs), the DC
// gain of 1 and the first output latency.
module tb_cic_decimator;
  localparam int R = 32, N = 5, M = 2;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [15:0] in_data = '0, out_data;
  int checks = 0, failures = 0;

  cic_decimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  longint integ [N];
  longint dly [N][M];
  longint expq [$];
  int nin = 0, nout = 0;

  // The pipelined integrators delay the input by N valid samples before the
  // rate changer picks a value; the reference applies the same delay.
  longint xdly [$] = '{0, 0, 0, 0, 0};

  task automatic ref_step(input longint xin);
    longint v, o, x;
    xdly.push_back(xin);
    x = xdly.pop_front();
    integ[0] += x;
    for (int k = 1; k < N; k++) integ[k] += integ[k-1];
    nin++;
    if (nin % R == 0) begin
      v = integ[N-1];
      for (int k = 0; k < N; k++) begin
        o = v - dly[k][M-1];
        for (int d = M-1; d > 0; d--) dly[k][d] = dly[k][d-1];
        dly[k][0] = v;
        v = o;
      end
      // keep 46 bits, sign-extend, take the top 16
      v = (v <<< 18) >>> 18;
      expq.push_back(v >>> 30);
    end
  endtask

  always @(posedge clk) begin : mon
    longint e;
    if (out_valid && !rst) begin
      checks++;
      nout++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = expq.pop_front();
        if (longint'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d expected %0d", out_data, e);
        end
      end
    end
  end

  initial begin
    int gap, first_lat;
    foreach (integ[k]) integ[k] = 0;
    foreach (dly[k, d]) dly[k][d] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // constant input: after settling the output equals the input (DC gain 1)
    for (int k = 0; k < 32 * 20; k++) begin
      @(negedge clk); in_valid = 1'b1; in_data = 16'sd12345; ref_step(12345);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (out_data != 16'sd12345 && out_data != 16'sd12344) begin
      failures++; $display("FAIL DC gain: %0d", out_data);
    end
    // random input with random gaps
    for (int k = 0; k < 32 * 300; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_data = 16'($urandom); ref_step(longint'(in_data));
      if ($urandom_range(0, 4) == 0) begin @(negedge clk) in_valid = 1'b0; end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout * R != nin) begin failures++; $display("FAIL rate: %0d outputs for %0d inputs", nout, nin); end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    // latency: output N+1 clocks after the R-th input
    @(negedge clk) rst = 1'b1; @(negedge clk) rst = 1'b0;
    for (int k = 0; k < R; k++) begin @(negedge clk); in_valid = 1'b1; in_data = 16'sd1; end
    @(negedge clk) in_valid = 1'b0;
    first_lat = 1;
    while (!out_valid && first_lat < 50) begin @(posedge clk); #1; first_lat++; end
    checks++;
    if (first_lat != N + 1) begin failures++; $display("FAIL latency %0d", first_lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
