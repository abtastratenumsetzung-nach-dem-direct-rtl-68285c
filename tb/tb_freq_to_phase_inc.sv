// tb_freq_to_phase_inc: writes frequencies (0, 1 Hz, 10.7 MHz, 9.45 MHz,
// 40 MHz, random) and checks the increment against the value of
// f * 2^32 / 80e6 computed here in 128-bit integer arithmetic, and the
// two-clock latency of inc_valid. One increment step (0.019 Hz) of error is
// allowed.
module tb_freq_to_phase_inc;
  logic clk = 1'b0, rst = 1'b1, freq_we = 1'b0, inc_valid;
  logic [31:0] freq_hz = '0, phase_inc;
  int checks = 0, failures = 0;

  freq_to_phase_inc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [31:0] f);
    logic [127:0] exact;
    logic [31:0] lo;
    int lat;
    exact = ({96'd0, f} << 32) / 128'd80_000_000;
    lo = exact[31:0];
    @(negedge clk); freq_we = 1'b1; freq_hz = f;
    @(negedge clk); freq_we = 1'b0; freq_hz = 32'hdead_beef;
    lat = 1;
    while (!inc_valid && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (phase_inc != lo && phase_inc != lo + 1 && phase_inc != lo - 1) begin
      failures++;
      $display("FAIL f=%0d inc=%h expected %h", f, phase_inc, lo);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    try(0); try(1); try(10_700_000); try(9_450_000); try(40_000_000); try(79_999_999);
    for (int k = 0; k < 300; k++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
