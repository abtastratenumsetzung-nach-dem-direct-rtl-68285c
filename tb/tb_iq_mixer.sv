// tb_iq_mixer: random samples and oscillator values; checks
// I = sat((x*cos) >>> 15), Q = sat((x*sin) >>> 15) one clock later, including
// the corner -32768 * -32768, and that out_valid follows in_valid.
module tb_iq_mixer;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [15:0] x = '0, cosine = '0, sine = '0, i_out, q_out;
  int checks = 0, failures = 0;

  iq_mixer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] ref_scale(input longint p);
    longint s = p >>> 15;
    if (s > 32767) return 16'sh7fff;
    if (s < -32768) return 16'sh8000;
    return 16'(s);
  endfunction

  initial begin
    logic signed [15:0] ei, eq;
    logic ev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x      = (k == 7) ? -16'sd32768 : 16'($urandom);
      cosine = (k == 7) ? -16'sd32768 : 16'($urandom);
      sine   = (k == 7) ? 16'sd32767  : 16'($urandom);
      ei = ref_scale(longint'(x) * longint'(cosine));
      eq = ref_scale(longint'(x) * longint'(sine));
      ev = in_valid;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== ev) begin failures++; $display("FAIL valid"); end
      if (ev) begin
        checks++;
        if (i_out !== ei || q_out !== eq) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d c=%0d s=%0d i=%0d/%0d q=%0d/%0d", x, cosine, sine, i_out, ei, q_out, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
