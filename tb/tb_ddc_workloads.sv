// tb_ddc_workloads: the receiver measurements of the reference system,
// repeated on the DDC data path at its default parameters.
//
// The ADC input is a carrier at 89.45 MHz, undersampled at 80 MS/s (alias at
// 9.45 MHz); the mixer is tuned to 9.45 MHz, so the carrier lands at 0 Hz.
// Phases are computed from integer sample counts (89.45/80 = 8945/8000,
// 1 kHz = 1/80000 of the sample rate), so the stimulus has no drift.
//  1. single tone at four levels (peak 3583, 17625, 23953, 32687 LSB):
//     |I + jQ| must equal the input peak within 2 %;
//  2. AM with a 1 kHz tone, degree of modulation 10, 15, 20, 30 %:
//     m = (A_max - A_min) / (2 A_C) measured over one modulation period
//     must be within 1 percentage point;
//  3. FM with a 1 kHz tone, modulation index 0.5, 1, 2, 3: the carrier and
//     sideband amplitudes |c_n| / A_C of one modulation period (1250 output
//     samples) must match the Bessel values |J_n(m_f)| within 0.01.
module tb_ddc_workloads;
  import ddc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int unsigned NPER = 1250;         // outputs per 1 kHz period
  logic clk = 1'b0, rst = 1'b1, run = 1'b0, dds_we = 1'b0, test_pattern_en = 1'b0;
  logic [15:0] adc_din = '0;
  logic [31:0] dds_inc = '0;
  logic out_valid;
  logic [31:0] out_word;
  int checks = 0, failures = 0;

  ddc_datapath dut (.*);

  always #6.25 clk = ~clk;

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // stimulus: 0 = tone, 1 = AM, 2 = FM
  int   mode = 0;
  real  amp = 0.0, mod_m = 0.0;
  longint unsigned n = 0;
  always @(posedge clk) begin
    real pc, pm, x;
    pc = 2.0 * PI * real'((n * 64'd8945) % 64'd8000) / 8000.0;
    pm = 2.0 * PI * real'(n % 64'd80000) / 80000.0;
    case (mode)
      1:       x = amp * (1.0 + mod_m * $cos(pm)) * $cos(pc);
      2:       x = amp * $sin(pc + mod_m * $sin(pm));
      default: x = amp * $cos(pc);
    endcase
    adc_din <= 16'($rtoi(x));
    n++;
  end

  real oi[$], oq[$];
  always @(posedge clk) if (out_valid) begin
    oi.push_back(real'($signed(out_word[31:16])));
    oq.push_back(real'($signed(out_word[15:0])));
  end

  // restart the data path with new stimulus, return after skip+cnt outputs
  task automatic capture(input int m, input real a, input real mm, input int cnt);
    @(negedge clk) run = 1'b0;
    repeat (4) @(negedge clk);
    mode = m; amp = a; mod_m = mm;
    oi.delete(); oq.delete();
    run = 1'b1;
    wait (oi.size() == 300 + cnt);
  endtask

  function automatic real mag(input int k);
    return $sqrt(oi[k] * oi[k] + oq[k] * oq[k]);
  endfunction

  initial begin
    real levels[4] = '{3583.0, 17625.0, 23953.0, 32687.0};
    real am_m[4]   = '{0.10, 0.15, 0.20, 0.30};
    real fm_m[4]   = '{0.5, 1.0, 2.0, 3.0};
    // |J_n(m_f)|, n = 0..4
    real bessel[4][5] = '{'{0.9385, 0.2423, 0.0306, 0.0026, 0.0002},
                          '{0.7652, 0.4401, 0.1149, 0.0196, 0.0025},
                          '{0.2239, 0.5767, 0.3528, 0.1289, 0.0340},
                          '{0.2601, 0.3391, 0.4861, 0.3091, 0.1320}};
    repeat (5) @(negedge clk);
    rst = 1'b0;
    dds_inc = 32'd507343012;        // round(9.45e6 * 2^32 / 80e6)
    dds_we = 1'b1;
    @(negedge clk) dds_we = 1'b0;

    // 1. single-tone levels
    foreach (levels[l]) begin
      real s;
      capture(0, levels[l], 0.0, 200);
      s = 0.0;
      for (int k = 300; k < 500; k++) s += mag(k);
      s /= 200.0;
      $display("tone: input peak %6.0f -> |I+jQ| %8.1f (%.2f %%)", levels[l], s, 100.0 * (s - levels[l]) / levels[l]);
      check(s > 0.98 * levels[l] && s < 1.02 * levels[l], $sformatf("tone level %0.0f", levels[l]));
    end

    // 2. AM
    foreach (am_m[l]) begin
      real mx, mn, s, mm;
      capture(1, 17625.0, am_m[l], NPER);
      mx = 0.0; mn = 1.0e9; s = 0.0;
      for (int k = 300; k < 300 + NPER; k++) begin
        real v;
        v = mag(k);
        s += v;
        if (v > mx) mx = v;
        if (v < mn) mn = v;
      end
      s /= NPER;
      mm = (mx - mn) / (2.0 * s);
      $display("AM: set %4.1f %%  A_max %7.0f  A_min %7.0f  measured %5.2f %%", 100.0 * am_m[l], mx, mn, 100.0 * mm);
      check(mm > am_m[l] - 0.01 && mm < am_m[l] + 0.01, $sformatf("AM degree %0.2f", am_m[l]));
    end

    // 3. FM
    foreach (fm_m[l]) begin
      real ac, cr, ci, c;
      string line;
      capture(2, 17625.0, fm_m[l], NPER);
      ac = 0.0;
      for (int k = 300; k < 300 + NPER; k++) ac += mag(k);
      ac /= NPER;
      line = $sformatf("FM: m_f %3.1f |c_n|/A_C:", fm_m[l]);
      for (int b = 0; b <= 4; b++) begin
        cr = 0.0; ci = 0.0;
        for (int k = 0; k < NPER; k++) begin
          real ph;
          ph = 2.0 * PI * real'(b * k) / real'(NPER);
          cr += oi[300 + k] * $cos(ph) + oq[300 + k] * $sin(ph);
          ci += oq[300 + k] * $cos(ph) - oi[300 + k] * $sin(ph);
        end
        // the tone may rotate either way: take the larger of c_n and c_-n
        c = $sqrt(cr * cr + ci * ci) / NPER / ac;
        cr = 0.0; ci = 0.0;
        for (int k = 0; k < NPER; k++) begin
          real ph;
          ph = -2.0 * PI * real'(b * k) / real'(NPER);
          cr += oi[300 + k] * $cos(ph) + oq[300 + k] * $sin(ph);
          ci += oq[300 + k] * $cos(ph) - oi[300 + k] * $sin(ph);
        end
        if ($sqrt(cr * cr + ci * ci) / NPER / ac > c) c = $sqrt(cr * cr + ci * ci) / NPER / ac;
        line = {line, $sformatf("  J%0d %.4f (%.4f)", b, c, bessel[l][b])};
        check(c > bessel[l][b] - 0.01 && c < bessel[l][b] + 0.01, $sformatf("FM m_f %0.1f J%0d", fm_m[l], b));
      end
      $display("%s", line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
