// tb_async_fifo: write clock 80 MHz, read clock 100 MHz (and a slow read
// phase). Random writes and a continuously or randomly asserted read strobe;
// every word leaving with `valid` must be the next word written (scoreboard).
// Also checks that the FIFO fills to DEPTH, that a write while full sets
// `overflow` and is dropped, and that `empty` returns after draining.
module tb_async_fifo;
  localparam int W = 32, DEPTH = 16;
  logic wr_clk = 1'b0, rd_clk = 1'b0, wr_rst = 1'b1, rd_rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0, full, overflow, valid, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] sb [$];
  int nwritten = 0, nread = 0;
  bit drop_next = 0;

  async_fifo dut (.*);
  always #6.25 wr_clk = ~wr_clk;
  always #5 rd_clk = ~rd_clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wr_clk) if (!wr_rst && wr_en && !full) begin sb.push_back(wr_data); nwritten++; end
  always @(posedge rd_clk) if (!rd_rst && valid) begin
    checks++;
    nread++;
    if (sb.size() == 0 || sb[0] !== rd_data) begin
      failures++;
      if (failures < 10) $display("FAIL read %h expected %h", rd_data, sb.size() ? sb[0] : 0);
    end
    if (sb.size()) void'(sb.pop_front());
  end

  initial begin
    int cnt;
    repeat (4) @(posedge wr_clk);
    wr_rst = 1'b0; rd_rst = 1'b0;
    // fill without reading
    for (int k = 0; k < DEPTH + 3; k++) begin
      @(negedge wr_clk); wr_en = 1'b1; wr_data = $urandom;
    end
    @(negedge wr_clk); wr_en = 1'b0;
    checks++;
    if (!full) begin failures++; $display("FAIL not full after %0d writes", DEPTH + 3); end
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    checks++;
    if (nwritten != DEPTH) begin failures++; $display("FAIL accepted %0d words", nwritten); end
    // drain with a continuous read strobe
    @(negedge rd_clk); rd_en = 1'b1;
    repeat (DEPTH + 10) @(negedge rd_clk);
    checks++;
    if (!empty || nread != DEPTH) begin failures++; $display("FAIL drain: empty=%0d read=%0d", empty, nread); end
    // random traffic
    fork
      begin
        for (int k = 0; k < 4000; k++) begin
          @(negedge wr_clk);
          wr_en = ($urandom_range(0, 2) == 0) && !full;
          wr_data = $urandom;
        end
        @(negedge wr_clk) wr_en = 1'b0;
      end
      begin
        for (int k = 0; k < 6000; k++) begin
          @(negedge rd_clk);
          rd_en = (k < 3000) ? 1'b1 : ($urandom_range(0, 3) == 0);
        end
        rd_en = 1'b1;
      end
    join
    repeat (50) @(negedge rd_clk);
    checks++;
    if (sb.size() != 0 || !empty) begin failures++; $display("FAIL %0d words left", sb.size()); end
    $display("words through: %0d", nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
