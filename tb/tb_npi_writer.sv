// tb_npi_writer: the NPI write engine between a model of the synchronisation
// FIFO (words 0, 1, 2, ... offered at random times through rd_en/valid) and
// the behavioural memory controller model npi_mem_model.
// Checks: InitDone low keeps the engine in RST; every word lands at
// start + 4*index modulo the 32 KB region (64 sectors), in order, after two
// wraps; 8 pushes per address request; one interrupt per 32 KB; rd_en never
// over-reads; a disable returns to RST and restarts at the region start.
// Counts and requires: AlmostFull stalls, same-clock acknowledges, wraps,
// interrupts and RST entries.
module tb_npi_writer;
  import ddc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, enable = 1'b0;
  logic [31:0] start_addr = 32'h0200_0000;
  logic [15:0] fat_sectors = 16'd64;           // 32 KB region
  logic fifo_rd_en, fifo_valid = 1'b0;
  logic [31:0] fifo_data = '0;
  logic npi_InitDone = 1'b0, npi_AddrReq, npi_AddrAck, npi_RNW, npi_RdModWr;
  logic [31:0] npi_Addr, npi_WrFIFO_Data;
  logic [3:0] npi_Size, npi_WrFIFO_BE;
  logic npi_WrFIFO_Push, npi_WrFIFO_Flush, npi_WrFIFO_AlmostFull, irq;
  npi_state_t state;
  int checks = 0, failures = 0;

  npi_writer dut (.*);
  npi_mem_model #(.ACK_PCT(40), .ALMOST_FULL_PCT(15)) mpmc (
    .clk, .rst, .Addr(npi_Addr), .AddrReq(npi_AddrReq), .AddrAck(npi_AddrAck),
    .RNW(npi_RNW), .Size(npi_Size), .RdModWr(npi_RdModWr), .WrFIFO_Data(npi_WrFIFO_Data),
    .WrFIFO_BE(npi_WrFIFO_BE), .WrFIFO_Push(npi_WrFIFO_Push), .WrFIFO_Flush(npi_WrFIFO_Flush),
    .WrFIFO_AlmostFull(npi_WrFIFO_AlmostFull));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // FIFO model: `avail` words are waiting; a read is accepted when one is
  int unsigned next_word = 0, avail = 0;
  always @(posedge clk) begin
    if (rst) fifo_valid <= 1'b0;
    else begin
      fifo_valid <= 1'b0;
      if (fifo_rd_en && avail > 0) begin
        fifo_valid <= 1'b1;
        fifo_data  <= next_word;
        next_word++;
        avail--;
      end
    end
  end

  int nirq = 0, nstall = 0, nrst = 0, nwrap = 0;
  npi_state_t prev_state = NPI_RST;
  always @(posedge clk) if (!rst) begin
    if (irq) nirq++;
    if (state == NPI_TX_DATA && npi_WrFIFO_AlmostFull) nstall++;
    if (state == NPI_RST && prev_state != NPI_RST) nrst++;
    if (npi_AddrReq && npi_AddrAck && npi_Addr == start_addr + 32'h7FE0) nwrap++;
    prev_state <= state;
  end

  task automatic feed(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) avail++;
      else k--;
    end
  endtask

  initial begin
    int total;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // enabled but memory not initialised: stays in RST, reads nothing
    enable = 1'b1;
    avail = 5;
    repeat (20) @(negedge clk);
    check(state == NPI_RST && next_word == 0, "must wait for InitDone");
    npi_InitDone = 1'b1;
    // 2.5 regions of data
    total = 8192 * 2 + 4096;
    feed(total - 5);
    wait (next_word == total && state == NPI_IDLE);
    repeat (20) @(negedge clk);
    check(mpmc.lines == total / 8, $sformatf("%0d lines written", mpmc.lines));
    check(mpmc.errors == 0, $sformatf("%0d protocol errors", mpmc.errors));
    check(nirq == 2, $sformatf("%0d interrupts for 2.5 x 32 KB", nirq));
    for (int w = 0; w < 8192; w++) begin
      int idx;
      idx = (w < 4096) ? 16384 + w : 8192 + w;
      check(mpmc.read_word(start_addr + 32'(4 * w)) == 32'(idx),
            $sformatf("word at offset %0d: %0d expected %0d", 4 * w, mpmc.read_word(start_addr + 32'(4 * w)), idx));
    end
    // disable with a partly filled buffer, re-enable: restart at region start
    avail += 3;
    repeat (20) @(negedge clk);
    enable = 1'b0;
    repeat (5) @(negedge clk);
    check(state == NPI_RST, "disable returns to RST");
    start_addr = 32'h0300_0000;
    enable = 1'b1;
    avail += 8;
    repeat (200) @(negedge clk);
    check(mpmc.read_word(32'h0300_0000) == 32'(next_word - 8), "restart at the new start address");
    check(nstall > 0, "AlmostFull stall never happened");
    check(mpmc.same_cycle_acks > 0, "same-clock acknowledge never happened");
    check(nwrap >= 2, $sformatf("%0d wraps", nwrap));
    check(nrst >= 1, "RST never re-entered");
    $display("stalls=%0d same_cycle_acks=%0d wraps=%0d irqs=%0d rst_entries=%0d", nstall, mpmc.same_cycle_acks, nwrap, nirq, nrst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
