// ddc_ip_core: digital down converter IP core with DMA-style memory output.
//
// An external 16-bit ADC samples an RF or IF signal at 80 MS/s (band-pass
// undersampling lets it take e.g. an FM-band carrier). This core mixes the
// wanted channel to baseband with an on-chip oscillator, filters and decimates
// it by 64 to a complex 1.25 MS/s stream (16-bit I and Q) and writes that
// stream, with no processor involvement, into a ring buffer in DDR2 memory
// through the memory controller's native port interface (NPI). Every 32 KB it
// raises an interrupt so that firmware can hand complete blocks on to a host.
//
// Clock domains:
//   adc_clk  ADC sample clock: ddc_datapath and the FIFO write side.
//   sys_clk  memory controller clock (NPI must run 1:1 with it); also clocks
//            the software registers.
// Crossings: the ADC enable and test-pattern select pass two-flop
// synchronisers; a new DDS phase increment passes a request/acknowledge
// handshake whose completion sets the "DDS synced" status bit; samples pass
// the dual-clock FIFO.
//
// Software view (slv_regs): reg 0 = {ADC enable, DDS synced, 14'b0, FAT data
// sectors}, reg 1 = ring buffer start address, reg 2 = mixer frequency in Hz.
// Writing reg 2 converts the frequency into a phase increment and loads it
// into the DDS. Setting ADC enable drives adc_en_out and starts the data path
// and the NPI engine at the start address; clearing it stops both.
//
// Ports: the register bus is a simple strobe interface (write on reg_wr,
// read data one clock after reg_rd); the npi_* ports carry the names of the
// NPI signals. fifo_overflow is a sticky flag in the adc_clk domain.
//
// The architecture follows the reference design; the register bus, the
// overflow flag, the test-pattern pin and the synchroniser details are this
// design's.
module ddc_ip_core
  import ddc_pkg::*;
#(
  parameter int unsigned FCLK_HZ           = 80_000_000,
  parameter int unsigned FIFO_DEPTH        = 16,
  parameter bit          ADC_OFFSET_BINARY = 1'b0
) (
  input  logic        sys_clk,
  input  logic        sys_rst,
  // ADC
  input  logic        adc_clk,
  input  logic [15:0] adc_din,
  output logic        adc_en_out,
  // software registers
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [1:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // MPMC native port interface
  input  logic        npi_InitDone,
  output logic [31:0] npi_Addr,
  output logic        npi_AddrReq,
  input  logic        npi_AddrAck,
  output logic        npi_RNW,
  output logic [3:0]  npi_Size,
  output logic        npi_RdModWr,
  output logic [31:0] npi_WrFIFO_Data,
  output logic [3:0]  npi_WrFIFO_BE,
  output logic        npi_WrFIFO_Push,
  output logic        npi_WrFIFO_Flush,
  input  logic        npi_WrFIFO_AlmostFull,
  // status
  output logic        irq,
  input  logic        test_pattern_en,
  output logic        fifo_overflow
);

  // ---------------------------------------------------------------- sys_clk
  logic        adc_enable, dds_freq_we, dds_synced_q;
  logic [15:0] fat_sectors;
  logic [31:0] start_addr, dds_freq;

  slv_regs u_regs (
    .clk (sys_clk), .rst (sys_rst),
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .dds_synced (dds_synced_q),
    .adc_enable, .fat_sectors, .start_addr, .dds_freq, .dds_freq_we
  );

  assign adc_en_out = adc_enable;

  logic        inc_valid;
  logic [31:0] phase_inc;

  freq_to_phase_inc #(.FCLK_HZ(FCLK_HZ), .PHASE_W(PHASE_W)) u_f2i (
    .clk (sys_clk), .rst (sys_rst),
    .freq_we (dds_freq_we), .freq_hz (dds_freq),
    .inc_valid, .phase_inc
  );

  // ---------------------------------------------------------------- adc_clk
  logic adc_rst, run, tp_en;

  sync_2ff #(.W(1), .RESET_VAL(1'b1)) u_rst_sync (
    .clk (adc_clk), .rst (1'b0), .d (sys_rst), .q (adc_rst));
  sync_2ff #(.W(2)) u_ctl_sync (
    .clk (adc_clk), .rst (adc_rst), .d ({adc_enable, test_pattern_en}), .q ({run, tp_en}));

  logic        hs_busy, hs_done, dds_we;
  logic [31:0] dds_inc;

  cdc_handshake #(.W(PHASE_W)) u_inc_cdc (
    .src_clk (sys_clk), .src_rst (sys_rst),
    .send (inc_valid), .src_data (phase_inc),
    .src_busy (hs_busy), .src_done (hs_done),
    .dst_clk (adc_clk), .dst_rst (adc_rst),
    .dst_pulse (dds_we), .dst_data (dds_inc)
  );

  // DDS synced: cleared by a frequency write, set when the new increment has
  // been loaded into the DDS and no further write is waiting.
  always_ff @(posedge sys_clk) begin
    if (sys_rst)                         dds_synced_q <= 1'b0;
    else if (dds_freq_we || inc_valid)   dds_synced_q <= 1'b0;
    else if (hs_done && !hs_busy)        dds_synced_q <= 1'b1;
  end

  logic        ddc_valid;
  logic [31:0] ddc_word;

  ddc_datapath #(.ADC_OFFSET_BINARY(ADC_OFFSET_BINARY)) u_ddc (
    .clk (adc_clk), .rst (adc_rst), .run,
    .adc_din, .dds_we, .dds_inc,
    .test_pattern_en (tp_en),
    .out_valid (ddc_valid), .out_word (ddc_word)
  );

  // ---------------------------------------------------------------- crossing
  logic        fifo_rd_en, fifo_valid, fifo_full, fifo_empty;
  logic [31:0] fifo_data;

  async_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk (adc_clk), .wr_rst (adc_rst), .wr_en (ddc_valid), .wr_data (ddc_word),
    .full (fifo_full), .overflow (fifo_overflow),
    .rd_clk (sys_clk), .rd_rst (sys_rst), .rd_en (fifo_rd_en),
    .rd_data (fifo_data), .valid (fifo_valid), .empty (fifo_empty)
  );

  // ---------------------------------------------------------------- NPI
  npi_state_t npi_state;

  npi_writer #(.WORDS(NPI_WORDS), .BLOCK_BYTES(IRQ_BLOCK_BYTES)) u_npi (
    .clk (sys_clk), .rst (sys_rst),
    .enable (adc_enable), .start_addr, .fat_sectors,
    .fifo_rd_en, .fifo_valid, .fifo_data,
    .npi_InitDone, .npi_Addr, .npi_AddrReq, .npi_AddrAck, .npi_RNW, .npi_Size,
    .npi_RdModWr, .npi_WrFIFO_Data, .npi_WrFIFO_BE, .npi_WrFIFO_Push,
    .npi_WrFIFO_Flush, .npi_WrFIFO_AlmostFull,
    .irq, .state (npi_state)
  );

endmodule
