// ddc_pkg: types and constants shared by the DDC IP core.
//
// The DDC (digital down converter) turns an 80 MS/s, 16-bit real ADC stream
// into a 1.25 MS/s complex baseband stream (16-bit I and Q) and writes it into
// DDR2 memory through the MPMC native port interface (NPI). The numbers below
// are the configuration of the reference design: 80 MHz sample clock, 32-bit
// phase accumulator, CIC with R=32, N=5, M=2, a decimate-by-2 compensation
// filter, 8-word cacheline writes and an interrupt every 32 KB.
package ddc_pkg;

  // Sample formats
  localparam int unsigned SAMPLE_W = 16;   // ADC and I/Q sample width
  localparam int unsigned PHASE_W  = 32;   // DDS phase accumulator width
  localparam int unsigned WORD_W   = 32;   // NPI data width: {I, Q}

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t i;   // bits 31:16
    sample_t q;   // bits 15:0
  } iq_word_t;

  // Filter cascade
  localparam int unsigned CIC_R = 32;
  localparam int unsigned CIC_N = 5;
  localparam int unsigned CIC_M = 2;
  localparam int unsigned CFIR_DECIM = 2;
  localparam int unsigned TOTAL_DECIM = CIC_R * CFIR_DECIM;  // 64

  // NPI cacheline write
  localparam int unsigned NPI_WORDS        = 8;                 // words per cacheline
  localparam int unsigned NPI_LINE_BYTES   = NPI_WORDS * WORD_W / 8;  // 32
  localparam logic [3:0]  NPI_SIZE_LINE8   = 4'h2;              // 8-word cacheline
  localparam int unsigned SECTOR_BYTES     = 512;
  localparam int unsigned IRQ_BLOCK_BYTES  = 32768;

  // NPI write engine states
  typedef enum logic [2:0] {
    NPI_RST,
    NPI_IDLE,
    NPI_BUFFER_SAMPLES,
    NPI_TX_DATA,
    NPI_TX_ADDR
  } npi_state_t;

  // Software register indices
  localparam logic [1:0] REG_CTRL  = 2'd0;  // FAT data sectors, DDS synced, ADC enable
  localparam logic [1:0] REG_START = 2'd1;  // start address of the ring buffer
  localparam logic [1:0] REG_FREQ  = 2'd2;  // DDS output frequency in Hz

  localparam int unsigned CTRL_DDS_SYNCED_BIT = 30;
  localparam int unsigned CTRL_ADC_ENABLE_BIT = 31;

  // Saturate a wide signed value to SAMPLE_W bits
  function automatic sample_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -64'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[15:0]);
  endfunction

endpackage
