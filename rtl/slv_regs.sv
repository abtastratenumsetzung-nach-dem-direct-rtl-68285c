// slv_regs: the three 32-bit software registers of the DDC core.
//
//   index 0 (control):  bits 15:0  FAT data sectors: ring-buffer size in
//                                   512-byte sectors (read/write)
//                       bits 29:16 reserved, read 0
//                       bit  30    DDS synced: the last frequency write has
//                                   reached the DDS (read only)
//                       bit  31    ADC enable: starts the ADC and the DDC
//   index 1 (start):    start address of the ring buffer in DDR2 memory
//   index 2 (freq):     DDS output frequency in Hz; every write also pulses
//                       dds_freq_we, which starts a DDS reconfiguration
// All registers reset to 0.
//
// Bus: a plain single-master register port standing for the processor bus
// slave. A write takes effect on the clock edge where reg_wr is high; read
// data appears one clock after reg_rd. The field layout follows the
// reference design's register tables, taking bit 0 as the least significant
// bit; the bus protocol is this design's.
module slv_regs
  import ddc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [1:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        dds_synced,
  output logic        adc_enable,
  output logic [15:0] fat_sectors,
  output logic [31:0] start_addr,
  output logic [31:0] dds_freq,
  output logic        dds_freq_we
);

  always_ff @(posedge clk) begin
    if (rst) begin
      adc_enable  <= 1'b0;
      fat_sectors <= '0;
      start_addr  <= '0;
      dds_freq    <= '0;
      dds_freq_we <= 1'b0;
    end else begin
      dds_freq_we <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            fat_sectors <= reg_wdata[15:0];
            adc_enable  <= reg_wdata[CTRL_ADC_ENABLE_BIT];
          end
          REG_START: start_addr <= reg_wdata;
          REG_FREQ: begin
            dds_freq    <= reg_wdata;
            dds_freq_we <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) reg_rdata <= '0;
    else if (reg_rd) begin
      unique case (reg_addr)
        REG_CTRL:  reg_rdata <= {adc_enable, dds_synced, 14'd0, fat_sectors};
        REG_START: reg_rdata <= start_addr;
        REG_FREQ:  reg_rdata <= dds_freq;
        default:   reg_rdata <= '0;
      endcase
    end
  end

endmodule
