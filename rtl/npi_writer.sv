// npi_writer: NPI write engine that moves DDC samples into DDR2 memory.
//
// Acting like a small DMA master on the memory controller's native port
// interface (NPI), it collects eight 32-bit {I,Q} words from the clock-domain
// crossing FIFO and writes them as one 8-word cacheline:
//
//   RST             entered after reset, while the core is disabled or while
//                   the memory controller is not initialised (InitDone low);
//                   the ring-buffer address returns to the region start;
//                   while disabled, words left in the FIFO are discarded.
//   IDLE            read strobe high, waiting for the first word.
//   BUFFER_SAMPLES  read strobe high until 8 words have been received
//                   (the sample counter counts them into the sample buffer).
//   TX_DATA         pushes buffer words 0..7 into the NPI write FIFO, one per
//                   clock, pausing while WrFIFO_AlmostFull is high; the last
//                   push also raises AddrReq.
//   TX_ADDR         holds AddrReq (Addr, RNW=0, Size=0x2) until AddrAck,
//                   then advances the address by 32 bytes and returns to IDLE.
//
// FIFO link: fifo_rd_en may stay high; a word counts when fifo_valid is high
// the clock after an accepted read. rd_en drops as soon as received plus
// in-flight words reach 8, so no word is read that cannot be stored.
// Address and interrupt generation are in npi_addr_gen and npi_irq_gen.
//
// States, buffer size, cacheline timing (eight pushes, address request with
// the last push, Size 0x2, byte enables 0xF) and the 32-byte address step
// follow the reference design. Own choices: the AlmostFull stall, completing
// a started transaction before obeying a disable, draining the FIFO while
// disabled, and RdModWr = 0.
module npi_writer
  import ddc_pkg::*;
#(
  parameter int unsigned WORDS       = 8,
  parameter int unsigned BLOCK_BYTES = 32768
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [31:0] start_addr,
  input  logic [15:0] fat_sectors,
  // synchronisation FIFO
  output logic        fifo_rd_en,
  input  logic        fifo_valid,
  input  logic [31:0] fifo_data,
  // MPMC native port interface, write side
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
  // interrupt
  output logic        irq,
  output npi_state_t  state
);

  localparam int unsigned CW = $clog2(WORDS + 1);

  npi_state_t   state_q, state_d;
  logic [CW-1:0] cnt_q;            // sample counter
  logic          inflight_q;       // a read strobe of the previous clock
  logic [31:0]   sbuf_q [WORDS];   // sample buffer
  logic          go;               // core enabled and memory ready
  logic          last_push, advance;

  assign go    = enable && npi_InitDone;
  assign state = state_q;

  // FIFO read strobe
  // (while the core is disabled the FIFO is drained, so a new run never
  // starts with words of the previous one)
  assign fifo_rd_en = ((state_q == NPI_IDLE || state_q == NPI_BUFFER_SAMPLES) && go &&
                       ((32'(cnt_q) + 32'(inflight_q)) < WORDS)) ||
                      (state_q == NPI_RST && !enable);

  // NPI outputs
  assign npi_WrFIFO_Push  = (state_q == NPI_TX_DATA) && !npi_WrFIFO_AlmostFull;
  assign npi_WrFIFO_Data  = sbuf_q[cnt_q[CW-2:0]];
  assign npi_WrFIFO_BE    = 4'hF;
  assign npi_WrFIFO_Flush = 1'b0;
  assign last_push        = npi_WrFIFO_Push && (cnt_q == CW'(WORDS - 1));
  assign npi_AddrReq      = (state_q == NPI_TX_ADDR) || last_push;
  assign npi_RNW          = 1'b0;
  assign npi_Size         = NPI_SIZE_LINE8;
  assign npi_RdModWr      = 1'b0;
  assign advance          = npi_AddrReq && npi_AddrAck;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      NPI_RST:            if (go) state_d = NPI_IDLE;
      NPI_IDLE:           if (!go) state_d = NPI_RST;
                          else if (fifo_valid) state_d = NPI_BUFFER_SAMPLES;
      NPI_BUFFER_SAMPLES: if (!go) state_d = NPI_RST;
                          else if (fifo_valid && cnt_q == CW'(WORDS - 1)) state_d = NPI_TX_DATA;
      NPI_TX_DATA:        if (last_push) state_d = npi_AddrAck ? NPI_IDLE : NPI_TX_ADDR;
      NPI_TX_ADDR:        if (npi_AddrAck) state_d = NPI_IDLE;
      default:            state_d = NPI_RST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= NPI_RST;
      cnt_q      <= '0;
      inflight_q <= 1'b0;
    end else begin
      state_q    <= state_d;
      inflight_q <= fifo_rd_en;
      unique case (state_q)
        NPI_IDLE, NPI_BUFFER_SAMPLES: begin
          if (!go)                                      cnt_q <= '0;
          else if (fifo_valid && cnt_q == CW'(WORDS - 1)) cnt_q <= '0;
          else if (fifo_valid)                          cnt_q <= cnt_q + 1'b1;
        end
        NPI_TX_DATA: begin
          if (last_push)            cnt_q <= '0;
          else if (npi_WrFIFO_Push) cnt_q <= cnt_q + 1'b1;
        end
        default: cnt_q <= '0;
      endcase
    end
    if ((state_q == NPI_IDLE || state_q == NPI_BUFFER_SAMPLES) && fifo_valid && go)
      sbuf_q[cnt_q[CW-2:0]] <= fifo_data;
  end

  // Address and interrupt generation
  logic [31:0] offset, next_offset;

  npi_addr_gen #(
    .LINE_BYTES(WORDS * 4), .SECTOR_BYTES(SECTOR_BYTES)
  ) u_addr (
    .clk, .rst,
    .clr        (state_q == NPI_RST),
    .advance,
    .start_addr,
    .fat_sectors,
    .addr       (npi_Addr),
    .offset,
    .next_offset
  );

  npi_irq_gen #(
    .BLOCK_BYTES(BLOCK_BYTES)
  ) u_irq (
    .clk, .rst, .advance, .next_offset, .irq
  );

  // NPI rules: an address request is held until it is acknowledged, with a
  // stable address; pushes never exceed one cacheline per request.
  a_req_held: assert property (@(posedge clk) disable iff (rst)
    npi_AddrReq && !npi_AddrAck |=> npi_AddrReq && $stable(npi_Addr));
  a_no_read_overflow: assert property (@(posedge clk) disable iff (rst)
    fifo_valid |-> (state_q != NPI_TX_DATA && state_q != NPI_TX_ADDR));

endmodule
