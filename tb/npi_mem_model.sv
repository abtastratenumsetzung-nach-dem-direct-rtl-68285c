// npi_mem_model: behavioural model of one write port of the multi-port memory
// controller (MPMC) as seen over its native port interface (NPI), for
// simulation only. Pushed words enter a write FIFO; an address request is
// acknowledged after a random wait (AddrAck may come in the same clock as
// AddrReq), and on the acknowledge the last eight pushed words are stored as
// one 8-word cacheline at Addr in a sparse memory. WrFIFO_AlmostFull is
// raised at random when ALMOST_FULL_PCT > 0. The model checks the request
// attributes (write, Size 0x2, byte enables 0xF, 32-byte alignment), that
// exactly eight words were pushed per request and that nothing is pushed
// while AlmostFull is high; errors are counted in `errors`.
module npi_mem_model #(
  parameter int unsigned ACK_PCT         = 40,
  parameter int unsigned ALMOST_FULL_PCT = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] Addr,
  input  logic        AddrReq,
  output logic        AddrAck,
  input  logic        RNW,
  input  logic [3:0]  Size,
  input  logic        RdModWr,
  input  logic [31:0] WrFIFO_Data,
  input  logic [3:0]  WrFIFO_BE,
  input  logic        WrFIFO_Push,
  input  logic        WrFIFO_Flush,
  output logic        WrFIFO_AlmostFull
);

  logic [31:0] mem [int unsigned];
  logic [31:0] wq [$];
  logic        grant_q;
  int          errors = 0, lines = 0, same_cycle_acks = 0;
  logic        req_prev = 1'b0;

  assign AddrAck = AddrReq && grant_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      grant_q           <= 1'b0;
      WrFIFO_AlmostFull <= 1'b0;
    end else begin
      grant_q           <= ($urandom_range(0, 99) < ACK_PCT);
      WrFIFO_AlmostFull <= ($urandom_range(0, 99) < ALMOST_FULL_PCT);
    end
  end

  always @(posedge clk) begin
    req_prev <= AddrReq && !AddrAck;
    if (!rst) begin
      if (WrFIFO_Push) begin
        if (WrFIFO_BE != 4'hF) errors++;
        if (WrFIFO_AlmostFull) begin
          errors++;
          $display("npi_mem_model: push while WrFIFO_AlmostFull");
        end
        wq.push_back(WrFIFO_Data);
      end
      if (WrFIFO_Flush) wq.delete();
      if (AddrReq && AddrAck) begin
        if (RNW || Size != 4'h2 || RdModWr || Addr[4:0] != 0) begin
          errors++;
          $display("npi_mem_model: bad request RNW=%0d Size=%h Addr=%h", RNW, Size, Addr);
        end
        if (wq.size() != 8) begin
          errors++;
          $display("npi_mem_model: %0d words pushed for one cacheline", wq.size());
        end
        if (!req_prev) same_cycle_acks++;
        for (int k = 0; k < 8 && wq.size() > 0; k++) mem[(Addr >> 2) + k] = wq.pop_front();
        lines++;
      end
    end
  end

  function automatic logic [31:0] read_word(input logic [31:0] byte_addr);
    if (mem.exists(byte_addr >> 2)) return mem[byte_addr >> 2];
    return 32'hDEAD_BEEF;
  endfunction

endmodule
