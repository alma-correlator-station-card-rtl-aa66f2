// ADDRESS FPGA of the station card: RAM buffer address sequencer.
//
// One chip addresses all four card RAM buffers (dual-ported, 64K x 64
// each) in lock-step. It is the word-timing master of the card: word_phase
// toggles every clock, and one 64-bit word per two clocks (62.5 MHz at the
// 125 MHz card clock) is written into each buffer and one is read out.
//
// Write side: while control bit 0 (run) is set, every word gets the next
// address of a circular buffer of 2**AW words. PACKET words (62500, 1 ms of
// data at 62.5 Mword/s) form one packet. If run is cleared in the middle of
// a packet, the partial packet is dropped and the write address rewinds to
// its start.
// Read side: each complete packet is read back in write order, one word per
// two clocks, starting as soon as it is complete, so reading trails writing
// by exactly one packet; rd_sop marks the first word of a packet. Read
// requests keep going after run is cleared until every complete packet is
// out.
//
// Timing: wr_en/wr_addr and rd_en/rd_addr/rd_sop are registered and high
// for the one clock after a word_phase=1 clock, the clock in which the DEMUX
// chips present ram_wdata.
//
// Register bus: control bytes 0-1, status 0x40-0x43 = packets written
// (16 bit), packets read (16 bit); six 256-byte block RAMs at 0x8000.
// The card's description gives the chip's job (address sequences for
// re-blocking, 1 ms read packets), its 2-byte register and six RAMs. The
// re-blocking order itself is not described: this sequencer reads each
// packet in the order it was written.
module address_fpga
  import stc_pkg::*;
#(
  parameter int AW     = 16,
  parameter int PACKET = 62500
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          word_phase,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          rd_sop,
  input  cbus_req_t     bus_req,
  output cbus_rsp_t     bus_rsp
);

  localparam int PW = $clog2(PACKET + 1);
  localparam int NPKT_MAX = (2 ** AW) / PACKET;  // packets the buffer holds

  initial assert (PACKET <= 2 ** AW) else $error("address_fpga: PACKET exceeds buffer");

  logic [15:0] ctrl;
  logic [15:0] pkt_wr_cnt, pkt_rd_cnt;
  logic run;
  assign run = ctrl[0];

  fpga_regs #(
    .CHIP_ID(TGT_ADDRESS), .NCTRL(2), .NSTAT(4), .NRAM(6), .RAM_BYTES(256)
  ) u_regs (
    .clk, .rst_n, .req(bus_req), .rsp(bus_rsp), .ctrl,
    .stat({pkt_rd_cnt, pkt_wr_cnt})
  );

  logic [AW-1:0] wa, ra;
  logic [PW-1:0] wcnt, rcnt;
  logic [7:0]    avail;       // complete packets waiting to be read
  logic          wr_done, rd_done;

  assign wr_done = word_phase && run && (32'(wcnt) == PACKET - 1);
  assign rd_done = word_phase && (avail != 0) && (32'(rcnt) == PACKET - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_phase <= 1'b0;
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      rd_en      <= 1'b0;
      rd_addr    <= '0;
      rd_sop     <= 1'b0;
      wa         <= '0;
      ra         <= '0;
      wcnt       <= '0;
      rcnt       <= '0;
      avail      <= '0;
      pkt_wr_cnt <= '0;
      pkt_rd_cnt <= '0;
    end else begin
      word_phase <= !word_phase;
      wr_en      <= 1'b0;
      rd_en      <= 1'b0;
      rd_sop     <= 1'b0;

      // write sequence
      if (!run) begin
        wa   <= wa - AW'(wcnt);
        wcnt <= '0;
      end else if (word_phase) begin
        wr_en   <= 1'b1;
        wr_addr <= wa;
        wa      <= wa + 1'b1;
        wcnt    <= wr_done ? '0 : wcnt + 1'b1;
      end

      // read sequence
      if (word_phase && avail != 0) begin
        rd_en   <= 1'b1;
        rd_addr <= ra;
        rd_sop  <= (rcnt == '0);
        ra      <= ra + 1'b1;
        rcnt    <= rd_done ? '0 : rcnt + 1'b1;
      end

      avail <= avail + 8'(wr_done) - 8'(rd_done);
      if (wr_done) pkt_wr_cnt <= pkt_wr_cnt + 1'b1;
      if (rd_done) pkt_rd_cnt <= pkt_rd_cnt + 1'b1;
    end
  end

  // Reading trails writing by one packet, so the buffer can never overrun.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(avail) <= NPKT_MAX);

endmodule
