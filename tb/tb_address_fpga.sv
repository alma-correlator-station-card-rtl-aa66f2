// Testbench for address_fpga with a 16-word buffer and 10-word packets.
// A reference model follows every wr_en and rd_en: write addresses must
// run on circularly, one word every two clocks; each read packet must start
// (rd_sop) at the base of the oldest complete, unread packet and run on
// sequentially; no read may start before its packet is complete; in steady
// state the read address trails the write address by exactly one packet.
// Clearing run in the middle of a packet must drop it and rewind. The
// packet counters, the control bytes and the six block RAMs are read back.
module tb_address_fpga;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int AW = 4, PACKET = 10;
  localparam logic [3:0] ID = TGT_ADDRESS;

  logic          word_phase, wr_en, rd_en, rd_sop;
  logic [AW-1:0] wr_addr, rd_addr;
  cbus_req_t     bus_req = '0;
  cbus_rsp_t     bus_rsp;

  address_fpga #(.AW(AW), .PACKET(PACKET)) dut (
    .clk, .rst_n, .word_phase, .wr_en, .wr_addr, .rd_en, .rd_addr, .rd_sop, .bus_req, .bus_rsp);

  int checks = 0, failures = 0;
  `include "tb_cbus_tasks.svh"

  // ---------------- reference model ----------------
  int exp_wa = 0, wcnt = 0, rcnt = 0, rbase = 0;
  int bases [$];
  int n_wr = 0, n_rd = 0, n_sop = 0, n_trail = 0, n_pkt_done = 0;
  bit rewind_req = 0;
  bit prev_wr_en = 0, prev_rd_en = 0;
  bit steady = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (wr_en) begin
        checks++;
        if (int'(wr_addr) != exp_wa) begin
          failures++; $display("FAIL: wr_addr %0d exp %0d", wr_addr, exp_wa);
        end
        checks++;
        if (prev_wr_en) begin failures++; $display("FAIL: writes on consecutive clocks"); end
        exp_wa = (exp_wa + 1) & (2**AW - 1);
        n_wr++;
        wcnt++;
        if (wcnt == PACKET) begin bases.push_back((exp_wa - PACKET) & (2**AW - 1)); wcnt = 0; n_pkt_done++; end
      end
      if (rd_en) begin
        checks++;
        if (rcnt == 0) begin
          if (bases.size() == 0) begin
            failures++; $display("FAIL: read before a packet was complete");
          end else begin
            rbase = bases.pop_front();
            if (!rd_sop || int'(rd_addr) != rbase) begin
              failures++; $display("FAIL: packet start addr %0d sop %0d exp %0d", rd_addr, rd_sop, rbase);
            end
            n_sop++;
          end
        end else if (rd_sop || int'(rd_addr) != ((rbase + rcnt) & (2**AW - 1))) begin
          failures++; $display("FAIL: read addr %0d sop %0d exp %0d", rd_addr, rd_sop, (rbase + rcnt) & (2**AW - 1));
        end
        rcnt = (rcnt + 1) % PACKET;
        n_rd++;
        if (steady && wr_en) begin
          checks++; n_trail++;
          if (int'(rd_addr) != ((int'(wr_addr) - PACKET) & (2**AW - 1))) begin
            failures++; $display("FAIL: read does not trail write by one packet");
          end
        end
      end
      prev_wr_en = wr_en;
      // run was cleared at the last edge: the partial packet is dropped
      if (rewind_req) begin
        exp_wa = (exp_wa - wcnt) & (2**AW - 1);
        wcnt = 0;
        rewind_req = 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, b0, b1, b2, b3;
    int t0, w0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (20) @(posedge clk);
    check(n_wr == 0 && n_rd == 0, "idle while run is clear");

    bus_wr(ID, 16'd0, 8'h01);
    repeat (4 * PACKET) @(posedge clk);
    #1 steady = 1;
    // write rate: one word per two clocks
    t0 = n_wr;
    repeat (200) @(posedge clk);
    #1 check(n_wr - t0 == 100, $sformatf("write rate %0d words in 200 clocks", n_wr - t0));
    #1 steady = 0;

    // stop in the middle of a packet
    wait (wcnt == 4);
    @(posedge clk); #1;
    bus_req = '{wr: 1'b1, rd: 1'b0, target: ID, addr: 16'd0, wdata: 8'h00};
    @(posedge clk);
    #1 bus_req = '0;
    rewind_req = 1;      // run is clear from the next clock on
    repeat (6 * PACKET) @(posedge clk);
    #1 check(bases.size() == 0 && rcnt == 0, "all complete packets read out after stop");
    w0 = n_wr;
    repeat (20) @(posedge clk);
    #1 check(n_wr == w0, "no writes while stopped");

    // restart: writes resume at the rewound address
    bus_wr(ID, 16'd0, 8'h01);
    repeat (5 * PACKET) @(posedge clk);
    bus_wr(ID, 16'd0, 8'h00);
    rewind_req = 1;
    repeat (6 * PACKET) @(posedge clk);
    #1;
    check(n_sop > 5, $sformatf("packets read: %0d", n_sop));
    check(n_trail > 50, "trailing-read checks made");

    bus_rd(ID, STAT_BASE + 16'd0, b0);
    bus_rd(ID, STAT_BASE + 16'd1, b1);
    bus_rd(ID, STAT_BASE + 16'd2, b2);
    bus_rd(ID, STAT_BASE + 16'd3, b3);
    check(int'({b1, b0}) == n_pkt_done, $sformatf("packets written %0d exp %0d", {b1, b0}, n_pkt_done));
    check(int'({b3, b2}) == n_sop, $sformatf("packets read %0d exp %0d", {b3, b2}, n_sop));

    // control bytes and the six block RAMs
    bus_wr(ID, 16'd1, 8'h5C);
    bus_rd(ID, 16'd1, d);
    check(d == 8'h5C, "control byte 1 read back");
    for (int k = 0; k < 6; k++)
      for (int o = 0; o < 256; o += 51) bus_wr(ID, RAM_BASE + 16'(k * 256 + o), 8'(k * 37 + o));
    for (int k = 0; k < 6; k++)
      for (int o = 0; o < 256; o += 51) begin
        bus_rd(ID, RAM_BASE + 16'(k * 256 + o), d);
        check(d == 8'(k * 37 + o), $sformatf("RAM %0d byte %0d", k, o));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
