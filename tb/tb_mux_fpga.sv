// Testbench for mux_fpga with a behavioural RAM buffer (pipelined read,
// latency 2) and its link looped back to itself.
//  - the RAM is filled with 64-bit words cut from a continuous PRBS35 bit
//    stream; the testbench reads it out one word per two clocks in packets
//    of 8 words with rd_sop on each first word;
//  - dout must then carry low half, high half of every word in order, valid
//    on every clock, with dout_sop on the first half of each packet;
//  - the data checker must report zero errors over a window, and exactly
//    the number of bit errors planted in the RAM when rerun over them;
//  - the link checker and the control/RAM register space are exercised.
module tb_mux_fpga;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int WINDOW = 300, AW = 8, PKT = 8;
  localparam logic [3:0] ID = TGT_MUX0;

  logic          rd_en = 0, rd_sop = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [63:0]   wdata = '0, ram_rdata;
  logic [31:0]   dout;
  logic          dout_valid, dout_sop;
  logic [15:0]   link_tx, link_rx, inj = '0;
  cbus_req_t     bus_req = '0;
  cbus_rsp_t     bus_rsp;

  assign link_rx = link_tx ^ inj;

  ram_buffer_model #(.AW(AW), .LAT(2)) u_ram (
    .clk, .wr_en, .wr_addr, .wdata, .rd_en, .rd_addr, .rdata(ram_rdata));

  mux_fpga #(.CHIP_ID(ID), .WINDOW(WINDOW), .RAM_LAT(2)) dut (
    .clk, .rst_n, .rd_en, .rd_sop, .ram_rdata, .dout, .dout_valid, .dout_sop,
    .link_tx, .link_rx, .bus_req, .bus_rsp);

  int checks = 0, failures = 0;
  `include "tb_cbus_tasks.svh"

  logic [63:0] words [2**AW];

  // output monitor: compares dout with the expected half-word stream
  logic [31:0] exp_q [$];
  bit          exp_sop [$];
  int          n_out = 0, n_sop_seen = 0;
  bit          streaming = 0;
  always @(posedge clk) begin
    #2;
    if (dout_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output word");
      end else begin
        logic [31:0] e;
        bit es;
        e  = exp_q.pop_front();
        es = exp_sop.pop_front();
        if (dout != e || dout_sop != es) begin
          failures++;
          if (failures < 8) $display("FAIL: dout %h sop %0d exp %h sop %0d", dout, dout_sop, e, es);
        end
      end
      n_out++;
      if (dout_sop) n_sop_seen++;
    end else if (streaming && exp_q.size() != 0) begin
      checks++; failures++;
      $display("FAIL: gap in output stream");
    end
  end

  // reads `n` words starting at address a, one per two clocks, packets of PKT
  task automatic read_words(input int a, input int n);
    for (int k = 0; k < n; k++) begin
      rd_en = 1; rd_addr = AW'(a + k); rd_sop = (k % PKT == 0);
      exp_q.push_back(words[AW'(a + k)][31:0]);  exp_sop.push_back(rd_sop);
      exp_q.push_back(words[AW'(a + k)][63:32]); exp_sop.push_back(1'b0);
      @(posedge clk); #1;
      rd_en = 0; rd_sop = 0;
      @(posedge clk); #1;
      if (k == 2) streaming = 1;
    end
    streaming = 0;
    repeat (6) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [$];
    logic [7:0] flags, d;
    int errs;
    logic [7:0] ref_ram [8][4];

    // PRBS35 words, bit 0 earliest
    for (int k = 34; k >= 0; k--) hist.push_back(k % 3 == 0);
    for (int a = 0; a < 2**AW; a++)
      for (int i = 0; i < 64; i++) begin
        bit b;
        b = hist[hist.size()-33] ^ hist[hist.size()-35];
        hist.push_back(b);
        words[a][i] = b;
        void'(hist.pop_front());
      end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 2**AW; a++) begin
      wr_en = 1; wr_addr = AW'(a); wdata = words[a];
      @(posedge clk); #1;
    end
    wr_en = 0;

    // plain readout
    read_words(0, 3 * PKT);
    check(exp_q.size() == 0 && n_out == 6 * PKT, $sformatf("all %0d half words out", n_out));
    check(n_sop_seen == 3, "three packet starts");

    // data checker, clean: the window must end inside the read
    bus_wr(ID, 16'd0, 8'h01);
    read_words(3 * PKT, WINDOW / 2 + 2 * PKT);
    read_chk(ID, STAT_BASE, flags, errs);
    check(flags == 8'hC0 && errs == 0, $sformatf("data checker clean: flags %h errors %0d", flags, errs));

    // plant 3 bit errors in words the next run reads after lock
    words[AW'(40)][5] ^= 1'b1;
    words[AW'(50)][40] ^= 1'b1;
    words[AW'(77)][63] ^= 1'b1;
    for (int a = 40; a <= 77; a++) begin
      wr_en = 1; wr_addr = AW'(a); wdata = words[a];
      @(posedge clk); #1;
    end
    wr_en = 0;
    bus_wr(ID, 16'd0, 8'h00);
    bus_wr(ID, 16'd0, 8'h01);
    read_words(20, WINDOW / 2 + 2 * PKT);
    read_chk(ID, STAT_BASE, flags, errs);
    check(flags == 8'hC0 && errs == 3, $sformatf("data checker counts planted errors: %0d", errs));

    // link
    bus_wr(ID, 16'd0, 8'h02);
    repeat (10) @(posedge clk);
    #1 inj = 16'h8000;
    @(posedge clk);
    #1 inj = 16'h0000;
    repeat (WINDOW + 10) @(posedge clk);
    #1;
    read_chk(ID, STAT_BASE + 16'd4, flags, errs);
    check(flags == 8'hC0 && errs == 1, $sformatf("link checker: flags %h errors %0d", flags, errs));

    // control bytes and eight 512-byte RAMs
    for (int i = 0; i < 4; i++) bus_wr(ID, 16'(i), 8'(8'h3C ^ i));
    for (int i = 0; i < 4; i++) begin
      bus_rd(ID, 16'(i), d);
      check(d == 8'(8'h3C ^ i), "control byte read back");
    end
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 4; j++) begin
        ref_ram[k][j] = 8'($urandom);
        bus_wr(ID, RAM_BASE + 16'(k * 512 + j * 170), ref_ram[k][j]);
      end
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 4; j++) begin
        bus_rd(ID, RAM_BASE + 16'(k * 512 + j * 170), d);
        check(d == ref_ram[k][j], $sformatf("RAM %0d byte %0d", k, j * 170));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
