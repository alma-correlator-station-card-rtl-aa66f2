// Testbench for demux_fpga (one chip, its link looped back to itself).
//  - normal mode: random card input words are paired, first word low,
//    into the 64-bit RAM write data, one pair per two clocks;
//  - test source mode: the RAM write data is a continuous PRBS35 bit
//    stream, checked by a testbench-side predictor seeded from the data;
//  - link test: a 1 ms (WINDOW) error count on the looped-back link reads
//    zero errors, then exactly the number of bit errors injected;
//  - the 4-byte control register and the 256-byte RAM read back.
module tb_demux_fpga;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int WINDOW = 400;
  localparam logic [3:0] ID = TGT_DEMUX0;

  logic [31:0] din = '0;
  logic        word_phase;
  logic [63:0] ram_wdata;
  logic [15:0] link_tx, link_rx, inj = '0;
  cbus_req_t   bus_req = '0;
  cbus_rsp_t   bus_rsp;

  assign link_rx = link_tx ^ inj;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) word_phase <= 1'b0;
    else        word_phase <= !word_phase;

  demux_fpga #(.CHIP_ID(ID), .WINDOW(WINDOW), .SEED(35'h4_0000_0001)) dut (
    .clk, .rst_n, .din, .word_phase, .ram_wdata, .link_tx, .link_rx, .bus_req, .bus_rsp);

  int checks = 0, failures = 0;
  `include "tb_cbus_tasks.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  d, flags;
    int          errs;
    logic [31:0] lo_in;
    bit          hist [$];
    logic [7:0]  ref_ram [256];

    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- normal mode: pair consecutive input words ----
    // start on a phase-0 clock so that the first low half is known
    @(posedge clk); #1;
    if (word_phase) begin @(posedge clk); #1; end
    din = $urandom();
    lo_in = din;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      din = $urandom();
      if (!word_phase) lo_in = din;
      else begin
        logic [63:0] expw;
        expw = {din, lo_in};
        @(posedge clk); #1;
        check(ram_wdata == expw, $sformatf("normal pair %h exp %h", ram_wdata, expw));
        din = $urandom();
        lo_in = din;  // this clock's word (phase 0) is the next low half
      end
    end

    // ---- test source mode ----
    bus_wr(ID, 16'd0, 8'h01);
    repeat (6) @(posedge clk);
    hist.delete();
    for (int n = 0; n < 300; n++) begin
      @(posedge clk); #1;
      if (!word_phase) begin  // a new pair appeared at this edge
        for (int i = 0; i < 64; i++) begin
          if (hist.size() >= 35) begin
            bit p;
            p = hist[hist.size()-33] ^ hist[hist.size()-35];
            if (i == 0 || i == 32) checks++;
            if (p != ram_wdata[i]) begin
              failures++;
              if (failures < 5) $display("FAIL: PRBS word bit %0d at pair %0d", i, n);
            end
          end
          hist.push_back(ram_wdata[i]);
        end
        while (hist.size() > 200) void'(hist.pop_front());
      end
    end

    // ---- link test, clean ----
    bus_wr(ID, 16'd0, 8'h03);
    repeat (WINDOW + 20) @(posedge clk);
    #1;
    read_chk(ID, STAT_BASE, flags, errs);
    check(flags == 8'hC0, $sformatf("link locked and done, flags %h", flags));
    check(errs == 0, $sformatf("clean link errors %0d", errs));

    // ---- link test with injected errors ----
    bus_wr(ID, 16'd0, 8'h01);
    bus_wr(ID, 16'd0, 8'h03);
    repeat (20) @(posedge clk);
    for (int k = 0; k < 7; k++) begin
      @(posedge clk); #1 inj = 16'h0001 << k;
      @(posedge clk); #1 inj = '0;
      repeat (10) @(posedge clk);
    end
    repeat (WINDOW) @(posedge clk);
    #1;
    read_chk(ID, STAT_BASE, flags, errs);
    check(flags == 8'hC0 && errs == 7, $sformatf("7 injected link errors, read %0d", errs));

    // ---- register and RAM read back ----
    for (int i = 0; i < 4; i++) bus_wr(ID, 16'(i), 8'(8'hA0 + i));
    for (int i = 0; i < 4; i++) begin
      bus_rd(ID, 16'(i), d);
      check(d == 8'(8'hA0 + i), "control byte read back");
    end
    for (int a = 0; a < 256; a++) begin
      ref_ram[a] = 8'($urandom);
      bus_wr(ID, RAM_BASE + 16'(a), ref_ram[a]);
    end
    for (int a = 0; a < 256; a++) begin
      bus_rd(ID, RAM_BASE + 16'(a), d);
      check(d == ref_ram[a], "RAM byte read back");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
