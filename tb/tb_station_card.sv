// End-to-end testbench of the station card at its default sizes (64K-word
// RAM buffers, 1 ms = 62500-word packets, 1 ms = 125000-clock checker
// windows), with four behavioural RAM buffers. Everything goes through the
// microprocessor port, as on the card:
//   1. the CPLD registers, the control registers of all nine FPGAs and a
//      sample of every block RAM are written with random data and read back;
//   2. the DEMUX-pair and MUX-pair 16-bit link checkers run a 1 ms count;
//   3. normal mode: random card input words go through DEMUX, RAM buffer and
//      MUX; every RAM write is checked against the inputs and every output
//      half-word against what was written, in order, with packet starts
//      every 62500 words; rate checks: one output word per clock;
//   4. mode switch: the DEMUX chips switch to their PRBS35 sources, and once
//      that data comes out of the buffers the MUX data checkers run a 1 ms
//      count, which must be error free on all four slices;
//   5. one bit of a word waiting in RAM buffer 0 is flipped and MUX 0's
//      data checker is rerun: it must count exactly that one error, and the
//      output monitor must see exactly that one corrupted word;
//   6. the ADDRESS chip's packet counters are read back.
// Each mechanism is counted; one that never happened is a failure.
module tb_station_card;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;   // 125 MHz

  localparam int AW = 16, PACKET = 62500, WINDOW = 125000;

  logic [31:0]   din [4];
  logic [31:0]   dout [4];
  logic          dout_valid [4], dout_sop [4];
  logic [19:0]   up_addr = '0;
  logic [7:0]    up_wdata = '0, up_rdata;
  logic          up_wr = 0, up_rd = 0, up_rvalid;
  logic          ram_wr_en, ram_rd_en;
  logic [AW-1:0] ram_wr_addr, ram_rd_addr;
  logic [63:0]   ram_wdata [4], ram_rdata [4];

  station_card dut (
    .clk, .rst_n, .din, .dout, .dout_valid, .dout_sop,
    .up_addr, .up_wdata, .up_wr, .up_rd, .up_rdata, .up_rvalid,
    .ram_wr_en, .ram_wr_addr, .ram_wdata, .ram_rd_en, .ram_rd_addr, .ram_rdata);

  for (genvar i = 0; i < 4; i++) begin : g_ram
    ram_buffer_model #(.AW(AW), .LAT(2)) u_ram (
      .clk, .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wdata(ram_wdata[i]),
      .rd_en(ram_rd_en), .rd_addr(ram_rd_addr), .rdata(ram_rdata[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  int n_cpld_reg = 0, n_fpga_reg = 0, n_bram = 0, n_link_ok = 0;
  int n_written = 0, n_out = 0, n_sop = 0, n_mode_switch = 0, n_data_chk_ok = 0;
  int allow_err = 0, n_err_detected = 0;   // planted RAM error on slice 0

  // ---------------- microprocessor port ----------------
  task automatic up_write(input logic [3:0] t, input logic [15:0] a, input logic [7:0] d);
    up_addr = {t, a}; up_wdata = d; up_wr = 1;
    @(posedge clk);
    #1 up_wr = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic up_read(input logic [3:0] t, input logic [15:0] a, output logic [7:0] d);
    int n = 0;
    up_addr = {t, a}; up_rd = 1;
    @(posedge clk);
    #1 up_rd = 0;
    while (!up_rvalid && n < 8) begin @(posedge clk); #1; n++; end
    check(up_rvalid, "microprocessor read answered");
    d = up_rdata;
    @(posedge clk);
    #1;
  endtask

  task automatic read_chk(input logic [3:0] t, input logic [15:0] a, output logic [7:0] f, output int e);
    logic [7:0] b1, b2, b3;
    up_read(t, a, f);
    up_read(t, a + 16'd1, b1);
    up_read(t, a + 16'd2, b2);
    up_read(t, a + 16'd3, b3);
    e = int'({b3, b2, b1});
  endtask

  // ---------------- card inputs and data path monitors ----------------
  bit          test_mode = 0;     // DEMUX sources switched to PRBS
  bit          din_on = 0;
  bit          track = 0;         // the buffers are being written for real
  logic [31:0] din_h1 [4], din_h2 [4];  // inputs of the last two clocks
  logic [31:0] exp_q [4][$];
  bit          out_started [4];

  always @(posedge clk) begin
    #2;
    for (int i = 0; i < 4; i++) begin
      din_h2[i] = din_h1[i];
      din_h1[i] = din[i];   // the inputs sampled at this edge
      // ram_wdata was formed at this edge from the inputs sampled at this
      // edge (high half) and the edge before (low half)
      if (ram_wr_en && track) begin
        if (!test_mode) begin
          checks++;
          if (ram_wdata[i] != {din_h1[i], din_h2[i]}) begin
            failures++;
            if (failures < 10) $display("FAIL: slice %0d RAM write %h exp %h", i, ram_wdata[i], {din_h1[i], din_h2[i]});
          end
        end
        exp_q[i].push_back(ram_wdata[i][31:0]);
        exp_q[i].push_back(ram_wdata[i][63:32]);
        if (i == 0) n_written++;
      end
      if (dout_valid[i]) begin
        logic [31:0] e;
        out_started[i] = 1;
        checks++;
        if (exp_q[i].size() == 0) begin
          failures++; $display("FAIL: slice %0d output with nothing written", i);
        end else begin
          e = exp_q[i].pop_front();
          if (dout[i] != e && i == 0 && allow_err > 0 && $countones(dout[i] ^ e) == 1) begin
            allow_err--;
            n_err_detected++;
          end else if (dout[i] != e) begin
            failures++;
            if (failures < 10) $display("FAIL: slice %0d dout %h exp %h", i, dout[i], e);
          end
        end
        if (i == 0) n_out++;
        if (dout_sop[i] && i == 0) n_sop++;
      end else if (out_started[i]) begin
        checks++; failures++;
        if (failures < 10) $display("FAIL: slice %0d gap in output", i);
      end
      // new inputs, applied for the next edge
      if (din_on) din[i] = $urandom();
    end
  end

  // packet-start spacing: one sop every 2*PACKET output half-words
  int last_sop_at = -1;
  always @(posedge clk) begin
    #3;
    if (dout_valid[0] && dout_sop[0]) begin
      if (last_sop_at >= 0) check(n_out - last_sop_at == 2 * PACKET, $sformatf("packet length %0d half-words", n_out - last_sop_at));
      last_sop_at = n_out;
    end
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, v, f;
    logic [7:0] refs [4];
    int e, t_out;

    for (int i = 0; i < 4; i++) begin din[i] = '0; din_h1[i] = '0; din_h2[i] = '0; out_started[i] = 0; end
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (4) @(posedge clk);
    #1;

    // ---- 1. register and block RAM loops (TEST0..TEST7 style) ----
    for (int n = 0; n < 4; n++) begin
      refs[0] = 8'($urandom); refs[1] = 8'($urandom);
      up_write(TGT_CPLD, 16'd0, refs[0]);
      up_write(TGT_CPLD, 16'd1, refs[1]);
      up_read(TGT_CPLD, 16'd0, d); check(d == refs[0], "CPLD register 0");
      up_read(TGT_CPLD, 16'd1, v); check(v == refs[1], "CPLD register 1");
      if (d == refs[0] && v == refs[1]) n_cpld_reg++;
    end
    for (int t = 1; t <= 9; t++) begin
      int nb;
      nb = (t == int'(TGT_ADDRESS)) ? 2 : 4;
      for (int b = 0; b < nb; b++) begin refs[b] = 8'($urandom); up_write(4'(t), 16'(b), refs[b]); end
      for (int b = 0; b < nb; b++) begin
        up_read(4'(t), 16'(b), d);
        check(d == refs[b], $sformatf("chip %0d control byte %0d", t, b));
        if (d == refs[b]) n_fpga_reg++;
      end
      for (int b = 0; b < nb; b++) up_write(4'(t), 16'(b), 8'h00);
    end
    begin
      // one byte in every block RAM: DEMUX 1 x 256, ADDRESS 6 x 256, MUX 8 x 512
      int nram, rb;
      for (int t = 1; t <= 9; t++) begin
        nram = (t <= 4) ? 1 : (t == 5) ? 6 : 8;
        rb   = (t <= 5) ? 256 : 512;
        for (int k = 0; k < nram; k++) up_write(4'(t), RAM_BASE + 16'(k * rb + rb - 1 - k), 8'(t * 16 + k));
        for (int k = 0; k < nram; k++) begin
          up_read(4'(t), RAM_BASE + 16'(k * rb + rb - 1 - k), d);
          check(d == 8'(t * 16 + k), $sformatf("chip %0d block RAM %0d", t, k));
          if (d == 8'(t * 16 + k)) n_bram++;
        end
      end
    end

    // ---- 2. start the link checkers (TEST8/TEST9) ----
    for (int i = 0; i < 4; i++) begin
      up_write(TGT_DEMUX0 + 4'(i), 16'd0, 8'h02);
      up_write(TGT_MUX0 + 4'(i), 16'd0, 8'h02);
    end

    // ---- 3. normal mode through the RAM buffers ----
    din_on = 1;
    repeat (4) @(posedge clk);
    #1;
    track = 1;
    up_write(TGT_ADDRESS, 16'd0, 8'h01);
    wait (n_out > 0);
    t_out = n_out;
    check(n_written >= PACKET, $sformatf("first output after a full packet (%0d words written)", n_written));

    // link results are in by now
    for (int i = 0; i < 4; i++) begin
      read_chk(TGT_DEMUX0 + 4'(i), STAT_BASE, f, e);
      check(f == 8'hC0 && e == 0, $sformatf("DEMUX %0d link: flags %h errors %0d", i, f, e));
      if (f == 8'hC0 && e == 0) n_link_ok++;
      read_chk(TGT_MUX0 + 4'(i), STAT_BASE + 16'd4, f, e);
      check(f == 8'hC0 && e == 0, $sformatf("MUX %0d link: flags %h errors %0d", i, f, e));
      if (f == 8'hC0 && e == 0) n_link_ok++;
    end

    // let most of the first packet come out in normal mode
    begin
      int c0;
      c0 = n_out;
      repeat (1000) @(posedge clk);
      #1 check(n_out - c0 == 1000, $sformatf("output rate %0d half-words in 1000 clocks", n_out - c0));
    end
    wait (n_out > PACKET);

    // ---- 4. switch to the PRBS sources, then the 1 ms data check (TESTA) ----
    @(posedge clk); #1;
    test_mode = 1;
    din_on = 0;
    for (int i = 0; i < 4; i++) up_write(TGT_DEMUX0 + 4'(i), 16'd0, 8'h03);
    n_mode_switch++;
    // PRBS data reaches the outputs one packet later
    repeat (2 * PACKET + 2 * PACKET / 4) @(posedge clk);
    #1;
    for (int i = 0; i < 4; i++) up_write(TGT_MUX0 + 4'(i), 16'd0, 8'h03);
    repeat (WINDOW + 200) @(posedge clk);
    #1;
    for (int i = 0; i < 4; i++) begin
      read_chk(TGT_MUX0 + 4'(i), STAT_BASE, f, e);
      check(f == 8'hC0 && e == 0, $sformatf("MUX %0d data check: flags %h errors %0d", i, f, e));
      if (f == 8'hC0 && e == 0) n_data_chk_ok++;
    end

    // ---- 5. plant one bit error in buffer 0, 1000 words ahead of the reader ----
    up_write(TGT_MUX0, 16'd0, 8'h02);
    begin
      logic [AW-1:0] a;
      a = ram_rd_addr + AW'(1000);
      g_ram[0].u_ram.mem[a][17] = !g_ram[0].u_ram.mem[a][17];
      allow_err = 1;
    end
    up_write(TGT_MUX0, 16'd0, 8'h03);
    repeat (WINDOW + 200) @(posedge clk);
    #1;
    read_chk(TGT_MUX0, STAT_BASE, f, e);
    check(f == 8'hC0 && e == 1, $sformatf("planted error: MUX 0 data check flags %h errors %0d", f, e));
    check(allow_err == 0 && n_err_detected == 1, "planted error seen once at the output");

    // ---- 6. packet counters ----
    begin
      logic [7:0] b0, b1, b2, b3;
      up_read(TGT_ADDRESS, STAT_BASE + 16'd0, b0);
      up_read(TGT_ADDRESS, STAT_BASE + 16'd1, b1);
      up_read(TGT_ADDRESS, STAT_BASE + 16'd2, b2);
      up_read(TGT_ADDRESS, STAT_BASE + 16'd3, b3);
      check(int'({b1, b0}) == n_written / PACKET, $sformatf("packets written %0d (words %0d)", {b1, b0}, n_written));
      // the packet being read out counts once its last address is issued
      check(int'({b3, b2}) == n_sop || int'({b3, b2}) == n_sop - 1,
            $sformatf("packets read %0d, packet starts seen %0d", {b3, b2}, n_sop));
    end

    $display("mechanisms: cpld_reg=%0d fpga_reg=%0d block_ram=%0d link_ok=%0d written=%0d out=%0d packets=%0d mode_switch=%0d data_check_ok=%0d error_detected=%0d",
             n_cpld_reg, n_fpga_reg, n_bram, n_link_ok, n_written, n_out, n_sop, n_mode_switch, n_data_chk_ok, n_err_detected);
    check(n_cpld_reg > 0, "CPLD register loop happened");
    check(n_fpga_reg > 0, "FPGA register loop happened");
    check(n_bram > 0, "block RAM loop happened");
    check(n_link_ok == 8, "all eight link checks passed");
    check(n_sop >= 2, "at least two packets read out");
    check(n_mode_switch > 0, "source mode switch happened");
    check(n_data_chk_ok == 4, "all four data checks passed");
    check(n_err_detected > 0, "a planted error was detected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
