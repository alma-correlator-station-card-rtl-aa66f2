// Output MUX FPGA of the station card.
//
// Recombines the 64 parallel outputs of one card RAM buffer into 32 card
// output lines: each 64-bit word read from the buffer (one per two clocks)
// leaves as its low half and then its high half on consecutive clocks of
// dout, so the card outputs carry the same 32-bit stream that entered the
// DEMUX chip, regrouped into 1 ms packets (dout_sop marks the first word of
// a packet). rd_en and rd_sop come from the ADDRESS chip and are delayed by
// RAM_LAT clocks to meet the read data of the pipelined buffer RAM.
//
// Test functions: a 32-bit PRBS35 predict checker watches dout (control
// bit 0, rising edge starts a count) for the end-to-end RAM path test, and
// a 16-bit PRBS35 generator and checker (control bit 1) test the link to the
// partner MUX chip. Each checker counts errors for WINDOW clocks (1 ms).
//
// Register bus (chip CHIP_ID): control bytes 0-3; status 0x40-0x43 data
// checker, 0x44-0x47 link checker, each {locked, done, 6'b0}, errors[7:0],
// errors[15:8], errors[23:16]; eight 512-byte block RAMs at 0x8000. The
// 64-to-32 recombination, 4-byte register, eight 512-byte RAMs and the 16-bit
// pair link follow the card's description; the output framing, half order,
// RAM latency and control bits are this design's choice.
module mux_fpga
  import stc_pkg::*;
#(
  parameter logic [3:0]          CHIP_ID = TGT_MUX0,
  parameter int                  WINDOW  = 125000,
  parameter int                  RAM_LAT = 2,
  parameter logic [PRBS_LEN-1:0] SEED    = 35'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the ADDRESS chip and the RAM buffer
  input  logic        rd_en,
  input  logic        rd_sop,
  input  logic [63:0] ram_rdata,
  // card outputs
  output logic [31:0] dout,
  output logic        dout_valid,
  output logic        dout_sop,
  // 16-bit link to and from the partner MUX chip
  output logic [15:0] link_tx,
  input  logic [15:0] link_rx,
  // register bus
  input  cbus_req_t   bus_req,
  output cbus_rsp_t   bus_rsp
);

  logic [31:0] ctrl;
  chk_stat_t   data_stat, link_stat;

  function automatic logic [31:0] stat_bytes(input chk_stat_t s);
    return {s.errors[23:16], s.errors[15:8], s.errors[7:0], {s.locked, s.done, 6'b0}};
  endfunction

  fpga_regs #(
    .CHIP_ID(CHIP_ID), .NCTRL(4), .NSTAT(8), .NRAM(8), .RAM_BYTES(512)
  ) u_regs (
    .clk, .rst_n, .req(bus_req), .rsp(bus_rsp), .ctrl,
    .stat({stat_bytes(link_stat), stat_bytes(data_stat)})
  );

  // Align read strobes with the RAM data
  logic [RAM_LAT-1:0] en_d, sop_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_d  <= '0;
      sop_d <= '0;
    end else begin
      en_d  <= {en_d[RAM_LAT-2:0], rd_en};
      sop_d <= {sop_d[RAM_LAT-2:0], rd_sop};
    end
  end

  // 64 -> 32 multiplexer
  logic [31:0] hi;
  logic        hi_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi         <= '0;
      hi_valid   <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_sop   <= 1'b0;
    end else if (en_d[RAM_LAT-1]) begin
      dout       <= ram_rdata[31:0];
      dout_valid <= 1'b1;
      dout_sop   <= sop_d[RAM_LAT-1];
      hi         <= ram_rdata[63:32];
      hi_valid   <= 1'b1;
    end else begin
      dout       <= hi;
      dout_valid <= hi_valid;
      dout_sop   <= 1'b0;
      hi_valid   <= 1'b0;
    end
  end

  // Run controls and their rising edges
  logic [1:0] run_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run_q <= '0;
    else        run_q <= ctrl[1:0];
  end

  prbs35_chk #(.W(32), .WINDOW(WINDOW)) u_data_chk (
    .clk, .rst_n, .start(ctrl[0] && !run_q[0]), .valid(dout_valid),
    .din(dout), .stat(data_stat)
  );

  prbs35_gen #(.W(16), .SEED(SEED)) u_link_gen (
    .clk, .rst_n, .en(1'b1), .dout(link_tx)
  );

  prbs35_chk #(.W(16), .WINDOW(WINDOW)) u_link_chk (
    .clk, .rst_n, .start(ctrl[1] && !run_q[1]), .valid(1'b1),
    .din(link_rx), .stat(link_stat)
  );

  initial assert (RAM_LAT >= 2) else $error("mux_fpga: RAM_LAT must be at least 2");

endmodule
