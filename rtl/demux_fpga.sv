// Input DEMUX FPGA of the station card.
//
// Takes 32 card input lines at the 125 MHz card clock and splits them into
// 64 lines at half the word rate, the width of one card RAM buffer: the word
// present while word_phase is 0 becomes the low half, the word present while
// word_phase is 1 the high half, and the 64-bit pair appears on ram_wdata
// one clock later, held for two clocks (aligned with the ADDRESS chip's write
// strobe). For testing, a 32-bit-wide PRBS35 generator can replace the card
// inputs (control bit 0), and the chip drives a 16-bit PRBS35 stream to its
// partner DEMUX chip while checking the 16-bit stream it receives from it
// with a self-seeding predict checker (control bit 1: a rising edge starts a
// 1 ms error count).
//
// Register bus (chip CHIP_ID): control bytes 0-3, status bytes 0x40-0x43
// {locked, done, 6'b0}, errors[7:0], errors[15:8], errors[23:16]; one
// 256-byte block RAM at 0x8000. The 32-to-64 split, the 4-byte register, the
// 256-byte RAM, the PRBS source and the 16-bit pair link follow the card's
// description; the half ordering, control bit meanings and the use of one
// 32-bit generator for all 32 input lines are this design's choice.
module demux_fpga
  import stc_pkg::*;
#(
  parameter logic [3:0]          CHIP_ID = TGT_DEMUX0,
  parameter int                  WINDOW  = 125000,
  parameter logic [PRBS_LEN-1:0] SEED    = 35'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  // card inputs and RAM buffer write data
  input  logic [31:0] din,
  input  logic        word_phase,
  output logic [63:0] ram_wdata,
  // 16-bit link to and from the partner DEMUX chip
  output logic [15:0] link_tx,
  input  logic [15:0] link_rx,
  // register bus
  input  cbus_req_t   bus_req,
  output cbus_rsp_t   bus_rsp
);

  logic [31:0] ctrl;
  chk_stat_t   link_stat;
  logic [31:0] stat;

  assign stat = {link_stat.errors[23:16], link_stat.errors[15:8],
                 link_stat.errors[7:0], {link_stat.locked, link_stat.done, 6'b0}};

  fpga_regs #(
    .CHIP_ID(CHIP_ID), .NCTRL(4), .NSTAT(4), .NRAM(1), .RAM_BYTES(256)
  ) u_regs (
    .clk, .rst_n, .req(bus_req), .rsp(bus_rsp), .ctrl, .stat
  );

  logic test_src, link_run, link_run_q;
  assign test_src = ctrl[0];
  assign link_run = ctrl[1];

  // Test source replacing the card inputs
  logic [31:0] prbs_data, src;
  prbs35_gen #(.W(32), .SEED(SEED)) u_src_gen (
    .clk, .rst_n, .en(1'b1), .dout(prbs_data)
  );
  assign src = test_src ? prbs_data : din;

  // 32 -> 64 demultiplexer
  logic [31:0] lo;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo        <= '0;
      ram_wdata <= '0;
    end else if (!word_phase) begin
      lo <= src;
    end else begin
      ram_wdata <= {src, lo};
    end
  end

  // Chip-to-chip link test
  prbs35_gen #(.W(16), .SEED(SEED)) u_link_gen (
    .clk, .rst_n, .en(1'b1), .dout(link_tx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) link_run_q <= 1'b0;
    else        link_run_q <= link_run;
  end

  prbs35_chk #(.W(16), .WINDOW(WINDOW)) u_link_chk (
    .clk, .rst_n, .start(link_run && !link_run_q), .valid(1'b1),
    .din(link_rx), .stat(link_stat)
  );

endmodule
