// ALMA correlator station card logic (top level).
//
// The card takes 4 x 32 input data lines, re-blocks the data through four
// 64K x 64 interstage RAM buffers and sends it out as 1 ms data packets on
// 4 x 32 output lines. It is built from:
//   - upif_cpld    the microprocessor interface CPLD (the only control path)
//   - demux_fpga   x4, each splitting 32 input lines into 64 RAM data lines
//   - address_fpga x1, addressing all four RAM buffers in lock-step
//   - mux_fpga     x4, each recombining 64 RAM outputs into 32 card outputs
// Slice i runs DEMUX i -> RAM buffer i -> MUX i. DEMUX chips 0/1 and 2/3,
// and MUX chips 0/1 and 2/3, are paired by 16-bit links in both directions,
// which carry PRBS35 test data checked in the receiving chip.
//
// The RAM buffers are external dual-port SRAM chips (four 18-bit-wide parts
// per buffer), so their ports are brought out: one write address/strobe and
// one read address/strobe shared by all four buffers, and per-buffer 64-bit
// write and read data. The read data is expected RAM_LAT clocks after the
// clock in which ram_rd_en is high.
//
// All logic runs on the single 125 MHz card clock. The chip partitioning,
// counts, widths and sizes follow the card's description; the slice wiring,
// the link pairing in both directions and the register map are this
// design's choice.
module station_card
  import stc_pkg::*;
#(
  parameter int AW      = 16,      // RAM buffer depth 64K words
  parameter int PACKET  = 62500,   // 1 ms of 64-bit words at 62.5 MHz
  parameter int WINDOW  = 125000,  // 1 ms of 125 MHz clocks
  parameter int RAM_LAT = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // card data inputs and outputs
  input  logic [31:0]   din        [4],
  output logic [31:0]   dout       [4],
  output logic          dout_valid [4],
  output logic          dout_sop   [4],
  // microprocessor port
  input  logic [19:0]   up_addr,
  input  logic [7:0]    up_wdata,
  input  logic          up_wr,
  input  logic          up_rd,
  output logic [7:0]    up_rdata,
  output logic          up_rvalid,
  // RAM buffers
  output logic          ram_wr_en,
  output logic [AW-1:0] ram_wr_addr,
  output logic [63:0]   ram_wdata  [4],
  output logic          ram_rd_en,
  output logic [AW-1:0] ram_rd_addr,
  input  logic [63:0]   ram_rdata  [4]
);

  localparam int NTGT = 10;

  cbus_req_t  bus_req;
  cbus_rsp_t  bus_rsp [NTGT];
  logic [7:0] cpld_reg0, cpld_reg1;

  upif_cpld #(.NTGT(NTGT)) u_cpld (
    .clk, .rst_n, .up_addr, .up_wdata, .up_wr, .up_rd, .up_rdata, .up_rvalid,
    .bus_req, .bus_rsp, .reg0(cpld_reg0), .reg1(cpld_reg1)
  );
  assign bus_rsp[0] = '0;  // the CPLD answers its own reads

  logic word_phase, rd_sop;

  address_fpga #(.AW(AW), .PACKET(PACKET)) u_address (
    .clk, .rst_n, .word_phase,
    .wr_en(ram_wr_en), .wr_addr(ram_wr_addr),
    .rd_en(ram_rd_en), .rd_addr(ram_rd_addr), .rd_sop,
    .bus_req, .bus_rsp(bus_rsp[TGT_ADDRESS])
  );

  logic [15:0] demux_link [4];
  logic [15:0] mux_link   [4];

  for (genvar i = 0; i < 4; i++) begin : g_slice
    demux_fpga #(
      .CHIP_ID(TGT_DEMUX0 + 4'(i)), .WINDOW(WINDOW),
      .SEED(35'h0_1234_5679 * 35'(i + 1))
    ) u_demux (
      .clk, .rst_n, .din(din[i]), .word_phase, .ram_wdata(ram_wdata[i]),
      .link_tx(demux_link[i]), .link_rx(demux_link[i ^ 1]),
      .bus_req, .bus_rsp(bus_rsp[TGT_DEMUX0 + 4'(i)])
    );

    mux_fpga #(
      .CHIP_ID(TGT_MUX0 + 4'(i)), .WINDOW(WINDOW), .RAM_LAT(RAM_LAT),
      .SEED(35'h2_4680_ACE1 + 35'(i))
    ) u_mux (
      .clk, .rst_n, .rd_en(ram_rd_en), .rd_sop, .ram_rdata(ram_rdata[i]),
      .dout(dout[i]), .dout_valid(dout_valid[i]), .dout_sop(dout_sop[i]),
      .link_tx(mux_link[i]), .link_rx(mux_link[i ^ 1]),
      .bus_req, .bus_rsp(bus_rsp[TGT_MUX0 + 4'(i)])
    );
  end

endmodule
