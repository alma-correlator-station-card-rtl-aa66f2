// Register bytes and block RAMs of one FPGA chip on the internal register bus.
//
// Each FPGA of the card has a small read/write control register (4 bytes in
// a DEMUX, 2 in the ADDRESS chip, 4 in a MUX), some internal block RAMs that
// the microprocessor can fill and read back (1 x 256 bytes, 6 x 256 bytes,
// 8 x 512 bytes respectively), and read-only status bytes of its test
// checkers. This module decodes the bus requests addressed to CHIP_ID:
//   addr 0 .. NCTRL-1            control bytes (read/write, reset to 0)
//   addr 0x40 .. 0x40+NSTAT-1    status bytes (read only)
//   addr 0x8000 + k*RAM_BYTES+o  byte o of block RAM k
// Any other register address reads as 0. A read is answered one clock after
// its request (rsp.valid with the byte); rsp is all-zero otherwise so that
// the responses of all chips can be ORed together. The register and RAM
// sizes follow the card's description; the address map is this design's.
module fpga_regs
  import stc_pkg::*;
#(
  parameter logic [3:0] CHIP_ID   = 4'd1,
  parameter int         NCTRL     = 4,
  parameter int         NSTAT     = 4,
  parameter int         NRAM      = 1,
  parameter int         RAM_BYTES = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cbus_req_t            req,
  output cbus_rsp_t            rsp,
  output logic [8*NCTRL-1:0]   ctrl,
  input  logic [8*NSTAT-1:0]   stat
);

  localparam int RAW = $clog2(RAM_BYTES);
  localparam int RIW = (NRAM > 1) ? $clog2(NRAM) : 1;

  logic sel, is_ram;
  assign sel    = (req.target == CHIP_ID);
  assign is_ram = req.addr[15];

  logic [14:0]    ram_off;
  logic [RIW-1:0] ram_idx;
  logic           ram_hit;
  assign ram_off = req.addr[14:0];
  assign ram_idx = RIW'(ram_off >> RAW);
  assign ram_hit = sel && is_ram && (32'(ram_off >> RAW) < NRAM);

  // Block RAMs
  logic [7:0] ram_q [NRAM];
  for (genvar k = 0; k < NRAM; k++) begin : g_ram
    byte_ram #(.DEPTH(RAM_BYTES)) u_ram (
      .clk   (clk),
      .we    (ram_hit && req.wr && (ram_idx == RIW'(k))),
      .addr  (ram_off[RAW-1:0]),
      .wdata (req.wdata),
      .rdata (ram_q[k])
    );
  end

  // Control bytes and register read data
  logic [7:0] reg_rd;
  always_comb begin
    reg_rd = '0;
    for (int i = 0; i < NCTRL; i++)
      if (req.addr == 16'(i)) reg_rd = ctrl[8*i +: 8];
    for (int i = 0; i < NSTAT; i++)
      if (req.addr == STAT_BASE + 16'(i)) reg_rd = stat[8*i +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0;
    end else if (sel && !is_ram && req.wr) begin
      for (int i = 0; i < NCTRL; i++)
        if (req.addr == 16'(i)) ctrl[8*i +: 8] <= req.wdata;
    end
  end

  // Response one clock after a read request
  logic           rd_q, rd_ram_q;
  logic [RIW-1:0] idx_q;
  logic [7:0]     reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q     <= 1'b0;
      rd_ram_q <= 1'b0;
      idx_q    <= '0;
      reg_q    <= '0;
    end else begin
      rd_q     <= sel && req.rd;
      rd_ram_q <= ram_hit;
      idx_q    <= ram_idx;
      reg_q    <= reg_rd;
    end
  end

  always_comb begin
    rsp = '0;
    if (rd_q) begin
      rsp.valid = 1'b1;
      rsp.rdata = rd_ram_q ? ram_q[idx_q] : reg_q;
    end
  end

  // A chip must not be asked to read and write in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(req.wr && req.rd));

endmodule
