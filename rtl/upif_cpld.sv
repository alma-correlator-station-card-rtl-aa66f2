// Microprocessor interface port of the station card (the card's CPLD).
//
// The card's only control path: a byte-wide port that the test fixture's
// microprocessor uses to write and read every register and block RAM of the
// card. The CPLD holds two 8-bit read/write registers of its own (local
// addresses 0 and 1 of chip 0) and forwards every other access, registered,
// onto the internal register bus shared by the nine FPGAs. The responses of
// all chips are ORed and returned on up_rdata with up_rvalid.
//
// Port: up_addr[19:16] is the chip number (0 CPLD, 1-4 DEMUX, 5 ADDRESS,
// 6-9 MUX), up_addr[15:0] the address inside it. up_wr or up_rd is a one
// clock strobe. A read of a CPLD register is answered one clock later; a
// forwarded read three clocks later (one clock to the bus, one in the chip,
// one back). The two registers and the forwarding to the FPGAs follow the
// card's description; widths, address layout and latencies are this design's.
module upif_cpld
  import stc_pkg::*;
#(
  parameter int NTGT = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  // microprocessor port
  input  logic [19:0]  up_addr,
  input  logic [7:0]   up_wdata,
  input  logic         up_wr,
  input  logic         up_rd,
  output logic [7:0]   up_rdata,
  output logic         up_rvalid,
  // internal register bus
  output cbus_req_t    bus_req,
  input  cbus_rsp_t    bus_rsp [NTGT],
  // the two CPLD registers, also brought out
  output logic [7:0]   reg0,
  output logic [7:0]   reg1
);

  logic [3:0]  tgt;
  logic [15:0] loc;
  logic        local_acc;
  assign tgt       = up_addr[19:16];
  assign loc       = up_addr[15:0];
  assign local_acc = (tgt == TGT_CPLD);

  // Local registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg0 <= '0;
      reg1 <= '0;
    end else if (local_acc && up_wr) begin
      if (loc == 16'd0) reg0 <= up_wdata;
      if (loc == 16'd1) reg1 <= up_wdata;
    end
  end

  // Forwarded request, registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_req <= '0;
    end else begin
      bus_req.wr     <= up_wr && !local_acc;
      bus_req.rd     <= up_rd && !local_acc;
      bus_req.target <= tgt;
      bus_req.addr   <= loc;
      bus_req.wdata  <= up_wdata;
    end
  end

  // Combine responses
  cbus_rsp_t rsp_or;
  always_comb begin
    rsp_or = '0;
    for (int i = 0; i < NTGT; i++) rsp_or = rsp_or | bus_rsp[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_rvalid <= 1'b0;
      up_rdata  <= '0;
    end else if (local_acc && up_rd) begin
      up_rvalid <= 1'b1;
      up_rdata  <= (loc == 16'd0) ? reg0 : (loc == 16'd1) ? reg1 : 8'h00;
    end else begin
      up_rvalid <= rsp_or.valid;
      up_rdata  <= rsp_or.rdata;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(up_wr && up_rd));

endmodule
