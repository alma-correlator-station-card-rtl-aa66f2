// Byte-wide single-port block RAM, one clock read latency.
//
// Models one FPGA-internal block RAM as the card's microprocessor sees it
// (256-byte RAMs in the DEMUX and ADDRESS chips, 512-byte RAMs in the MUX
// chips). A write stores wdata at addr on the clock edge; a read returns
// the byte at addr on rdata after the next edge (write-first is not needed:
// the bus never reads and writes in the same cycle). Written as an array so
// synthesis maps it onto a block RAM.
module byte_ram #(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
