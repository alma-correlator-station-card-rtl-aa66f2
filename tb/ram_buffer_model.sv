// Behavioural model of one card RAM buffer: 2**AW words x 64 bits, built on
// the card from four 18-bit-wide synchronous dual-port SRAM chips (16 bits
// of each used). Testbench use only; the chips themselves are not part of
// the logic design. One port writes (wr_en, wr_addr, wdata sampled on the
// clock edge), the other reads in pipelined mode: rdata shows the word at
// rd_addr LAT clocks after the clock in which rd_en is high, and holds it
// until the next read.
module ram_buffer_model #(
  parameter int AW  = 16,
  parameter int LAT = 2
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [63:0]   wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]   rdata
);
  logic [63:0] mem [2**AW];
  logic [63:0] pipe [LAT];
  logic        vpipe [LAT];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wdata;
    vpipe[0] <= rd_en;
    if (rd_en) pipe[0] <= mem[rd_addr];
    for (int i = 1; i < LAT; i++) begin
      vpipe[i] <= vpipe[i-1];
      if (vpipe[i-1]) pipe[i] <= pipe[i-1];
    end
  end
  assign rdata = pipe[LAT-1];
endmodule
