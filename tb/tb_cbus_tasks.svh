// Register-bus access tasks shared by the chip-level testbenches. The
// including module provides clk, bus_req (cbus_req_t), bus_rsp (cbus_rsp_t),
// and the checks/failures counters. Stimulus is applied 1 time unit after a
// clock edge with blocking assignments.

task automatic check(input bit cond, input string msg);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask

task automatic bus_wr(input logic [3:0] t, input logic [15:0] a, input logic [7:0] d);
  bus_req = '{wr: 1'b1, rd: 1'b0, target: t, addr: a, wdata: d};
  @(posedge clk);
  #1 bus_req = '0;
endtask

task automatic bus_rd(input logic [3:0] t, input logic [15:0] a, output logic [7:0] d);
  bus_req = '{wr: 1'b0, rd: 1'b1, target: t, addr: a, wdata: 8'h00};
  @(posedge clk);
  #1 bus_req = '0;
  check(bus_rsp.valid, "read answered after one clock");
  d = bus_rsp.rdata;
endtask

// Reads a 4-byte checker status {errors, flags} at a status address.
task automatic read_chk(input logic [3:0] t, input logic [15:0] a,
                        output logic [7:0] flags, output int errors);
  logic [7:0] b0, b1, b2, b3;
  bus_rd(t, a, b0);
  bus_rd(t, a + 16'd1, b1);
  bus_rd(t, a + 16'd2, b2);
  bus_rd(t, a + 16'd3, b3);
  flags  = b0;
  errors = int'({b3, b2, b1});
endtask
