// Testbench for fpga_regs: drives the register bus directly.
// Writes random bytes to every control byte and to every byte of three
// block RAMs, reads them back and compares with a testbench copy; reads the
// status bytes; checks the one-clock read latency, that the control outputs
// follow the writes, that requests to another chip number are ignored and
// that the module answers nothing when not read.
module tb_fpga_regs;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [3:0] ID = 4'd7;
  localparam int NCTRL = 4, NSTAT = 3, NRAM = 3, RB = 16;

  cbus_req_t req = '0;
  cbus_rsp_t rsp;
  logic [8*NCTRL-1:0] ctrl;
  logic [8*NSTAT-1:0] stat = 24'hC3_5A_81;

  fpga_regs #(.CHIP_ID(ID), .NCTRL(NCTRL), .NSTAT(NSTAT), .NRAM(NRAM), .RAM_BYTES(RB))
    dut (.clk, .rst_n, .req, .rsp, .ctrl, .stat);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [3:0] t, input logic [15:0] a, input logic [7:0] d);
    req = '{wr: 1'b1, rd: 1'b0, target: t, addr: a, wdata: d};
    @(posedge clk);
    #1 req = '0;
  endtask

  // Read with the latency checked: rsp.valid exactly one clock after.
  task automatic rd(input logic [3:0] t, input logic [15:0] a, output logic [7:0] d, output bit ok);
    req = '{wr: 1'b0, rd: 1'b1, target: t, addr: a, wdata: 8'h00};
    @(posedge clk);
    #1 req = '0;
    ok = rsp.valid;
    d  = rsp.rdata;
    @(posedge clk);
    #1;
    if (rsp.valid) ok = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ctrl_ref [NCTRL];
    logic [7:0] ram_ref [NRAM][RB];
    logic [7:0] d;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(ctrl == '0, "control resets to zero");

    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < NCTRL; i++) begin
        ctrl_ref[i] = 8'($urandom);
        wr(ID, 16'(i), ctrl_ref[i]);
      end
      for (int k = 0; k < NRAM; k++)
        for (int o = 0; o < RB; o++) begin
          ram_ref[k][o] = 8'($urandom);
          wr(ID, RAM_BASE + 16'(k * RB + o), ram_ref[k][o]);
        end
      // writes to another chip must change nothing
      wr(4'd3, 16'd0, ~ctrl_ref[0]);
      wr(4'd3, RAM_BASE, ~ram_ref[0][0]);
      #1;
      for (int i = 0; i < NCTRL; i++)
        check(ctrl[8*i +: 8] == ctrl_ref[i], $sformatf("ctrl output byte %0d", i));
      for (int i = 0; i < NCTRL; i++) begin
        rd(ID, 16'(i), d, ok);
        check(ok && d == ctrl_ref[i], $sformatf("ctrl readback byte %0d got %h", i, d));
      end
      for (int k = 0; k < NRAM; k++)
        for (int o = 0; o < RB; o++) begin
          rd(ID, RAM_BASE + 16'(k * RB + o), d, ok);
          check(ok && d == ram_ref[k][o], $sformatf("ram %0d byte %0d got %h exp %h", k, o, d, ram_ref[k][o]));
        end
    end
    for (int i = 0; i < NSTAT; i++) begin
      rd(ID, STAT_BASE + 16'(i), d, ok);
      check(ok && d == stat[8*i +: 8], $sformatf("status byte %0d", i));
    end
    rd(ID, 16'h0020, d, ok);
    check(ok && d == 8'h00, "unmapped register reads zero");
    // a read to another chip: no response
    req = '{wr: 1'b0, rd: 1'b1, target: 4'd2, addr: 16'd0, wdata: 8'h00};
    @(posedge clk);
    #1 req = '0;
    #1 check(!rsp.valid && rsp.rdata == 0, "other chip's read not answered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
