// Testbench for upif_cpld: drives the microprocessor port and models nine
// register-bus chips (a byte array per chip, answering reads one clock
// after the request). Checks the two CPLD registers with random data, that
// FPGA writes and reads are forwarded to the right chip with the right
// address and data, that local accesses are not forwarded, and the read
// latencies (1 clock for the CPLD, 3 for a forwarded read).
module tb_upif_cpld;
  import stc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NTGT = 10;
  logic [19:0] up_addr = '0;
  logic [7:0]  up_wdata = '0, up_rdata, reg0, reg1;
  logic        up_wr = 0, up_rd = 0, up_rvalid;
  cbus_req_t   bus_req;
  cbus_rsp_t   bus_rsp [NTGT];

  upif_cpld #(.NTGT(NTGT)) dut (.clk, .rst_n, .up_addr, .up_wdata, .up_wr, .up_rd,
    .up_rdata, .up_rvalid, .bus_req, .bus_rsp, .reg0, .reg1);

  // chip models: 64 bytes each
  logic [7:0] mem [NTGT][64];
  int fwd_count = 0;
  assign bus_rsp[0] = '0;
  for (genvar t = 1; t < NTGT; t++) begin : g_chip
    always_ff @(posedge clk) begin
      bus_rsp[t] <= '0;
      if (bus_req.target == 4'(t)) begin
        if (bus_req.wr) mem[t][bus_req.addr[5:0]] <= bus_req.wdata;
        if (bus_req.rd) bus_rsp[t] <= '{valid: 1'b1, rdata: mem[t][bus_req.addr[5:0]]};
      end
    end
  end
  always_ff @(posedge clk) if (bus_req.wr || bus_req.rd) fwd_count++;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [19:0] a, input logic [7:0] d);
    up_addr = a; up_wdata = d; up_wr = 1;
    @(posedge clk);
    #1 up_wr = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic rd(input logic [19:0] a, output logic [7:0] d, output int lat);
    up_addr = a; up_rd = 1;
    @(posedge clk);
    #1 up_rd = 0;
    lat = 1;
    while (!up_rvalid && lat < 10) begin @(posedge clk); #1; lat++; end
    d = up_rdata;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref0, ref1, d;
    logic [7:0] ref_mem [NTGT][64];
    int lat, n_before;
    for (int t = 0; t < NTGT; t++) for (int a = 0; a < 64; a++) begin mem[t][a] = 0; ref_mem[t][a] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;

    // TEST0-style loop on the two CPLD registers
    for (int n = 0; n < 20; n++) begin
      ref0 = 8'($urandom); ref1 = 8'($urandom);
      n_before = fwd_count;
      wr(20'h0_0000, ref0);
      wr(20'h0_0001, ref1);
      check(fwd_count == n_before, "CPLD writes are not forwarded");
      check(reg0 == ref0 && reg1 == ref1, "register outputs");
      rd(20'h0_0000, d, lat);
      check(d == ref0 && lat == 1, $sformatf("reg0 read %h lat %0d", d, lat));
      rd(20'h0_0001, d, lat);
      check(d == ref1 && lat == 1, $sformatf("reg1 read %h lat %0d", d, lat));
    end

    // forwarded accesses to every FPGA
    for (int t = 1; t < NTGT; t++)
      for (int a = 0; a < 64; a++) begin
        logic [7:0] v;
        v = 8'($urandom);
        wr({4'(t), 16'(a)}, v);
        ref_mem[t][a] = v;
      end
    for (int t = 1; t < NTGT; t++)
      for (int a = 0; a < 64; a += 3) begin
        rd({4'(t), 16'(a)}, d, lat);
        check(d == ref_mem[t][a] && lat == 3, $sformatf("chip %0d addr %0d read %h exp %h lat %0d", t, a, d, ref_mem[t][a], lat));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
