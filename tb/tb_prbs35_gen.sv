// Testbench for prbs35_gen: compares the generator's W-bit words, clock by
// clock, with a bit-serial reference of the recurrence b[n] = b[n-33] ^
// b[n-35] kept in the testbench, for a 32-bit and a 7-bit wide generator.
// It also checks that en=0 holds the output and that the output changes on
// every enabled clock (W new bits per clock).
module tb_prbs35_gen;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  localparam logic [34:0] SEED = 35'h5_A5A5_1234;
  logic [31:0] d32;
  logic [6:0]  d7;

  prbs35_gen #(.W(32), .SEED(SEED)) dut32 (.clk, .rst_n, .en, .dout(d32));
  prbs35_gen #(.W(7),  .SEED(SEED)) dut7  (.clk, .rst_n, .en, .dout(d7));

  int checks = 0, failures = 0;

  // bit-serial reference histories, oldest bit first
  bit hist32 [$];
  bit hist7  [$];

  function automatic void seed_hist(ref bit h [$]);
    h.delete();
    for (int k = 34; k >= 0; k--) h.push_back(SEED[k]);
  endfunction

  function automatic bit next_bit(ref bit h [$]);
    bit b;
    b = h[h.size()-33] ^ h[h.size()-35];
    h.push_back(b);
    return b;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e32, prev32;
    logic [6:0]  e7;
    seed_hist(hist32);
    seed_hist(hist7);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 3000; c++) begin
      en <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        for (int i = 0; i < 32; i++) e32[i] = next_bit(hist32);
        for (int i = 0; i < 7; i++)  e7[i]  = next_bit(hist7);
        checks++;
        if (d32 !== e32) begin
          failures++;
          if (failures < 10) $display("W=32 mismatch cycle %0d: got %h exp %h", c, d32, e32);
        end
        checks++;
        if (d7 !== e7) begin
          failures++;
          if (failures < 10) $display("W=7 mismatch cycle %0d: got %h exp %h", c, d7, e7);
        end
        prev32 = d32;
      end else if (c > 0) begin
        checks++;
        if (d32 !== prev32) begin
          failures++;
          $display("output changed while en=0");
        end
      end
      if (hist32.size() > 4000) void'(hist32.pop_front());
      while (hist7.size() > 1000) void'(hist7.pop_front());
      // keep the loop's popping from breaking the tap positions
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
