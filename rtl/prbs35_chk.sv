// PRBS35 receive-side error checker ("predict generator").
//
// A duplicate of the 35-bit generator that seeds itself from the data it
// receives: after start, the first 35 received bits are shifted straight into
// the register (feedback open). Once 35 bits are in, the feedback is closed
// and the register predicts every following bit; each predicted bit is
// compared with the received one and the mismatches are counted. Counting
// runs for WINDOW clock cycles from the moment of lock (125000 cycles is
// 1 ms at the 125 MHz card clock); the count is then frozen with done set,
// until the next start pulse. That procedure follows the card's description;
// the saturating 24-bit count and the start pulse are this design's choice.
//
// Interface: din carries W consecutive bits (bit 0 earliest) when valid is
// high. start restarts seeding and clears the count. stat is registered.
module prbs35_chk
  import stc_pkg::*;
#(
  parameter int W      = 16,
  parameter int WINDOW = 125000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         valid,
  input  logic [W-1:0] din,
  output chk_stat_t    stat
);

  localparam int NLW = $clog2(PRBS_LEN + W + 1);
  localparam int CW  = $clog2(WINDOW + 1);

  logic [PRBS_LEN-1:0] state;
  logic [NLW-1:0]      nloaded;
  logic [CW-1:0]       cycles;
  logic                running;

  // Next state when loading (feedback open) and when predicting.
  logic [PRBS_LEN-1:0] load_state, pred_state;
  logic [W-1:0]        mism;
  logic [$clog2(W+1)-1:0] nerr;

  always_comb begin
    load_state = state;
    pred_state = state;
    nerr       = '0;
    for (int i = 0; i < W; i++) begin
      logic p;
      load_state = {load_state[PRBS_LEN-2:0], din[i]};
      p          = prbs35_fb(pred_state);
      mism[i]    = p ^ din[i];
      pred_state = {pred_state[PRBS_LEN-2:0], p};
      nerr       = nerr + mism[i];
    end
  end

  logic [24:0] sum;
  assign sum = {1'b0, stat.errors} + 25'(nerr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      nloaded <= '0;
      cycles  <= '0;
      running <= 1'b0;
      stat    <= '0;
    end else if (start) begin
      nloaded <= '0;
      cycles  <= '0;
      running <= 1'b1;
      stat    <= '0;
    end else if (running) begin
      if (!stat.locked) begin
        if (valid) begin
          state <= load_state;
          if (32'(nloaded) + W >= PRBS_LEN) stat.locked <= 1'b1;
          else nloaded <= nloaded + NLW'(W);
        end
      end else begin
        if (valid) begin
          state       <= pred_state;
          stat.errors <= sum[24] ? '1 : sum[23:0];
        end
        if (32'(cycles) == WINDOW - 1) begin
          running   <= 1'b0;
          stat.done <= 1'b1;
        end
        cycles <= cycles + 1'b1;
      end
    end
  end

endmodule
