// PRBS35 parallel data generator.
//
// Produces W consecutive bits of the 35-bit pseudo random sequence every
// enabled clock: bit 0 of dout is the earliest bit in time, bit W-1 the
// latest. Internally the 35-bit shift register is advanced W steps per clock
// by unrolling the feedback W times, so the aggregate line rate is W bits per
// clock. The generator is the test data source of the card: it replaces the
// card inputs of a DEMUX chip and drives the chip-to-chip links.
//
// Interface: en advances the sequence; dout is registered and changes one
// clock after en. After reset the register holds SEED (must be nonzero).
// The register length of 35 bits follows the card's description; the
// feedback taps and the W-bit-per-clock arrangement are this design's choice.
module prbs35_gen
  import stc_pkg::*;
#(
  parameter int                    W    = 32,
  parameter logic [PRBS_LEN-1:0]   SEED = 35'h1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] dout
);

  logic [PRBS_LEN-1:0] state;
  logic [PRBS_LEN-1:0] nstate;
  logic [W-1:0]        nbits;

  always_comb begin
    nstate = state;
    for (int i = 0; i < W; i++) begin
      nbits[i] = prbs35_fb(nstate);
      nstate   = {nstate[PRBS_LEN-2:0], nbits[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      dout  <= '0;
    end else if (en) begin
      state <= nstate;
      dout  <= nbits;
    end
  end

  initial assert (SEED != '0) else $error("prbs35_gen: SEED must be nonzero");

endmodule
