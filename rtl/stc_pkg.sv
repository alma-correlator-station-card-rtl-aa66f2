// Shared types and constants of the station card.
//
// The card logic talks to its microprocessor through one CPLD, which forwards
// each byte access to the FPGA chip it addresses over an internal register
// bus. That bus is the request/response pair below: a request carries a
// one-cycle write or read strobe, a 4-bit chip number (target), a 16-bit
// address inside that chip and a write byte; the addressed chip answers a
// read one clock later with a valid strobe and the byte. The widths and the
// chip numbering are this design's own choice.
//
// PRBS35 is the 35-bit pseudo random sequence used on all test paths. Its
// feedback taps (x^35 + x^33 + 1, a maximal-length polynomial) are also this
// design's choice: only the register length of 35 bits is given.
package stc_pkg;

  // Chip numbers on the internal register bus.
  localparam logic [3:0] TGT_CPLD    = 4'd0;
  localparam logic [3:0] TGT_DEMUX0  = 4'd1;  // DEMUX chips 0..3 are 1..4
  localparam logic [3:0] TGT_ADDRESS = 4'd5;
  localparam logic [3:0] TGT_MUX0    = 4'd6;  // MUX chips 0..3 are 6..9

  // Local address map inside a chip: bit 15 clear selects registers, bit 15
  // set selects the block RAM window.
  localparam logic [15:0] STAT_BASE = 16'h0040;  // read-only status bytes
  localparam logic [15:0] RAM_BASE  = 16'h8000;

  typedef struct packed {
    logic        wr;
    logic        rd;
    logic [3:0]  target;
    logic [15:0] addr;
    logic [7:0]  wdata;
  } cbus_req_t;

  typedef struct packed {
    logic       valid;
    logic [7:0] rdata;
  } cbus_rsp_t;

  localparam int PRBS_LEN = 35;

  // One step of the PRBS35 shift register. s[0] is the newest bit, s[k] the
  // bit k+1 steps back; the next bit is b[n-33] xor b[n-35].
  function automatic logic prbs35_fb(input logic [PRBS_LEN-1:0] s);
    return s[32] ^ s[34];
  endfunction

  // Error checker result as seen on the register bus.
  typedef struct packed {
    logic        locked;   // seed loaded, feedback closed
    logic        done;     // the counting window has ended
    logic [23:0] errors;   // bit errors counted in the window (saturating)
  } chk_stat_t;

endpackage
