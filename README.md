# Station card logic for a radio-astronomy correlator

A correlator station card sits between the digitised antenna data and the
correlator chips. It takes in a continuous stream of samples and cuts it
into fixed-length blocks, 1 ms each, for the next stage. To do this it
writes the data into large interstage RAM buffers and reads it back one block
at a time. The card has four such slices. Each slice has:

```
 32 input lines ──► DEMUX FPGA ──64──► RAM buffer (64K x 64) ──64──► MUX FPGA ──► 32 output lines
                        ▲                ▲          ▲                    ▲
                        │           write addr   read addr               │
                        └──────────── ADDRESS FPGA (shared) ─────────────┘
```

One CPLD gives a microprocessor access to every register and internal
RAM on the card. Test logic is built into every chip: pseudo random
sources, self-seeding error checkers and read/write registers. With it the
card can check itself through that one port.

This repository holds synthesizable SystemVerilog for the logic of the
card: the CPLD, the three FPGA designs and their test logic. It also holds
self-checking testbenches. The RAM chips, the clock buffer and the
delay-locked loops are bought parts. They are not designed here: the RAM
ports appear at the top level, and the design uses a single ideal clock.

## Data path and word timing

Everything runs on one 125 MHz clock. The ADDRESS chip sets the word timing
for the whole card. Its `word_phase` output toggles on every clock:

* **DEMUX (32 → 64).** The input word sampled while `word_phase`=0 becomes
  the low half of a RAM word. The word sampled while `word_phase`=1 becomes
  the high half. The 64-bit word appears on `ram_wdata` one clock later and
  stays there for two clocks. The buffers therefore run at one 64-bit word
  per two clocks (62.5 Mword/s), the same bit rate as the input.
* **ADDRESS.** On each `word_phase`=1 clock it sends a write strobe and
  address to all four buffers, followed by a read strobe and address. The
  strobes and addresses are registered, so they line up with `ram_wdata`.
* **MUX (64 → 32).** The read data comes back `RAM_LAT` clocks after the
  read strobe (2 clocks: the RAMs run in pipelined mode). The MUX delays the
  strobe and packet-start marker to match. It then sends out the low half
  and then the high half on consecutive clocks. `dout_valid` stays high
  without gaps while packets stream.

So each output line carries the same 32-bit word sequence that entered the
matching DEMUX. The words come out in 1 ms packets, and `dout_sop` marks
the first word of each packet.

## Packets and the buffer address sequence

A packet is 1 ms of data: 62 500 words of 64 bits at 62.5 Mword/s. A
buffer holds 65 536 words, so one packet fits, with 3 036 words to spare.
The buffers are dual-ported, so the sequencer writes and reads at the same
time:

* Write addresses run through the buffer as a circular buffer (mod
  2^`AW`), one per word, while control bit `run` is set.
* A packet is ready once its last word has been written. Reading then
  starts at the packet's first address and runs in order. Reading and
  writing go at the same rate, so the read address stays exactly one packet
  (62 500 words) behind the write address. The buffer can never overrun.
* If `run` is cleared in the middle of a packet, that packet is dropped and
  the write address goes back to the packet's start. Any complete packets
  still in the buffer are read out.

The real card reorders the data ("re-blocking") with more complex address
sequences, perhaps driven by tables in the ADDRESS chip's six internal
RAMs. Those sequences are not known, so this sequencer reads each packet
in the order it was written. **This is the main gap in this
implementation.** Everything else in the data path is in place: the
interface, the timing and the packet framing. The sequence itself is
local to the `always_ff` block in `address_fpga.sv`.

## The PRBS35 test system

All high-speed paths are tested with one kind of 35-bit pseudo random
sequence (PRBS35). This design uses the polynomial x^35 + x^33 + 1, a
maximal-length polynomial with a period of 2^35 − 1 bits.

* **`prbs35_gen`** produces W consecutive sequence bits per clock, with bit
  0 being the earliest. It does this by unrolling the shift register W times
  inside one clock.
* **`prbs35_chk`** is the "predict generator". After `start`, it shifts the
  first 35 received bits straight into its register, with the feedback
  open. It then closes the feedback and predicts each following bit. Every
  received bit that differs from the prediction is counted. The checker
  needs no known seed and no alignment to the transmitter: any 35 correct
  consecutive bits lock it. A bit error inside those 35 seed bits gives a
  huge error count, and the remedy is to restart. Counting lasts `WINDOW`
  clocks from lock: 125 000 clocks, which is 1 ms. The count then freezes
  and the `done` flag goes high. The count is 24 bits wide and saturates.

The test system uses them in three places:

| Path | Source | Checker | Start |
|---|---|---|---|
| DEMUX ↔ DEMUX, 16-bit links (pairs 0/1, 2/3) | 16-bit generator in each DEMUX | 16-bit checker in the partner | DEMUX control bit 1 |
| MUX ↔ MUX, 16-bit links (pairs 0/1, 2/3) | 16-bit generator in each MUX | 16-bit checker in the partner | MUX control bit 1 |
| Whole card: input → DEMUX → RAM → MUX | 32-bit generator replacing the DEMUX inputs (control bit 0) | 32-bit checker on the MUX outputs, advancing only on valid words | MUX control bit 0 |

A checker starts on the rising edge of its control bit. To run another
count, clear the bit and set it again.

## Microprocessor port and register map

Port (`station_card` top): `up_addr[19:0]`, `up_wdata[7:0]`, one-clock
strobes `up_wr` and `up_rd`, and read data `up_rdata` with `up_rvalid`.
Reads are answered one clock later for a CPLD register and three clocks
later for an FPGA. Send one access at a time and wait for `up_rvalid`
after a read. Assertions flag a read and a write issued in the same clock.

`up_addr[19:16]` selects the chip:

| Chip | 0 | 1–4 | 5 | 6–9 |
|---|---|---|---|---|
| | CPLD | DEMUX 0–3 | ADDRESS | MUX 0–3 |

`up_addr[15:0]` is the address inside that chip:

| Chip | Control (read/write, reset 0) | Status (read only, from 0x40) | Block RAMs (from 0x8000) |
|---|---|---|---|
| CPLD | 0, 1: two 8-bit registers | – | – |
| DEMUX | 0–3; bit 0 PRBS source, bit 1 link check | 0x40 flags {locked, done}, 0x41–0x43 link errors | 1 × 256 B |
| ADDRESS | 0–1; bit 0 run | 0x40–0x41 packets written, 0x42–0x43 packets read | 6 × 256 B |
| MUX | 0–3; bit 0 data check, bit 1 link check | 0x40–0x43 data checker, 0x44–0x47 link checker (flags, then errors LSB first) | 8 × 512 B |

Block RAM k, byte o is at 0x8000 + k·size + o. The other control bits are
free read/write storage. The CPLD forwards each access over an internal
register bus (`cbus_req_t`/`cbus_rsp_t` in `stc_pkg.sv`). The addressed
chip answers a read one clock later, and all responses are ORed together.

A self-test in the style of the card's test programs:
1. Write random bytes to every register and block RAM, then read them back.
2. Set bit 1 in all DEMUX and MUX chips, wait 1 ms, and read the link
   status. A good result is `0xC0` (locked and done) with zero errors.
3. Set DEMUX bit 0 and ADDRESS `run`. Wait one packet time (1 ms) plus
   margin, so that PRBS data fills the buffers and reaches the outputs. Then
   set MUX bit 0, wait 1 ms and read the data status.

## Files

| File | Contents |
|---|---|
| `rtl/stc_pkg.sv` | register bus types, chip numbers, address map, PRBS35 feedback, checker status type |
| `rtl/station_card.sv` | top: CPLD, 4 DEMUX, ADDRESS, 4 MUX, link pairing |
| `rtl/upif_cpld.sv` | microprocessor port, CPLD registers, bus forwarding |
| `rtl/demux_fpga.sv`, `rtl/address_fpga.sv`, `rtl/mux_fpga.sv` | the three FPGA designs |
| `rtl/prbs35_gen.sv`, `rtl/prbs35_chk.sv` | test generator and predict checker |
| `rtl/fpga_regs.sv`, `rtl/byte_ram.sv` | per-chip register/RAM decoder and block RAM |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_station_card` is end to end |
| `tb/ram_buffer_model.sv` | behavioural model of one 64K × 64 RAM buffer (testbench only) |
| `tb/tb_cbus_tasks.svh` | register-bus tasks shared by the chip testbenches |

Top parameters: `AW` = 16 (64K-word buffers), `PACKET` = 62500 words,
`WINDOW` = 125000 clocks, `RAM_LAT` = 2.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/stc_pkg.sv tb/tb_station_card.sv --top-module tb_station_card
./obj_dir/Vtb_station_card
```

Swap in any other `tb/tb_<module>.sv` to test one block. The chip-level
testbenches use small sizes: 16-word buffers, 10-word packets and windows
of a few hundred clocks. `tb_station_card` runs the whole card at its real
sizes and finishes in well under a minute. It covers 64K-word buffers,
1 ms packets and 1 ms windows, some 600 000 clocks in all. It runs all the
register and RAM loops and all eight link checks. Then comes a normal-mode
run, in which every RAM write is checked against the inputs and every
output word against what was written. Then come the switch to PRBS sources
and the four 1 ms data checks. Last, one bit is flipped in a word still
waiting in buffer 0, and a rerun of that slice's data checker must count
exactly one error. Each of these events is counted, and the
testbench fails if any of them never happens.

## Where this design follows its source and where it does not

Taken from the card's description: the chip partitioning (one CPLD, four
DEMUX, one ADDRESS, four MUX); 32 → 64 → 32 lines per slice; four 64K × 64
buffers; 1 ms packets; the 125 MHz clock; the two 8-bit CPLD registers; the
register sizes (4/2/4 bytes); the block RAM counts and sizes (1 × 256,
6 × 256, 8 × 512 bytes); the 16-bit links between DEMUX pairs and between
MUX pairs; the 35-bit generators; the self-seeding predict checker; and the
1 ms error count.

This design's own choices: the PRBS polynomial; the port protocol, the
address map and the control bits; the half-word order; the slice wiring
(DEMUX i → buffer i → MUX i) and the link pairing; the RAM read latency;
the packet framing signals; the linear address sequence; and reset
behaviour (active-low asynchronous, everything idle).

Not modelled:
* the real re-blocking address sequence;
* any use of the block RAMs beyond microprocessor read/write;
* any normal-mode traffic on the 16-bit links;
* clock distribution and skew.

The source puts the DEMUX generators' pattern repeat time at about 4.5 s.
That does not match a 16- or 32-bit-wide PRBS35 stream at 125 MHz, which
repeats after 17 s or 8.6 s. The figure is not used to size anything here.
