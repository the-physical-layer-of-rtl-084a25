# BIC-LAN physical layer: ATM cells over Fibre Channel parts

This is the transmission convergence (TC) sublayer of a station on a
Buffer Insertion Cell-based LAN (BIC-LAN). The network is a slotted ring
that carries fixed-length ATM cells. The link hardware is Fibre Channel:
a TAXI-class 10-bit serializer/deserializer and optical modules running
at 1 Gbaud. Each direction carries 100 Mbyte/s, i.e. 1.887 million
53-byte cells per second.

The logic in this repository sits between the station's ATM layer and the
Fibre Channel adapter. It does four jobs:

* **Transmit.** Take cells from the ATM layer, add the header checksum
  (HEC), code every byte into a 10-bit character, and fill every gap with
  an *idle cell*.
* **Find cell boundaries.** Recover them in the received character stream,
  using the idle cells as markers.
* **Check headers.** Correct single-bit header errors. Throw away cells with
  more than one header error.
* **Receive.** Remove the idle cells and hand user cells to the ATM layer.

Two ideas shape the design:

1. **The 4B1C code instead of 8B/10B for user data.** 8B/10B can turn one
   line-bit error into two wrong data bits, which would defeat single-error
   correction of the header. In 4B1C, each 4-bit nibble is sent behind one
   complement bit, so a line error stays a single data-bit error. Runs on the
   line are still at most five bits long, as Fibre Channel requires.
2. **Idle cells built from the K28.5 comma character.** They mark cell
   boundaries and separate "datagrams" (bursts of user cells). They also
   absorb rate differences between neighbouring stations. The ATM layer uses
   them as free slots. Because an idle cell is unmistakable, the receiver can
   lock onto cell boundaries within a single idle cell.

## Line format

Each character is 10 bits. `char[9]` is sent first (Fibre Channel bit `a`).

| character | code | note |
|---|---|---|
| user byte `d` | `{~d[7], d[7:4], ~d[3], d[3:0]}` | 4B1C: complement bits at code positions 1 and 6 |
| K28.5 | `0011111010` | negative-disparity form, always this one |
| CK28.5 | `0011101010` | K28.5 with code bit 6 inverted |

Neither K28.5 nor CK28.5 obeys the 4B1C rule at code positions 1 and 2, so
no user byte can look like either of them.

A cell is 53 characters long. Positions 0–3 hold the four ATM header bytes,
position 4 holds the HEC, and positions 5–52 hold the 48 payload bytes.

* **User cell.** Every byte is 4B1C-coded. The HEC is a CRC-8 over the four
  header bytes: generator x⁸+x²+x+1, MSB first, remainder XOR `0x55`. These
  are the B-ISDN values.
* **Idle cell.** `K K K K CK`, then twelve blocks of `K CK CK CK`. The CK
  in the HEC slot means four K28.5 in a row occur only at the start of an
  idle cell.

A *datagram* is the run of user cells between two idle cells. Its length is
capped at `MAX_BURST` cells. When the cap is reached, the transmitter sends
an idle cell even if the ATM layer has more cells waiting.

## Transmit path (`tc_tx`)

One character leaves per clock. `pos` counts 0..52 through the current cell.
The header and the payload come over two separate buses and are merged only
at the character multiplexer:

* **H-bus (8 bits).** The next cell's four header bytes arrive here while the
  current cell's payload is still going out.
* **P-bus (32 bits).** The current cell's payload arrives here, one word
  every fourth clock. Each word is read one clock before its first byte is
  due (`pos` 4, 8, …, 48).

All user bytes are 4B1C-coded before they are stored:

* Each P-bus word goes through four parallel coders, one per byte lane, and
  is held as four coded characters.
* Each header byte is coded as it arrives, and the HEC is coded once it is
  complete.

The output character then passes three multiplexing stages:

1. the byte lane within the coded payload word;
2. header or payload;
3. user cell or idle-cell generator.

```
pos      0..3    4     5 ........................ 44  45 ....... 52 | 0 (next cell)
tx       hdr     HEC   payload bytes 1..40            41 ......  48 | next header
p_rd     .       ^   ^   ^   ^ ... (every 4th clock, 12 per cell)   |
nci                                                   ^             |
h_rd                                                  ^ . ^ . ^ . ^ |  (H_CLKS = 2)
```

* **NCI (next-cell inquiry), at `pos` 45.** `nci` pulses while payload byte
  40 goes out, and `cell_avail` is sampled in that clock.
  * If a cell is ready and fewer than `MAX_BURST` user cells have been sent
    since the last idle cell, the next cell is a user cell. Its four header
    bytes are read one every `H_CLKS` clocks (`h_rd`), and `hec_gen` folds
    each byte into the CRC as it arrives. The header and HEC are complete by
    the end of the current cell.
  * Otherwise the next cell is an idle cell. `tx_forced_idle` pulses when the
    reason is the burst cap rather than an empty ATM queue.
* **Data handshake.** Data on `h_data` and `p_data` must be valid in the same
  clock as `h_rd` / `p_rd` (show-ahead FIFO style). `p_data[31:24]` is sent
  first.
* **Output timing.** `tx_char`, `tx_sof` and `tx_user` are registered.
  `tx_sof` is high while character 0 of a cell is on `tx_char`, and `nci`
  comes 44 clocks later.
* **Reset.** After reset the transmitter sends idle cells until the first
  NCI finds a cell. During reset it drives CK28.5, so the receiver never sees
  a fifth K28.5 in front of the first idle cell.

## Receive path (`tc_rx`, `cell_sync`, `hec_check`)

### Finding cell boundaries (`cell_sync`)

Characters arrive already aligned. The Fibre Channel receiver aligns them on
K28.5 and raises `rx_k285` on every K28.5. The state machine has three
states:

* **HUNT.** Count consecutive K28.5. The fourth one in a row fixes the cell
  boundary, and the machine moves to PRESYNC at position 4.
* **PRESYNC.** Compare the rest of the idle cell, character by character,
  with the expected pattern. Any mismatch returns to HUNT. A complete match
  enters SYNC, and the next character is position 0 of a cell.
* **SYNC.** Keep counting 53-character cells.
  * For every user cell, the receiver reports the HEC result at position 4.
  * `M_LOSS` consecutive cells with a non-zero syndrome send the machine
    back to HUNT (`sync_lost`). A new idle cell is then needed to
    resynchronize.
  * A clean cell or an idle cell clears the count.

Compared with hunting on HEC alone (as in B-ISDN), this locks within one
idle cell.

### Header check and correction (`hec_check`)

The syndrome is `CRC8(header) ^ 0x55 ^ HEC`. The CRC is linear, so each of
the 40 possible single-bit errors gives its own fixed syndrome, and these
syndromes are all different:

* A header bit `i` gives `CRC8(1<<i)`.
* A HEC bit `k` gives `1<<k`.

`hec_check` compares the syndrome against the 32 header cases (these
constants fold away at elaboration). It outputs the byte number, the bit
position and a one-hot XOR mask. A syndrome with exactly one bit set is an
error in the HEC byte itself, which needs no correction. Any other non-zero
syndrome means two or more errors, and the cell is discarded. For two
errors this detection is guaranteed, because the code's minimum distance
is 4.

### Datapath and hand-over to the ATM layer (`tc_rx`)

In SYNC, the cell moves through the receiver as follows:

* **Positions 0–3.** The four header characters are decoded into the Head
  Buffer. A K28.5 indication on position 0 marks an idle cell, which is
  counted (`ev_idle`) and dropped.
* **Position 4.** The HEC arrives. The receiver registers the cell's fate and,
  for a single header error, its byte number and bit position. It pulses
  `ev_hec_err`, `ev_corr` or `ev_drop`.
* **Positions 5–52.** Payload bytes are packed into 32-bit words.
* **First word out.** The first word appears on `p_data` with `p_valid` and
  `p_sof` in the clock after position 8 arrives. The four header bytes appear
  on `h_data` with `h_valid` in that clock and the next three, alongside the
  first four payload bytes. At this point an XOR plane, driven by the stored
  byte number and bit position, flips the bit in error as its byte passes.
* **Later words.** The remaining eleven words follow every fourth clock.
* **Discarded and idle cells.** These produce no output at all.

## Top level (`bic_phy_top`)

`bic_phy_top` holds `tc_tx` on `tx_clk` and `tc_rx` on `rx_clk`. In the real
system, `rx_clk` is the clock recovered from the line. `rst_n` is
asynchronous and shared by both halves. The ports fall into three groups:

* **ATM layer, transmit:** `atm_cell_avail`, `atm_nci`, `atm_h_rd`,
  `atm_h_data[7:0]`, `atm_p_rd`, `atm_p_data[31:0]`.
* **ATM layer, receive:** `atm_h_valid`, `atm_h_out[7:0]`, `atm_p_valid`,
  `atm_p_out[31:0]`, `atm_p_sof`.
* **Fibre Channel adapter:** `fca_tx_char[9:0]` out; `fca_rx_char[9:0]` and
  `fca_rx_k285` in.

It also has status outputs for station management: `tx_sof`, `tx_user`,
`tx_forced_idle`, `rx_state` (0 HUNT, 1 PRESYNC, 2 SYNC), and the receive
event pulses.

The Fibre Channel adapter itself is not RTL, because it is built from
commercial parts:

* TTL/PECL level translators;
* the TAXI transmitter (VCO and serializer);
* the TAXI receiver (clock-recovery PLL, K28.5 byte alignment, deserializer,
  loopback mode);
* 1 Gb/s optical transmit and receive modules;
* their link controller;
* a status/control register block reached over SPI.

The 10-bit buses to and from the adapter are top-level ports. The
testbenches stand in for the adapter with a character-level loopback channel.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NCI_BYTE` | 40 | `tc_tx`, top | payload byte after which the next cell is chosen (design source's value) |
| `H_CLKS` | 2 | `tc_tx`, top | clocks per H-bus header byte (own choice, see below) |
| `MAX_BURST` | 32 | `tc_tx`, top | user cells allowed between idle cells (own choice; the source gives no value) |
| `M_LOSS` | 7 | `cell_sync`, `tc_rx`, top | consecutive HEC-errored cells that drop delineation (own choice, the B-ISDN value) |

`tc_tx` refuses (`$error` at elaboration) any combination where the header
fetch would not finish before the end of the cell, i.e. where
`5 + NCI_BYTE + 3*H_CLKS > 52`. It also refuses a `MAX_BURST` outside
1..255.

## Where this RTL departs from, or adds to, the original design

These parts follow the original design directly:

* the 53-byte cell;
* 4B1C for user cells;
* K28.5/CK28.5 idle cells with four K28.5 and twelve `K CK CK CK` blocks;
* HUNT/PRESYNC/SYNC with a loss threshold;
* NCI after payload byte 40;
* separate H-bus and P-bus;
* the header fetched during the previous payload;
* the HEC computed while the bytes arrive;
* the header delivered with the first payload word;
* correction through an XOR plane;
* discard on more than one error.

These are this implementation's own choices:

* **Clocking.** One character-rate clock per direction. The prototype ran
  its FPGA word paths at 25 MHz. This design keeps the prototype's four
  parallel 4B1C coders and three multiplexing stages, but in the
  character-clock domain, with a P-bus word read every fourth clock. The
  exact split of the prototype's FPGA multiplexer stages is not known.
* **4B1C bit layout.** The complement bit precedes its nibble, and the high
  nibble is sent first. The source only says that CK28.5 differs from K28.5
  by making its sixth bit the complement of its seventh.
* **CK28.5 in the idle cell's HEC slot.** The source describes only the four
  header bytes and the payload of an idle cell.
* **K28.5 polarity.** A single polarity is used for K28.5; running disparity
  is not tracked.
* **HEC polynomial and coset.** The B-ISDN ones, x⁸+x²+x+1 and `0x55`.
* **H-bus rate.** The source gives 25 Mbyte/s, which is one byte every four
  clocks. At that rate, four header bytes fetched after payload byte 40 cannot
  arrive before the payload ends 8 clocks later. This design keeps the NCI
  point and fetches one byte every 2 clocks.
* **Burst cap.** At most `MAX_BURST` user cells in a row; the source only
  says the count must not exceed a threshold. `M_LOSS` = 7.
* **Error count in SYNC.** Idle cells clear the consecutive-error count.
  Cells with a corrected single error still count as errored.
* **Extra outputs.** `dec_4b1c` raises a 4B1C violation flag, and the receive
  event pulses are brought out. Both are for monitoring only.

Known gaps:

* The register map of the optical link's status/control block is not given
  by the design source, so it is not implemented.
* The medium access protocol and the ATM layer above this sublayer are not
  part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/bic_phy_pkg.sv` | constants, `char_t`, `sync_state_t`, 4B1C/CRC/idle-pattern functions |
| `rtl/enc_4b1c.sv`, `rtl/dec_4b1c.sv` | 4B1C encoder and decoder |
| `rtl/hec_gen.sv` | byte-serial HEC generator |
| `rtl/idle_cell_gen.sv` | idle-cell character generator |
| `rtl/tc_tx.sv` | TC transmitter |
| `rtl/hec_check.sv` | syndrome, single-error location, XOR mask |
| `rtl/cell_sync.sv` | HUNT/PRESYNC/SYNC delineation |
| `rtl/tc_rx.sv` | TC receiver |
| `rtl/bic_phy_top.sv` | both directions |
| `tb/tb_ref_pkg.sv` | reference CRC (long division), 4B1C table, idle pattern, written apart from the RTL |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cell_rate.sv` | throughput at default parameters |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends the run with a failure if it hangs. Run commands from the
repository root. For example:

```
verilator --binary --timing --assert -Wno-fatal -Mdir obj \
  rtl/bic_phy_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_bic_phy_top.sv --top-module tb_bic_phy_top
./obj/Vtb_bic_phy_top
```

What each testbench covers:

* **`tb_bic_phy_top`** runs the whole layer at its default parameters. The
  transmitter is looped back to the receiver through a channel that flips
  line bits in chosen cells and raises the K28.5 indication. It sends 400
  numbered cells and checks that every cell delivered matches the cell sent
  with that number, in order and with constant latency. It also checks that
  cells with two header errors never arrive and that every other cell sent
  while in SYNC does. It requires each of these events to occur at least
  once:
  * an idle cell because no cell was ready;
  * an idle cell forced by the burst cap;
  * idle-cell removal;
  * header correction;
  * cell discard;
  * loss of delineation;
  * resynchronization.
* **`tb_cell_rate`** checks a cell period of 53 clocks (1.887 Mcells/s at
  100 MHz) and exactly one idle cell per 32 user cells when the ATM layer
  always has a cell ready. It also checks that every user cell is delivered.
* **`tb_tc_tx`** checks NCI timing, the H-bus and P-bus strobe counts, and the
  burst cap, and compares each cell's characters with the reference.
* **`tb_tc_rx`** checks the first-word latency (9 clocks), correction,
  discard, loss and resync.
* **`tb_cell_sync`** checks the state machine's transitions, including a
  damaged idle cell in PRESYNC, and `M_LOSS - 1` versus `M_LOSS` errored
  cells.
* **`tb_hec_check`** covers all 40 single errors and random double errors.
* **`tb_enc_4b1c` / `tb_dec_4b1c`** check the code exhaustively, including
  the run-length bound and that a line error does not spread.
