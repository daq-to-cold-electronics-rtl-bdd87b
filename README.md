# Timing distribution and WIB-to-RCE data link for a ProtoDUNE TPC readout slice

This design covers one timing master, many readout elements, and the data links between the warm electronics and the DAQ.

**Timing master.** It sends one serial stream to every readout element.
- The stream carries a 50 MHz clock and a 25-bit command word every 500 ns.
- The words carry CONVERT (the 2 MHz digitize command), CALIBRATE, SYNC, COLDATA_RESET, partition-tagged triggers, and a low-speed addressed channel.

**Return path.** The readout elements answer on one shared return path.
- Only the element that is asked turns its driver on.
- The master uses the answers to check that every element has counted the same number of CONVERTs.

**WIB (Warm Interface Board).**
- It turns the commands into the 2 MHz CONVERT clock of its four front-end boards (FEMBs).
- It wraps each FEMB's samples in a frame with a header, a timestamp, checksums and a CRC-32.
- It sends each frame 8b/10b encoded on a 5 Gbps fibre, one frame per CONVERT, and idle characters when there is nothing to send.

**RCE (the DAQ's receiving processor).** It checks every frame and keeps only the triggers of the run partition it belongs to.

The RTL models everything with a logic function: the master, the endpoint receivers and transmitters, the WIB framer, and the RCE receiver. The following are modelled as wires:
- clock recovery chips, fan-out buffers and the backplane
- optical transceivers and SERDES
- the front-end ASICs

## Block map

```
                 trigger_master
                      |
  software -->  timing_master --(biphase-mark stream, 100 MHz half-cells)--+--> timing_endpoint (WIB) --> convert_gen --> FEMB CONVERT clock, pulses
   strobes        ^      cmd_word_tx, bmc_encoder                         |          |                   wib_ip_addr
                  |      bmc_decoder, cmd_word_rx (return)                +--> timing_endpoint (RCE) --> rce_trigger_filter
                  +------------- shared return line (wired OR of enabled drivers) <---+
                                                               
  FEMB words --> wib_frame_tx (sync_fifo, crc32_d16, 2 x enc8b10b) --20-bit code words--> rce_frame_rx (2 x dec8b10b, crc32_d16)
                 one per link, N_LINKS = 4, 250 MHz word clock
```

`pdts_system_top` connects all of this. Its other parts:
- **Endpoints:** a WIB endpoint at address 0x01 and an RCE endpoint at 0x02.
- **Links:** four framer/receiver pairs.
- **Clock crossing:** `cdc_pulse` carries the CONVERT and SYNC strobes from the timing clock into the link clock.
- **Shared types:** all shared types and constants are in `pdts_pkg`.

## The timing stream

### Line code

The stream uses biphase-mark coding on a 50 MHz carrier.
- Every bit cell (20 ns) starts with a transition.
- A 1 has a second transition in the middle of the cell.
- So the line has 100 M half-cells per second and carries 50 Mb/s of data. That is exactly one 25-bit word per 500 ns.

All timing logic runs on a 100 MHz clock, one line half-cell per cycle, so a bit takes 2 cycles and a word 50 cycles. In hardware this clock comes from the clock/data recovery device in front of each receiver; in the model every endpoint uses the master's clock.

`bmc_encoder` toggles the line at each cell start, and toggles it again mid-cell for a 1. Its `tx_en` input also drives `line_oe`. With the driver off the line is held at 0, which stands for a dark laser. This is what lets several transmitters share the return fibre.

`bmc_decoder` does not know which half-cell starts a cell, so it guesses.
- Each time a supposed cell boundary shows no transition, it swaps the guess.
- After `LOCK_CELLS` (16) good boundaries in a row it declares lock.
- Once locked, a missing boundary transition counts as a code violation. `LOSS_CELLS` (4) violations in a row drop lock.
- `cell_start` marks the first half-cell of each cell. `clk_div2` uses it to keep the 50 MHz clock sent to the front ends rising at the start of every cell; a phase error costs one held cycle, which is counted as a slip.

### The command word

```
 bit 24..20   19 ......................................... 1    0
   11010      payload (19 bits)                                 even parity over 24..1
```

Words are sent back to back, most significant bit first.

**Downstream payload (`cmd_payload_t`):**

| bits | field |
|---|---|
| 18 | CONVERT |
| 17 | CALIBRATE |
| 16 | SYNC |
| 15 | COLDATA_RESET |
| 14 | trigger |
| 13:12 | trigger partition |
| 11 | trigger is a calibration trigger |
| 10 | addressed byte valid |
| 9:2 | addressed byte (poll address) |
| 1:0 | reserved |

**Return payload (`ret_payload_t`):**

| bits | field |
|---|---|
| 18:3 | echoed CONVERT count |
| 2 | endpoint word-aligned |
| 1:0 | reserved |

### Finding the word boundary

The receiver has no separate framing signal, so `cmd_word_rx` finds the boundary from the data.
- It shifts the decoded bits into a 25-bit window and keeps a free-running position counter from 0 to 24.
- Each of the 25 positions has its own hit counter. A position whose window holds the preamble with correct parity counts up; any other result clears it.
- The first position to reach `LOCK_WORDS` (3) good words in a row becomes the boundary.

Because each position keeps its own counter, a payload that happens to contain `11010` at another position cannot disturb the search. Once aligned, only the boundary position is checked:
- A good word is delivered for one cycle on `word_valid`/`payload`.
- A bad word increments `err_count`.
- `LOSS_WORDS` (3) bad words in a row start the search again.

The aligner is held in reset while the decoder is unlocked.

## Synchronization check over the shared return path

The return path's job is to let the master check that all readout elements agree on the CONVERT count. It works as follows:

1. **Counting.** The master and every endpoint keep a 16-bit CONVERT count.
   - SYNC clears all of them, and the SYNC word's own CONVERT counts as 1. So all counts agree as long as no word is lost.
   - The 16-bit width gives the rollover check every 65536 CONVERTs (32.8 ms).
2. **Poll.** Software asks for a poll (`poll_req`, `poll_addr`). The next downstream word carries the address in the addressed-byte field. The master records its count including that word (`expect_count`).
3. **Answer.** The endpoint whose `my_addr` matches latches its count, which includes the same word. It turns its driver on and sends `RESP_WORDS` (5) return words, then turns the driver off.
   - The burst is long enough for the master's return decoder to lock (16 cells) and align (3 words) before the words it compares.
4. **Compare.** The master decodes the return line. Each good return word increments `sync_ok` if the echoed count equals `expect_count`, and `sync_err` otherwise.

The return line is the OR of each endpoint's `line & line_oe`. Only one endpoint answers at a time, so polls must be at least one burst apart (about 8 words). `poll_busy` shows that a poll request is still waiting for its word.

## Trigger master, backpressure and partitions

`trigger_master` sits inside the timing master.

**Spill.** `spill_start` and `spill_end` from the accelerator define `in_spill`.

**Beam triggers.** Beam triggers are accepted in spill.
- A beam trigger less than `veto_cycles` after the previous one is vetoed as pile-up, and the vetoed trigger restarts the window.
- Accepted beam triggers carry partition `beam_part`.

**Calibration triggers.** Outside the spill, with `calib_en` set, a calibration trigger is made every `calib_period` cycles. It carries partition `calib_part`.

**SET (software-enable-trigger).** A trigger goes out only while the effective SET `set_eff` is high. `set_eff` needs all three of:
- software's `set_enable`
- none of the `NBUSY` (8) RCE busy lines asserted (they are ORed, one per COB)
- fewer than `max_outstanding` triggers outstanding, where outstanding = triggers sent − `evt_done` strobes from the RCEs

A trigger blocked this way is counted in `n_inhibited`.

**Sending.** Each word carries at most one trigger. A second trigger accepted before the first has been sent is counted as lost.

On the RCE side, `rce_trigger_filter` holds a partition register (`cfg_part`, with an enable). It passes only triggers of its own partition and counts the others as ignored. CONVERT, CALIBRATE and SYNC are common to all partitions.

## WIB: CONVERT clock and addresses

**CONVERT clock.** `convert_gen` starts one period of the 2 MHz CONVERT clock for each received CONVERT: 25 cycles high, then low. The rising edge is the digitize command, so if CONVERT stops, the front end stops digitizing.

**Commands and counts.** CALIBRATE, SYNC and COLDATA_RESET become 4-cycle pulses. The block also keeps the two counts written into the frame header:
- the 16-bit CONVERT count
- a 24-bit reset count, the number of SYNC commands

**IP address.** `wib_ip_addr` builds the WIB's slow-control IP address `{IP_PREFIX, crate[7:0], 5'b0, slot[2:0]}`. It flags slots outside 1..5 as invalid.

## The WIB-to-RCE frame

Each link carries 16-bit words, each sent as two 8b/10b characters with the low byte first, one word per 250 MHz clock (5 Gbps). A CONVERT period therefore has 125 word slots. Each CONVERT sends one 123-word frame; every other slot carries the idle word {K28.2, K28.1}.

| row | content |
|---|---|
| 0 | {crate[4:0], slot[2:0]} in the high byte, K28.5 comma in the low byte |
| 1 | {reset count [7:0], version [3:0], 2'b00, link [1:0]} |
| 2 | reset count [23:8] |
| 3 | CONVERT count |
| 4 | error bits: {error count [7:0], 0, FIFO overflow, overrun, missing data, start-flag error [1:0], checksum error [1:0]} |
| 5, 6 | WIB timestamp [15:0], [31:16], counting at 125 MHz and cleared by SYNC |
| 7, 8 | WIB header of COLDATA block 1: {14'b0, start-flag error, checksum error}, then 0 |
| 9 .. 63 | COLDATA block 1, 55 words, passed on unaltered |
| 64, 65 | WIB header of COLDATA block 2 |
| 66 .. 120 | COLDATA block 2, 55 words, unaltered |
| 121, 122 | CRC-32 [15:0], [31:16] of rows 1..120 |

**Buffering.** Front-end words arrive on `cd_valid`/`cd_sof`/`cd_data`. They are buffered in a 256-word `sync_fifo` together with the start flag; `cd_sof` marks the first word of a block.

**When a CONVERT arrives,** the framer checks whether both blocks are buffered.
- If they are, it sends the frame.
- If not, the slot stays idle and "missing data" is raised.
- A CONVERT that arrives while a frame is still going out is an overrun.

**Checksum.** The first word of each block is a checksum word {ChkSm B, ChkSm A}: the sums of the high bytes and of the low bytes of the block's other 54 words. The framer recomputes both sums.

**Error reporting.** Errors do not stop the link. They are counted, and they are flagged in row 4 and in the block headers of the next frame.

**Test mode.** `test_mode` replaces the COLDATA words with an incrementing 16-bit pattern, so a link can be tested with no FEMB attached.

**CRC-32.** `crc32_d16` uses polynomial 0x04C11DB7, one 16-bit word per clock, most significant bit first, preset to all ones, with no final inversion.

**8b/10b.** `enc8b10b` is the standard code with running disparity.
- Two encoders are chained in one cycle, low byte first.
- Only K28.y control characters are produced; the frame uses K28.1, K28.2 and K28.5.
- In the 20-bit `link_code`, bits [19:10] are the first character, bit `a` first.

`rce_frame_rx` decodes with two chained `dec8b10b`, keeping the running disparity across words.
- **Frame start:** a K28.5 in the low byte starts a frame, and rows 1..122 follow.
- **Counters:**
  - good frames
  - CRC errors
  - truncated frames (a control character inside a frame)
  - 8b/10b code errors and disparity errors
  - idle words
  - CONVERT-count gaps between consecutive frames (a frame that was never sent)
- **Monitoring:** it holds the last frame's CONVERT count, timestamp and error bits.
- **Output:** it hands each word on with its row number (`rx_valid`, `rx_row`, `rx_word`).

## Clocks and resets

| clock | rate | used by |
|---|---|---|
| `clk_tim` | 100 MHz | Line half-cell clock: master, endpoints, trigger master, convert_gen, IP address. |
| `clk_link` | 250 MHz | Link word clock: framers and receivers. |

The CONVERT and SYNC strobes cross from `clk_tim` to `clk_link` through toggle synchronizers (`cdc_pulse`).
- The counts that go with them are stable for the whole 500 ns between strobes.
- Each framer samples those counts on the synchronized strobe.

All resets are synchronous and active high, one for each domain. Every register that is read has a reset value.

## Where this design goes beyond the specification it follows

The specification fixes the following:
- the carrier, the line code, and the 25-bit word every 500 ns
- the four commands
- the shared return path with a driver disable, and its purpose
- the 2 MHz CONVERT clock and the divide-by-two 50 MHz clock
- the trigger master's functions (spill, pile-up veto, calibration triggers, SET, backpressure)
- a 2-bit partition identifier with a partition register in the receiver
- the IP address taken from crate and slot (slots 1–5)
- 5 Gbps per FEMB on four fibres
- the frame rows for the header counts, timestamp, checksums, CRC-32 trailer and K28.2/K28.1 idles
- counting errors at the WIB without stopping
- a test-pattern mode

The following are this design's own choices, and are the first things to revisit against a final protocol:
- **Command word.** The preamble, parity and field layout. The high-level timing protocol was left open, so any field can be moved in `pdts_pkg`.
- **Return path.** The polling scheme, the 5-word burst and the return word layout.
- **Lock and align.** The lock and alignment thresholds.
- **Frame rows.** Rows 0 and 1, and the contents of the per-block WIB header words.
- **Block length.** 55 words, derived from a 123-row frame.
- **Checksum and CRC.** The byte-sum checksum rule, and the CRC-32 polynomial, bit order and preset.
- **Backpressure.** It uses two of the four schemes considered: busy lines and a credit count. The scheme that estimates the fill level from the spill is not built.
- **Address layout.** The IP prefix `192.168/16` and the address layout.
- **Front-end input.** Each FEMB sends its samples over four 1.28 Gbps lanes. Here that input is one merged 16-bit word stream with a block-start flag; lane deserialization and merging are not modelled.
- **Framer clock.** The framer runs on the 250 MHz link word clock with a 16-bit datapath, not on the WIB's 125 MHz fabric clock. Only the timestamp counts at 125 MHz (every second link clock).
- **Front-end system clock.** It is 50 MHz, as stated twice in the text. One overview drawing labels it 20 MHz.

Not modelled: clock/data recovery, fan-out and transceivers (the model treats them as ideal wires), the front-end ASICs, the Ethernet slow-control server, and the RCE's processing and buffering.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog. To build and run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/pdts_pkg.sv tb/tb_wib_frame_tx.sv --top-module tb_wib_frame_tx
./obj_dir/Vtb_wib_frame_tx +verilator+rand+reset+2
```

**`tb_pdts_system_top`** runs the whole slice at the default parameters (four links, eight busy lines) in a few seconds. A front-end model on each link digitizes on every CONVERT edge and sends two 55-word blocks. The testbench then:
- locks and aligns both endpoints
- starts CONVERT with a SYNC
- checks that every block reaches the RCE unaltered and in order
- sends CALIBRATE and COLDATA_RESET
- polls both endpoints over the return path
- sends beam triggers, including a vetoed pile-up, triggers held back by the credit count and by a busy line, and calibration triggers for another partition
- flips one line bit on one fibre
- runs test-pattern frames
- turns CONVERT off

It prints how often each mechanism happened. A typical run shows 80 CONVERT edges, 303 good frames, 4 matching poll answers, 3 triggers at the RCE, 1 vetoed, 2 inhibited, 1 detected link error and 5 detected CONVERT gaps.

Parameters worth changing:

| parameter | where | meaning |
|---|---|---|
| `N_LINKS` | top | Number of WIB-to-RCE links. |
| `NBUSY` | top | Number of busy lines. |
| `WIB_ADDR`, `RCE_ADDR` | top | Endpoint addresses. |
| `FIFO_DEPTH` | `wib_frame_tx` | Depth of the COLDATA buffer. |
| `RESP_WORDS`, `LOCK_CELLS` | `timing_endpoint` | Return burst length and lock threshold. |
| `LOCK_WORDS`, `LOSS_WORDS` | `cmd_word_rx` | Alignment thresholds. |
| `HIGH_CYCLES`, `PULSE_CYCLES` | `convert_gen` | CONVERT clock high time and command pulse width. |

The word and frame geometry lives in `pdts_pkg`.
