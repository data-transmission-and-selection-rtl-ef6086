# LHCb L0 calorimeter Selection Crate: SystemVerilog model

This is synthesisable SystemVerilog for the logic of the LHCb L0 calorimeter
Selection Crate. The crate has eight Selection Boards (SBs). Each board:

- receives 28 optical links from the Validation Cards;
- finds the highest-energy candidate and the energy sum of each bunch
  crossing;
- sends the results to the L0 Decision Unit (L0DU);
- after an L0 accept, sends a 36-word record to TELL1.

The optical transmitter boards (MCM and SCM) are made of commercial and
CERN chips with no logic of their own, so they are not modelled. The
testbenches drive the boards at the deserializer's output pins.

## Layout

| Path | Content |
|---|---|
| `rtl/sb_pkg.sv` | constants, result struct, L0DU word packing, pattern functions |
| `rtl/selection_crate.sv` | top: 8 boards and the HCAL backplane |
| `rtl/selection_board.sv` | one board: everything below |
| `rtl/tlk_demux.sv` | rebuilds 32-bit words from 16-bit halves at 80.156 MHz |
| `rtl/async_fifo.sv` | Gray-pointer clock-crossing FIFO |
| `rtl/input_channel.sv` | demux + FIFO + error counters for one link |
| `rtl/bc_sync.sv` | delayed BCRST, common read start, bunch counter |
| `rtl/addr_lut.sv` | 8-bit local to 14-bit global address tables |
| `rtl/max_select.sv` | highest-energy candidate |
| `rtl/et_sum.sv` | energy / hit sum |
| `rtl/trigger_process.sv` | 4-stage processing pipeline and HCAL master combination |
| `rtl/derandomizer.sv` | L0 latency buffer and 16-event TELL1 queue |
| `rtl/snapshot_fifo.sv` | 256-word diagnostic and debug FIFOs |
| `rtl/pattern_gen.sv`, `rtl/pattern_check.sv` | link test pattern source and comparator |
| `rtl/ecs_regs.sv` | register bank on the ECS bus |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_crate_pkg.sv`, `tb/tlk_link_model.sv` | reference model and deserializer model for the crate test |

## Data flow in one board

1. **Link input.** Each link gives 16-bit halves at 80.156 MHz with the dv
   and er flags. `tlk_demux` pairs them, low half first, into one 32-bit
   word per crossing. If er is set on either half, the word is marked as
   an error. If an idle arrives between the two halves, it is counted as a
   framing fault.
2. **Clock crossing.** A 16-deep asynchronous FIFO per link moves the word
   and its error flag into the 40.08 MHz board clock. Writes follow dv.
3. **Common start.** `bc_sync` delays the TTC BCRST by a programmed number
   of cycles. The delayed pulse starts reading all 28 FIFOs on the same
   cycle, so from then on every read returns words of the same crossing.
   It also restarts the 12-bit bunch counter (0..3563).
4. **Processing** (`trigger_process`, 4 cycles):
   - stage 1: the LUT turns each 8-bit local address into a 14-bit global
     address;
   - stage 2: highest candidate (lowest channel wins ties) and the sum;
     the result goes out on the backplane port;
   - stage 3: registers the two slave results on the HCAL master;
   - stage 4: the master keeps the best of the three candidates (its own
     wins ties) and adds the three sums, then the two L0DU words are
     formed.
5. **Outputs.** There are three SCM ports:
   - SCM0 carries L0DU word 0 = `{bcid[7:0], 2'b00, address[13:0], Et[7:0]}`;
   - SCM1 carries L0DU word 1 = `{bcid[11:0], 4'h0, sum[15:0]}`;
   - SCM2 carries the TELL1 stream.
6. **De-randomizer.** Each crossing's 36-word record waits in a latency
   memory for `L0_LATENCY` cycles. On an L0 accept, the record leaves the
   memory and is queued; up to 16 events can wait. The queue sends one
   word per cycle, so an event takes 36 cycles = 898 ns. An accept that
   finds the queue full is dropped and counted.

Input word: bits [7:0] are the Et (or, on the SPD board, the hit count),
bits [15:8] are the local address, and bits [31:16] are carried but not
used.

TELL1 record (36 words):

| Word | Content |
|---|---|
| 0 | header `{4'hC, 1'b0, role[2:0], event number[11:0], bcid[11:0]}` |
| 1..28 | the 28 input words of the crossing |
| 29, 30 | L0DU words 0 and 1 |
| 31..34 | the two slave results as seen by the board: `{Et, address, 10'b0}` then sum (zero on other boards) |
| 35 | the er flag of each input word, one bit per channel |

## Board roles

The role is the `ROLE` parameter, so it is fixed when the FPGA image is
built. In the crate:

| Slot | Role |
|---|---|
| 0 | electron |
| 1 | photon |
| 2 | local π0 |
| 3 | global π0 |
| 4, 5 | HCAL slaves |
| 6 | HCAL master; its `bp_in` is wired to the `bp_out` of slots 4 and 5 |
| 7 | SPD multiplicity; its sum is the hit count |

## ECS register map

The ECS bus is synchronous: address, write strobe and write data go in on
one cycle. Read data comes back two clock cycles after `ecs_rd`, together
with `ecs_rvalid`. In the table, `cc` is the channel number 0..27 and `k`
is the debug FIFO number 0..2.

| Address | Access | Content |
|---|---|---|
| 0x0000 | R | board ID `{16'h5B00, role}` |
| 0x0001 | RW | BCRST delay (12 bit) |
| 0x0002 | RW | control: [0] generator on, [2:1] generator mode, [3] comparator on, [5:4] comparator mode |
| 0x0003 | RW | pattern word / PRBS seed |
| 0x0004 | W | pulses: [0] arm diagnostic FIFOs, [1] arm debug FIFOs, [2] clear counters |
| 0x0005 | R | de-randomizer `{overflows[15:0], 9'b0, sending, occupancy[5:0]}` |
| 0x0006 | R | L0 accepts |
| 0x0007 | R | bunch counter |
| 0x01cc | R | `{framing faults, er words}` of channel cc |
| 0x02cc | R | `{FIFO overflows, FIFO underflows}` of channel cc; an overflow is a word lost because the FIFO was full |
| 0x03cc / 0x0Acc | R | comparator word count, bits [31:0] / [47:32] |
| 0x04cc | R | comparator wrong words |
| 0x05cc | R | comparator wrong bits |
| 0x06cc | R | pop one word from diagnostic FIFO cc |
| 0x07cc | R | fill of diagnostic FIFO cc |
| 0x080k | R | pop one word from debug FIFO k (0: L0DU word 0, 1: L0DU word 1, 2: TELL1 stream) |
| 0x090k | R | fill of debug FIFO k |
| 0x2000 + cc·256 + a | RW | LUT entry a of channel cc |

Mode values: 0 = fixed word, 1 = counter, 2 = PRBS. The PRBS is a 32-bit
Galois LFSR with x^32+x^22+x^2+x+1.

Arming a snapshot FIFO empties it. The FIFO then records the next 256
words and stops.

When the generator is on, all three SCM ports send the pattern instead of
data. The link test then reaches the L0DU and TELL1.

The comparators check the received input words of each channel. Their
counters restart when the comparator is switched on. A 48-bit word count
lasts about 81 days at 40.08 MHz.

## Timing

- Board clock: 40.08 MHz. Link clocks: 80.156 MHz, separate per link.
- From the FIFO read to the L0DU words on the SCM ports: 4 cycles.
- For the HCAL master, the slave results cross the backplane in one
  registered cycle. They are therefore aligned with the master's own
  stage-2 result.
- L0 accept: an accept on cycle t selects the record of the crossing
  processed `L0_LATENCY` cycles earlier.

## What follows the source and what is this design's choice

Taken from the source:

- 8 boards;
- 28 connected inputs per board;
- 32-bit words at 40.08 MHz;
- 16-bit halves at 80.156 MHz with dv/er;
- asynchronous FIFOs written on dv and read from the delayed BCRST;
- 8- to 14-bit LUT address translation loaded through ECS;
- highest candidate and energy sum;
- two HCAL slaves feeding a master over a backplane;
- 80 HCAL clusters over three boards;
- 36-word TELL1 events within 900 ns;
- 16 consecutive accepts;
- 256-event diagnostic FIFOs;
- three 32x256 debug FIFOs;
- a pattern generator and comparator for on-site BER tests;
- three SCM outputs.

This design's own choices, because the source does not give them:

- word layouts, record layout and register map;
- FIFO depth 16;
- one LUT per channel;
- the tie-break rules;
- the content of the backplane result and the master's combination rule;
- `L0_LATENCY` = 160 cycles (4 µs);
- the drop-and-count behaviour when the queue is full;
- the pattern kinds;
- the counter widths;
- reset behaviour (asynchronous, active low; memories are not reset).

Simplifications:

- The board has 30 optical inputs arranged as 5 buses of 6. Only 28 are
  connected, and only those 28 are modelled.
- The input FPGA and the process FPGA are merged into one board module.
- There is no temperature monitoring and no FPGA programming over ECS.
- The crate control state machine is software and is not included.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wall -Irtl -Itb --top-module tb_selection_board \
    rtl/sb_pkg.sv rtl/*.sv tb/tb_selection_board.sv -o sim && ./obj_dir/sim
```

Dependencies: the package file comes first. The crate testbench also needs
`tb/tb_crate_pkg.sv` and `tb/tlk_link_model.sv`.

`tb_selection_crate` runs the full crate at default sizes: 8 boards × 28
links, with separate link clocks and phases. It takes about a minute and a
half. It checks:

- the L0DU words of every board against a reference model on every
  crossing, including the master combination and the SPD multiplicity;
- the TELL1 records, including overflow after more than 16 back-to-back
  accepts;
- the error, framing-fault and comparator counters (the FIFO overflow
  and underflow counters are checked in the unit testbench);
- the diagnostic and debug FIFO read-out;
- pattern output on all SCM ports.

The other testbenches check single blocks, including corner cases:

- FIFO full and empty;
- the bunch counter wrap;
- LUT read-back;
- ties in the selection;
- the PRBS sequence;
- counter saturation.
