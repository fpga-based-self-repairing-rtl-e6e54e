# C3: a configuration scrubber that needs no golden copy

An SRAM FPGA in a radiation field slowly collects bit flips in its configuration
memory. A classic scrubber compares every configuration frame with a golden
copy kept in an external flash. C3 (Configuration Consistency Corrector) needs
no external memory. The logic to be protected is triplicated and
floorplanned so that each used configuration frame exists three times. The
scrubber reads the three copies of each frame through the internal
configuration port (ICAP), votes them bit by bit, and writes the voted frame
back over every copy that disagrees. Frames that the design does not use must
be all-zero, so they are read and forced back to zero. Each corrected bit is
reported with a time stamp, the frame address, the word, the bit and the
direction of the flip.

The scrubber sits in the same fabric it repairs, so it must survive upsets
itself. It therefore runs as three identical cores in lockstep. All of their
memories, outputs and resets are voted.

This repository holds synthesizable SystemVerilog for that scrubber. Two small
circuits from the same work sit beside it in the top level:

- the calibration circuit of the on-chip ring oscillator that clocks the
  scrubber;
- a counter-based test circuit used in fault-injection campaigns.

## How the parts fit

```
 dco_clk (200 MHz ring oscillator, outside) -> clk_div2 -> sys_clk (100 MHz)
 dco_sel <- dco_encoder (k, k_dither)

                    cmd_* (host)              upset_*, status (host)
                       |                            ^
           +-----------+-----------+                |
           v           v           v                |
        c3_core 0   c3_core 1   c3_core 2 --> c3_out_voter --> icap_* (ICAP)
        (engine +   (...)       (...)           ^ icap_o fanned back to all cores
         Data RAM,
         Prog ROM,
         scratchpad)
           port B of every memory
           v
        mem_scrubber x3 (Data RAM, Program ROM, scratchpad)
        jtag_loader   (shares Program ROM port B, selected by the loader reset)
        c3_reset_ctrl (voted core reset: power-on, loader, periodic)
        unixtime_counter

 side by side: dco_calib (cal_*), test_counters (tc_*)
```

| Module | Role |
|---|---|
| `c3_top` | Top level. It wires everything above and brings out ICAP, boundary scan, host link, fetch ports and the side circuits. |
| `c3_core` | One core: `c3_scrub_engine` plus Data RAM (4096×8), Program ROM (4096×18) and scratchpad (128×8). Each memory is a `dp_ram`. |
| `c3_scrub_engine` | The scrubbing state machine (see below). |
| `c3_out_voter` | Majority vote of the ICAP signals and of the IO outputs of the three cores. |
| `mem_scrubber` | Sweeps port B of three memory copies, votes them, and rewrites the copies that disagree. |
| `c3_reset_ctrl` | Triplicated reset hold logic with a voted output. |
| `jtag_loader` | Program ROM loader behind a boundary-scan user register, synchronised to the system clock. |
| `tmr_voter` | Bitwise 2-of-3 voter with per-copy mismatch flags. |
| `dp_ram` | True dual-port RAM. |
| `dco_encoder` | Thermometer encoder with dithering for the delay line. |
| `dco_ring` | Behavioural model of the ring oscillator. It is not synthesizable. |
| `clk_div2` | Divide-by-two. |
| `unixtime_counter` | Seconds counter, loadable from host time. |
| `dco_calib` | Oscillator calibration: two 32-bit counters, one on the oscillator and one on a reference. |
| `test_counters` | Three counters and a reference, latched, voted and compared. |
| `c3_pkg` | Shared constants, the command enum and the upset report struct. |

## The scrubbing engine

In the original system this job is a program on an 8-bit soft processor. That
program is not available. Here the job is a state machine, `c3_scrub_engine`,
which uses the memories the same way the program would.

### Data RAM layout (bytes)

| Range | Contents |
|---|---|
| 0 – 403 | copy 0 of the current frame (101 words × 4 bytes) |
| 404 – 807 | copy 1 |
| 808 – 1211 | copy 2 |
| 1212 – 1615 | voted frame |
| 2048 – 4095 | frame list. It has 4 bytes per entry, least significant byte first, and 512 entries. |

The list holds `nred` triplets first (entries 3t, 3t+1 and 3t+2 are the three
copies of redundant frame t). Then come `nempty` empty-frame addresses. So
`3·nred + nempty` must not exceed 512. An assertion in the engine checks this
whenever a list position is started.

### One scan

The engine visits each list position in turn.

**For a triplet:**

1. It reads the three copies into areas 0–2. Per word it sends one ICAP read
   request, then makes four byte writes.
2. It votes byte by byte into the vote area.
3. It reports each differing bit.
4. It writes the voted frame back over every copy whose error count is not
   zero.

**For an empty frame:** it reads the frame, reports each set bit, and writes a
zero frame if any bit was set.

A scan ends with a one-cycle `scan_done`.

A copy with more than `HALT_THR` (127) wrong bits is not treated as upsets. It
means the ICAP access has failed. The engine then halts, and only an external
reset brings it back.

### Command set

Commands come from the host link as `cmd_op`/`cmd_arg`/`cmd_idx` with a
valid/ready handshake. `cmd_ready` is high only in IDLE, that is, between two
list positions. A command therefore never splits a frame.

| Op | Meaning |
|---|---|
| `SET_NRED`, `SET_NEMPTY` | List sizes. They are stored in the scratchpad. |
| `SET_RSTSCANS` | Request a core reset after this many scans. 0 turns the periodic reset off. |
| `SET_LIST` | Write list entry `cmd_idx` with frame address `cmd_arg`. |
| `TOGGLE` | Invert one configuration bit: frame `cmd_arg`, word `cmd_idx[11:5]`, bit `cmd_idx[4:0]`. This injects a fault. |
| `VOTE` | Start scanning from the top of the list. |
| `CONTINUE` | Resume scanning at the current list position. |
| `PAUSE` | Stop after the current frame. |
| `STOP` | Stop and rewind the list pointer. |
| `SET_FAR` | Select a frame for the next three commands. |
| `READ` | Read the selected frame into Data RAM area 0. |
| `FLIP` | Invert one bit of the frame held in area 0 (`cmd_idx` as for `TOGGLE`). |
| `WRITE` | Write area 0 back to the selected frame. |

`SET_FAR`/`READ`/`FLIP`/`WRITE` do by hand, step by step, what `TOGGLE`
does in one go. Area 0 is also the scan buffer, so pause the scan before
using them.

An upset report (`upset_t`) carries the frame address, the word (0–100), the
bit (0–31), the polarity (1 means the bit flipped 0→1) and the Unixtime
seconds.

### Timing

Data RAM and the scratchpad have one cycle of read latency. ICAP read data
arrives one cycle after the request.

In the top-level testbench a clean scan over 2 triplets and 2 empty frames
takes about 14,700 system-clock cycles. That is roughly 1,800 cycles per
frame read, or 147 µs at 100 MHz. Each reported bit adds a few cycles.

### Surviving its own reset

The settings live in the scratchpad (byte 0 `nred`, 1 `nempty`, 2
`rstscans`, 3 the running flag). After any reset the engine reloads them
before accepting commands. It then resumes where the host left it.

`c3_reset_ctrl` releases the cores only after both of these:

- at least `MIN_CYCLES` (16) cycles;
- one complete sweep of the scratchpad scrubber.

So the settings are voted clean before they are read.

## Self-protection of the scrubber

- **Outputs.** The ICAP has one port. The three cores' `csib`, `rdwrb` and
  write data are voted before it, and its read data is fanned out to all
  three cores. Status flags and upset reports are voted as well. Each voter
  raises a disagreement flag when one core is outvoted.
- **Memories.** Each memory type has its own `mem_scrubber` on port B. It
  takes two cycles per address:
  1. it reads the three copies;
  2. it writes the voted word into every copy that differs.

  If port A writes the same address in that window, the address is skipped
  for this sweep. The Program ROM scrubber pauses while the JTAG loader holds
  the cores in reset, because the loader then owns port B.
- **Reset.** A core reset is issued on three conditions:
  - power-on;
  - the loader's reset bit;
  - a majority of the cores asking for a periodic reset.

  The hold logic is kept in three copies and voted.

## JTAG loader

The loader replaces the processor's stock JTAG program loader. The stock
loader clocks port B of the Program ROM from the JTAG clock. That would need
a clock multiplexer on port B. Here the boundary-scan side and the RAM side
are split:

- **On DRCK.** A 33-bit write register shifts TDI in, LSB first. On the
  UPDATE edge it is copied into a holding register. An 18-bit read register
  loads on DRCK with CAPTURE high, and shifts out on TDO, LSB first.
- **On the system clock.** UPDATE is synchronised through three flip-flops.
  On its rising edge the holding register is applied for one cycle. A read
  result is the vote of the three ROMs, captured two cycles later. It is
  returned by the next scan.

Word layout: `[32]` processor reset, `[31]` enable, `[30]` write enable,
`[29:18]` address, `[17:0]` data.

While bit 32 is set:

- the cores are held in reset;
- the loader drives port B of all three Program ROMs;
- a write goes to all three at once.

When bit 32 is cleared, port B returns to the ROM scrubber.

## Clock: ring oscillator and its control

The system clock comes from a ring oscillator built from a carry-chain delay
line closed through an inverter. Its period is twice the loop delay:

    T = 2 · (t_feedback + t0 + n · tpd)

Here n is the number of chain elements the signal crosses.

`dco_encoder` turns the coarse setting k and the fine setting k_dither into
the thermometer select code. A KDW-bit accumulator adds k_dither every cycle.
Its carry makes the chain one element longer for that cycle, so the average
length is k + k_dither/2^KDW.

`dco_ring` is a timing model only. Its delays (t_feedback = 0.3 ns,
t0 = 1.2 ns, tpd = 25 ps) are illustrative numbers for which k = 40 gives
200 MHz. On real silicon k is found with the calibration circuit, and the
loop is a placed, hand-constrained structure, not RTL.

`dco_calib` counts the oscillator and a 200 MHz reference in two 32-bit
counters, each with its own reset synchroniser. The ratio of the two counts
gives the oscillator frequency for a given k/k_dither.

## Fault-injection test circuit

`test_counters` has three 32-bit counters, C0–C2, and a reference, CREF, all
on one clock. A LATCH strobe captures them. The latched C0–C2 are voted, and
each is compared with CREF.

`fail` marks a critical upset, meaning that two or more counters are wrong,
which the vote cannot hide. With `TRIPLE_GLOBAL=1` each counter latches on
its own copy of the strobe. That is the variant that removes the single
global signal as a weak point.

## Where this design departs from the original

- The soft processors and their program are replaced by the hardware engine
  above. The Program ROMs are still built, loaded over JTAG and scrubbed, and
  their fetch ports are outputs of the top level. No instruction is executed
  from them.
- The ICAP transaction is simplified to three steps:
  1. a command word (1 = read, 2 = write);
  2. a frame address;
  3. 101 data words.

  The real device needs its own command sequence: sync word, FAR/CMD
  register writes and a pad frame. That sequence would be a small wrapper on
  `icap_*`.
- The frame is 101 words × 32 bits. The frame list is limited to 512 entries,
  with `nred` and `nempty` at most 255. The Data RAM byte order inside a word
  is an internal choice. Reports use ordinary word/bit numbers.
- The memory voters and the output voters are single instances. Only the
  reset hold logic is triplicated. Triplicating the voters themselves only
  pays off with placement-level separation.
- The boundary-scan primitive, the ICAP primitive, the host link (UART over
  JTAG), the virtual I/O core, clock buffers and the 200 MHz board oscillator
  are not part of the RTL. Their signals are ports.
- The variant with triplicated user logic behind a signal "mixer" is not
  built. Only the plain configuration is.
- Halt threshold 127 and frame size 101 words are the original values. The
  reset hold minimum, the encoder's chain length (64) and the dither width
  (4) are this design's choices.

## Simulating

Everything runs with plain Verilator 5. Testbenches are self-checking. Each
prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/c3_pkg.sv tb/c3_top_tb.sv --top-module c3_top_tb -o sim
./obj_dir/sim
```

Replace `c3_top_tb` with `<module>_tb` to test a single block.

`c3_top_tb` runs the top level at its default parameters: a 200 MHz
oscillator model, 100 MHz system clock, 101-word frames and threshold 127.
It takes about 2 ms of simulated time. It goes through one complete
operation:

1. JTAG upload and read-back of a program;
2. list set-up;
3. repair of a redundant frame and clearing of an empty one, with the
   reports checked;
4. repair of a Data RAM, a Program ROM and a scratchpad copy;
5. a periodic reset with resumed scanning;
6. a forced fault on one core's ICAP data, masked by the voter;
7. a toggle command;
8. a halt on a failing frame;
9. an oscillator calibration measurement;
10. a test-circuit latch.

At the end it prints how often each of these mechanisms happened.

`c3_injection_tb` runs a fault-injection campaign on the same top level, in
the way a campaign is driven from a host. Each of its 300 injections is a
toggle command followed by a vote command. It checks every report and every
repair, and that the configuration is back to its original state after each
scan. It runs in roughly 30 ms of simulated time.

`dco_tuning_tb` runs the oscillator tuning procedure against a ring model
whose fixed delay is 0.14 ns longer than nominal:

1. it sweeps k with the dither off and picks the longest chain that still
   reaches 200 MHz (k = 34, 200.8 MHz);
2. it then searches k_dither and lands at 200.05 MHz (k_dither = 6).

`tb/icap_cfg_model.sv` is a behavioural ICAP plus a small configuration
memory, used by the engine, core and top testbenches.

## How far to trust it

Every module has its own testbench, and each testbench is known to catch at
least one deliberately broken version of its module.

Three things have not been verified:

- the real ICAP protocol;
- timing closure at 100 MHz;
- the placement-dependent parts: the oscillator loop and the separation of
  the copies.
