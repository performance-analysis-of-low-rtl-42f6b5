# Low-power DDR SDRAM controller

This controller connects a bus master with a 128-bit data port to a 64-bit
DDR SDRAM with four banks. Each access is one burst of eight 64-bit beats,
which is four 128-bit words. The bus master side runs at one word per clock
on `clk` (133 MHz). The memory side moves one beat on each edge of the DDR
clock. A second clock, `clk2x` (266 MHz), places those beats and strobes.
The design also saves power: an XOR-and-flip-flop clock gate stops the DDR
clock pair whenever the controller has nothing to do.

The structure follows the controller described by G. Shalini and
C. Sahu in "Performance Analysis of Low Power DDR3 SDRAM Memory Control
Unit":

- a main control module with two state machines (initialisation and command) and a counter;
- a signal generation module;
- a data path module;
- a PLL;
- an adaptive clock gate.

It runs at 133 MHz with burst length 8, 128-bit data and CAS latency 2. Some
parts of that description only say what a block does, not how. Where that
is so, this RTL makes its own choices. Each choice is named below and in the
opening comment of each file. Despite "DDR3" in the title, the protocol
described (four banks, CAS latency 2, a single LOAD MODE REGISTER) is
first-generation DDR, and the controller implements that.

## Blocks

```
            ref_clk
               |
             [pll] --clk, clk2x-------------------------------+
               |                                               |
 bus master    |   +--------------------------------------+    |
 sys_req  ---->|   | main_control                         |    |
 sys_r_wn ---->|   |  init_fsm --istate--+                |    |
 sys_addr ---->|   |  command_fsm -cstate+--> signal_gen --+--> ddr_csn/rasn/casn/wen,
 sys_ready <---|   |  2 x timing_counter |                |     ddr_ba, ddr_ad, ddr_cke
               |   |  refresh timer      |                |
               |   +------clk_en---------+----------------+
               |            |            cstate
               |   [adaptive_clock_gate] --> ddr_clk, ddr_clkn
 sys_wdata --->|   [data_path] <------------ cstate
 sys_rdata <---|        |  ddr_dq_o/_en, ddr_dqs_o/_en, ddr_dq_i
```

| File | Role |
|------|------|
| `rtl/ddr_pkg.sv` | widths, burst length, CAS latency, timing in clocks, command encoding, state enums, mode word |
| `rtl/timing_counter.sv` | loadable down counter; times every wait state and counts the burst |
| `rtl/init_fsm.sv` | power-up sequence |
| `rtl/command_fsm.sv` | read, write and refresh sequencing, request handshake |
| `rtl/main_control.sv` | the two state machines, their counters, the refresh timer, the clock-gate enable |
| `rtl/signal_gen.sv` | `istate`/`cstate` to DDR command, bank and address lines (registered) |
| `rtl/data_path.sv` | 128-bit to 2 x 64-bit double-data-rate conversion, write strobe, read capture |
| `rtl/adaptive_clock_gate.sv` | gates `ddr_clk`/`ddr_clkn` from the controller's activity |
| `rtl/pll.sv` | behavioural model of the PLL (not synthesizable) |
| `rtl/ddr_sdram_ctrl.sv` | top level |

The DDR SDRAM device and the bus master are outside the design. The bus
master's signals are the top's `sys_*` ports. The memory's signals are the
`ddr_*` ports. DQ and DQS are split into output, output-enable and input
signals; the bidirectional pad buffers belong in the chip or FPGA top.

## Bus master interface

All `sys_*` signals are synchronous to `sys_clk`, which is the internal `clk`.

| Signal | Dir | Meaning |
|--------|-----|---------|
| `sys_dly_200us` | in | high once the 200 us power-up wait has passed; starts initialisation |
| `sys_init_done` | out | memory initialised, requests may be made |
| `sys_req` | in | request; taken on the rising edge where `sys_req && sys_ready` |
| `sys_ready` | out | controller is idle, initialised and has no refresh pending |
| `sys_r_wn` | in | 1 = read, 0 = write, taken with the request |
| `sys_addr[21:0]` | in | `{bank[21:20], row[19:8], column[7:0]}`, taken with the request |
| `sys_wdata_req` | out | present the next write word in the next clock |
| `sys_wdata[127:0]` | in | write word |
| `sys_rdata[127:0]`, `sys_rd_valid` | out | four read words, one per clock |
| `sys_cyc_end` | out | one-clock pulse in the last clock of an access |

A column holds 64 bits, and a burst covers eight consecutive columns. The
burst order is sequential and wraps inside the 8-column block that holds the
column given. Word *i* of a burst holds beat 2*i* in bits [63:0] and beat
2*i*+1 in bits [127:64].

Write data uses a request one clock ahead of the data. In each clock where
`sys_wdata_req` is high, the master must present the next word in the clock
that follows. A FIFO with registered output can do this: drive its read
enable from `sys_wdata_req`.

## Access timing

Each state of the command machine lasts a fixed number of clocks. The
signal generator registers its outputs, so each command reaches the DDR bus
one clock after its state. The memory then takes it on the next rising edge
of `ddr_clk`. The table below uses the defaults: tRCD = 2, CL = 2, BL = 8,
tWR = 2 and tRP = 2 clocks.

| Clock after accept | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| read `cstate` | ACTIVE | TRCD | READA | CL | CL | CL | RDATA | RDATA | RDATA | RDATA | |
| write `cstate` | ACTIVE | TRCD | WRITEA | WDATA | WDATA | WDATA | WDATA | TDAL | TDAL | TDAL | TDAL |

- **Read.** READ is issued with auto-precharge. `C_CL` lasts CL + 1 clocks: the extra clock covers the command register. As a result, the four clocks of `C_RDATA` are exactly the clocks whose ending edges register the four words into `sys_rdata`. The first word is valid 5 + CL = 7 clocks after the accepting edge. A read occupies the controller for 8 + CL = 10 clocks.
- **Write.** WRITE is issued with auto-precharge. `C_WDATA` takes one word per clock. `C_TDAL` then waits tWR + tRP, so the bank has finished precharging before anything else is issued. A write occupies the controller for 11 clocks.
- **Refresh.** A refresh timer raises a request every `T_REFI` = 2048 clocks (15.4 us). In `C_IDLE`, the refresh wins over a waiting request: `C_AR` issues AUTO REFRESH and `C_TRFC` waits tRFC.
- **Back-to-back accesses.** A new request is taken in the clock after `sys_cyc_end`. Every access closes its row, so consecutive accesses never conflict, and the controller never needs a separate PRECHARGE after initialisation.

## Initialisation

Reset (`rst_n` low, asynchronous) puts the initialisation machine in
`I_IDLE`. There the memory is deselected, CKE is low and the DDR clock is
stopped. When `sys_dly_200us` goes high, the machine steps through this
sequence:

```
I_NOP -> I_PRE (PRECHARGE all) -> I_TRP (tRP) -> I_AR1 (AUTO REFRESH) -> I_TRFC1 (tRFC)
      -> I_AR2 (AUTO REFRESH) -> I_TRFC2 (tRFC) -> I_MRS (LOAD MODE REGISTER) -> I_TMRD (tMRD)
      -> I_READY (sys_init_done = 1)
```

At the defaults this takes 30 clocks. The mode word is 0x023: burst length
8, sequential, CAS latency 2. The source description has no wait states
after PRECHARGE or the AUTO REFRESH commands; they are added here so that
the memory timing is met. The extended mode register and the DLL reset of a
full JEDEC DDR start-up are not issued, because the source sequence does not
contain them.

## The data path: one 64-bit beat per clock edge

This is the least obvious part of the design. `clk2x` runs at twice the
rate of `clk`, and its rising edges coincide with both edges of `clk`. The
data path works in three clock domains that share one phase:

- **`clk` rising edge:** stores a write word per `C_WDATA` clock in `wr_word`, and registers read words into `sys_rdata`.
- **`clk2x` rising edge:** makes the write strobe `dqs_o`. The strobe is high in the first half of each clock of the burst and low in the second half. Its first rising edge comes one clock after the memory takes WRITE (tDQSS = 1 clock). `dqs_en` rises half a clock earlier (the preamble, with DQS low) and falls half a clock after the last falling edge (the postamble).
- **`clk2x` falling edge:** launches the write beats a quarter clock before each strobe edge, so each strobe edge falls in the middle of its beat. This is a centre-aligned write. The low half of a word goes out before the rising edge of `clk`, the high half before the falling edge. The high half comes from a holding register, because `wr_word` has already moved on to the next word. The same edge samples `ddr_dq_i` in the middle of each read beat. The memory drives read beats edge-aligned with `ddr_clk`. After every second sample, the last two samples form a 128-bit word ready for `clk`.

The data path must know which `clk2x` edge it is on. A flip-flop `tgl`
toggles on every rising edge of `clk`. A copy taken on each rising edge of
`clk2x` equals `tgl` at the edges that coincide with a rising edge of `clk`.
It differs at the edges in the middle of the clock. A second copy, taken on
the falling edges of `clk2x`, tells the first quarter of the clock from the
third in the same way. All of this assumes that `clk` and `clk2x` come from
the same PLL with aligned edges.

Reads are captured at a fixed delay after READ, worked out from CAS
latency, and are timed from `clk2x`. The memory's read DQS is not used.
This is simple and exact in simulation. On a real board, the board and pad
delays must then be matched to the capture point.

## Adaptive clock gating of the DDR clock

The controller's activity signal `clk_en` is high in four cases:

- during initialisation;
- while the command machine is away from `C_IDLE`;
- as soon as a request is pending;
- as soon as a refresh is pending.

In the clock gate, a flip-flop keeps last clock's `clk_en`, and an XOR
(`gated_clk`) flags the clock in which `clk_en` changes. The clock enable is
`clk_en | gated_clk`. This keeps the DDR clock running for one more clock
after activity ends, so the last command still meets a clock edge. The
enable is held in a flip-flop on the falling edge of `clk`, and
`ddr_clk = clk & gate_q`, so the gated clock cannot glitch. When `clk_en`
rises during a clock, `ddr_clk` runs from the next rising edge of `clk`.
This is always before the first command of the access reaches the bus.

While the controller is idle, `ddr_clk` is held low and `ddr_clkn` high.
This is how the source design saves power. A JEDEC DDR device expects the
clock to keep running unless CKE has first put it into power-down. To use
this controller with a standard device, either drive `clk_en` high or add
CKE power-down entry and exit around the stop.

## PLL

`rtl/pll.sv` is a behavioural model, not synthesizable. `clk` follows the
reference clock. `clk2x` has a rising edge on every reference edge and a
falling edge a quarter reference period later (`REF_PERIOD_NS`). `locked`
rises after 16 reference clocks. The top holds the logic in reset until
`locked` is high, then releases reset through a two-flop synchroniser. For
an implementation, replace the model with the target's PLL or clock manager
configured for 1x and 2x outputs with aligned phase.

## Parameters

The shared constants are in `ddr_pkg`:

| Constant | Value | Note |
|----------|-------|------|
| `DATA_W`, `DQ_W` | 128, 64 | bus-master word, DDR bus |
| `ADDR_W` (`BA_W`, `ROW_W`, `COL_W`) | 22 (2, 12, 8) | address split is this design's choice |
| `BURST_LEN`, `CAS_LAT` | 8, 2 | |
| `T_RP`, `T_RCD`, `T_RFC`, `T_MRD`, `T_WR` | 2, 2, 10, 2, 2 clocks | JEDEC DDR values at 7.5 ns |
| `T_REFI` | 2048 clocks | refresh interval |

The modules take these as typed parameters with the package values as
defaults. The controller accepts any timing values with `T_RCD >= 2`.

The source description also gives 144 MHz as an operating frequency. At
144 MHz, tRFC needs 11 clocks, so raise `T_RFC` (and check the others)
before using a faster clock. The tRP, tRCD and tWR values still fit.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `timing_counter_tb` | count-down, hold at zero, reload, and exact wait lengths |
| `init_fsm_tb` | state sequence and the length of every wait; asynchronous reset in mid-sequence |
| `command_fsm_tb` | state by state for reads, writes and refreshes: `sys_wdata_req`, `sys_cyc_end`, `ref_ack`, the handshake, refresh priority |
| `main_control_tb` | initialisation length, access lengths, refresh every `TREFI` clocks, the `clk_en` rules |
| `signal_gen_tb` | command truth table, bank, row and column with A10, mode word, CKE |
| `data_path_tb` | write beat order and strobe edge times (preamble, postamble), read word assembly |
| `adaptive_clock_gate_tb` | DDR clock pulses against the enable history, XOR output, no glitches |
| `pll_tb` | clock periods, duty cycle, edge alignment, lock |
| `ddr_sdram_ctrl_tb` | end to end at default parameters (see below) |

`ddr_sdram_ctrl_tb` runs the whole controller with its default parameters
against `tb/ddr_sdram_model.sv`. That file is a behavioural DDR SDRAM that:

- checks the initialisation order, tRP, tRCD, tRFC, tMRD, write recovery, bank state and tDQSS;
- stores written beats;
- returns read bursts at the programmed CAS latency.

The testbench does the following:

- waits a real 200 us before raising `sys_dly_200us`;
- writes and reads back the pattern 0x87665439876543458768965793246895 at address 0x183740;
- runs 400 random back-to-back reads and writes against a shadow memory;
- checks the read latency (7 clocks) and the occupancy of a read (10 clocks) and a write (11 clocks);
- checks that the model reported no violation.

It also counts initialisation, periodic refresh, a request held off by a
refresh, DDR clock stops and restarts, and back-to-back accesses. If any of
these never happens, the test fails. The test takes well under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y tb -y rtl rtl/ddr_pkg.sv \
    tb/ddr_sdram_ctrl_tb.sv --top-module ddr_sdram_ctrl_tb -o sim
./obj_dir/sim
```

For another testbench, replace the file and top-module names. Everything
except `pll.sv` is synthesizable. In a synthesis run, use the target's PLL in
place of `pll.sv`, or feed `clk` and `clk2x` directly.

## Limits

- One access at a time, always a full 8-beat burst with auto-precharge. There are no open-row hits, no bank interleaving, no burst interruption and no data masks (DM).
- Reads are captured at a fixed latency from `clk2x`. No DQS-based capture or training is done.
- Stopping the DDR clock between accesses follows the source design, not the JEDEC rules (see the clock gating section).
- Power and FPGA utilisation figures depend on the technology and are not part of the RTL.
