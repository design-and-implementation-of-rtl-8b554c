# DDR SDRAM controller

This controller sits between a simple 16-bit bus master and an 8-bit DDR
SDRAM. The bus master asks for a burst read or write at a
bank/row/column address. The controller does everything the SDRAM needs
in between:

- the power-up sequence;
- opening and closing rows;
- the periodic refresh;
- converting each 16-bit word into two 8-bit beats that travel on both
  edges of the SDRAM clock.

The controller core runs at 100 MHz. A second clock at 200 MHz, `clk2x`,
places the half-cycle events of the double-data-rate bus.

The structure follows a published FPGA DDR controller design ("Design and
Implementation of High Speed DDR SDRAM Controller on FPGA"). It has four
modules: main control, signal generation, data path and PLL. The main
control holds two state machines, a power-up FSM and a command FSM,
together with their counters and a refresh counter. The two FSMs publish
their states, `iState` and `cState`. Signal generation and the data path
work only from those two state values. The published description gives
this partitioning, the state names of the power-up FSM, the signal names
and the clock frequencies. It gives no timing values, no bus protocol and
no waveform details. Those parts are this implementation's own choices.
Each one is marked below.

## Module map

| module | role |
|---|---|
| `ddr_ctrl_top` | top level; wires the four modules together and holds the controller in reset until the PLL locks |
| `ddr_pll` | clock generator (behavioural model; use the FPGA's PLL/DCM in hardware) |
| `ddr_main_ctrl` | main control: `ddr_init_fsm`, `ddr_cmd_fsm`, two `ddr_counter`s, `ddr_refresh_counter` |
| `ddr_init_fsm` | power-up FSM (Mealy); produces `iState` and `sys_init_done` |
| `ddr_cmd_fsm` | command FSM; produces `cState`, `sys_ack`, `sys_ref_ack` |
| `ddr_counter` | loadable down-counter that times FSM wait states |
| `ddr_refresh_counter` | raises a refresh request every `REF_INT` cycles |
| `ddr_sig_gen` | decodes `iState`/`cState` into CKE, CS#, RAS#, CAS#, WE#, BA, A |
| `ddr_data_path` | 16-bit bus words to/from 8-bit DDR beats, DQ/DQS timing |
| `ddr_pkg` | state and command enums, device geometry, widths |

## How a command reaches the SDRAM

The command FSM changes state on the rising edge of `clk`.
`ddr_sig_gen` decodes the new state and registers the result, so the
command pins change one clock later. The SDRAM samples them at the next
rising edge of `ddr_clk`. Every command therefore reaches the SDRAM two
clocks after the cycle in which its FSM state began. The spacing between
commands is exactly the spacing between states. Each wait in the FSMs
therefore equals an SDRAM timing parameter. The data path uses the same
two-clock offset to know when write data must leave and when read data
will arrive.

## Power-up sequence (`ddr_init_fsm`)

After reset the FSM waits in `I_IDLE` with CKE low. It leaves only when
the bus master raises `sys_dly_200us`, meaning that 200 µs have passed
and the clock is stable. It then issues these commands in order:

| state | command on the pins | followed by a wait of |
|---|---|---|
| `I_NOP` | NOP (CKE goes high) | – |
| `I_PRE` | PRECHARGE all banks (A10 = 1) | `T_RP` clocks |
| `I_AR1`, `I_AR2` | AUTO REFRESH, twice | `T_RFC` clocks each |
| `I_EMRS` | LOAD EXTENDED MODE REGISTER, BA = 01, value 0 (DLL on, normal drive) | `T_MRD` clocks |
| `I_MRS` | LOAD MODE REGISTER, BA = 00: CAS latency, sequential burst, burst length | `T_MRD` clocks |
| `I_READY` | – (`sys_init_done` = 1 from here on) | |

At the defaults, `sys_init_done` rises 2 + T_RP + 2·T_RFC + 2·T_MRD = 24
clocks after the FSM sees `sys_dly_200us`. While any of these states is
active, the pins carry NOP. A low `rst_n` sends the FSM back to `I_IDLE`
from any state.

The FSM loads its wait counter as a Mealy output of each command state's
transition. The description calls for a Mealy machine. It places the two
AUTO REFRESH commands right after the PRECHARGE and the MRS after them. It
also lists an EMRS state without saying where it goes. This design puts
the EMRS just before the MRS.

This is shorter than the full JEDEC DDR sequence, which also resets the
DLL and precharges a second time. The MRS is written with the DLL-reset
bit clear.

## Serving reads, writes and refreshes (`ddr_cmd_fsm`)

The FSM works only after `sys_init_done`. It uses a closed-page policy:
every READ and WRITE has auto precharge (A10 = 1), so every bank is idle
whenever the FSM is in `C_IDLE`. This makes every access take the same
time, and a refresh can be issued from `C_IDLE` without any extra
precharge. A pending refresh wins over a waiting bus request.

Cycle by cycle, with defaults (T_RCD = 2, CAS_LAT = 2, BURST_LEN = 4, so
2 words per burst). Cycle 0 is the `C_IDLE` cycle in which `sys_ack` is
high:

| cycle | read | write | bus master sees |
|---|---|---|---|
| 0 | `C_IDLE` | `C_IDLE` | `sys_ack` |
| 1 | `C_ACTIVE` | `C_ACTIVE` | |
| 2 | `C_TRCD` | `C_TRCD` | |
| 3 | `C_READA` | `C_WRITEA` | |
| 4–5 | `C_CL` | `C_WDATA` | write: `sys_wdata_req`, one word taken per cycle |
| 6–7 | `C_RDATA` | `C_TDAL`, cycles 6–9 (T_WR + T_RP) | |
| 8–9 | `C_IDLE` | | read: `sys_rvalid` with the two words |
| 10 | | `C_IDLE` | |

The read data latency is T_RCD + CAS_LAT + 4 clocks after `sys_ack`,
which is 8 clocks (80 ns) at the defaults. A refresh is `C_AR` followed
by T_RFC − 1 wait cycles. The description says only that the command
FSM "issues the commands"; the state list and the page policy are this
design's.

## The double-data-rate data path (`ddr_data_path`)

This is the part that needs the most care. It has two clocks.
`clk2x` rises at every edge of `clk`, both rising and falling. Its
falling edges fall at the quarter points of each `clk` period.

- A toggle flip-flop on `clk`, resampled on `clk2x`, tells each `clk2x`
  edge whether it lies in the first or the second half of a `clk` cycle.
- Rising `clk2x` edges move DQS.
- Falling `clk2x` edges move DQ on writes, and sample DQ and DQS on reads.

Both clocks must come from the same PLL with aligned rising edges, which
is what `ddr_pll` provides.

**Write.** Take a WRITE command that reaches the SDRAM at clock edge *T*.
The data path produces this waveform:

- DQS is driven low from *T*+½ (the preamble).
- DQS rises at *T*+1, so tDQSS is one clock.
- DQS falls at *T*+1½, then toggles once per half clock for the rest of
  the burst.
- After the last falling edge, DQS is held low for half a clock (the
  postamble) and then released.
- DQ changes a quarter clock before each DQS edge, so every DQS edge sits
  in the middle of its byte.
- The low byte of each 16-bit word goes first. That is the lower byte
  address in the SDRAM.
- The data mask, `ddr_dm`, is held low.

**Read.** The SDRAM returns data edge-aligned with its clock. DQS is
high during the first byte of each clock and low during the second. Each
falling `clk2x` edge is in the middle of a byte, and there the data path
samples DQ and DQS. At the next `clk` edge the two bytes of the past cycle
are joined into a word. The word is marked valid only when both of these
hold:

- the command timing expects read data in this cycle, that is CAS_LAT + 3
  clocks after `C_READA`;
- the two DQS samples of the cycle read high and then low, so a DQS
  period carried this word.

A burst that arrives without DQS therefore produces no data.

The sampling points are fixed phases of `clk2x`, not edges of a delayed
DQS. This is correct only if the flight time to the SDRAM and back stays
well under a quarter clock, 2.5 ns at 100 MHz. A board with longer traces
needs either a phase-shifted capture clock or DQS delay lines, which are
not part of this design.

The description fixes the 8-bit DDR / 16-bit bus widths and says that
`clk2x` exists "to control the read/write data path delay". It also says
that the data path is driven by `cState`. The waveform details above are
standard DDR SDRAM behaviour, as this design implements it.

## Bus master interface

All signals are synchronous to `sys_clk`, which is the controller's
100 MHz clock.

| signal | dir | meaning |
|---|---|---|
| `sys_dly_200us` | in | high once the 200 µs power-up delay has passed |
| `sys_init_done` | out | SDRAM initialized; requests are accepted from now on |
| `sys_req`, `sys_r_wn`, `sys_addr[24:0]` | in | request: hold until `sys_ack`; `sys_r_wn` = 1 for a read |
| `sys_ack` | out | one-cycle pulse, combinational, in the cycle the request is taken |
| `sys_wdata[15:0]` | in | write word; must be valid in every cycle with `sys_wdata_req` high |
| `sys_wdata_req` | out | high for BURST_LEN/2 cycles per write |
| `sys_rdata[15:0]`, `sys_rvalid` | out | read words, one per cycle with `sys_rvalid` |
| `sys_ref_ack` | out | pulse when an AUTO REFRESH is issued (status only) |

`sys_addr` is `{bank[1:0], row[12:0], column[9:0]}`. It is a byte
address for a 256 Mbit x8 device. The column bits below the burst are
ignored, so bursts are always aligned. The SDRAM side uses separate
output, output-enable and input signals for DQ and DQS
(`ddr_dq_o/_oe/_i`, `ddr_dqs_o/_oe/_i`). The FPGA's I/O buffers join them
into the bidirectional pins.

## Parameters

The description gives only the 100 MHz clock and the 200 µs power-up
wait. Every value below is this design's choice. The values are typical
DDR-266 datasheet figures, rounded up to whole 10 ns clocks.

| parameter | default | meaning |
|---|---|---|
| `T_RP` | 2 | PRECHARGE to next command (20 ns) |
| `T_RFC` | 8 | AUTO REFRESH period (75 ns) |
| `T_MRD` | 2 | mode register set cycle |
| `T_RCD` | 2 | ACTIVE to READ/WRITE (20 ns) |
| `T_WR` | 2 | write recovery (15 ns) |
| `CAS_LAT` | 2 | CAS latency; integer values only (2.5 is not supported) |
| `BURST_LEN` | 4 | bytes per burst: 2, 4 or 8 |
| `REF_INT` | 780 | refresh interval in clocks (7.8 µs) |
| `REF_PERIOD` | 40 | `ddr_pll` only: reference period in simulator time units |
| `LOCK_CYCLES` | 8 | `ddr_pll` only: reference cycles until `locked` |

Constraints that the RTL relies on:

- T_RP, T_RFC, T_MRD and T_RCD must each be at least 2.
- CAS_LAT + 2 ≥ T_RP, so that a row closed by auto precharge after a read
  is idle before the next ACTIVE.
- T_RCD + BURST_LEN/2 ≥ tRAS, the minimum time a row stays open.

With the defaults, 2 + 2 = 4 clocks = 40 ns, which meets tRAS = 40 ns.

## Performance and what is not here

This is a closed-page controller for a single requester, with no overlap
between banks. A read occupies the command FSM for 8 cycles. Of those,
2 cycles move data, so the data bus is busy about 25–29% of the time for
back-to-back accesses.

The same published work claims, in its conclusion, more than 80%
efficiency and a worst-case latency of 375 ns for the highest-priority
requester. Those figures come from an interleaved, multi-requester
scheduler. The description does not describe such a scheduler, and this
design does not implement one. Nor does it implement these:

- precharging one bank while another is being accessed;
- open-page (row hit) accesses;
- DLL reset during power-up;
- DQS-delay-based read capture.

The worst case here comes from a refresh that falls due just after a
write has been accepted. A read then waits about 26 clocks (260 ns)
before its data arrives.

`ddr_pll` is a simulation model built from delays. On hardware, replace
it with the device's PLL/DCM. The replacement must give `clk2x` rising
edges aligned with `clk`, and must hold `locked` low until the clocks
are stable. A synthesis tool ignores the model's quarter-period delay and
reduces `clk2x` to a constant, which removes the whole data path from a
netlist built with the model in place.

## Simulation

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and finishes; a watchdog ends it if it
hangs. With Verilator 5, run for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ddr_pkg.sv tb/tb_ddr_ctrl_top.sv \
          --top-module tb_ddr_ctrl_top
./obj_dir/Vtb_ddr_ctrl_top
```

To run a different testbench, replace `tb_ddr_ctrl_top` with its name.

`tb_ddr_ctrl_top` runs the whole controller with every parameter at its
default, against `tb/ddr_sdram_model.sv`. That model is a behavioural x8,
four-bank DDR SDRAM. It stores the data it receives, returns CAS-latency
read bursts with DQS, and flags any broken rule:

- power-up order;
- opening an already open bank, or reading or writing a closed one;
- tRCD, tRAS, tRP (including auto precharge), tRFC, tMRD;
- the refresh interval;
- tDQSS, and DQ not driven at a DQS edge.

The test does the following:

- waits out the full 200 µs (20 000 clocks);
- checks that initialization takes 24 clocks and sets BL = 4 and CL = 2;
- writes one known burst and reads the SDRAM model's array directly to
  check the byte order;
- runs about 400 random reads and writes over all four banks, checking
  every word against a reference copy;
- checks the read latency (8 clocks) and the write-data request latency
  (4 clocks);
- checks that at least one request had to wait for a refresh.

The test counts each mechanism it exercises: PLL lock hold-off, power-up,
writes, reads, refreshes, a request delayed by a refresh, and accesses to
each bank. Any mechanism that never happened counts as a failure.

`tb_ddr_ctrl_top_cl3` runs the same sequence with non-default
parameters, and configures the SDRAM model with the same timings:

- CAS latency 3 and burst length 8 (four system words per access);
- tRCD = 3, tRP = 3, tWR = 3 and tRFC = 10;
- a 300-clock refresh interval and a 200-clock power-up delay.

With these parameters the test expects:

- initialization in 2 + tRP + 2·tRFC + 2·tMRD = 29 clocks;
- read data tRCD + CL + 4 = 10 clocks after `sys_ack`;
- the write-data request tRCD + 2 = 5 clocks after `sys_ack`.

The block testbenches check the following:

- **FSMs:** exact state sequences and wait lengths, at non-default timing
  values.
- **`ddr_sig_gen`:** every command and address encoding, including the
  mode register fields for CL = 3 and BL = 8.
- **`ddr_data_path`:** DQ/DQS edge positions, preamble, byte order, read
  latency, and the rejection of a burst that comes without DQS.
- **`ddr_pll`:** clock periods and edge alignment.
