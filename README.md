# DDR SDRAM controller with a simple 16-bit host interface

This controller sits between a bus master with no memory controller of its own
and a DDR SDRAM. The host sees a small synchronous interface: a 3-bit command
(`READA` or `WRITEA`), a word address, an acknowledge, and 16-bit data in and
out. The controller handles everything else the memory needs:

- the power-up initialisation sequence;
- periodic auto refresh, arbitrated against host traffic;
- opening and closing rows;
- the double-data-rate transfers on an 8-bit DQ bus, two bytes per clock.

The architecture follows the paper *Design and Verification of DDR SDRAM
Controller for Satellite Data Acquisition System*. That paper gives:

- the module split: main control, signal generation and data path;
- the two state machines, INIT_FSM and CMD_FSM;
- the arbitration rules;
- the pin list;
- the 16-bit host bus and 8-bit memory bus;
- burst length 8.

It gives no clock rate, no CAS latency, no memory timing values and no
host-side timing. Those are this design's own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
                 ddr_sdram_ctrl (top)
 host ──CMD/ADDR──► ddr_main_control ─────────────────┐ iState, cState, request
      ◄──CMDACK───   ├ ddr_control_if   (command      │
                     │                   interface)   ▼
                     ├ ddr_refresh_counter   ddr_signal_gen ──► SA BA CS_N CKE
                     ├ ddr_init_fsm           ├ ddr_arbiter        RAS_N CAS_N WE_N
                     └ ddr_cmd_fsm ◄─grants── └ ddr_cmd_gen ──oe, rd_win─┐
                                                                         ▼
 host ──DATAIN/DM──► ddr_data_path (ddr_oddr cells) ──► DQ DQM DQS (two beats/cycle)
      ◄──DATAOUT───                                 ◄── DQ
```

| Module | Role |
|---|---|
| `ddr_pkg` | Widths, the host address struct, the host/SDRAM command codes, the state enums, the mode-register value. |
| `ddr_control_if` | Decodes `CMD`, holds the request until it is served, raises `CMDACK`. |
| `ddr_refresh_counter` | Counts the 200 µs power-up wait (`sys_dly_200us`) and the refresh interval (`ref_req`, held until acknowledged). |
| `ddr_init_fsm` | Power-up sequence: `i_IDLE → i_NOP → i_PRE → i_AR1 → i_AR2 → i_MRS → i_READY`; then `INIT_DONE`. |
| `ddr_cmd_fsm` | Normal operation (cState): idle, active, read, write, precharge, precharge-all, refresh. |
| `ddr_arbiter` | Refresh has priority over the host; no host grant while refreshing. |
| `ddr_cmd_gen` | Turns the state of either FSM into registered command and address pins. Also times the data path. |
| `ddr_data_path` | Converts between 16-bit host words and the 8-bit DDR bus. |
| `ddr_oddr` | Two flops and a clock-selected multiplexer. It puts two values on a pin in one clock cycle. |
| `ddr_main_control`, `ddr_signal_gen` | Group the blocks above as the paper's main control and signal generation modules. |

## Host interface

All signals are synchronous to `CLK`. `RESET` is active high and synchronous.

| Port | Width | Meaning |
|---|---|---|
| `CMD` | 3 | `000` NOP, `001` READA, `010` WRITEA; other codes are ignored |
| `ADDR` | 22 | 16-bit word address `{chip, row[11:0], bank[1:0], column[6:0]}` |
| `CMDACK` | 1 | one-cycle acknowledge |
| `DATAIN`, `DM` | 16, 2 | write data, byte mask (`DM[i]=1` leaves byte `i` unwritten) |
| `DATAOUT` | 16 | read data |
| `INIT_DONE` | 1 | initialisation complete |

Protocol:

1. Wait for `INIT_DONE`.
2. Drive `CMD` and `ADDR`. Hold them until `CMDACK` is high, which lasts one
   cycle. The next command may be driven from the cycle that follows.
   `CMDACK` always comes one cycle before the READ or WRITE command reaches the
   memory. The data timing below is therefore counted from the `CMDACK` cycle,
   called *j*:

   | | cycle *j* | *j*+1 | *j*+2 | *j*+3 | *j*+4 | *j*+5 | *j*+6 |
   |---|---|---|---|---|---|---|---|
   | command pins | | WRITE / READ | | | | | |
   | `DATAIN` (write) | | word 0 | word 1 | word 2 | word 3 | | |
   | DQ beats (write) | | | | w0 lo/hi | w1 | w2 | w3 |
   | `DATAOUT` (read, CL=2) | | | | | | word 0 | word 1 … word 3 at *j*+8 |

   Read words are on `DATAOUT` in cycles *j*+CL+3 to *j*+CL+6. `DATAOUT`
   holds its last value outside read bursts. The interface has no read-valid
   strobe, so the host counts cycles.
3. One command moves a burst of 8 DDR beats, which is 4 host words. The words
   are `column`, `column+1`, and so on, wrapping inside the aligned group of 4
   words that holds `column`.

On an idle controller `CMDACK` arrives 4 cycles after the command is first
presented. The request is registered, the FSM leaves idle, and ACTIVE waits
T_RCD = 2 cycles. A command to the row that is already open can arrive before
the current burst's last cycle. It is then chained: its `CMDACK` comes exactly
BL/2 = 4 cycles after the previous one, and the data bus has no gap. A run of
reads or writes to one row therefore moves 16 bits per clock. At 100 MHz that
is 200 MB/s.

## Memory side

| Port | Meaning |
|---|---|
| `SCLK`, `SCLK_N` | The memory clock: `CLK` and its inverse, sent out through the same DDR output cell as the data. |
| `SA[11:0]`, `BA[1:0]`, `CS_N[1:0]`, `CKE`, `RAS_N`, `CAS_N`, `WE_N` | Command and address. Registered; they change just after the rising edge. |
| `DQ_O`, `DQ_OE`, `DQ_I` (8 bits) | The bidirectional DQ pad, split into output, output enable and input. |
| `DQS_O`, `DQS_OE` | The DQS pad, split into output and output enable. |
| `DQM` | Write data mask, one bit per beat. |

The memory is organised as two chips (chip selects). Each chip has 4 banks,
4096 rows and 256 byte columns. One host word is two byte columns, so word
column *c* becomes byte column 2*c* on `SA[7:0]`. Commands use the standard
`{RAS_N, CAS_N, WE_N}` codes. The two the paper spells out are WRITE = `100`
and READ = `101`. A command meant for both chips (initialisation,
precharge-all, refresh) pulls both `CS_N` low. Other commands select the
addressed chip. Between commands `CS_N` keeps its value and the pins carry NOP.

## Initialisation

After reset, `ddr_refresh_counter` counts `T_200US` cycles (200 µs at
100 MHz). Then `ddr_init_fsm` steps through its states. Each state issues its
command in its first cycle (`ifirst`) and then waits out the required time:

| State | Command | Lasts (cycles) |
|---|---|---|
| `i_IDLE` | none; `CKE` low | until `sys_dly_200us` |
| `i_NOP` | NOP; `CKE` goes high | 1 |
| `i_PRE` | PRECHARGE all (A10 = 1) | T_RP |
| `i_AR1`, `i_AR2` | AUTO REFRESH | T_RFC each |
| `i_MRS` | LOAD MODE REGISTER: `SA = 0x023` (burst 8, sequential, CL 2) | T_MRD |
| `i_READY` | `INIT_DONE` = 1 | for good |

`INIT_DONE` rises T_200US + 2 + T_RP + 2·T_RFC + T_MRD rising edges after
reset ends. With the defaults that is edge 20022. The sequence is exactly the
one the paper describes. A full JEDEC DDR power-up also loads the extended
mode register and resets the DLL. This sequence does not, so real parts that
need those steps need two more states.

## Command FSM and refresh arbitration

`ddr_cmd_fsm` waits in `C_INIT` until `INIT_DONE`.

**From `C_IDLE`:**

- A refresh grant leads to `C_PREALL` (T_RP) and then `C_REFRESH` (T_RFC).
- A host grant opens the row with `C_ACTIVE` (T_RCD). The FSM then goes to
  `C_READ` or `C_WRITE`. The request is accepted on that transition, and
  `CMDACK` follows.

**In a burst:**

- `C_READ` lasts BL/2 = 4 cycles.
- `C_WRITE` lasts 4 + 1 + T_WR cycles. The extra cycles are write recovery
  before the bank may be precharged.

**In the last cycle of a burst** (cycle 4 of a write), one of three things
happens:

- A pending host command of the same kind to the same chip, bank and row
  re-enters the state, so the next burst follows with no gap.
- Otherwise, a pending refresh sends the FSM to `C_PREALL`.
- Otherwise, the FSM goes to `C_PRE`, which precharges that bank, and then
  back to `C_IDLE`.

The arbiter grants refresh whenever it is requested and grants the host only
when no refresh is requested or running. The FSM acts on grants only at its
decision points: idle, and the last cycle of a burst. Together these give the
paper's two rules:

- A host command that arrives with a refresh, or during one, gets no `CMDACK`
  until the refresh is over.
- A refresh that becomes due during a host burst waits for the burst to end.

The refresh request stays high until the FSM acknowledges it, which happens
when it enters `C_REFRESH`. The interval counter keeps running in the
meantime, so the average rate stays one refresh per T_REFI cycles. In the
end-to-end test the longest gap between refreshes was 1578 cycles, against a
nominal interval of 1560.

Rows are closed after every access unless a chained command keeps them open,
so READ and WRITE go out with A10 = 0 and a separate PRECHARGE follows. This
matches the paper's state diagram, which has an explicit precharge state. The
host command names READA and WRITEA are kept, even though no auto-precharge
command goes to the memory.

## The double-data-rate data path

This is the part that is easiest to get wrong when changing the design.

**The DDR output cell.** `ddr_oddr` samples `d_rise` and `d_fall` on a rising
edge. It drives `d_rise` while `CLK` is high. A falling-edge flop copies the
`d_fall` sample, and the cell drives it while `CLK` is low. Two values per
cycle thus come out one cycle after they go in. DQ, DQM, DQS and the forwarded
clock all use this cell.

**Write timing.** `ddr_cmd_gen` keeps a shift register of the READ and WRITE
commands it has issued, and derives two windows from it:

- `oe` is high in cycles 1–4 after a WRITE is on the pins.
- `rd_win` is high in cycles CL+1 to CL+4 after a READ.

`ddr_data_path` registers `DATAIN`/`DM` every cycle, and each word reaches the
output cells one cycle later. Host word *n* of a burst is therefore on DQ in
cycle *k*+2+*n*, where *k* is the cycle with WRITE on the pins:

- the low byte while `CLK` is high;
- the high byte while `CLK` is low.

This puts the first DQS rising edge one clock after the WRITE (tDQSS = 1).
DQS toggles with the clock during the burst. `DQS_OE` opens half a cycle early
so that DQS is driven low first, which is the write preamble. DQS is
therefore edge-aligned with DQ. Centring it in the data eye needs a
quarter-cycle delay in the I/O, which is not modelled here. The test memory
samples write data a quarter cycle after each edge.

**Read timing.** DQ is sampled on the falling edge (the rising-edge beat) and
again on the next rising edge (the falling-edge beat). While `rd_win` is high
the pair goes into `DATAOUT` as `{second beat, first beat}`. The controller
captures with its own clock and ignores the read DQS. This works when the
round trip from `SCLK` to returned data is under a quarter cycle. In the
paper, a PLL in clock-lock mode and a 2X clock handle I/O timing. Those clock
parts are not part of this RTL, and `CLK` is taken to be the PLL's deskewed
output. A faster board needs DQS-based capture or a phase-shifted capture
clock.

## Parameters

The top-level parameters and their defaults are below. "Own" means the value
is this design's choice for a 100 MHz clock and DDR-200-class parts. The paper
gives only the 200 µs wait and burst length 8.

| Parameter | Default | Meaning | Source |
|---|---|---|---|
| `T_200US` | 20000 | power-up wait, cycles | paper: 200 µs |
| `T_REFI` | 1560 | refresh interval, cycles (15.6 µs = 64 ms / 4096 rows) | own |
| `T_RCD` | 2 | ACTIVE to READ/WRITE | own |
| `T_RP` | 2 | PRECHARGE to next command | own |
| `T_RFC` | 8 | AUTO REFRESH to next command | own |
| `T_WR` | 2 | write recovery | own |
| `T_MRD` | 2 | LOAD MODE REGISTER to next command | own (the paper names tMRD) |
| `CL` | 2 | CAS latency (whole cycles only) | own |
| `BL` | 8 | burst length; the data path timing assumes 8 | paper |

The widths live in `ddr_pkg`: 16-bit host data, 8-bit DQ, 12-bit rows, 2-bit
banks, 7-bit word columns and 2 chip selects. `ASIZE` is derived from them.

## Departures and own choices

- **Bus widths.** The host bus is 16 bits and DQ is 8 bits, as the paper's
  text and system diagram state. Its core block diagram labels DQ with the
  host width, and its simulation waveforms show a 128-bit data vector (one
  8-beat burst of 16-bit beats). Here a burst is 8 beats of 8 bits, which is
  4 host words. A 128-bit block is two chained bursts.
- **Host command width.** `CMD` is 3 bits, as in the system diagram and the
  waveforms. The core block diagram shows 2 bits. The command encoding, the
  address field order and the `CMDACK` timing are this design's choices.
- **What the paper's system has that this RTL leaves out:**
  - The PLLs and the 2X clock are not included.
  - Read data is captured with `CLK`, not DQS.
  - The I/O pads are outside the RTL; `DQ` and `DQS` are split into
    output, enable and input signals.
- **Initialisation** has no extended mode register or DLL reset, because the
  paper's sequence has none.
- **No host-issued** refresh, precharge or mode-register commands; refresh is
  automatic only.
- **No read-to-write chaining.** A change of direction always closes the row.

## Simulation

Each testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. The end-to-end test runs at the top's default
parameters and needs `--timing`:

```
verilator --binary --timing --assert --timescale 1ns/100ps -Irtl -y rtl \
    --top-module tb_ddr_sdram_ctrl rtl/ddr_pkg.sv tb/ddr_sdram_model.sv \
    tb/tb_ddr_sdram_ctrl.sv -o sim
./obj_dir/sim
```

`tb_ddr_sdram_ctrl` runs the top against `tb/ddr_sdram_model.sv`, a
behavioural DDR SDRAM model (simulation only). The model:

- stores data;
- returns it at the CAS latency;
- counts violations of command order and timing. It checks the power-up wait,
  the initialisation order, the mode register value, ACTIVE to an open bank,
  access to a closed bank, tRCD, tRP, tRFC, tMRD, write recovery, the refresh
  gap, the DQ/DQS enables and bus contention.

The test makes 2500 random reads and writes, some of them masked, over a few
rows of both chips. It predicts every read word from a scoreboard, checks
`INIT_DONE` timing and the 4-cycle spacing of chained bursts, and requires
each mechanism at least once:

- refresh;
- host held off by refresh;
- refresh waiting for a burst;
- chained reads;
- chained writes;
- masked writes;
- bank precharge;
- both chips.

It runs about 44,000 cycles in well under a second.

`tb_ddr_block_rw` also runs at the defaults. It writes 128-bit blocks as
pairs of chained WRITEA commands and reads them back as chained READA pairs.
It checks the 4-cycle command spacing and the 8 consecutive read words.

Unit testbenches (`tb_ddr_<block>.sv`) cover every module. They use short
timing parameters where that helps:

- exact state sequences and their durations;
- pin codes and the mode register value;
- the `oe`/`rd_win` windows;
- the beat-by-beat DDR output and read capture, with random data;
- the `CMDACK` handshake;
- arbitration.

Build them the same way, naming the testbench as the top module. The model
and the testbenches use delays and therefore need `--timing`. The RTL modules
declare no time unit of their own, so `--timescale` supplies one.
