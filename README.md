# DRAM memory interface for a 32-bit processor

A processor that was built around a static RAM expects a simple memory bus:
raise a strobe with an address, wait for an acknowledge. A dynamic RAM does
not work that way. It needs the address in two halves, row then column,
framed by the RAS and CAS strobes. It also loses its contents unless a
refresh cycle reaches it every 4 ms. This design is the small controller that
closes that gap. It sits between the processor bus and a bank of 256K-bit
TMS4256-class DRAM chips. It turns each processor read or write into a DRAM
read or write cycle. It also slips CAS-before-RAS refresh cycles in between,
paced by a timer.

The main idea is that the controller is nothing more than the DRAM's own
protocol, seen from the other side. The DRAM accepts three cycles: read,
write and refresh. Each is a fixed sequence of pin states that starts and
ends in an idle state. The controller, the "DRAM manager", holds those three
sequences as three paths through one state machine:

- a refresh request from the timer selects the refresh path;
- a processor strobe selects the read or the write path.

Because every path is a sequence the DRAM accepts, and every path returns to
idle, the manager can only drive legal DRAM cycles.

```
              strobe/rw/addr/wdata            ras/cas/rw/addr/din
 processor  ------------------------>  DRAM  ---------------------->  DRAM
  (outside) <------------------------ manager <----------------------  bank
                 rdata/dtack            |  ^         dout          (outside)
                                    set |  | done
                                        v  |
                                   refresh timer
```

## One step per clock

The whole interface runs from one 100 ns (10 MHz) clock. The DRAM's timing
limits are:

| limit | meaning | minimum |
|---|---|---|
| t_a(C) | CAS high to data valid | 50 ns |
| t_a(R) | RAS high to data valid | 100 ns |
| t_dis(CH) | output held after CAS falls | 30 ns |
| t_w(RH) | CAS before RAS, in refresh | 90 ns |
| t_w(RL) | RAS pulse, in refresh | 100 ns |

With a 100 ns clock, every one of these limits is met when each protocol
step lasts exactly one clock. So the state machine has no wait counters. A
read or write takes four clocks (400 ns) and a refresh takes three
(300 ns). If you run the clock faster, these limits break. Each one would
then need a longer step.

RAS and CAS are modelled **active high**: 1 means the strobe is asserted.
Real TMS4256 pins are active low, so a board using real chips must invert
`dram_ras` and `dram_cas`.

### The three cycles, clock by clock

Clock 1 of every cycle is the clock in which the manager leaves IDLE. Its
DRAM outputs come from the state *and* the request inputs of that same
clock, so a strobe that arrives at an idle manager drives RAS at once. All
later steps are decoded from the state register alone.

| clock | read (rw=1) | write (rw=0) | refresh |
|---|---|---|---|
| 1 (IDLE) | ras, addr=row | ras, addr=row | cas |
| 2 | ras, cas, rw=1, addr=column | ras, cas, rw=0, addr=column | cas, ras |
| 3 | strobes low, rw=1; DRAM drives `dram_dout`, captured at the clock edge | strobes low, rw=0; `dram_din` = write data, stored by the DRAM | strobes low, `timer_set` |
| 4 | `dtack`, word on `rdata` | `dtack` | – |

State names are in `dram_pkg`: `MS_IDLE`, `MS_COL`, `MS_DATA`, `MS_ACK`,
`MS_REF2`, `MS_REF3`. The DRAM is precharging whenever RAS is low. That
covers step 3 and step 4 of an access and step 3 of a refresh, so there is
at least one RAS-low clock between any two cycles.

## Processor bus

| signal | dir | meaning |
|---|---|---|
| `strobe` | in | an access is requested |
| `rw` | in | 1 = read, 0 = write |
| `addr[17:0]` | in | upper 9 bits = DRAM row, lower 9 bits = column |
| `wdata[31:0]` | in | word to write |
| `rdata[31:0]` | out | word read; valid while `dtack` is high |
| `dtack` | out | one-clock acknowledge |

The processor must hold `strobe`, `rw`, `addr` and (for a write) `wdata`
until it sees `dtack`. The manager does not latch them; it reads each one in
the step that needs it. An assertion in `dram_manager` fires if they change
early. On the clock after `dtack`, the processor either drops `strobe` or
already presents its next request. Back-to-back accesses therefore run at
one every four clocks.

Latency, counted from the first clock of `strobe` up to and including
`dtack`:

- 4 clocks when the manager is idle;
- up to 3 clocks more when a refresh is running or starts in that first
  clock.

## Refresh pacing

`refresh_timer` raises `done` exactly `PERIOD` clocks after it is set. It
holds `done` high until it is set again. The default `PERIOD` is 33000
clocks, which is 3.3 ms. The manager sets the timer in the last step of each
refresh. A refresh due while an access is in progress waits for that access
to finish, at most 3 more clocks. When a refresh and a strobe are both
pending in IDLE, **the refresh goes first**.

So one refresh begins between `PERIOD+3` and `PERIOD+6` clocks after the
previous one began, which is 3.3003 to 3.3006 ms. That is well inside the
DRAM's 4 ms requirement. The 0.7 ms of slack is room for accesses in
progress, not for a backlog. Giving the strobe priority in IDLE could let a
processor that never pauses starve refresh, which is why the refresh wins.

Each CAS-before-RAS cycle refreshes the row picked by the DRAM's internal
counter. The 3.3 ms spacing is this design's pacing target. If your DRAM
needs every row refreshed within a given time, compare that with the
per-cycle spacing here.

## What is specified and what was chosen here

The following come from the design this RTL implements:

- the block structure (processor, manager, timer, DRAM);
- the pin sequence of each of the three cycles;
- one clock per step at 100 ns;
- the 3.3 ms timer and the 4 ms refresh requirement;
- the 400 ns and 300 ns cycle times;
- the processor handshake (strobe and RW held with the address until
  dtack, read data returned with dtack).

The following are this implementation's own choices:

- **Geometry.** 9-bit row, 9-bit column, 32-bit words, with the row taken
  from the upper address bits. This matches 32 one-bit 256K chips side by
  side and a 32-bit processor.
- **Write cycle.** It mirrors the read cycle with `rw` = 0. Write data is
  presented in step 3 and `dtack` comes in step 4.
- **Priority.** Refresh wins over a strobe when both are pending in IDLE.
- **dtack.** It is exactly one clock long.
- **Idle values.** Outside its steps, `dram_rw` rests at 1 and `dram_addr`
  at 0.
- **Reset.** Asynchronous and active low. Reset returns to IDLE with both
  strobes low. It also starts the timer on a full interval, so the first
  refresh comes 3.3 ms after reset.
- **Timer implementation.** A down counter.
- **Strobe polarity.** Active-high RAS/CAS, as described above.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dram_system` | `ROW_W`, `COL_W` | 9, 9 | row/column address bits (`addr` is `ROW_W+COL_W` wide, `dram_addr` is `max(ROW_W,COL_W)`) |
| | `DATA_W` | 32 | word width |
| | `REFRESH_PERIOD` | 33000 | refresh timer interval in clocks |
| `refresh_timer` | `PERIOD` | 33000 | same, for the timer alone |

Shared constants (clock period, 4 ms limit in clocks, cycle lengths) and the
state type live in `rtl/dram_pkg.sv`. If you change the clock, recompute
`REFRESH_PERIOD` as 3.3 ms divided by the clock period, and recheck the
timing table above.

## Files

| file | content |
|---|---|
| `rtl/dram_pkg.sv` | constants, manager state type |
| `rtl/dram_manager.sv` | the controller state machine, with bus assertions |
| `rtl/refresh_timer.sv` | refresh interval timer |
| `rtl/dram_system.sv` | top: manager and timer wired together |
| `tb/dram_chip_model.sv` | behavioural DRAM bank: checks the protocol and the refresh gaps, and returns random data outside the read data step |
| `tb/dram_bus_master.sv` | processor stand-in: random traffic and all end-to-end checks |
| `tb/tb_refresh_timer.sv` | timer, at 7 clocks and at 33000 clocks, checked every clock |
| `tb/tb_dram_manager.sv` | manager, checked pin by pin on every step, including the refresh/strobe collisions |
| `tb/tb_dram_system.sv` | whole system with a 60-clock refresh interval: 5000+ accesses and hundreds of refreshes |
| `tb/tb_dram_system_full.sv` | whole system at default parameters, run through eight refresh intervals (about 26 ms) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/dram_pkg.sv tb/tb_dram_system_full.sv --top-module tb_dram_system_full
./obj_dir/Vtb_dram_system_full
```

Swap in any other `tb_*` name. Every testbench runs in well under a second.

## Verification

The testbenches check these properties:

- **Timer.** `done` is compared every clock with a reference count of clocks
  since the last set.
- **Pins.** In the manager test, every DRAM pin and the address are checked
  on every step of every cycle.
- **Collisions.** Also in the manager test:
  - a refresh request and a strobe arriving together run the refresh first
    and delay `dtack` by three clocks;
  - a refresh request arriving during an access waits until that access
    ends.
- **Data.** In the system tests, every read returns the word last written,
  compared against a shadow memory. Every access takes 4 clocks plus any
  remaining refresh steps.
- **Refresh spacing.** The starts of consecutive refreshes are 33003 to
  33006 clocks apart (or the shortened equivalent).
- **Protocol.** The DRAM model sees no illegal pin sequence and no refresh
  gap over 4 ms.

The system tests also count how often each mechanism occurs: reads, writes,
refreshes, back-to-back accesses, an access waiting behind a refresh, and a
refresh waiting behind an access. A test fails if any mechanism never
happens.

## Limits

- **Model only.** The DRAM chips are represented only by a behavioural model
  with one step per clock. It checks pin sequences, not analog timing
  inside a clock: setup of the address to the strobe edges, or output
  turn-on time. A board design must check those against the real part's
  data sheet.
- **Processor bus.** This design defines only the processor side of the
  bus. The processor itself is not included.
- **Power-up.** The initialisation sequence that real DRAMs need at power-up
  (several RAS cycles before first use) is not generated.
