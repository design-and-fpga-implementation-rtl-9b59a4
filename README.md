# APB bridge with a ripple-counter transfer sequencer

This is a small AMBA APB subsystem. A host on the fast side of a chip asks
for writes and reads. A bridge queues the writes in a FIFO and runs each
request as an APB transfer to one of three peripheral slaves. The unusual
part is how the bridge keeps track of the bus phase: it uses no ordinary
state register. The phase is the count of a **three-bit asynchronous down
ripple counter**, so only the counter's first flip-flop loads the clock. The
design it follows presents this as a way to cut clock skew. Each later stage
is clocked by the output of the stage before it, not by the clock tree.

The RTL follows the bridge described by M. Kiran Kumar, A. Sajja and
F. Noorbasha in "Design and FPGA Implementation of AMBA APB Bridge with
Clock Skew Minimization Technique". That description gives these parts:

- the building blocks: a FIFO, a three-bit down ripple counter, APB
  slaves and a reset controller;
- the signal names and widths;
- the constants 111, 110 and 101;
- the 32-bit, 8-entry configuration.

It says little about how the parts work together. Much of the behaviour
below is therefore this implementation's own choice. The section
"Departures and open points" lists those choices.

## Blocks

| module | file | role |
|---|---|---|
| `apb_bridge_top` | `rtl/apb_bridge_top.sv` | the whole subsystem: reset controller, bridge, three slaves |
| `apb_bridge` | `rtl/apb_bridge.sv` | APB master: write FIFO, sequencer, address decode, read return |
| `ripple_down_counter` | `rtl/ripple_down_counter.sv` | 3-bit asynchronous down counter that holds the bus phase |
| `sync_fifo` | `rtl/sync_fifo.sv` | 8-deep queue of pending writes (address and data) |
| `apb_addr_decoder` | `rtl/apb_addr_decoder.sv` | address to one-hot `PSEL` and register offset |
| `reset_controller` | `rtl/reset_controller.sv` | asynchronous assertion, synchronous release of `PRESETn` |
| `apb_slave` | `rtl/apb_slave.sv` | register-bank peripheral with optional wait states and a data output `sout` |
| `apb_pkg` | `rtl/apb_pkg.sv` | phase codes and default sizes |

```
 host port                         apb_bridge                              APB
 apb_write ──►┌──────────┐  pop  ┌──────────────────────┐  PADDR,PWRITE  ┌──────────┐
 apb_write_data│ sync_fifo├──────►│ start / register     ├──PWDATA───────►│ slave 0  ├─► sout0
 PADDRESS ───►│ {addr,data}│     │ transfer             │  PSEL[0]       ├──────────┤
              └──────────┘       │                      ├──PSEL[1]──────►│ slave 1  ├─► sout1
 apb_read ───► pending read ────►│  ripple_down_counter │  PSEL[2]       ├──────────┤
                                 │  111 IDLE            ├──PENABLE──────►│ slave 2  ├─► sout2
 apb_read_data ◄─────────────────│  110 SETUP           │◄─PRDATA,PREADY─┴──────────┘
 read_valid                      │  101 ACCESS          │
                                 └──────────────────────┘
```

## The ripple-counter sequencer

### Phase codes

The three phases of an APB transfer are consecutive values of a down count:

| count (`seq_out`) | phase | `PSEL` | `PENABLE` |
|---|---|---|---|
| `3'b111` | IDLE | 0 | 0 |
| `3'b110` | SETUP | decoded slave | 0 |
| `3'b101` | ACCESS | decoded slave | 1 |

A counter that starts at all ones reaches SETUP after one decrement and
ACCESS after two. `seq_qb` is the bitwise complement of the count, as the
counter's Q-bar outputs.

### How it counts

Each stage is a D flip-flop with its Q-bar fed back to D, so it toggles.
Stage 0 is clocked by `PCLK`. Stage *i* is clocked by the Q of stage *i-1*.
With rising-edge flip-flops, stage *i* toggles when stage *i-1* wraps from 0
to 1, so the circuit counts down: 111 → 110 → 101 → … → 000 → 111.

Stage 0 toggles only when the bridge enables it. The enable is a
multiplexer on D (`en ? ~q : q`), not a gated clock. The bridge enables
stage 0 in two cases:

- in IDLE, when it starts a transfer;
- in SETUP, which always lasts exactly one cycle.

In ACCESS the counter holds until the selected slave raises `PREADY`.

### Getting back to IDLE

Counting down from ACCESS (101) would reach 100, not 111. The bridge
therefore does not count on from ACCESS. When ACCESS completes, a flip-flop
(`seq_ready`) drives the counter's **asynchronous preset** low for one
cycle, and every stage is forced back to 1. Because the preset comes
straight from a flip-flop, it carries no glitch. The preset also catches a
count that is not one of the three phase codes: it pulls the counter back
to IDLE.

A preset never lasts longer than one cycle. The next cycle is always IDLE,
so it always ends with a fresh falling edge.

The counter cannot step while its preset is held. The cycle after ACCESS is
therefore an extra IDLE cycle in which no transfer can start.

### Timing

Without wait states, one transfer takes four `PCLK` cycles from the cycle
that starts it to the first cycle that can start the next one:

| cycle | count | what happens |
|---|---|---|
| n | 111 | IDLE; a request is waiting, so stage 0 is enabled; the FIFO is popped (or the pending read is taken); `PADDR`, `PWRITE` and `PWDATA` are registered |
| n+1 | 110 | SETUP: `PSEL` high, `PENABLE` low |
| n+2 | 101 | ACCESS: `PENABLE` high; the slave samples the transfer at the end of the cycle if `PREADY` is high |
| n+3 | 111 | IDLE with the preset held; read data appears on `apb_read_data` and `read_valid` is high |
| n+4 | 111 | the next transfer may start |

Each wait state adds one ACCESS cycle. An accepted write reaches the
slave's `sout` 3 + *wait states* cycles after the edge that accepted it. A
read returns 4 + *wait states* cycles after the edge that accepted the
request.

### Ripple caveat

The count settles a few flip-flop delays after the clock edge. On the way
from SETUP to ACCESS it passes through 111 for one stage delay, because
bit 0 rises before bit 1 falls. `PSEL` and `PENABLE` are decoded from the
count, so they can glitch inside a cycle. They are valid at the `PCLK`
edges, where APB slaves sample them. Static timing analysis must treat the
counter stages as generated clocks.

### Power-up

On an FPGA each stage powers up at 1 (it has an initial value). A stage
after the first is clocked only by the stage before it, so the initial
value is what guarantees a defined count before the first preset edge.

## Write FIFO and request order

### Writes

A one-cycle `apb_write` pulse pushes `{PADDRESS, apb_write_data}` into the
8-word FIFO. The address is stored with the data, so the FIFO is 37 bits
wide in the default build.

When the FIFO is full, the request is dropped and `wr_overflow` is high
during that cycle. A pop in the same cycle frees room, and then the request
is accepted. `fifo_count` (16 bits), `empty` and `full` are outputs.

### Reads

A one-cycle `apb_read` pulse records `PADDRESS` as the pending read.
`read_busy` stays high until the read returns. A read request made while
`read_busy` is high is ignored.

The read starts only when the FIFO is empty. Every write accepted before
it, and any accepted while it waits, reaches the slaves first.

## Address map

The 5-bit address is split as follows:

| `PADDR[4:3]` | target |
|---|---|
| 0, 1, 2 | slave 0, 1 or 2; `PADDR[2:0]` picks one of its eight registers |
| 3 | no slave |

For an unmapped address, the bridge still runs SETUP and ACCESS, but no
`PSEL` is asserted. The transfer completes at once without waiting, and a
read returns zero.

With `NSLAVE` slaves, the top `clog2(NSLAVE)` address bits select the slave.

## Slaves

`apb_slave` stands for a simple peripheral, such as a UART, timer, keypad
or PIO.

- It holds eight `DSIZE`-bit registers.
- A write stores `PWDATA` in the addressed register and also drives it on
  `sout`, the slave's output pins.
- A read returns the addressed register. `PRDATA` is zero when the slave is
  not selected.
- `WAIT_STATES` (default 0) holds `PREADY` low for that many ACCESS cycles
  of every transfer.

## Reset

`PRESETn` is active low, as in APB. `reset_controller` applies it at once.
It releases it two `PCLK` edges after `PRESETn` rises, so every flip-flop
leaves reset on the same edge.

Reset has these effects:

- the FIFO is emptied;
- the slaves' registers and `sout` are cleared;
- a pending read is dropped;
- the sequencer is held at IDLE.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DSIZE` | 32 | data width; 8 and 64 are also tested |
| `ASIZE` | 8 | FIFO depth in words |
| `AW` | 5 | address width |
| `NSLAVE` | 3 | number of slaves |
| `COUNT_W` | 16 | width of `fifo_count` |
| `WAIT_STATES` | 0 | wait states inserted by every slave (top only) |

The defaults are the published configuration. The published work also
mentions an 8-bit build on a Zynq board and support for 64-bit data. Both
are a change of `DSIZE`.

## Departures and open points

These points either differ from the published description or fill in
details it leaves open:

- **Phase codes.** The published design lists the constants 111, 110 and
  101 next to the ripple counter's outputs, without saying what they mean.
  Here they are the IDLE, SETUP and ACCESS phases of the counter.
- **Return to IDLE.** The one-cycle preset that returns the counter to
  IDLE is this design's own, and so is the extra IDLE cycle it costs.
- **Host handshake.** The pulse-based handshake, the overflow flag, the
  single pending read and the write-before-read order are this design's own.
- **Address storage.** The address is queued together with the data. The
  published FIFO is 32 bits wide and holds data only.
- **Slaves and address map.** The register-bank slave and the address map
  are this design's own. The published board demo shows slave 0 selected
  for an input pattern of 10011. How the board's switches drive the bridge
  inputs is not given, so that pattern does not fix the decode.
- **Reset polarity.** The published waveforms show transfers running while
  `PRESETn` is 0, which reads as an active-high reset. The APB convention
  of active low was followed instead.
- **Number of slaves.** The published conclusion mentions two slaves, but
  its waveforms show three selects and three slave outputs. Three are built.
- **FIFO pointers.** The FIFO pointers are 3 bits wide. The published
  waveforms show 32-bit pointers.
- **Not built.** The high-speed AHB/ASB side, the board-level pin mapping
  and the named example peripherals are not built. The host port stands in
  for the first. `DSIZE = 8` covers the board's data width.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and each has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_ripple_down_counter` | count sequence against a reference, random enable, mid-cycle asynchronous preset, wrap-around |
| `tb_sync_fifo` | random push/pop against a queue model: data, count, flags, overflow |
| `tb_apb_addr_decoder` | all 32 addresses |
| `tb_reset_controller` | immediate assertion, release exactly on the second edge |
| `tb_apb_slave` | reads and writes against a register model, exact wait-state count, `sout`, idle `PRDATA` |
| `tb_apb_bridge` | the bridge against testbench slaves with random wait states and random host traffic, covering ordering, data, select, SETUP→ACCESS, phase codes, start latency, 4-cycle back-to-back spacing, FIFO count and flags, read-after-write; it fails if FIFO full, overflow, wait states, unmapped access, reads and writes to each slave did not all occur |
| `tb_apb_bridge_top` | end to end with one wait state per transfer: write latency, read latency, burst with overflow, drain rate, read-back of all 32 addresses, reset during traffic; counts every mechanism |
| `tb_apb_bridge_top_full` | the same sequence with the top at its default parameters |
| `tb_apb_bridge_widths` | the whole subsystem at 8-bit and 64-bit data |

The two top-level testbenches share their sequence through
`tb/apb_top_test_body.svh`.

The bridge also checks the APB rules itself with immediate assertions:

- SETUP is followed by ACCESS;
- the transfer holds still during wait states;
- the count is always a legal phase code.

### Running a testbench

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/apb_pkg.sv \
    tb/tb_apb_bridge_top.sv --top-module tb_apb_bridge_top
./obj_dir/Vtb_apb_bridge_top
```

To run another, swap in its file and module name. Every run takes well
under a second.

### Lint warnings

`verilator --lint-only -Wall` reports a few warnings that are deliberate:

- `SYNCASYNCNET` on `seq_ready`: it is both the counter's preset and a term
  of the start condition.
- `SYNCASYNCNET` on the reset synchroniser.
- `PROCASSINIT` on the counter stages: this is their power-up value.
