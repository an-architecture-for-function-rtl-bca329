# Hardware function calls and function pointers between HLS accelerators

High-level synthesis normally inlines every function call. The callee's
hardware is copied into each caller, and a call through a function pointer
cannot be built, because the target is only known at run time. This RTL shows
another approach. Each function becomes an accelerator on a shared bus. Its
arguments, control word and result sit in memory-mapped registers, and **the
base address of those registers is the function's pointer**. A caller,
whether another accelerator or a processor, calls a function like this:

1. It writes the arguments.
2. It writes the control register. The data written is a *notification
   address* that belongs to the call site.
3. It waits until the callee writes to that address.
4. It reads the result.

A pointer call is the same sequence with a base address that arrives at run
time. One callee can serve many callers, so it exists only once in hardware.

The SystemVerilog contains three things:

- the reusable pieces: a Wishbone B4 wrapper, an interface controller, a
  notification unit, the call unit and a shared-bus intercon;
- a small cluster, `acc_system`, that exercises them with two classic
  examples: a plain call, and a call through a function pointer;
- a self-checking testbench for every module.

## The accelerator's register window

Each accelerator owns an aligned window of bytes (256 in the example
cluster). Registers are 32-bit words:

| byte offset   | register         | write                                         | read                                          |
|---------------|------------------|-----------------------------------------------|-----------------------------------------------|
| 0             | control          | start; data = notification address (0 = none) | `{notification address[31:2], state[1:0]}`    |
| 4 .. 4·N      | parameters 1..N  | argument value (taken only while idle)        | current value                                 |
| 4·(N+1)       | return value     | ignored                                       | result of the last computation                |
| rest of window| accelerator's own memories and call-site addresses (its *slave chain*) | | |

`state` is 0 (idle, A), 1 (busy, B) or 2 (done, C). The control register is
also a lock:

- A control write is only accepted in state A. It moves the accelerator to
  B and raises `start_port`.
- `done_port` moves it to C.
- The **first read of the control register in state C** moves it back to A.

A caller must therefore read the control register once after the result is
ready. Until then, no one else can start that accelerator. A function without
arguments or without a result simply has no such registers (`NP = 0`,
`HAS_RET = 0`).

## What a call looks like on the bus

A call from accelerator *funA* to accelerator *sum* in the example cluster
goes through these steps. Addresses are bytes.

```
funA builtin unit                     bus                        sum wrapper
  write  0x204 <- a           ------------------------------>   param 1
  write  0x208 <- b           ------------------------------>   param 2
  write  0x200 <- 0x180       ------------------------------>   control: A->B, start_port
         (0x180 = funA call site)                                 ... sum computes ...
                                                                  done_port: B->C
  slave chain sees write 0x180 <------------------------------   notify_caller writes 0x180
  read   0x20C  -> result     <------------------------------>  return register
  write  0x140 <- result      (inside funA's window: never leaves funA)
  read   0x200  (release)     <------------------------------>  control: C->A
  done
```

The notification is a plain bus write to an address inside the caller's
window. The caller's wrapper routes it to the caller's slave chain, and there
the call unit recognises its own call-site address. No register or memory
has to exist at that address. Because each call site has its own address,
several calls in one caller never mix up their notifications. Notification
replaces polling. With polling, many callers that keep reading their callees'
control registers can fill the bus, and the callees then cannot finish.

## Inside the wrapper (`wb_acc_wrapper`)

A synthesized core has a *minimal interface*. It has:

- `start_port` and `done_port`;
- one input port per argument and a `return_port`;
- optionally, two memory **daisy chains**:
  - a master chain (`Mout_*`), on which the core issues loads and stores;
  - a slave chain (`S_*`), on which the core's own memories answer.

A request on a chain is a level: `we` or `oe` stays high, with `addr`,
`wdata` and `size` held steady, until a one-cycle `rdy` (DataRdy) answers it.
`size` is in bits. Idle requesters drive all zeros, so chains are merged by
OR. The wrapper puts the register window and a Wishbone master and slave
around such a core, in three parts:

1. **Register pool.** It holds the control, parameter and return registers.
   A register access is acknowledged one cycle after its strobe. The return
   register is loaded on `done_port`.
2. **Interface controller** (`wb_if_controller`). This is the A/B/C
   machine above.
   - **`notify_caller`** sits beside it. On `done_port` with a non-zero
     notification address, it makes one Wishbone classic write to that
     address. The write data is the callee's base address, which the
     receiver ignores.
   - While it writes, it owns the wrapper's master port, and the core's own
     master traffic waits.
3. **Interconnection logic.** `range_checker` compares the core's master
   address with the window and produces `internal`.
   - **`internal = 1`:** the core accesses its own memory, for example a
     local variable that a call unit stores into. Multiplexers close the
     master chain onto the slave chain: we, oe, address, write data and
     size go across, and DataRdy and read data come back. Nothing appears
     on the bus.
   - **`internal = 0`:** the master chain drives the Wishbone master. `cyc`
     and `stb` equal `!internal & (we | oe)`, `sel` comes from `drs_to_sel`,
     and `ack` becomes the master chain's DataRdy.
   - **In both cases**, Wishbone slave accesses outside the registers are
     fed into the slave chain:
     - `we` only in write cycles (`cyc & stb & we`) and `oe` only in read
       cycles;
     - address through `addr_filter`, which keeps the word offset inside
       the window;
     - size from `sel_to_drs`;
     - the slave chain's DataRdy becomes `ack`.

   An internal access has priority over a slave access, which then waits a
   cycle. The DataRdy path is a demultiplexer/multiplexer pair controlled by
   `internal`.

`HAS_SLAVE = 0` is for a core without a slave chain. The wrapper then
answers the rest of the window itself, with data 0. `irq` is high in state C,
for software that would rather not poll.

Constraint: `BASE` must be non-zero. An idle master chain drives address 0,
which must never look internal.

## The call unit (`builtin_wait_call`)

This is the functional unit that a caller core contains for each call
site. It is specialised by the number of arguments (`NP`) and by whether a
result is stored (`HAS_RET`). It steps through these states:

| state               | does |
|---------------------|------|
| wait                | waits for `start` (a pulse or a level from the caller) |
| sendParameter       | writes argument k to `fun_addr + 4·(k+1)`, one transfer per argument |
| startComputation    | writes `CALL_SITE_ADDR` to `fun_addr` |
| waitNotification    | waits until a write to `CALL_SITE_ADDR` arrives on its slave chain |
| readReturnValue     | reads `fun_addr + 4·(NP+1)` |
| writeReturnValue    | stores it at `ret_addr` (usually a local variable: an internal access) |
| done                | reads `fun_addr` once to release the callee, then pulses `done` |

The callee address is an input, `fun_addr`, so the same unit makes both
direct calls and pointer calls. The register offsets depend only on the
argument count, so any two functions of the same signature are
interchangeable behind a pointer. A notification that arrives early, before
waitNotification, is remembered; the flag clears at the next start. The unit
acknowledges the notification write one cycle after it appears on its slave
chain.

## The example cluster (`acc_system`)

There are six accelerators and one intercon with one extra master port and
one extra slave port toward the outside.

| index | accelerator | C signature                                               | base (default) | wrapper settings |
|-------|-------------|-----------------------------------------------------------|----------------|------------------|
| 0     | funA        | `int funA(int a, int b, int c) { return c * sum(a, b); }` | 0x100          | NP=3, return, slave chain |
| 1     | sum         | `int sum(int a, int b)`                                   | 0x200          | NP=2, return, no slave chain |
| 2     | sort        | `void sort(char *v, size_t n, int (*compare)(int, int))`  | 0x300          | NP=3, no return, slave chain |
| 3     | less        | `int less(int a, int b)` (a < b, signed)                  | 0x400          | NP=2, return |
| 4     | greater     | `int greater(int a, int b)` (a > b, signed)               | 0x500          | NP=2, return |
| 5     | f           | `int f(int a)`: sorts its local `{'b','c','a'}` with `sort(vec, 3, a ? less : greater)` | 0x600 | NP=1, no return, slave chain (holds `vec`) |
| 6     | outside     | external master / external slave (for example a RAM)      | everything else | — |

Inside a caller's window, local variables sit at +0x40 (`e` of funA, `tmp`
of sort, the array `vec` of f) and call-site addresses at +0x80.

- **funA** calls sum through its call unit, stores the result in `e`
  (internal store), then returns `c * e`.
- **sort** runs a bubble sort: n−1 passes over i = 1..n−1.
  - Each step loads `v[i]` and `v[i-1]` (8-bit loads).
  - It then calls `compare(v[i], v[i-1])` through the pointer it was
    given.
  - If the result is non-zero, it writes the pair back swapped.
  - With `less` it sorts ascending; with `greater`, descending.
  - Each char occupies one 32-bit word (at `v + 4·i`, low byte).
- **f** sets `vec` to `'b','c','a'` and calls sort with the address of
  `vec`, the length 3, and the base of `less` (a ≠ 0) or `greater` (a = 0).
  It does this through its own call unit, with no result to fetch.
  - sort works on `vec` across the bus, through f's Wishbone slave and
    slave chain.
  - Each comparison is a nested call from sort to the comparator.
  - Afterwards `vec` reads back as `abc` or `cba` at 0x640..0x648.
- All bases are parameters, so the cluster can be relocated. They must be
  non-zero and aligned to `WIN`. Every address outside the six windows goes
  to the external slave.

The outside world calls into the cluster like any caller: it writes
parameters and the control register, then polls the control register or
watches `irq`, then reads the result.

## The intercon and its arbitration (`wb_intercon`, `wb_arbiter`)

There is one shared bus, so one transfer happens at a time.

- **Arbitration.** A master requests the bus with `cyc`. The arbiter
  decides in one cycle: the last granted master keeps priority while it
  still requests; otherwise the lowest index wins.
- **Transfer.** The request is registered toward the slave, and the
  slave's ack and data are registered back toward the master. A transfer
  therefore runs in four steps: arbitrate, capture, request (until ack),
  respond.
- **Latency.** With an idle bus and a slave that acks in one cycle, a
  transfer takes **4 cycles**. Wrapper registers ack one cycle after the
  strobe.
- **Unmapped addresses.** An address with no slave is answered with data 0
  when no default slave is configured. In the cluster, the default slave is
  the external port.

**Caveat:** a master that releases `cyc` and raises it again in the very
next cycle keeps winning, and can starve the others. The end-to-end
testbench therefore leaves four idle cycles between polls of a control
register. Software polling from outside should do the same, or use `irq`.

**Caveat on shared callees:** the lock accepts one caller at a time and
simply ignores a second start. A call unit whose control write is ignored
would wait forever for its notification. Two accelerators that can call the
same function at the same moment therefore need an arrangement that keeps
them apart. In the example cluster, every callee has a single hardware
caller.

## Timing measured in simulation

These cycle counts come from the end-to-end testbench at default
parameters, in clock cycles.

- **funA→sum call (2 arguments), from the call unit's start:**
  - sum's `start_port` rises after **14** cycles (two parameter writes and
    the control write);
  - the notification reaches funA **4** cycles after sum's `done_port`;
  - the whole call costs **33** cycles more than sum's own computation.
    This includes the result read, the internal store of `e` and the
    release read.
- **A complete funA call seen from the outside,** from the control write
  until the outside master sees state C: about 45 cycles.

For comparison, the thesis this design follows reports, for a 4-argument
function on its own generated bus:

- 14 cycles to start the callee;
- 14 cycles for the notification, 28 in total;
- 2 more cycles for the result read.

The start cost grows with the number of arguments, at one bus transfer
each. Notification here is cheaper, because the notify write is a single
transfer.

Synthesis size of the whole cluster (generic Yosys coarse synthesis, not
mapped to a device): about 1,110 word-level cells, 1,640 flip-flops and a
32-bit memory (f's array).

## Where this RTL follows the original design and where it departs

**Follows:**

- the register layout (control first, then parameters, then return);
- the control register as a lock, with its A/B/C machine and its release
  on read;
- zero or a notification address written to start;
- notification by a bus write to a call-site address;
- the call unit's state sequence;
- the wrapper's three parts;
- the wrapper's multiplexer network, with the names RangeChecker,
  DRSToS, SToDRS and Filter, and weMux, oeMux, addrMux, wDataMux, dRSMux
  and rDataMux;
- `cyc`/`stb` from `!internal & (we | oe)` and the DataRdy routing;
- a shared Wishbone B4 bus with a one-cycle arbiter, registers between
  masters and slaves, lower index first, and extra external master and
  slave ports;
- relocation by parameters;
- the example programs funA/sum and f/sort/less/greater, with f's array
  living in f and reached by sort over the bus.

**This design's own choices:**

- 32-bit data and addresses, with every object in its own word;
- notification address in bits [31:2] of the control word, state in bits
  [1:0];
- parameter writes ignored outside state A; a control write outside A is
  acknowledged and ignored;
- the one-cycle register ack;
- the data of the notification write (the callee's base address);
- the release read that ends every call, which the original state diagram
  does not show (without it the callee would stay locked);
- the arbiter's exact "keep the last master" rule, and the 4-step transfer;
- the window size and the +0x40 / +0x80 layout;
- bubble sort as the loop of `sort`, and 8-bit chars stored one per word;
- f without a return value (its C declaration returns `int` but never
  returns one);
- `irq`;
- the cores `acc_sum`, `acc_compare`, `acc_funa`, `acc_sort` and `acc_f`. These are
  hand-written stand-ins for what an HLS tool would generate. Each finishes
  in one cycle after its inputs are ready, or after its calls complete.

**Not included:**

- the processor SoC used to try the accelerators from software (an
  OpenRISC core with debug, UART and GPIO);
- its crc32 accelerator;
- the floating-point LU-decomposition accelerators of the performance
  study.

The cluster's external master and slave ports are where a processor and a
memory would connect.

## Files

| file | module |
|------|--------|
| `rtl/hwcall_pkg.sv` | bus structs (`wb_req_t`, `wb_rsp_t`, `mem_req_t`, `mem_rsp_t`), widths, controller states |
| `rtl/acc_system.sv` | the cluster (top) |
| `rtl/wb_intercon.sv`, `rtl/wb_arbiter.sv` | shared-bus intercon and its arbiter |
| `rtl/wb_acc_wrapper.sv` | Wishbone wrapper around a minimal-interface core |
| `rtl/wb_if_controller.sv`, `rtl/notify_caller.sv` | control-register state machine, notification writer |
| `rtl/range_checker.sv`, `rtl/addr_filter.sv`, `rtl/drs_to_sel.sv`, `rtl/sel_to_drs.sv` | wrapper helpers |
| `rtl/builtin_wait_call.sv` | the call unit |
| `rtl/acc_sum.sv`, `rtl/acc_compare.sv`, `rtl/acc_funa.sv`, `rtl/acc_sort.sv`, `rtl/acc_f.sv` | example cores |
| `tb/tb_<module>.sv` | self-checking testbench per module; `tb/tb_wb_mem.sv` is a Wishbone RAM model |

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_acc_system` runs the cluster at its default parameters:

- random funA calls;
- a call from outside with the notification going to RAM;
- sorts of `{'b','c','a'}` and of random vectors through `less` and
  `greater`;
- f(1), f(0) and f with a random argument, which checks the nested call
  chain f → sort → less/greater on f's local array;
- a start attempt while busy (rejected);
- funA and sort running at the same time.

It counts each mechanism and fails if any never happened: non-inlined calls,
pointer calls to each comparator, notifications, internal loop-back stores,
bus contention, rejected starts, calls of sort by f, and sort's bus
accesses to f's local array. It also prints the call-overhead figures
above.

## Simulating

With Verilator 5 (two-state; the testbenches reset everything they read):

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/hwcall_pkg.sv rtl/*.sv tb/tb_wb_mem.sv tb/tb_acc_system.sv \
  --top-module tb_acc_system -Mdir obj_sys -o sim
./obj_sys/sim
```

For one module, list the package, the module, the modules it instantiates,
and its testbench, for example:

```sh
verilator --binary --timing --assert -Wno-fatal rtl/hwcall_pkg.sv \
  rtl/builtin_wait_call.sv rtl/acc_sort.sv tb/tb_acc_sort.sv \
  --top-module tb_acc_sort -Mdir obj_sort -o sim && ./obj_sort/sim
```

The testbenches drive and sample the design on the falling clock edge; the
design itself uses only rising edges and a synchronous, active-high reset.

To add an accelerator:

1. Wrap its core in `wb_acc_wrapper` with its `BASE`, `NP`, `HAS_RET` and
   `HAS_SLAVE`.
2. Add a master and a slave port to the `wb_intercon` instance, with the
   window in `SLV_BASE`/`SLV_SIZE`.
3. If it calls others, give each call site a `builtin_wait_call` with an
   unused address of its own window as `CALL_SITE_ADDR`. OR the call units'
   and load/store units' master requests together.
