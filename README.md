# SoC Lock Cache with task-preemption support

In a shared-memory multiprocessor on one chip, software locks cost bus
bandwidth and time: processors spin on test-and-set, every spin is a bus
transfer, and the lock holder has to compete with the spinners to release the
lock. The SoC Lock Cache (SoCLC) moves the lock variables into a small
hardware unit on the processor bus. A lock is taken with a single read, a
processor that finds a lock busy goes to sleep instead of spinning, and the
unit wakes it with an interrupt when the lock is released.

Two kinds of critical section (CS) are supported:

* **Short CS** (roughly under 1000 cycles): the waiting task keeps its
  processor and sleeps until the release interrupt, then re-executes the lock
  read.
* **Long CS**: the waiting task is preempted so that other tasks can use the
  processor. When the lock is released, the interrupt routine has to find out
  *which* lock was released so that the operating system can wake the right
  task. For this the unit keeps, for every processor, the indices of the locks
  released on its behalf, readable at address `0x040C`.

This repository holds synthesizable SystemVerilog for the lock cache and for
a four-processor shared-bus system around it (arbiter, bus multiplexer,
address decoder, memory controller, shared memory), with self-checking
testbenches. The processors and the operating-system side (lock-wait tables,
interrupt handler) are not hardware and are modelled only in the testbench.

## System structure

```
   processor 1..4 (outside)      pe_req[p] = {br, we, addr, wdata}
        |  ^  ^  ^               pe_bg[p], pe_ta[p], pe_rdata[p], intr[p]
        v  |  |  |
   +------------+   gnt_id, start   +-------------+
   | bus_select |<------------------| bus_arbiter |<-- br[0..3], TA
   +------------+                   +-------------+
        | shared bus: we, addr, wdata / ta, rdata
        v
   +--------------+ sel_soclc  +-------------------------------------------+
   | addr_decoder |----------->| soclc                                     |
   +--------------+            |   decoder: lock window, 0x040C            |
        | sel_mem              |   soclc_lock_array: lock + Pr bits        |
        v                      |   soclc_index_unit: pending indices, INT  |--> intr[0..3]
   +----------+   +------------+                                           |
   | mem_ctrl |-->| shared_mem |+-------------------------------------------+
   +----------+   +------------+
```

`soclc_soc` is the top. Its ports are the processors' bus ports and their
interrupt lines; everything else is inside.

## Programming model

### Memory map

| Address (byte)            | What                                           |
|---------------------------|------------------------------------------------|
| `0x0000_040C`             | released-lock index register of the reader     |
| `0x0000_0800 + 4*i`       | lock variable `i`, `0 <= i < N_SHORT+N_LONG`   |
| `0x0001_0000 + 4*w`       | shared memory word `w`, `w < MEM_WORDS`        |
| anything else             | acknowledged, reads as 0                       |

Only `0x040C` is fixed by the original design; the other windows are this
implementation's choice and are constants in `rtl/soclc_pkg.sv`.

### Lock kinds

With the default 128 short and 128 long locks, **even indices are long-CS
locks and odd indices are short-CS locks**. If the two counts differ, the
interleaving covers the smaller count and the surplus kind takes the top
indices (`soclc_pkg::is_long_lock`). The hardware treats both kinds the same;
the kind matters only to the software, which reads it from the index.

### Lock variable access

* **Read = test-and-set.** Data bit 0 returns the lock as it was: `0` means
  the lock was free and the reader now holds it; `1` means it is busy, and the
  reader is now registered as waiting (its *Pr* bit for that lock is set).
* **Write of 0 = release.** If processors are waiting, one of them is chosen
  and interrupted (see below).
* **Write of 1** sets the lock without touching waiters (start-up
  initialisation). Reset clears all locks and waiters.

### Software sequences

Short CS:

1. Read the lock. `0`: enter the CS, write `0` afterwards.
2. `1`: sleep until the interrupt; read `0x040C` (odd index = short CS);
   go back to 1.

Long CS (preemptive):

1. Read the lock. `0`: enter the CS.
2. `1`: the operating system marks the task in that lock's wait table (one bit
   per task, 64 tasks, task 0 highest priority), removes it from the ready
   list and switches to another task.
3. On the interrupt, the interrupt routine reads `0x040C` until it returns the
   empty value (all ones). For every even index it makes the waiting tasks of
   that lock ready; the highest-priority one runs first and reads the lock
   again.

## Release and notification (the part that needs care)

Each lock has one lock bit and one *Pr* bit per processor. The *Pr* bits
record processors, not tasks; several tasks on one processor waiting for the
same lock share a bit, which is why the long-CS scheme needs the software wait
tables.

On a release of lock `L` by processor `r`:

1. The lock bit becomes 0: **the lock is freed, not handed over**.
2. Among the processors whose `Pr[L]` is set, the first one in round-robin
   order starting at `r+1` is chosen. Only that one is notified; its `Pr` bit
   is cleared. Others stay registered and are served by later releases, so
   under steady contention the waiters are served in rotation.
3. The index unit sets the pending bit `(chosen processor, L)`. The
   processor's interrupt line is high while any of its pending bits is set.
4. A read of `0x040C` by processor `p` returns the lowest pending index of
   `p` and clears it; with nothing pending it returns `0xFFFF_FFFF`.

Consequences a software writer has to know:

* Because the lock is freed, another processor can take it between the
  release and the notified processor's retry. The retry then reads `1`, the
  processor is registered again and waits for the next release. Nothing is
  lost, but strict FIFO order is not guaranteed.
* A processor can have several releases pending at once (different tasks
  waiting on different long-CS locks). The pending bits hold all of them; none
  can overflow. The interrupt routine should read until it gets the empty
  value.
* A release with no waiters raises no interrupt.

## Bus and timing

The bus is a simplified request/grant/acknowledge handshake modelled on the
processor bus signals BR, BG and TA; the other signals of the PowerPC 60x
bus are not built. A processor raises `br` with its transfer on its request
lines and holds it until it sees `ta`; it may present its next transfer in the
same cycle it sees `ta`. The arbiter grants in round-robin order and runs one
transfer at a time.

| Path                          | Cycles (request to TA, idle bus) |
|-------------------------------|----------------------------------|
| lock read/write, `0x040C`     | 2 (1 inside the lock cache)      |
| shared memory                 | 3 + `MEM_WAIT` (4 by default)    |
| transfer right after another  | one more                         |

A release interrupt shows on `intr[p]` one cycle after the releasing write's
start strobe, i.e. in the cycle in which the releaser sees its `ta`.

## Parameters

| Module / parameter        | Default | Meaning                                  |
|---------------------------|---------|------------------------------------------|
| `N_PE`                    | 4       | processors                               |
| `N_SHORT`, `N_LONG`       | 128, 128| short-CS and long-CS locks (256 in all)  |
| `MEM_WORDS`               | 4096    | shared memory, 32-bit words (16 KB)      |
| `MEM_WAIT`                | 1       | memory wait states                       |

The lock counts are the largest configuration of the design's synthesis
study, which ranged over 16 to 128 locks of each kind (reported between about
2,700 and 14,500 gate equivalents in a 0.25 µm library). Four processors and
objects of about 1.6 KB are the reference system and workload. Memory size,
wait states, bus widths (32-bit address and data) and all address windows
except `0x040C` are this implementation's choices.

## Files

`rtl/` — one module or package per file:

* `soclc_pkg.sv` — sizes, memory map, bus request struct, lock-kind function
* `soclc_lock_array.sv` — lock and Pr bits, test-and-set, round-robin waiter choice
* `soclc_index_unit.sv` — per-processor pending indices, interrupts, `0x040C` read
* `soclc.sv` — the lock cache as a bus slave (decoder + the two above)
* `bus_arbiter.sv`, `bus_select.sv`, `addr_decoder.sv` — the shared bus
* `mem_ctrl.sv`, `shared_mem.sv` — memory controller and shared memory
* `soclc_soc.sv` — the system top

`tb/` — one self-checking testbench per module (`tb_<module>.sv`). Each prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.
`tb_soclc_soc.sv` runs the whole system at its default size:

* a replay of the preemption example (two tasks of one processor fail on a
  long lock, a third task keeps working until the release interrupt, the
  higher-priority task gets the lock first),
* two releases pending for one processor,
* a short-CS hand-off and round-robin notification of three waiters,
* a client-server database copy: a server fills a 400-word object in shared
  memory under a long-CS lock and publishes a sequence number under a
  short-CS lock; three clients, woken by release interrupts, copy the objects
  out and check them word by word (six objects, about 43,000 cycles).

It keeps its own record of lock holders, fails on any overlap, and fails if
any of these never happened: free acquire, busy read, release interrupt,
long and short index reads, empty index read, two pending indices, work
during a wait, bus contention.

Two more testbenches run workloads rather than single blocks:

* `tb_soclc_configs.sv` builds the lock cache at eight short/long lock counts
  from 16/16 to 128/128, including unequal mixes (16/128, 128/16, 64/32,
  32/64). In every configuration it takes, blocks, releases and reads back the
  index of every lock, and checks the short/long split of the indices. The
  helper `soclc_cfg_check.sv` does the checks for one configuration.
* `tb_soclc_db40.sv` runs 40 application tasks, ten per processor, under a
  modelled preemptive kernel: a ready list plus a 64-entry lock-wait table per
  lock. Each task updates every word of one of four 1.6 KB objects under the
  object's long-CS lock, then bumps a shared counter under a short-CS lock.
  Blocked long-CS tasks are switched out. The interrupt handler wakes all
  waiters of a released lock, and the highest-priority one runs first. The
  test checks that no update is lost, so a mutual-exclusion fault anywhere
  shows up in the data. It also prints the preemptions, wake-ups and the
  worst lock delay. One run takes about 178,000 cycles.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/soclc_pkg.sv \
    tb/tb_soclc_soc.sv --top-module tb_soclc_soc -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run another testbench.
`-y` lets Verilator find every other module by its file name. The package has
to be named first on the command line. The simulator has no
X state, so every register that is read is reset (the shared memory is not;
software must write before it reads).

## How far to trust it

* The lock-cache behaviour (test-and-set, Pr bits, one interrupt per release,
  index register at `0x040C`, even/odd lock kinds) follows the original
  design's description. The choice of the next waiter is stated there only as
  "deterministic and fair"; round robin is this implementation's reading.
* One passage of the original description speaks of interrupting "the
  waiting processors" on a release. Elsewhere, and in its example, only the
  processor whose turn it is gets the interrupt. This implementation follows
  the latter: one waiter per release.
* Freeing the lock on release (instead of handing it to the notified
  processor) follows from the description of the short-CS path, where the
  woken processor re-executes its lock read.
* The index storage (a pending bit per processor and lock, lowest index
  first, read-to-clear, empty value all ones) is this implementation's design
  for a unit that is described only by its function.
* The arbiter, bus multiplexer, address decoder, memory controller and memory
  are only named in the original; their protocol, timing and sizes are
  ordinary choices made here.
* Not built: the processors (their bus ports are the top's ports), their L1
  caches, the full 60x bus protocol, and the operating-system lock-wait tables
  and interrupt handler, which are software.
* All modules lint cleanly in Verilator and elaborate in Yosys/slang; the
  timing and area of the original (a 0.25 µm standard-cell synthesis) were
  not reproduced.
