# Scheduled memory access for pipelined loops on an FPGA

An FPGA that runs a loop usually keeps its arrays in one external memory behind a
single port. Every iteration of the loop must read its operands from that port and
write its results back through it, so the port, not the arithmetic, sets the pace.
This design shows how to pace it well: if a loop body does `NRD` reads and `NWR`
writes, a new iteration can start every `II = NRD + NWR` cycles, and the memory port
is then busy in every cycle of the steady state. Doing fewer than `NRD + NWR` cycles
per iteration is impossible with one port, so this is the minimum initiation interval.

The approach is to leave the loop computation alone. The computation is synthesized
first, as a circuit that takes operands and produces results on its own timetable.
The memory traffic is then rearranged around it, after the fact, into a fixed
*standard* form:

```
   one period of II cycles, repeated:   R R ... R | W ... W
                                        NRD reads   NWR writes
```

The RTL here is the memory side of that arrangement: a controller that issues the
reads and writes, a small queue that holds each result until its write slot, and the
interface to the memory pins. The controller's schedule is computed from the loop
shape while the design elaborates, by SystemVerilog functions; there is no scheduling
logic in the hardware.

## Computation model

```
               +-----------------+
               | external memory |   single port: address, Strobe_n,
               +--------^--------+   Write_Sel_n, bidirectional data
                        | Mem_Data
   +--------------------v-------------------------------------------+
   |  mem_interface          output registers, bus direction        |
   +------^--------------------^-------------------+----------------+
          | Strobe_n,          | Data_Out          | Data_In (din)
          | Write_Sel_n, addr  |                   v
   +------+---------+  +-------+------------+  +---------------------+
   | mem_access_ctrl|  | write_standardizer |  | internal circuit     |
   | (schedule      |->| circular queue     |<-| (the loop body, not  |
   |  table + FSM)  |  | + 2:1 multiplexer  |  |  part of this RTL)   |
   +----------------+  +--------------------+  +---------------------+
        QW_En, QR_En, QM_Sel         result ^        din_valid, din_first
```

`mas_top` contains the three boxes on the left and the interface. The internal
circuit connects through the ports `din`, `din_valid`, `din_first` and `result`.

## Memory timing rules

The memory port has two control lines. `Strobe_n` low means "access in this cycle".
`Write_Sel_n` selects the direction: 1 for a read, 0 for a write. When it is not
needed it is released (high impedance). Two delays tie the memory to the circuit:

* `dR`: a word whose read starts in cycle `t` reaches the circuit in cycle `t + dR`;
* `dW`: a word whose write starts in cycle `t` must be on the data path in cycle `t + dW`.

A loop body is written as one code per cycle at the circuit: 0 idle, 1 an operand
arrives, 2 a result leaves, 3 both. From that vector the control lines follow:

| body cycle `n` holds | in cycle `n - dR`            | in cycle `n - dW`            |
|----------------------|------------------------------|------------------------------|
| 1 (operand)          | `Strobe_n = 0`, `Write_Sel_n = 1` |                        |
| 2 (result)           |                              | `Strobe_n = 0`, `Write_Sel_n = 0` |
| 0                    | `Strobe_n = 1`, `Write_Sel_n` released | same           |

If a read and a write land on the same cycle, the schedule has a conflict.
`mas_pkg::ctrl_schedule` applies these rules and reports conflicts. For example, with
`dR = 2`, `dW = 0` and the body `1 2 1 2`, the strobes fall in cycles -2, 0, 1 and 3,
and there is no conflict.

## Pipelining the loop

The standard body is `NRD` operand cycles, then `NC` compute cycles, then `NWR`
result cycles. Start one such body every `II` cycles. Reads then repeat with period
`II`. Each iteration's writes are pushed later by a delay `D`, so that they land in
the write part of a later period:

```
m = ceil((NC - dW + dR) / II)        iterations in flight before the first write
D = m*II - dR - NC + dW              extra cycles each result waits
```

Seen from the memory, each iteration takes `m + 1` periods. Its reads are at the
start of the first period, and its writes are at the end of the last one. The
controller builds its table with the published algorithm:

1. Take the standard body and insert `D` idle cycles in front of its writes
   (`rsh(NRD + NC, D, data)`: shift everything from an index to the right).
2. Add the body to copies of itself shifted by `II`, `2*II`, ... `m*II`. An operand
   code (1) and a result code (2) that fall on the same cycle add to 3.
3. Apply the timing rules to the sum.

The resulting table is `(2m+1)*II + dW` cycles long. The first `m*II` cycles are the
**prologue**, where reads start but no results are ready. The next `II` cycles are one
**steady-state** period. The rest is the **epilogue**, where the last results drain.
At run time the sequencer plays the prologue once. It then repeats the steady period
`n_iter - m` times and plays the epilogue once. A loop of `n_iter` iterations
therefore takes `(n_iter + m) * II + dW` cycles.

Worked default (`NRD = 6, NC = 3, NWR = 2, dR = 2, dW = 0`): `II = 8`, `m = 1`,
`D = 3`, and the table is 24 cycles:

```
memory cycle  0..5   6  7 | 8..13  14 15 | 16..21  22 23
              R ... R  .  . | R ... R  W  W  |  . ...   W  W
              prologue      | steady state   | epilogue
```

## Standardizing the writes: circular queue and multiplexer

A synthesized circuit seldom produces its results exactly in the standard write
slots. It may produce them earlier, spread through the body. Take a body of 10 cycles
that produces results 3, 4, 8, 2, 5, 7 in cycles 1, 2, 4, 5, 7 and 9. The standard
form wants them in cycles 4 to 9. The write standardizer does this with a circular
queue and a 2:1 multiplexer. `QM_Sel = 1` passes `result` straight to the memory, and
`QM_Sel = 0` takes the head of the queue. Three per-cycle enables come from two
backward scans of the body (`mas_pkg::queue_scan`):

* **First scan, from the last cycle back.** While the cycles are results, they are
  already in place and bypass the queue (`QM_Sel = 1`, counted as `N_k`). Every
  result before the first gap is pushed (`QW_En = 1`), and counted as `L`.
* **Second scan.** The `L` cycles just before the bypassed ones pop the queue
  (`QR_En = 1`). A result produced inside that window is pushed in a cycle where
  another result is popped, so it needs no extra room. `L` minus those results is
  the minimum queue length, `L_MIN`.

For the example: pushes in cycles 1, 2, 4, 5, 7; pops in 4 to 8; a bypass in cycle 9;
`L_MIN = 2`. The queue therefore has to accept a push and a pop in the same cycle
while it is full. Its head is read combinationally, so the popped word is on the
memory data path in its slot cycle.

In this design the same queue also provides the pipelining delay `D`. The scan runs
on the body extended by `D` idle cycles. Its target slots are then the delayed
write slots, and every result waits in the queue for exactly as long as it must.
Because bodies overlap every `II` cycles, the queue can hold results of more than
one iteration. Its length is the largest overlapped occupancy
(`mas_pkg::std_queue_depth`), which is 2 for the defaults.

## Modules

| file | role |
|------|------|
| `rtl/mas_pkg.sv` | types (`phase_t`, codes, table structs) and the elaboration-time schedule functions: `ctrl_schedule`, `prologue_m`, `write_delay`, `rsh`, `pipelined_data`, `queue_scan`, `queue_depth`, `std_queue_depth` |
| `rtl/mem_access_ctrl.sv` | schedule table plus sequencer (idle, prologue, steady, epilogue), address counters, operand flags, queue enables |
| `rtl/write_standardizer.sv` | circular queue + multiplexer |
| `rtl/circular_queue.sv` | ring-buffer FIFO with push/pop in one cycle; assertions on overflow and underflow |
| `rtl/mem_interface.sv` | one rank of output registers to the pins, data-bus direction, read data to `din` |
| `rtl/mas_top.sv` | the above, wired; the internal circuit and the memory pins are ports |

### `mas_top` interface and timing

* Pulse `start` for one cycle with `n_iter >= m` and `n_iter >= 1` while `busy` is
  low; a `start` with a smaller `n_iter` is ignored. The operand words are read
  from `rd_base` upward, `NRD` words per iteration, in order. The results are written from `wr_base` upward, `NWR` per iteration.
* Cycle 0 of the loop is the cycle after `start` is sampled. `phase` reports
  prologue, steady state or epilogue. `done` pulses for one cycle after the last
  loop cycle.
* The internal circuit sees operand words on `din` while `din_valid` is high.
  `din_first` marks the first operand of each iteration, and body cycle 0 of that
  iteration is that cycle. The circuit must present result `k` on `result` in the
  body cycle of the `k`-th set bit of `ORIG_WR`. `qw_en`, `qr_en` and `qm_sel` are
  brought out so that this can be checked.
* The pins follow the controller by one cycle. `mem_write_sel_oe = 0` means
  `Write_Sel_n` is released. `mem_data_oe` is high only in write cycles. With a
  synchronous memory that returns a read word one cycle after sampling it, this
  gives `dR = 2` and `dW = 0`, which are the default parameter values.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NRD`, `NC`, `NWR` | 6, 3, 2 | reads, compute cycles, writes per iteration |
| `DR`, `DW` | 2, 0 | read and write delay of the memory system, in cycles |
| `ORIG_WR` | `64'h600` | bit `n` set: the circuit produces a result in body cycle `n` (default: cycles 9 and 10, the standard slots) |
| `DATA_W`, `ADDR_W`, `NITER_W` | 32, 16, 16 | widths |

Elaboration stops with an error in several cases. These are: the schedule has a
conflict; `ORIG_WR` does not mark exactly `NWR` cycles within the body; two
iterations would hand over results in the same cycle; the pushed results of one
iteration span `II` cycles or more; or an iteration's events do not fit within the
`(m+1)*II` cycles after its first strobe. The last condition holds whenever `DW = 0`.

## Verifying and simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/mas_pkg.sv tb/tb_mas_top.sv --top-module tb_mas_top
./obj_dir/Vtb_mas_top
```

| testbench | what it establishes |
|-----------|---------------------|
| `tb_circular_queue` | random push/pop against a reference FIFO, including push+pop while full |
| `tb_write_standardizer` | the 10-cycle example above, cycle by cycle, with a 2-word queue; 300 random bodies, results leave in order in the last slots and occupancy never exceeds `L_MIN` |
| `tb_mem_access_ctrl` | schedule functions against hand-worked cases (timing-rule example, conflict, `m`/`D`, `rsh`, shift-and-add); three controller shapes checked every cycle against a closed-form model of the modulo schedule, including cycle counts |
| `tb_mem_interface` | pin registers, write-select enable, bus direction, reset state |
| `tb_mas_top` | four loop shapes end to end with a behavioural memory and loop body: every result word in memory, `(n_iter+m)*II` cycles per loop, protocol; counts that prologue, steady state, epilogue, queue push, pop, push+pop together, bypass and read/write turnaround all occur |
| `tb_mas_top_full` | the default configuration, unmodified, through a 200-iteration loop (1608 cycles) |

`tb/ext_mem_model.sv` and `tb/loop_body_model.sv` are behavioural stand-ins, used
only by the testbenches. The first is a synchronous single-port memory with one
cycle of read latency. The second is a loop body that sums its operands and returns
`sum + k` as its `k`-th result.

## What follows the published scheme and what is this design's own

From the scheme: the computation model, the three-valued `Write_Sel_n` and the
timing rules with conflict detection. Also from it: `II = NRD + NWR`, the formulas
for `m` and `D`, the `rsh` shift and the shift-and-add construction of the pipelined
schedule, and the prologue / steady state / epilogue split with their lengths. The
circular queue and multiplexer, with `QW_En`, `QR_En`, `QM_Sel` and the two scans
that give them and `L_MIN`, come from it as well. The default loop shape and delays
are its worked example.

Choices made here, where the scheme says nothing:

* The schedule is computed at elaboration and stored as a table played by a small
  state machine. The scheme describes the computation as an offline algorithm.
* The write delay `D` is realized by running the queue scan on the body extended
  by `D` cycles. The queue length accounts for overlapping iterations.
* The loop body is assumed to take its operands in the standard order (the first
  `NRD` body cycles). The scheme also moves reads earlier, but adds no hardware for
  them, and none is built here.
* The interface structure (registered outputs, unregistered `din`), together with
  a memory of one cycle of read latency, gives `dR = 2` and `dW = 0`.
* Sequential address generation, the start/done handshake, all widths and the
  reset behaviour are this design's.

Limits: one memory port (the scheme notes that multiple ports are a possible
extension; this design does not cover them). The loop shape is fixed when the
design elaborates. `dW > 0` is accepted by the schedule functions but rejected by
the controller's window check. The tables are bounded at 128 body cycles and 256
schedule cycles (`mas_pkg::MAXD`, `MAXW`).
