# Autonomous control flow checker for a pipelined embedded CPU

A soft error or an attack that corrupts a jump target, a branch or a return
address sends a processor into code it was never meant to run. This design
catches such errors in hardware, while the faulty instruction is still in the
decode stage, and repairs them by fetching and executing the instruction
again. The program is not modified (no signatures, no extra instructions),
and without faults the pipeline runs at full speed.

The idea: for code whose direct jumps and branches are known at compile time,
the sequence of program counter values is fully described by a short list of
*control flow instructions* (CFIs): their addresses, their targets, and which
CFI comes next. A small microprogrammed unit with its own program counter,
the **CUPC**, walks that list in step with the CPU. Every instruction leaving
decode is checked against it:

* an instruction that is not the next CFI must be followed by its address + 1;
* the next CFI must be followed by its target (jump, call), by its target or
  its address + 1 (branch), or by the address on a hardware return stack
  (return).

The approach follows the paper *Concepts for Autonomous Control Flow Checking
for Embedded CPUs* (its "control flow instruction" method). The RTL here is
an independent implementation; where the paper leaves something open, the
choice made is stated below and in the header of each file.

## The checker tables

A program analyzer (software, not part of this RTL) lists every checked CFI
and every checking marker in ascending address order. Entry *i* is stored at
index *i* of three memories of `ENTRIES` words, loaded through the `cfg_*`
port:

| memory   | contents of entry *i* |
|----------|------------------------|
| sAdrRam  | address of the CFI (word address) |
| jAdrRam  | its target (unused for returns and markers) |
| ctrlRam  | `next`: CUPC after the target is taken; flags `chk_start`, `chk_end`, `is_branch`, `is_call`, `is_return` (all zero: jump) |

`next` of a jump, call or taken branch is the index of the first CFI at or
after the target address. A branch that falls through continues at CUPC + 1,
which is why the list must be sorted. For markers `next` is the entry to
watch after the marker.

Example (the test program in `tb/cfc_prog_pkg.sv`):

```
idx  sAdr   jAdr   next  flags       meaning
0    0x100  -      1     chk_start   checking starts at 0x100
1    0x105  0x200  5     is_call     call subroutine
2    0x109  0x102  1     is_branch   loop back (next CFI after 0x102 is 0x105)
3    0x10A  0x110  4     -           jump
4    0x114  -      0     chk_end     checking stops; wait for entry 0 again
5    0x206  0x200  5     is_branch   loop in the subroutine
6    0x207  -      -     is_return   return, checked against the stack
```

## One check per cycle

`cfi_checker` sees `PC_n`, the decode-stage PC, and `PC_n+1`, the fetch-stage
PC, i.e. the instruction and its successor. With the words of entry CUPC it
evaluates three comparators:

* **b**: `PC_n == sAdr`: the instruction is the CFI the checker waits for;
* **a**: `PC_n+1 == PC_n + 1`: sequential successor;
* **c**: `PC_n+1 == jAdr`: the successor is the target.

| instruction at PC_n | legal if | CUPC becomes | stack |
|---|---|---|---|
| not entry CUPC (b false) | a | unchanged | - |
| jump | c | next | - |
| branch | c, or a | next, or CUPC + 1 | - |
| call | c | next | push (PC_n + 1, CUPC + 1) |
| return | PC_n+1 == top address | top index | pop |
| `chk_end` marker | (not checked) | next, checking off | - |

While checking is off, only a `chk_start` entry at CUPC is looked for. The
marker instructions themselves are not checked.

The three memories are read synchronously at `cupc_nxt`, the value CUPC takes
at the next edge. The entry for the next CFI is therefore ready one cycle
after a CFI is checked, even when the target itself is the next CFI. No stall
is ever needed.

The return stack stores, besides the return address, the CUPC at which
checking resumes in the caller. A return address alone would not tell the
checker where it is in the list. Nor does the paper say how the CUPC
continues after a return; this is this design's addition. The stack has 32
entries. A push on a full stack drops the oldest entry and sets the sticky
`stack_overflow`. A return that then finds the stack empty is reported as an
error.

`events` (type `cfc_event_t`) is a one-hot pulse per checked instruction:
sequential, jump, taken branch, not-taken branch, call, return, activation,
deactivation or error. It is there to count checks and errors.

## Correction by re-execution

The error is seen while the faulty instruction J is in decode, so J has not
yet changed any state. The checker keeps CUPC, its active flag and the stack
unchanged. `reexec_ctrl` then waits until J reaches the memory stage. At that
point the pipeline loads the memory-stage PC into its PC generation and annuls
everything from fetch to memory:

```
cycle  fetch   decode  execute memory  write   checker
t      X'      J       i1      i2      i3      error: J -> X' illegal
t+1    X'+1    X'      J       i1      i2      hold
t+2    X'+2    X'+1    X'      J       i1      hold, reexecute (loop back J)
t+3    J       -       -       -       -       (fetch..memory annulled)
t+4    X       J       -       -       -       J -> X checked again
t+7                                    J       J retires
```

A correction costs exactly four retire slots, and a fault-free run costs
nothing. Nothing fetched along the wrong path, nor J's first execution,
reaches the write stage. A permanent fault would make the loop repeat; the
paper does not deal with that case, and neither does this design.

The paper says to loop back the memory-stage PC and to annul "after the
memory step". Waiting until J itself is in the memory stage, which makes that
PC J's own address, is this design's reading.

## The pipeline side

`pc_pipeline` models only the PC path of a five-stage pipeline: fetch,
decode, execute, memory, write. Its PC generation mux chooses, in order, the
re-execution loop-back, a jump address, a taken branch address, or PC + 1.
Each stage carries a valid bit, which re-execution clears. The host CPU is
not part of this design: its decoder reports through `jump_valid/jump_addr`
and `branch_taken/branch_addr` what the instruction *in the fetch stage*
does. The successor is thus fetched right behind it. This is an idealised
front end without delay slots, stalls or mispredictions.

A real SPARC has delay slots, and a real Leon-class pipeline resolves
branches later and stalls. Fitting the checker to such a core needs an
adapter that presents each instruction together with its true successor,
and a `REEXEC_DIST` that matches the distance from the check to the stage
whose PC is looped back.

## Versions and parameters

| parameter | default | meaning |
|---|---|---|
| `ENTRIES` | 4096 | entries per checker memory; the paper evaluates 512 to 4096 |
| `ADDR_W` | 30 | PC width in words (32-bit byte addresses) |
| `STACK_DEPTH` | 32 | return stack entries |
| `EN_RET_STACK` | 1 | calls and returns checked (versions B and C) |
| `EN_REEXEC` | 1 | correction by re-execution (version C) |
| `RESET_PC` | 0 | first fetch address (`cfc_system`, `pc_pipeline`) |

* **Version A** (`EN_RET_STACK=0, EN_REEXEC=0`) checks direct jumps and
  branches only. Call and return flags are ignored. Calls and returns must
  lie outside checked code: put a `chk_end` marker on the call and a
  `chk_start` marker on the instruction after it.
* **Version B** adds the return stack.
* **Version C** (default) adds re-execution. Without re-execution, an error
  is only reported: the checker stays at the entry it expected and keeps
  flagging until the system reacts.

The defaults synthesise to about 130 word-level cells and 181 flip-flops,
154 of them in the modelled PC pipeline. Memory is 316,736 bits: two 4096 x
30 tables, one 4096 x 17 table, and the 32 x 42 stack. Table sizes needed by
the SPEC CINT2000 programs range from 398 to 79,206 entries. mcf, bzip2 and
gzip fit in 4096; the others need a larger `ENTRIES`.

## Files

| file | contents |
|---|---|
| `rtl/cfc_pkg.sv` | flag and event types |
| `rtl/checker_ram.sv` | one table memory (used three times) |
| `rtl/cfi_checker.sv` | comparators, CUPC, control |
| `rtl/return_stack.sv` | return stack |
| `rtl/reexec_ctrl.sv` | re-execution timing |
| `rtl/control_flow_checker.sv` | the checker unit |
| `rtl/pc_pipeline.sv` | PC path of the host pipeline |
| `rtl/cfc_system.sv` | top: pipeline plus checker |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/cfc_prog_pkg.sv` | test program and its tables |
| `tb/cfc_version_run.sv`, `tb/tb_cfc_versions.sv` | versions A, B, C at 512, 1024, 2048 entries |

## Verification

Each testbench compares the module against values worked out separately, and
ends by printing `TB_RESULT checks=N failures=M`.

* `tb_cfc_system` runs at the top's default parameters. A behavioural front
  end executes the test program from address 0, with its unchecked prologue,
  the checked main loop with a subroutine call, and unchecked code between
  rounds. It corrupts the first fetch of six instructions in checked code: a
  plain instruction, a call, a branch, a jump, a branch in the subroutine,
  and the return. The test checks four things. The retired PC stream must
  equal the fault-free program path. There must be one error and one
  re-execution per fault, two cycles apart. The cycle count must be exactly
  retired + 4 x corrections. Every check type and mechanism must have
  happened.
* `tb_cfi_checker` and `tb_control_flow_checker` walk the program with
  random single-bit corruptions of the successor (hundreds of errors), plus
  idle and hold cycles.
* `tb_cfc_versions` covers versions A, B and C.

Simulating with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/cfc_pkg.sv tb/cfc_prog_pkg.sv tb/tb_cfc_system.sv --top tb_cfc_system
./obj_dir/Vtb_cfc_system
```

Other testbenches build the same way. Drop `tb/cfc_prog_pkg.sv` for those
that do not import it (`tb_checker_ram`, `tb_return_stack`, `tb_reexec_ctrl`,
`tb_pc_pipeline`).

## Not covered

* Indirect jumps other than returns, and register-indirect calls: they
  cannot be listed at compile time. Such code must run with checking off.
* Conditions of branches: a branch that goes the wrong way to a legal
  successor is not detected.
* Faults inside straight-line code that do not change the PC.
* Interrupts, traps and multithreading: no mechanism is defined for them.
* Loading the tables at run time on demand (a page-fault-like refill): the
  paper mentions it only as an outlook.
