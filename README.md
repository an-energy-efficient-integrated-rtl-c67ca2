# IPA: an integrated programmable array for near-sensor kernels

The IPA is a small coarse-grained reconfigurable array (CGRA) meant to sit next
to the processors of an ultra-low-power cluster and take over whole signal
processing kernels. Many CGRAs accelerate only the innermost loop and leave
outer loops and branches to a host CPU. This array runs the complete control
and data flow of a kernel itself: loops of any depth, nested branches, and
its own loads and stores. The host only preloads a program and the input
data, starts the kernel and waits for `done`.

Three ideas keep it cheap in energy:

* **Registers instead of memory.** Intermediate values stay in the
  processing elements (PEs): in their register files and in an output
  register that the four torus neighbours can read. Only primary inputs and
  outputs go through the shared L1 memory.
* **A lock-step array with tiny instructions.** Each PE has its own
  program, but all PEs advance together, one 20-bit instruction per cycle.
  Immediates live in a per-PE constant register file, so the instruction
  word stays narrow and the decoder stays trivial.
* **Fine-grained clock gating.** Each PE has a power management unit that
  stops its clock in four cases:
  * the PE is unused;
  * the whole array is stalled on a memory bank conflict;
  * the PE is in a multi-cycle NOP;
  * the PE has finished.

This repository is synthesizable SystemVerilog for the accelerator at its
reference configuration: 4 x 4 PEs, 8 load/store units, 4 memory banks, 32 KB
of data memory and 8 KB of context memory. It includes a self-checking
testbench for every block, and end-to-end tests that run real kernels.

## Top-level structure

```
 host ──► GCM (8 KB, 64-bit words) ──► IPA controller ──context bus──► PE array (4x4 torus)
 host ◄─► logarithmic interconnect ◄──────── LSU ports of 8 PEs ──────────┘
              │  (word-interleaved, round robin per bank)
              ▼
          TCDM: N_BANKS banks, 32 KB total
```

| Module | Role |
|---|---|
| `ipa_top` | Connects everything. Host ports for GCM writes, TCDM access and start/done, plus cycle counters. |
| `ipa_gcm` | Global context memory: 1024 x 64 bit, host write port, synchronous read. |
| `ipa_ctrl` | IPA controller: copies a kernel's context from the GCM into the PEs, starts the array and detects the end. |
| `ipa_pea` | The PE array. Builds the torus, the global condition OR, the global stall and the LSU placement. |
| `ipa_pe` | One PE: IRF, decoder, sequencer, RRF, CRF, operand muxes, ALU, OPR, CR, PMU and an optional LSU. |
| `ipa_pe_ctrl` | PE sequencer: program counter, jmp/cjmp/exit and halt. |
| `ipa_decoder` | Splits the 20-bit instruction into its fields and classifies it. |
| `ipa_alu` | 32-bit ALU with a signed 16x16→32 multiplier and compare operations. |
| `ipa_regfile` | Register file with two read ports and two write ports. Used for the IRF (32x20), RRF (8x32) and CRF (16x32). |
| `ipa_pmu` | Power management unit: issue/clock-enable logic and the NOP counter. |
| `ipa_lsu` | Load/store unit: request to the interconnect, stall handling. |
| `ipa_log_xbar` | Logarithmic interconnect: N masters to N_BANKS banks, one grant per bank per cycle. |
| `ipa_tcdm`, `ipa_tcdm_bank` | Tightly coupled data memory, word-interleaved banks. |
| `ipa_pkg` | Instruction format, opcodes, operand encoding, context tags and encoding helpers. |

## Execution model

All PEs share one clock and one notion of "the current cycle". In every
cycle that is not stalled, each active PE does the following:

1. reads the instruction at its program counter;
2. picks two operands;
3. computes;
4. writes the result to its output register (OPR), to a regular register, or
   to both.

There is no pipeline inside a PE. A result written in cycle *t* can be read
by the PE itself and by its four neighbours in cycle *t+1*. The compiler, or
the person writing a program by hand, schedules data movement around that
one-cycle hop. A value that must travel two PEs away is copied through the
PE in between.

The PEs' programs are independent (MIMD), but control flow is global:

* **`jmp t`** jumps to slot *t* of the PE's own program.
* **Compares** (`lt`, `ltu`, `eq`, `ne`, `ge`) write 0/1 as a result and
  load the PE's 1-bit condition register (CR).
* **`cjmp t, f`**: the array ORs the CR bits of all PEs into `cond_any`.
  Every PE that executes a cjmp goes to its own *t* when `cond_any` is 1,
  and to its own *f* otherwise. Executing a cjmp clears the PE's CR, so a
  stale condition cannot leak into the next decision.

Because the decision is global, every PE that takes part in a loop or branch
carries a cjmp in the same cycle. Typically exactly one PE computes the
condition in the cycle before it. This is how a loop nest stays in lock-step
across the array without any host involvement.

* **`nop n`** keeps the PE idle, and clock-gated, for *n* cycles from a
  single instruction.
* **`exit`** halts the PE.
* **End of kernel:** the kernel ends when every PE that received a
  program has halted.

## Instruction format

Instructions are 20 bits wide, with fields MSB first:

| Bits | 19:15 | 14:13 | 12:10 | 9 | 8:5 | 4 | 3:0 |
|---|---|---|---|---|---|---|---|
| Field | opcode | output type | dest RRF | IN0 type | IN0 addr | IN1 type | IN1 addr |

* **Output type:** 0 = discard, 1 = OPR, 2 = RRF[dest], 3 = both.
* **Operand with type 1:** reads CRF[addr].
* **Operand with type 0:**

  | addr | Source |
  |---|---|
  | 0-7 | RRF[addr] |
  | 8 | own OPR |
  | 9 | north neighbour's OPR |
  | 10 | east neighbour's OPR |
  | 11 | south neighbour's OPR |
  | 12 | west neighbour's OPR |
  | 13-15 | zero |

* **Jumps and NOPs** reuse the low 15 bits:
  * `jmp`: target in [14:10];
  * `cjmp`: true target in [14:10], false target in [9:5];
  * `nop`: count in [14:0].
* **Opcodes:**

  | Value | Mnemonic | Value | Mnemonic | Value | Mnemonic |
  |---|---|---|---|---|---|
  | 0 | nop | 7 | sll | 14 | ne |
  | 1 | add | 8 | srl | 15 | ge |
  | 2 | sub | 9 | sra | 16 | ld |
  | 3 | mul | 10 | mov | 17 | st |
  | 4 | and | 11 | lt | 18 | jmp |
  | 5 | or | 12 | ltu | 19 | cjmp |
  | 6 | xor | 13 | eq | 20 | exit |

  * `mul` multiplies the signed low halves of the two operands into 32 bits.
  * `ld` reads word `mem[IN0 + IN1]`. Addresses are byte addresses of
    32-bit words.
  * `st` writes IN0 to address IN1.

`ipa_pkg` provides `enc`, `enc_nop`, `enc_jmp`, `enc_cjmp`, `enc_exit`, and
the operand helpers `rf()`, `crf()` and `nb()`, so a testbench can write
programs as readable SystemVerilog. For example:

```systemverilog
enc(OP_MUL, OUT_RRF, 4, nb(SRC_WEST), nb(SRC_EAST))   // r4 = west.opr * east.opr
enc(OP_LT,  OUT_NONE, 0, rf(0), crf(0))               // CR = r0 < c0
enc_cjmp(4, 10)                                       // any CR ? goto 4 : goto 10
```

## Memory access and the global stall

Eight of the sixteen PEs have a load/store unit (LSU). Which ones is fixed
when the array is elaborated:

* the PEs are ranked checkerboard first ((row+col) even), then the rest;
* the first `N_LSU` PEs get an LSU;
* with the default of 8, every PE without an LSU has LSU PEs as neighbours.

A PE without an LSU ignores `ld`/`st`; a simulation assertion flags it.

The LSUs reach the banks through `ipa_log_xbar`:

* **Bank selection:** the bank is `addr[2 +: log2(N_BANKS)]`, so
  consecutive words go to consecutive banks.
* **Arbitration:** each bank arbitrates round robin among the requests that
  reach it, and grants one per cycle.
* **Host port:** the host is the last master port and competes on equal
  terms.
* **Latency:** a grant returns read data in the same cycle (the banks are
  written on the clock edge and read combinationally). A loaded value is
  therefore usable by any neighbour in the next cycle, like any other
  result.

If a request is not granted, the LSU raises `pending`. The OR of all pending
bits is the **global stall**, which freezes every PE:

* no PC advances;
* no register is written;
* NOP counters pause.

The stalled instruction is issued again in the next cycle. An LSU whose
request was granted while another LSU was still waiting records that it is
done, and keeps the loaded word, so no access happens twice. When the stall
drops, all PEs retire the instruction together. A bank conflict between *k*
requests therefore costs *k-1* cycles, and the program's timing is otherwise
unchanged. The LSUs (and the PMU counters) stay on the ungated clock for
exactly this reason.

## Power management

`ipa_pmu` computes two signals per PE:

* `issue = used & !halted & !nop_busy`: the PE executes a new instruction
  in this cycle;
* `clockgate_en = issue & !global_stall`: the PE's registers may change.

`clockgate_en` is used as a register enable on every PE state element. That
is logically equivalent to the clock gate a standard-cell implementation
would insert. The cell itself is technology-specific and not part of the RTL.

A `nop n` loads *n-1* into the PMU counter. The PE stays gated until the
counter reaches zero, so the NOP occupies exactly *n* cycles. The counter does
not count while the global stall is high. Otherwise a PE waiting out a NOP
would drift out of step with PEs that were held by the stall.

## Contexts and kernel start

A kernel's program ("context") is stored in the GCM as 64-bit words:

```
header : [63:60]=4'h1  [59:52]=PE index  [45:40]=#instructions ni  [36:32]=#constants nc
         ceil(ni/2) words, two instructions each: [19:0] first, [51:32] second
         ceil(nc/2) words, two constants each:    [31:0] first, [63:32] second
... one such segment per used PE ...
end    : [63:60]=4'hF
```

The host starts a kernel with a one-cycle `start` pulse and the context's
base word address in `ctx_base`. Then `ipa_ctrl` proceeds in four steps:

1. It streams the segments over a shared context bus. Each cycle it writes
   two IRF or two CRF entries of one PE. A context of *W* words loads in
   *W+1* cycles, reported in `cfg_cycles`.
2. It marks the PEs that received a segment as used. The other PEs stay
   clock-gated for the whole kernel.
3. It resets the used PEs' program counters and lets the array run.
4. It pulses `done` when every used PE has executed `exit`.

`exec_cycles` and `stall_cycles` report the run time and the cycles lost to
bank conflicts.

`tb/ipa_tb_ctx.svh` has the testbench side:

* building a context from per-PE programs;
* preloading it into the GCM;
* host reads and writes of the TCDM;
* running a kernel.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `ROWS`, `COLS` | 4, 4 | `ipa_top`, `ipa_pea` |
| `N_LSU` | 8 (1 … ROWS·COLS) | `ipa_top`, `ipa_pea` |
| `N_BANKS` | 4 (power of two) | `ipa_top`, `ipa_log_xbar`, `ipa_tcdm` |
| `TCDM_BYTES` | 32768 | `ipa_top` |
| `GCM_BYTES` | 8192 | `ipa_top` |
| IRF / RRF / CRF | 32x20, 8x32, 16x32 | `ipa_pkg` |

The defaults are the configuration the architecture was tuned to. That study
found 8 LSUs with 4 banks the best balance between bank conflicts and
interconnect cost for a 4 x 4 array. Other combinations, such as 4 or 16
LSUs with 4 to 32 banks, are reachable through the parameters.

## Simulating

Everything runs with plain Verilator 5 from the repository root. The
testbenches include `tb/ipa_tb_ctx.svh` by a path relative to the root, hence
`-I.`:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -I. \
    rtl/ipa_pkg.sv tb/tb_ipa_top.sv --top-module tb_ipa_top
./obj_dir/Vtb_ipa_top
```

Replace `tb_ipa_top` with any other testbench. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_ipa_top` | Runs the full design at default parameters. Kernel `c[i] = a[i] < b[i] ? a*b : a-b` on 3 PEs, with a fourth PE running compressed NOPs. It checks results and exact cycle counts, and counts each mechanism: stalls, NOP gating, NOP hold during a stall, unused-PE gating, taken and not-taken cjmp, jmp. |
| `tb_ipa_matmul` | C = A x B for N = 2, 4, 8, 16, 32 at default parameters. The three-deep loop nest runs entirely on 4 PEs. Every element and the exact cycle count are checked; the count is 2 + N·(4 + N·(6 + 6N)) plus one cycle per bank conflict. |
| `tb_ipa_kernels` | A gcd kernel (a loop containing an if/else, two cjmps per iteration) run 20 times on one PE, and a 4-tap FIR on 7 PEs. In the FIR, four PEs load x[n..n+3] in the same cycle from four different banks, two PEs add pairs of products, and a fifth PE sums and stores. Results and cycle counts are checked. |
| `tb_ipa_configs` | Instantiates twelve IPAs, one per combination of 4, 8 or 16 LSUs with 4, 8, 16 or 32 banks. All twelve run one kernel in which four PEs load together and store together, with a stride of 8 words. It checks results, and checks that each configuration's stall count is exactly what the bank mapping predicts: 240, 240, 80 and 0 stall cycles for 4, 8, 16 and 32 banks. |
| `tb_ipa_fig1` | Two products computed on two PEs are moved to a third PE and summed, with no trip through memory. The test counts the issued operations: 4 memory, 3 arithmetic, 2 moves. It also checks the 7-cycle run time. |
| `tb_ipa_fig4` | A four-PE loop body (two loads, an add, a store) that completes in 4 cycles without stalls. |
| `tb_ipa_pea` | Array level: torus wrap-around, global condition OR, stall against a slow memory. |
| `tb_ipa_ctrl` | Context loading and run-time counting against a model. |
| other `tb_ipa_*` | One per block, checked against independent models. |

Measured with the hand-mapped matrix multiplication at 8 LSUs and 4 banks:

| N | Execution cycles | Stall cycles |
|---|---|---|
| 16 | 27202 | 1024 |
| 32 | 211074 | 8192 |

Context loading takes 48 cycles. The same program with 32 banks stalls 1024
cycles at N=32. The mapping uses only 4 of the 16 PEs and no unrolling. It
exercises the mechanisms and is not meant as a performance result.

## Where this RTL makes its own choices

The architecture defines these and the RTL follows them:

* the PE's components;
* the 20-bit instruction with its field widths;
* the register file sizes;
* the torus;
* the OR-combined conditional jump;
* the three clock-gating cases: unused PE, global stall, multi-cycle NOP
  (gating a PE that has already executed `exit` is added here);
* the stall-the-whole-array rule for bank conflicts;
* the word-interleaved, multi-bank L1;
* the default sizes.

The following are this design's own:

* **Timing.** Single-cycle PEs with no operand registers in front of the
  ALU. Operand and result latches appear in the PE's block diagram, but the
  intended schedule (a loaded value used by a neighbour in the next cycle,
  one operation per cycle) is met without a separate stage.
* **Memory access.** Same-cycle grant and read data from the TCDM.
* **ISA numbering.** Opcode numbering, the set of ALU operations beyond
  add/sub/mul/and/or/compare/mov/ld/st, the operand-source numbering, the
  output-type encoding and the `exit` instruction.
* **Conditions.** The CR is cleared on every cjmp. The jump register is
  folded into the program counter.
* **Contexts.** The context format and the 64-bit GCM width. The width
  gives one configuration cycle per 8 bytes of context.
* **LSU placement.** The checkerboard ranking.
* **Arbitration.** Round-robin arbitration, and the host as one more
  interconnect master.
* **Register file sizes.** The CRF has 16 entries of 32 bits, matching
  the 4-bit operand address. One statement of the original sizing suggests
  twice that storage.

Not included:

* overlay loading of contexts larger than the register files;
* the compiler that maps C kernels onto the array (programs here are written
  by hand with the helpers in `ipa_pkg`);
* the host processor;
* SRAM macros: the memories are register arrays, to be replaced by macros
  in an implementation;
* the clock-gating cells.
