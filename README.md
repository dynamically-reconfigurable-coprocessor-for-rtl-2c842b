# A swap-in float32 coprocessor for an integer-only space computer

Small-satellite computers are often a soft RISC-V (RV32I) processor on an FPGA.
It has integer arithmetic only, and the FPGA fabric has little room left over.
This design adds single-precision floating point anyway. It does not keep a full
FPU beside the processor. Instead it keeps one small *reconfigurable region* that
holds **one** float operation at a time. Before each operation the region is
swapped, by partial reconfiguration of the FPGA, to the operation that is needed
next. The operations are:

| code | name   | result in D            |
|------|--------|------------------------|
| 0    | NOP    | 0, nothing is computed |
| 1    | ADD    | A + B                  |
| 2    | SUB    | A − B                  |
| 3    | MUL    | A × B                  |
| 4    | MAC    | A × B + C              |
| 5    | DIV    | A / B                  |
| 6    | DIVBY2 | A / 2                  |
| 7    | MOD    | A mod B (floored)      |
| 8    | REM    | A rem B (truncated)    |
| 9    | RCP    | 1 / A                  |

The processor sees the coprocessor as an ordinary memory-mapped peripheral. It
writes operands into registers, asks for a swap, waits, starts the operation
and reads the result back. Operands and results stay in the peripheral's own
registers, never in shared data memory. So a swap, which the processor cannot
predict in time, can never collide with a memory access.

The host computer around it is not part of this RTL. That computer is four
RV32I cores in quad modular redundancy, with a voter, memory scrubbers and a
configuration monitor. Neither is the FPGA's own configuration port, which
loads the partial bitstreams. The top level, `coproc_top`, is the peripheral
as the CPU bus sees it.

## The swap, and how it is emulated

This is the part of the design that RTL cannot express directly, so it needs
the most care.

On the FPGA, each of the ten configurations (NOP and nine operations) is a
separate partial bitstream for the same region. All of them have the same
ports: operands A, B and C, a start strobe, result D, a compute flag and a
result strobe. Only one is ever present. While a bitstream loads (about 250 ms
over JTAG on the original hardware), the region holds no working logic. When
loading ends, the new module starts from its initial state. That also wipes out
any radiation upset that had hit the region.

In this RTL:

* `fpu_pr_region` instantiates **all ten** modules (`fpu_rm` with `OP` = 0…9)
  side by side. The input `loaded_op` connects one of them to the region's
  ports. Only that module receives `start`. So the region here is about nine
  times larger than one configuration would be on the FPGA (roughly 8,900
  word-level cells after coarse synthesis, most of them in MOD/REM). For a real
  partial-reconfiguration flow, synthesize `fpu_rm` with one `OP` value per
  bitstream and use it as the reconfigurable module.
* `pr_controller` reproduces the swap's *behaviour*. A swap request for a code
  0–9 makes `pr_busy` high for exactly `PR_CYCLES` cycles, starting at the next
  clock edge. Meanwhile:
  * `loaded_op` reads NOP;
  * the whole region is held in reset (`region_rst`);
  * further swap requests are ignored.

  When the swap ends, `loaded_op` becomes the requested operation. Codes 10–15
  are ignored. After reset the region holds NOP.
* `PR_CYCLES` defaults to 4,000,000. That is 250 ms at the 16 MHz system clock
  assumed throughout.

The NOP configuration is the resting state between operations. Its D output is
constantly 0 and its flag never rises. A supervisor can therefore treat any
other value as a fault in the region.

## The operation modules (`fpu_rm`)

Each operation is combinational logic behind a fixed delay:

1. On `start` the module latches A, B and C. Changes on the inputs after that
   point do not matter.
2. The compute flag (`busy`) goes high on the next cycle. It stays high for
   `DELAY_CYCLES` cycles, which gives the combinational path time to settle.
3. On the cycle the flag falls, D is loaded and `valid` pulses for one cycle.

A `start` while the flag is high is ignored.

| operation         | `DELAY_CYCLES` | flag time at 16 MHz |
|-------------------|----------------|---------------------|
| MAC               | 58             | 3.625 µs            |
| RCP               | 42             | 2.625 µs            |
| all other six ops | 50             | 3.125 µs            |

These widths reproduce the compute times measured on the original hardware
(3.11 µs, 3.61 µs and 2.62 µs). The cycle counts themselves are this design's
choice. They live in `fpu_pkg::op_delay`. Change them there if the clock
differs, or to match a different timing closure.

## Float32 arithmetic

All units are combinational and follow the same conventions. These conventions
are this design's own; the original fixes only the float32 format.

* **Rounding:** round to nearest, ties to even.
* **Subnormals:** subnormal inputs count as zero. Results below the normal
  range are flushed to a signed zero.
* **Invalid results:** the quiet NaN `0x7FC00000`. Overflow gives ±infinity.

| unit        | used by     | method |
|-------------|-------------|--------|
| `fp_addsub` | ADD, SUB, second step of MAC, MOD fix-up | Aligns the smaller operand onto a 27-bit significand with guard, round and sticky bits; adds or subtracts; renormalises; rounds. |
| `fp_mul`    | MUL, first step of MAC | Multiplies the 24-bit significands into a 48-bit product and normalises it by at most one place. |
| `fp_div`    | DIV, RCP (1/A) | Unrolled restoring division giving 27 quotient bits; a non-zero final remainder becomes the sticky bit. |
| `fp_half`   | DIVBY2 | Decrements the exponent (exact). |
| `fp_modrem` | MOD, REM | Exact remainder; see below. |

**MAC** rounds twice: once after the product, once after the sum. It is not a
fused multiply-add.

**REM and MOD.** The original names the two as separate operations without
defining the difference. Here:

* REM is `A − B·trunc(A/B)`, which carries the sign of A (like C's `fmod`).
* MOD is `A − B·floor(A/B)`, which carries the sign of B.

The remainder is computed exactly. A long division runs over the exponent
difference, one compare-and-subtract step per quotient bit. It is unrolled for
the largest difference possible between normal floats (254 steps). That makes
`fp_modrem` by far the largest unit. When the remainder is non-zero and its
sign differs from B, MOD adds B to it. That addition is rounded, as in common
software libraries.

## Register map and programming sequence

Registers are 32-bit words at these byte offsets (`fpu_pkg`). The map is this
design's choice.

| offset | register | access | contents |
|--------|----------|--------|----------|
| 0x00   | A        | R/W    | operand A |
| 0x04   | B        | R/W    | operand B |
| 0x08   | C        | R/W    | operand C |
| 0x0C   | D        | R      | last result, held until the next result arrives |
| 0x10   | CTRL     | R/W    | [3:0] operation code; [8] write 1 to request a swap to that code; [9] write 1 to start (bits 8 and 9 read as 0) |
| 0x14   | STATUS   | R      | [3:0] loaded operation; [4] swap in progress; [5] ready (an operation other than NOP is loaded); [6] computing; [7] done (set by a result, cleared by the next start) |

A start is issued only when no swap and no computation is running. A start
while NOP is loaded produces no result.

The bus is a simple single-cycle bus:

* A write is `bus_sel & bus_we` at a rising edge.
* `bus_rdata` is combinational from `bus_addr`.
* The swap and start pulses reach the region one cycle after the write.

The address decode of the host bus is outside this design (`bus_sel`).

A program uses the coprocessor like this:

1. Write A, B and, for MAC, C.
2. Write CTRL = `op | 1<<8` to request the swap.
3. Poll STATUS until bit 4 clears. Alternatively, watch `pr_done`, which
   behaves like the FPGA's configuration DONE pin.
4. Write CTRL = `op | 1<<9` to start.
5. Poll STATUS bit 7, then read D.

`compute_flag` is high exactly while an operation computes. It is meant for a
pin, so the compute time can be measured from outside.

The values are IEEE-754 bit patterns: 10.75 is `0x412C0000` and 15.0 is
`0x41700000`. The original demonstration software printed numbers in a 16.16
fixed-point hexadecimal form (15.0 as `0xF0000`). That was a print format,
not the register contents.

## Files

| file | contents |
|------|----------|
| `rtl/fpu_pkg.sv` | operation codes, register map, delays, float helpers (rounding and packing) |
| `rtl/coproc_top.sv` | the peripheral: `coproc_regs` + `pr_controller` + `fpu_pr_region` |
| `rtl/coproc_regs.sv` | register block |
| `rtl/pr_controller.sv` | swap emulation |
| `rtl/fpu_pr_region.sv` | the region with its ten configurations |
| `rtl/fpu_rm.sv` | one configuration (operation, operand latch, delay) |
| `rtl/fp_*.sv` | the float32 units |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches (double-precision reals, rounded to float32) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_coproc_top_full.sv` | the nine-operation test program at full size |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Build and
run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fpu_pkg.sv tb/fp_ref_pkg.sv tb/tb_coproc_top.sv --top-module tb_coproc_top -o sim
./obj_dir/sim
```

What each testbench covers:

* **Float units** (`tb_fp_*`): special operands, the worked examples, and 5,000
  to 20,000 random operands each, compared bit-exactly with the reference.
* **`tb_fpu_rm`**: all ten configurations, the flag width and the result
  strobe.
* **`tb_coproc_top`**: plays the host program with `PR_CYCLES` = 300. It
  checks 27 swaps and 153 operations. It counts the mechanisms of the design
  and requires each to occur at least once:
  * a start refused during a swap;
  * a swap request ignored during a swap;
  * a start while NOP is loaded;
  * a start refused during a computation;
  * a result held across a swap.
* **`tb_coproc_top_full`**: runs at the default parameters, so each of its
  nine swaps takes the full 4,000,000 cycles. It finishes in about a minute.

## How far to trust it

* All float units agree bit for bit with the reference on every tested
  operand. The tests stay inside the normal exponent range, apart from
  directed overflow and underflow cases.
* Quiet NaNs are canonicalised. There are no exception flags and no rounding
  modes other than nearest-even.
* Timing closure was not studied. The arithmetic is deliberately single-cycle
  combinational logic behind a multicycle delay. MOD/REM in particular is a
  very deep path, and the delay counts are what make it usable. A synthesis
  flow needs matching multicycle constraints, or the delays must be raised.
* Left out, because only the surrounding computer uses them:
  * quad-redundant copies of the coprocessor;
  * an automatic swap scheduler;
  * bitstream storage.
