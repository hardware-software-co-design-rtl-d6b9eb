# RSA modular-multiplication accelerator: a 64-bit Montgomery multiplier behind a block-RAM mailbox

RSA encryption and decryption are modular exponentiations, `c = m^e mod n`, and
an exponentiation is a chain of modular multiplications. In software, the
expensive part of each multiplication is the reduction modulo `n`. This design
moves the whole modular multiplication into FPGA logic. The processor keeps
the control flow, which is the square-and-multiply loop over the exponent bits.
For every product it hands the operands to the hardware and collects the
result.

The hardware does **Montgomery multiplication** with 64-bit operands. This
kind of multiplication replaces the division by `n` with a division by a
power of two. The processor and the accelerator share a dual-ported 8 KB
block RAM, which serves as a mailbox:

- The processor writes the operands into fixed RAM words, then sets a
  control word.
- A small state machine on the RAM's second port sees the control word and
  fetches the operands.
- The state machine runs the multiplier, writes the product back and flags
  completion in the control word.

```
        processor side                       accelerator (rsa_accel_top)
   +--------------------+   port A   +------------+  port B  +------------+   64-bit   +-----------+
   | CPU + on-chip-     |<==========>| bram_block |<========>| controller |<==========>| main_mult |
   | memory bus (not    |  32-bit    |  8 KB,     |  32-bit  |  Mealy FSM |  operands, | Montgomery|
   | part of this RTL)  |  words     |  2 ports   |  words   |            |  result    | multiplier|
   +--------------------+            +------------+          +------------+            +-----------+
                                                                                         |  mult_64bits
                                                                                         |   4x mult_32bits
                                                                                         |     4x mult_16bits
```

## Montgomery multiplication in 64 bits

Let `R = 2^64`, let `n` be odd, and let `n' = -n^-1 mod 2^64`. For `a, b < n`,
`main_mult` computes

```
T      = a * b                              128 bits
u      = (T mod 2^64) * n'   mod 2^64       64 bits
U      = (T + u * n) / 2^64                 65 bits, exact: the low 64 bits of T + u*n are zero
result = U >= n ? U - n : U                 = a * b * R^-1 mod n
```

The choice of `u` makes `T + u*n` a multiple of `2^64`. Dividing by `R` is
therefore just taking the upper bits. Because `U < 2n`, one conditional
subtraction finishes the reduction. There is no trial division anywhere.

The result carries a factor `R^-1`. An exponentiation therefore runs inside
the *Montgomery domain*, where a value `x` is represented by `x*R mod n`. The
product of two such representations is again a representation. Software does
the following, using only calls to the multiplier:

```
x~  = Mont(x, R^2 mod n)          map the base into the domain
A   = R mod n                     the domain's "1"
for each exponent bit, MSB first:
    A = Mont(A, A)
    if bit == 1: A = Mont(A, x~)
result = Mont(A, 1)               map back
```

The processor has to supply `n'` (the `PRIME` operand) and `R^2 mod n`. Both
are computed once per modulus. With a 64-bit exponent in which half the bits
are set, one exponentiation takes 64 squares, 32 multiplies and 2 mappings,
so 98 hardware products.

## Inside `main_mult`: one multiplier used three times

The three 64x64 products share one pipelined multiplier, `mult_64bits`.
`main_mult_counter` runs a step counter. The counter is held at 0 while
`load_data` is high. When `load_data` falls, it counts 1 to 20 and then wraps
to 1. Each product is given six steps:

| step | action |
|------|--------|
| 1    | multiplier inputs <- `a`, `b` |
| 7    | keep `T = a*b`; multiplier inputs <- `T[63:0]`, `n'` |
| 13   | multiplier inputs <- `u = (T[63:0]*n')[63:0]`, `n` |
| 19   | `U` <- bits 128:64 of `T + u*n` |
| 20   | `mod_ab` <- `U - n` if `U >= n`, else `U` |

`ready` is a one-cycle registered pulse in the cycle after step 20. That is
**21 clock edges after `load_data` falls**. The counter keeps running as long
as `load_data` stays low. The same product is then recomputed, and `ready`
pulses again, every 20 cycles. The operands must stay stable during this
time, and the controller keeps them stable.

### The multiplier tree

`mult_64bits` splits both operands into 32-bit halves. Four `mult_32bits`
instances form `lo*lo`, `lo*hi`, `hi*lo` and `hi*hi`. One register stage adds
the two cross products. A second register stage places `hi*hi` above `lo*lo`
and adds the cross sum shifted left by 32 bits. `mult_32bits` does the same
with four registered `mult_16bits` leaves, which map onto the FPGA's 18x18
hard multipliers. The latency is 1 cycle for `mult_16bits`, 3 for
`mult_32bits` and 5 for `mult_64bits`. A new operand pair is accepted every
cycle. The Montgomery schedule samples each product in the sixth cycle after
loading its inputs, so one cycle of slack remains. The same construction
extends to 128 and 256 bits, but only the 64-bit size is built.

## The mailbox and the handshake

The RAM appears in the processor's address space at `0x3100_0000`. Every
64-bit value occupies two 32-bit words `0x20` bytes apart. The word at the
lower address holds bits 63:32.

| offset | word | offset | word |
|--------|------|--------|------|
| 0x000 | A1 (A[63:32]) | 0x020 | A2 (A[31:0]) |
| 0x040 | B1 | 0x060 | B2 |
| 0x080 | MOD1 | 0x0A0 | MOD2 |
| 0x0C0 | PRIME1 (n') | 0x0E0 | PRIME2 |
| 0x100 | RESULT1 | 0x120 | RESULT2 |
| 0x3E0 | CTRL | | |

The CTRL values are 0 (idle or acknowledged), 1 (start) and 2 (done). One
transaction runs as follows:

1. The processor writes the eight operand words and then `CTRL = 1`.
2. `controller` addresses CTRL on port B in every idle cycle. When it reads
   a word with bit 0 set, it writes `CTRL = 0` and leaves IDLE.
3. The controller goes through START and eight LOAD states. Each state
   presents the next address and captures the word addressed one cycle
   earlier, because the RAM has one cycle of read latency. `load_data` is
   high from the first to the last LOAD state.
4. In WAIT_MULT, `load_data` is low, so the multiplier runs. The controller
   leaves WAIT_MULT on the `ready` pulse.
5. WRITE_1 and WRITE_2 store the result halves. SET_DONE writes
   `CTRL = 2`, and DONE returns to IDLE. The controller ignores `CTRL = 2`,
   because its bit 0 is clear.
6. The processor polls CTRL until it reads 2, writes `CTRL = 0` and reads
   RESULT1 and RESULT2.

### Cycle budget

| phase | cycles |
|-------|--------|
| IDLE with start seen, START, 8 LOAD states | 10 |
| WAIT_MULT (21 edges to `ready`, plus the `ready` cycle) | 22 |
| WRITE_1, WRITE_2, SET_DONE, DONE | 4 |
| **total, CTRL=1 write to CTRL=2 write** | **36** |

At 100 MHz, 36 cycles are 360 ns per product, or about 2.8 million products
per second. The core alone spends 98 x 36 = 3528 cycles on a 64-bit
exponentiation. The processor's own writes and polls come on top of that.

The published estimate is 34 cycles per product, built from 10 + 20 + 4. It
counts the multiplier as the 20 counter steps. It leaves out two cycles of
the same published schedule: the edge that takes the counter from 0 to 1,
and the registered `ready`. The RTL keeps both cycles, and the testbench
checks 36.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/rsa_pkg.sv` | package | widths, mailbox offsets, CTRL codes, step numbers, FSM state type |
| `rtl/rsa_accel_top.sv` | `rsa_accel_top` | RAM + controller + multiplier, port A brought out |
| `rtl/bram_block.sv` | `bram_block` | dual-ported 8 KB RAM, byte enables, registered reads |
| `rtl/controller.sv` | `controller` | port-B state machine |
| `rtl/main_mult.sv` | `main_mult` | Montgomery multiplier |
| `rtl/main_mult_counter.sv` | `main_mult_counter` | 1..20 step counter |
| `rtl/mult_64bits.sv`, `mult_32bits.sv`, `mult_16bits.sv` | | multiplier tree |

### Top-level ports

The top's ports are the RAM's port A, which the processor side drives. The
processor side is the processor's data-side on-chip-memory bus and its RAM
interface.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | the single system clock |
| `rst` | in | 1 | active-high reset of the core |
| `bram_rst_a` | in | 1 | clears port A's read register |
| `bram_en_a` | in | 1 | port A enable |
| `bram_wen_a` | in | 4 | byte write enables; bit i covers data bits 8i+7:8i |
| `bram_addr_a` | in | 13 | byte address within the 8 KB; bits 1:0 ignored |
| `bram_wdata_a` | in | 32 | write data |
| `bram_rdata_a` | out | 32 | read data, one cycle after the address |

The vendor block-RAM wrapper names data from the controller's point of view:
`Dout` goes *into* the RAM and `Din` comes *out*. `bram_block` and
`controller` keep these names. Vendor buses are numbered `[0:31]`, where bit 0
is the MSB. Here every vector is `[31:0]`, and the values are the same.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rsa_pkg.sv tb/rsa_ref_pkg.sv tb/rsa_accel_top_tb.sv --top-module rsa_accel_top_tb
./obj_dir/Vrsa_accel_top_tb
```

Replace `rsa_accel_top_tb` with any other `*_tb` in `tb/`. `tb/rsa_ref_pkg.sv`
holds the reference arithmetic. It computes Montgomery products bit-serially,
`n'` by Newton iteration, and modular powers with full-width `%`. The
testbenches therefore never reuse the RTL's method.

| testbench | what it establishes |
|-----------|---------------------|
| `mult_16bits_tb`, `mult_32bits_tb`, `mult_64bits_tb` | streamed random and corner products at latencies 1, 3 and 5 |
| `main_mult_counter_tb` | hold at 0, count 1..20, wrap to 1, restart |
| `main_mult_tb` | the two published 64-bit test vectors, corner cases and 200 random products; `ready` exactly 21 cycles after start; one-cycle pulse; repeat after 20 cycles; final subtraction exercised |
| `bram_block_tb` | random two-port traffic with byte masks and collisions against a model; zero start; read-register reset |
| `controller_tb` | 50 transfers against a RAM model and a multiplier model with random delay: operand halves, result halves, 10-cycle load, CTRL=2 four cycles after `ready`, no stray writes |
| `rsa_accel_top_tb` | whole system through port A, with a processor model: both test vectors, 40 random products, the demonstration exponentiation `0xD431^0x25318523 mod 0x8000013B = 0x4EE9DA38` (n' = `0x0D979124_8D00D00D`, R^2 mod n = `0x2D7EBD3D`), three 64-bit exponentiations with 32-of-64-bit exponents (98 products each); 36 cycles per product |

All testbenches run in well under a second. The top has no parameters, so
`rsa_accel_top_tb` exercises the design exactly as it would be synthesized.

## Where this RTL departs from, or adds to, the published design

- **Pipelined partial-product adders.** In the published 32- and 64-bit
  multipliers, the final adder reads `hi*hi` and `lo*lo` straight from the
  previous level. That is only correct while the inputs are held, which the
  Montgomery schedule guarantees. Here those two products pass through one
  extra register, so each multiplier is a true pipeline. The latencies (3 and
  5) and the schedule do not change.
- **Step II uses 64 low bits.** One prose description says the second product
  uses "the 32 least significant bits" of the first. With `R = 2^64`, the
  reduction needs all 64, and the published test vectors only work with 64.
  The RTL uses 64.
- **Word order.** A1 and RESULT1 hold bits 63:32, as the controller and the
  driver software have it. Two short code fragments in the description show
  the low half at the lower address instead. They were not followed.
- **Controller and multiplier side by side.** The published controller
  instantiates the multiplier inside itself. Here `rsa_accel_top`
  instantiates both, with the same signals between them. The published
  controller's unused divide-by-4 clock is omitted.
- **One clock for both RAM ports.** The published system runs both ports
  from the same 100 MHz clock. `bram_block` takes a single `clk` instead of
  separate port clocks.
- **RAM details not specified by the source.** These are this design's
  choices:
  - Reads return the old word when the same address is written in the same
    cycle (read-first).
  - When both ports write the same byte in the same cycle, port B wins.
  - Reset clears only the read registers.
  - The contents start at zero.

  The real part is the FPGA vendor's block RAM. On an FPGA, the array maps
  onto block RAM with the same interface and timing.
- **Reset.** Flip-flops use an asynchronous, active-high reset. The RAM's
  port-B reset is the same `rst` used synchronously, which is why lint reports
  `rst` as both an asynchronous and a synchronous signal.
- **Cycle count.** The count is 36 per product, not the published 34 (see
  the cycle budget above).
- **Free-running multiplier.** After `load_data` falls, `main_mult` keeps
  recomputing every 20 cycles until the next load, as published. It is
  functionally harmless, but it costs power. A variant that stops after one
  round would gate the counter on `ready`.

## What is not here

The processor system around the accelerator is built from vendor and
processor IP. No RTL is given for any of these parts:

- the embedded processor
- its local and peripheral buses and the bridge between them
- the UART
- the program memory and its interface
- the reset and JTAG helpers
- the data-side on-chip-memory bus and its RAM interface

The accelerator connects to that system only through RAM port A. The
testbench's processor model drives port A with single-word reads and writes
in the same order as the driver routine.

The multiplier width is fixed at 64 bits, as in the published system. The
8 KB RAM would have room for 1024-bit operands, but using them would need a
wider Montgomery multiplier. The 16 -> 32 -> 64 construction shows how to
build one, but it is not provided.
