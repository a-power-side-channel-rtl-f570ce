# SSP: a small 32-bit processor for masked cryptography

Masking defends software against power side-channel attacks. Every secret value is split into random
shares, and each share is processed separately. Masking only works if the processor does
not quietly recombine the shares in its hardware. Two common ways this happens:
- an ALU computes every function in parallel, so an AND unit sees both shares of an operand
  even during an XOR;
- a pipeline register holds one share while the next instruction brings in the other.

Masking also needs a steady supply of fresh random numbers.

SSP ("Small and Secure Processor") attacks both problems with a very small
instruction set and a few hardware features:

* **Four instruction classes.** The classes are subtract (with an optional branch), AND/XOR,
  load/store, and shift. Every other operation is built from them in software.
* **Gated ALU.** Each functional unit's inputs are forced to zero unless the current
  operation selects that unit. A unit that is not in use therefore sees no data and toggles no
  wires.
* **An on-chip random number generator** (XORSHIFT-ADD). Software reads a fresh 32-bit random
  word into a register with an ordinary load instruction.
* **A short three-stage pipeline** with separate instruction and data memories (2 KB and
  4 KB), aimed at small IoT devices.

This repository holds synthesizable SystemVerilog for the whole processor. It also holds
self-checking testbenches that run these workloads on the full-size design:
* masked Simon, Chaskey and AES S-box code;
* dynamic time warping (DTW), an eHealth signal-matching workload;
* small data-processing kernels.

## Instruction format

Each instruction has a 16-bit main word. An optional 16-bit second word follows it:

```
 15 14 | 13 | 12   9 | 8      4 | 3   0        15                      0
 opcode| fn |   RA   |    RB    |   RD    +    optional block (immediate
                                                or branch target/condition)
```

| opcode | class  | fn = 0                 | fn = 1                        |
|--------|--------|------------------------|-------------------------------|
| 00     | Sub    | RD = B - A, no 2nd word | 2nd word present (immediate or branch) |
| 01     | Logic  | RD = A AND B           | RD = A XOR B                  |
| 10     | Memory | RD = M[B - off]  (mr)  | M[B - off] = R[RD-field]  (mw) |
| 11     | Shift  | RD = A >> RB-field     | RD = A << RB-field            |

The RA and RB fields are *operand codes*, not plain register numbers. Small constants and
immediates therefore need no separate opcodes:

| RA (4 bits) | operand A        |  | RB (5 bits) | operand B                     |
|-------------|------------------|--|-------------|-------------------------------|
| 0 / 1 / 2   | constant 0 / 1 / -1 |  | 0 - 15   | register R0 - R15             |
| 3           | immediate (sign-extended) | | 16 / 17 / 18 | constant 0 / 1 / -1  |
| 4 - 15      | register R4 - R15 |  | 20          | immediate, zero-extended      |
|             |                  |  | 24          | immediate, sign-extended      |
|             |                  |  | others      | constant 0                    |

Because of the A codes, R0 to R3 can only be used as operand B.

Some instructions use the fields differently:

* **Memory:** RA is a 4-bit unsigned offset that is subtracted from operand B. For a store,
  the data register is in bits [3:0].
* **Shift:** RB is the shift amount (0 to 31), and operand A is the value shifted. The shifts
  are logical.
* **Sub with fn = 1:** if either operand code names an immediate, the second word is that
  immediate. Otherwise the second word is a branch block, `{target[12:0], cond[2:0]}`.
  The subtraction is always performed and written to RD.

  The branch is taken when the result satisfies a selected condition:
  * cond bit 0: negative;
  * cond bit 1: zero;
  * cond bit 2: positive.

  Some useful combinations:
  * `111` always;
  * `101` not equal;
  * `110` greater or equal.

  The 13-bit target is a signed slot offset from the branch itself.
* **Random numbers:** a load from word address `0xFFFFFFFF` returns a fresh random number.
  For example, `mr 0, -1, RD` means operand B is constant -1 and the offset is 0. A store to
  that address is dropped.
* **Halting:** a taken branch to its own address stops the core and raises `halted`.

`tb/ssp_asm_pkg.sv` contains one small encoder function per instruction form (`sub_`,
`subi_bs`, `subb`, `xor_`, `mr`, `mw`, `rnd`, `halt`, ...). It is the quickest way to
write test programs.

## Pipeline and timing

```
  Fetch                 Decode / Execute                         Memory / Write back
  PC -> Imem (Lo,Hi) -> decoder, RF read, gated ALU, branch   ->  WB mux: ALU result |
                        decision, Dmem/PRNG request               Dmem word | random -> RF
        ^                                        |
        +----------- taken branch (registered) ---+
```

* The instruction memory's output register is the fetch/decode register. The data memory's
  address register is the execute/memory register. Both memories read synchronously.
* The core issues one instruction per cycle, whether it is 16 or 32 bits long. The memory
  stores every instruction in one *slot*: the main word in the Lo bank and the optional block
  in the Hi bank, read together. A 16-bit instruction leaves its Hi word unused.
* The branch decision is registered and steers the fetch address in the next cycle. The one
  instruction fetched behind a taken branch is squashed. A taken branch therefore costs 2
  cycles, and an untaken branch costs 1.
* The write-back value is forwarded to the instruction in decode/execute. This covers ALU
  results, loaded words and random numbers. A loaded value can be used by the very next
  instruction, so the pipeline never stalls.
* The core leaves reset at slot 0. Registers reset to 0.

Measured cycle counts, all checked by the testbenches:
* a masked Simon64/128 round of 49 instructions takes 52 cycles;
* DTW on two 256-point series takes 1,642,249 cycles.

## Gated ALU

`ssp_gated_alu` contains five units: subtractor, AND, XOR, right shifter and left shifter.
* Each unit's two inputs are ANDed with that unit's enable, which is decoded from the
  operation.
* A disabled unit outputs zero, so the result is simply the OR of all unit outputs.
* The testbench checks the gating itself, not only the result: all four disabled units must
  see all-zero inputs in every cycle.

The subtractor also computes the data addresses (`B - offset`) and the branch flags.

## Random number generator

`ssp_prng` is a 128-bit XORSHIFT-ADD generator. Its recurrence is:

```
t  = s0;  t ^= t << 15;  t ^= t >> 18;  t ^= s3 << 11;
(s0, s1, s2, s3) = (s1, s2, s3, t);      output = s3 + s2
```

The generator advances only when software reads a random number. The output is
valid in the same cycle as the load's write-back.

Seeding works as follows:
* The state resets to the `PRNG_SEED` parameter.
* The host can load a new seed with `seed_we`/`seed` whenever `rst_n` is high. Reset takes
  priority, so the natural moment is the first cycle after reset. The first random read
  comes several cycles later.
* An all-zero seed would lock the generator, so it is replaced by the parameter.

## Memories and host interface

`ssp_top` has these memories and host ports:

* **Instruction memory**, `IMEM_SLOTS = 512`: 512 slots × (16 + 16) bits = 2 KB. Load it
  through `imem_we/imem_waddr/imem_wdata`, normally while `rst_n` is low. The write data is
  `{Hi word, Lo word}`.
* **Data memory**, `DMEM_WORDS = 1024`: 1024 × 32 bits = 4 KB, word-addressed. It has a
  second, independent host port, `dmem_host_*`, for inputs and results. Reads return data
  one cycle after the request.
* **Status outputs**: `halted`, `retire` (an instruction wrote back), `br_taken` and
  `pc_ex`.

## Files

| file | contents |
|------|----------|
| `rtl/ssp_pkg.sv` | widths, opcode/operand codes, decoded-instruction struct |
| `rtl/ssp_decoder.sv` | instruction slot → control struct |
| `rtl/ssp_gated_alu.sv` | input-gated ALU |
| `rtl/ssp_regfile.sv` | 16 × 32 register file, 2 read / 1 write |
| `rtl/ssp_prng.sv` | XORSHIFT-ADD generator |
| `rtl/ssp_imem.sv`, `rtl/ssp_dmem.sv` | memories |
| `rtl/ssp_core.sv` | pipeline, forwarding, branch, write-back mux |
| `rtl/ssp_top.sv` | processor with memories and PRNG |
| `tb/ssp_asm_pkg.sv` | instruction encoders, PRNG reference model |
| `tb/ssp_progs_pkg.sv` | test programs (masked Simon round, DTW) and their reference models |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/ssp_dtw_tb.sv` | DTW at 100/128/200/256 points on the full-size processor |
| `tb/ssp_chaskey_tb.sv` | masked Chaskey-12 permutation (Boolean/arithmetic conversions) |
| `tb/ssp_aes_sbox_tb.sv` | masked table-based AES S-box |
| `tb/ssp_isa_tb.sv` | random programs against an instruction-set model |
| `tb/ssp_apps_tb.sv` | quicksort, histogram, Laplacian edge filter, block motion detection |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one also has a watchdog.
With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ssp_pkg.sv tb/ssp_asm_pkg.sv tb/ssp_progs_pkg.sv tb/ssp_top_tb.sv \
    --top-module ssp_top_tb -o sim && obj_dir/sim
```

Replace `ssp_top_tb` with any other testbench name.

`ssp_top_tb` runs three masked Simon rounds and then a 16 × 16 DTW. It also counts how often
each mechanism occurred:
* each ALU operation;
* immediates and 32-bit instructions;
* taken and untaken branches and squashed slots;
* loads and stores;
* random-number reads;
* every forwarding path;
* halting.

It fails if any of them never occurred.

`ssp_dtw_tb` runs the full-size design. It checks each DTW distance against a software model
and checks each run time against the time a sensor needs to collect the samples. It takes about
2 seconds.

## Masked cipher workloads

The Chaskey and AES testbenches keep every secret in two shares from input to output. They
recombine the shares only in the checker. The Simon round is a simpler demonstration: it
loads plain inputs and splits them into shares with fresh random numbers before any
computation.

| workload | slots | cycles | random numbers |
|----------|-------|--------|----------------|
| Simon64/128 round, two Boolean shares | 49 | 52 per round | 3 per round |
| Chaskey-12 permutation | 283 | 13,456 (1,121 per round) | 144 |
| AES S-box: build masked table | 25 in total | 2,055 | 2 |
| AES S-box: substitute one byte | (same program) | 11 | 0 |

* **Simon** uses only XOR, AND and rotations. A rotation is two shifts and an XOR. The
  non-linear AND term is computed as the four cross products of the shares.
* **Chaskey** mixes additions with XORs and rotations. The XORs and rotations work on
  Boolean shares, one share at a time. Each addition works as follows:
  1. convert both operands to arithmetic masking (`x = A + r`) with Goubin's conversion;
  2. add the arithmetic shares and the masks separately;
  3. convert the sum back to Boolean masking with Goubin's 32-step arithmetic-to-Boolean loop.

  Each conversion uses a fresh random number. The loop dominates the run time.
* **AES S-box** builds a masked copy of the table, `T[x ^ m_in] = S[x] ^ m_out`, using fresh
  8-bit masks. It then substitutes each byte of a state through T. Each byte arrives under
  its own mask and is re-masked to `m_in` without ever being unmasked.

## Data-processing kernels

`ssp_apps_tb` runs four typical sensor-node kernels. Each result is checked against a model
in the testbench. The data sizes are chosen to fit the 4 KB data memory with one value per
32-bit word.

| kernel | data | slots | cycles |
|--------|------|-------|--------|
| quicksort, with an explicit stack in data memory | 100 words | 40 | 7,373 |
| 256-bin histogram | 16 × 16 pixels | 13 | 2,820 |
| Laplacian edge filter (`4c − l − r − u − d`) | 16 × 16 pixels | 23 | 3,574 |
| motion detection: SAD of 4 × 4 blocks against a threshold | two 16 × 16 images | 32 | 3,331 |

## Checking the instruction set as a whole

`ssp_isa_tb` builds random programs from random 32-bit slots. The only constraint is that
branch targets point forward, so each program reaches the final halt. This covers every
opcode, operand code, immediate form, shift amount, memory offset and condition mask.

The testbench also contains an instruction-set model, written directly from the encoding
above. After each program it compares:
* all registers;
* the whole data memory;
* the number of executed instructions;
* the cycle count.

The cycle count must equal `executed + taken branches + 1`. This confirms the timing
rules in the pipeline section.

## Performance on the DTW workload

The test series are 16-bit sensor-like samples (a sine wave plus random noise), with both series the same length. The time
column assumes a 5 MHz clock.

| points | cycles | time at 5 MHz | data memory used |
|--------|--------|---------------|------------------|
| 100 | 251,509 | 50 ms | 1,600 B |
| 128 | 411,529 | 82 ms | 2,048 B |
| 200 | 1,003,009 | 201 ms | 3,200 B |
| 256 | 1,642,249 | 328 ms | 4,096 B (full) |

* Data layout: the program keeps two input series and two rows of the cost matrix, 4 arrays
  of n words. A 256-point problem therefore fills the data memory exactly.
* The program uses 47 instruction slots.
* Each row is computed from the previous one as `d[j] = |s_i - p_j| + min(d[j-1], dp[j], dp[j-1])`.
  The absolute value and the three-way minimum are built from subtract-and-branch.

## Where this design makes its own choices

The processor's published description defines the following:
* the four instruction classes and the role of the function bit;
* the field layout;
* the operand-code tables;
* the three pipeline stages and the blocks in each;
* the gated ALU and its purpose;
* the XORSHIFT-ADD generator;
* the register count;
* the memory sizes.

The following are this implementation's own decisions:

* **Opcode values, operand codes and immediate widths** follow the predecessor instruction set
  that SSP extends. In one place the predecessor's tables disagree about the operand-A code
  for an immediate. Code 3 is used here.
* **Branch conditions.** The three condition bits are not defined anywhere. The
  negative/zero/positive mask above is a guess. The relative-target base (the branch's own
  slot) is also a guess.
* **Shift direction encoding** (fn = 0 right, fn = 1 left), logical shifts, and the shift
  amount taken from the RB field.
* **Store data register** in bits [3:0], because RA holds the offset.
* **Random-number access** through a load from address `0xFFFFFFFF`. The description only says
  that random numbers go from the generator straight to the register file.
* **Forwarding, branch squash and halting.** The description gives the stages, not the hazard
  handling.
* **The exact XSadd recurrence.** Shift amounts 15, 18 and 11 and output `s3 + s2` are the
  standard published generator.
* **Flip-flop register file.** The original also has an ASIC variant with a latch-based
  register file and technology clock gating. Neither is modelled.
* **Host ports** for loading memories and seeding the generator.

Cycle counts for the masked ciphers therefore cannot match published figures exactly. They
are nevertheless close to published figures for comparable code:
* Simon: 52 cycles per round, against 47;
* Chaskey: 1,121 cycles per round, against 1,240.

The Chaskey round function, the XSadd constants and the AES S-box definition used by the
testbenches are the standard published algorithms.
