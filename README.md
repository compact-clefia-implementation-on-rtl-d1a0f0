# Compact CLEFIA core: one folded F-function, two cycles per round

CLEFIA is a 128-bit block cipher with 128-, 192- and 256-bit keys. It is
built on a four-branch generalised Feistel network. In every round, F0 is
applied to branch 0 and XORed into branch 1, and F1 is applied to branch 2
and XORed into branch 3. The branches are then rotated by one word. There are
18, 22 or 26 rounds, and whitening keys are XORed in before the first round
and after the last.

This core is built for small FPGAs. It keeps a single F-function datapath and
runs F0 and F1 through it on alternating cycles. A round therefore takes two
cycles instead of one. The datapath is split by a pipeline register into two
balanced stages, and while one stage works on one F-function the other stage
finishes the other. So the pipeline never stalls and the clock can run about
twice as fast as an unfolded round. A block occupies the datapath for 36, 44 or 52 cycles for a
128-, 192- or 256-bit key, and a new block can start every 36/44/52 cycles.

The F-functions are done with *T-boxes*: tables that combine an S-box lookup
with one column of the diffusion matrix. They sit in two dual-port 512 x 32
block RAMs. A third, small RAM holds the expanded key. The key schedule is
not run in hardware: the host computes the expanded key once per key and
writes it into the core.

## What one F-function costs: merged T-boxes

F0 and F1 take a 32-bit word x XOR a round key, split it into bytes
b0..b3 (b0 = bits 31:24), pass the bytes through S-boxes and multiply the
byte vector by a 4 x 4 matrix over GF(2^8) (polynomial z^8+z^4+z^3+z^2+1):

| | byte 0 | byte 1 | byte 2 | byte 3 | matrix rows |
|---|---|---|---|---|---|
| F0 | S0 | S1 | S0 | S1 | M0 = (1 2 4 6 / 2 1 6 4 / 4 6 1 2 / 6 4 2 1) |
| F1 | S1 | S0 | S1 | S0 | M1 = (1 8 2 A / 8 1 A 2 / 2 A 1 8 / A 2 8 1) |

The output is the XOR of four T-box words, one per byte. Each word is the
S-box value times one matrix column. Two facts make this compact:

* Columns 0 and 2 of each matrix hold the same four constants rotated by two
  positions, and so do columns 1 and 3. Bytes 0 and 2 therefore read the
  *same* table, and byte 2's word is rotated by 16 bits, which costs only
  wiring. The same holds for bytes 1 and 3.
* The F0 and F1 versions of a table are stored in one 512-entry memory.
  Address bit 8 selects the F-function and bits 7..0 are the byte.

| memory | F0 half (bit 8 = 0) | F1 half (bit 8 = 1) | read by |
|---|---|---|---|
| `u_tbox0` (TABLE_ID 0) | (S0, 2S0, 4S0, 6S0) | (S1, 8S1, 2S1, AS1) | port A: byte 0; port B: byte 2, rotated 16 |
| `u_tbox1` (TABLE_ID 1) | (2S1, S1, 6S1, 4S1) | (8S0, S0, AS0, 2S0) | port A: byte 1; port B: byte 3, rotated 16 |

The contents are computed at elaboration by `clefia_pkg::tbox_entry`. S0 is
computed from CLEFIA's four 4-bit S-boxes and a GF(2^4) mixing step. S1 is the
256-entry table of the cipher's definition, S1(x) = g(f(x)^-1), where f and g
are affine maps. No data files are needed.

## The schedule

A block is processed as 2r *steps*, one half-round each. One step enters
the pipeline every cycle. Step n uses three consecutive cycles:

| cycle | what happens for step n |
|---|---|
| n (address) | F input XOR round key; the result is the T-box address, registered by the RAMs |
| n+1 (stage 1) | T-box lookups; the words go into the pipeline register, together with the branch word ("partner") that the step will update |
| n+2 (stage 2) | XOR tree: four T-box words, the partner and, in the first and last rounds, a whitening key |

For encryption, step 2k is F0 of round k and step 2k+1 is F1 of round k. The
F input of step n+2 is always the result of step n. That result appears in
stage 2 in the very cycle in which step n+2 needs its address. So it is
forwarded straight from the XOR tree, through the round-key XOR, into the RAM
address. This loop, XOR tree -> key XOR -> RAM address register -> RAM ->
pipeline register -> XOR tree, is two cycles long, and this is why a round
takes two cycles. Only step 0 takes its input from the new block and step 1
from the branch registers. For r = 18 the cycles are:

| cycle | stage 1 | stage 2 | word produced |
|---|---|---|---|
| 1 | F0(T0 ^ RK0) | - | - |
| 2 | F1(T2 ^ RK1) | F0 words ^ T1 ^ WK0 | T0 of round 1 |
| 3 | F0(... ^ RK2) | F1 words ^ T3 ^ WK1 | T2 of round 1 |
| ... | | | |
| 34 | F1(... ^ RK33) | F0 words ^ T1 | C0 |
| 35 | F0(... ^ RK34) | F1 words ^ T3 | C2 |
| 36 | F1(... ^ RK35) | F0 words ^ T1 ^ WK2 | C1 |
| 37 | next block, F0 | F1 words ^ T3 ^ WK3 | C3 |

**Branch registers without data movement.** `clefia_round_regs` holds the four
branches, and words are never moved between registers. In round k, logical
branch j lives in register (j + k) mod 4 when encrypting. A step reads its F
input and partner from two registers and writes the new partner value back
in place. `clefia_pkg::step_info()` gives, for every step, the F-function, the
round-key and whitening-key addresses, the input and target registers, and the
rotation offset. `clefia_ctrl` computes it when the step enters, and the
control word travels down the pipeline with the step.

**Decryption.** CLEFIA's inverse applies the round keys in reverse order and
also rotates the branches the other way. So the register offset runs
(j - k) mod 4. With the encryption order (F0 first), the F input of one step
would be the result of the step just before it, which the two-stage loop
cannot deliver. The controller therefore runs F0 first in even rounds and F1
first in odd rounds. With that order, every F input is again the result of the
step two before, and decryption runs at the same rate on the same datapath.
The whitening keys swap roles: WK2/WK3 are used at the start and WK0/WK1 at
the end.

**Overlapping blocks.** The last two steps of a block are still in stages 1
and 2 when the next block's step 0 enters. For this to work:

* the partner word is fetched in stage 1, not in stage 2, so it is safe in the
  pipeline register before the new block overwrites the branch registers;
* loading the new block takes priority over the write-back of step 2r-2, and
  step 2r-1 does not write back at all;
* the result is gathered in a separate output register. When step 2r-2
  finishes, three final branches plus that step's result are copied into the
  register, in logical order. When step 2r-1 finishes, the fourth word is
  added.

For every key size, the last two steps update registers 2 and 0, because
r mod 4 = 2. The code does not rely on this: it uses the offsets.

## The expanded key and the host

The host runs the CLEFIA key schedule in software. This is the GFN over the
key with the constants CON_i, followed by the DoubleSwap function and further
constants. The host then writes the result through the key port while the core
is idle:

| address | contents |
|---|---|
| 0..3 | WK0..WK3 |
| 4 + i | RK_i, i = 0 .. 2r-1 |

The 64-word memory holds the 56 words of a 256-bit key. Port A reads one
round key per cycle, addressed one cycle ahead because the RAM read is
synchronous. When idle, port A keeps pointing at the round key of the next
block's step 0. Port B reads the whitening key for stage 2.
`tb/clefia_ref_pkg.sv` contains a complete key schedule; use it as the
reference for host software.

## Interface and timing (`clefia_type2`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_we`, `cfg_dec`, `cfg_ks` | in | 1, 1, 2 | set decrypt and key size (`KEY128`/`KEY192`/`KEY256`); only while `idle` |
| `key_we`, `key_addr`, `key_wdata` | in | 1, 6, 32 | write one expanded-key word; only while `idle` |
| `in_valid`, `in_ready`, `din` | in/out/in | 1, 1, 128 | start a block; `din[127:96]` is word 0 |
| `out_valid`, `dout` | out | 1, 128 | one-cycle pulse with the result block |
| `idle` | out | 1 | no block in flight |

* A block accepted in cycle t gives `out_valid` in cycle t + 2r + 2.
* With `in_valid` held high, blocks are accepted every 2r cycles.
* After a configuration or key write, `in_ready` stays low for one cycle.
* Configuration and key writes made while a block is in flight are ignored,
  and an assertion flags them.

## Files

| file | contents |
|---|---|
| `rtl/clefia_pkg.sv` | types, key-memory layout, S-boxes, T-box contents, `step_info()` schedule |
| `rtl/clefia_type2.sv` | top level: wiring, F-input multiplexer, output register |
| `rtl/clefia_ctrl.sv` | step counter, control-word pipeline, key read addresses, handshake |
| `rtl/clefia_tbox_bram.sv` | dual-port 512 x 32 merged T-box ROM |
| `rtl/clefia_key_ram.sv` | dual-port 64 x 32 expanded-key RAM |
| `rtl/clefia_stage2.sv` | pipeline register and XOR tree |
| `rtl/clefia_round_regs.sv` | four branch registers |
| `tb/clefia_ref_pkg.sv` | reference CLEFIA: F via matrices, key schedule, encrypt, decrypt |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

* `tb_clefia_type2` covers the whole core at its only (default) size. It uses
  all three key sizes, the CLEFIA known-answer vectors (encrypt and decrypt),
  and back-to-back random streams in both directions with random keys. It
  checks latency, issue interval, the `in_ready` stall and mode switches.
* `tb_clefia_ctrl` runs the control words on a software model of the registers
  and compares the result with the reference cipher. This checks every
  schedule choice, including the forwarding rule, on its own.
* The other testbenches check the memories, the registers and the XOR tree
  against independent models.

The known-answer values are the CLEFIA test vectors (key
`ffeeddcc...30201000`, plaintext `00010203...0c0d0e0f`). The reference model
reproduces the published ciphertexts for 128- and 192-bit keys. The 256-bit
value it checks, `a1397814 289de80c 10da46d1 fa48b38a`, is the model's own
output; the model's 256-bit path differs from its 192-bit path only in the
constant seed and the number of round keys.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/clefia_pkg.sv \
    tb/clefia_ref_pkg.sv $(ls rtl/*.sv | grep -v clefia_pkg) tb/tb_clefia_type2.sv \
    --top-module tb_clefia_type2 -o sim
./obj_dir/sim
```

## Choices made here, and limits

* **Decryption schedule.** The alternating F0/F1 order and the reversed
  register offset are this design's own way of running CLEFIA's inverse
  rotation on the folded datapath.
* **Branch registers.** In-place registers with index offsets, and the
  stage-1 fetch of the partner word, are this design's choices. They let the
  next block overlap the end of the current one.
* **Host protocol.** The valid/ready handshake, the key-memory layout, the
  configuration register and the reset style are all this design's own.
* **Memory style.** The RAMs are written as arrays with synchronous reads, so
  FPGA tools infer block RAMs. The T-box initial contents are computed by
  functions in an `initial` loop. Synthesis tools that do not evaluate such
  loops need the tables in another form.
* **Scope.** Only the folded (two cycles per round) structure is provided. A
  one-round-per-cycle variant, with four T-box memories and two XOR trees, is
  not included. Key expansion is not done in hardware.
