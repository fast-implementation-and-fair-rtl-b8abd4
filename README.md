# AES finalists on an FPGA: iterative and fully pipelined cipher units

Block ciphers run in two kinds of modes. In feedback modes (CBC, CFB, OFB), each block must
wait for the previous one, so only one block can be in flight. In non-feedback modes (ECB,
counter mode), blocks are independent and can be pipelined without limit. Each kind of mode
has its own best hardware architecture:

* **Feedback modes: basic iterative architecture.** One cipher round of combinational logic
  sits between a block register and an input multiplexer. The round is evaluated once per
  clock, so a block takes `#rounds` cycles. Unrolling rounds adds a lot of area for little
  gain in speed, and pipelining cannot be used because only one block is in flight.
* **Non-feedback modes: full mixed inner- and outer-round pipelining.** Every round is
  unrolled (outer-round pipelining). Each unrolled round also holds `k` pipeline registers
  (inner-round pipelining). A new block enters every clock, so throughput is
  `128 bit / T_clk`. Latency grows to `#rounds × k` cycles and does not depend on how many
  rounds are unrolled. With `k` chosen well, the clock period is set by one logic level,
  whatever the cipher. Ciphers with few, complex rounds then reach about the same
  throughput as ciphers with many simple ones.

This RTL builds both architectures for four of the five AES final candidates:
Rijndael (AES-128), Serpent, RC6 and Twofish (128-bit key). All eight units share one
block structure: an input
interface on a shared data/key bus, a memory of round keys, the encryption/decryption unit
with its control, and an output interface. Round keys are computed off chip and written
through the input bus. Every unit encrypts and decrypts, and the direction is chosen block
by block.

| unit (prefix)        | architecture              | rounds per clock | block time | latency (unit) |
|----------------------|---------------------------|------------------|------------|----------------|
| Rijndael (`rij_`)    | basic iterative           | 1                | 10 cycles  | 10 cycles      |
| RC6 (`rc6_`)         | basic iterative           | 1                | 20 cycles  | 20 cycles      |
| Serpent I8 (`spi_`)  | basic iterative, 8 rounds | 8                | 4 cycles   | 4 cycles       |
| Twofish (`twf_`)     | basic iterative           | 1                | 16 cycles  | 16 cycles      |
| Rijndael (`rjp_`)    | full mixed, k = 7         | –                | 1 cycle    | 70 cycles      |
| Serpent (`spp_`)     | full mixed, k = 3         | –                | 1 cycle    | 96 cycles      |
| RC6 (`rcp_`)         | full mixed, k = 28        | –                | 1 cycle    | 560 cycles     |
| Twofish (`twp_`)     | full mixed, k = 23        | –                | 1 cycle    | 368 cycles     |

Measured at the top-level ports, each latency is 2 cycles longer: one register in the input
interface and one in the output interface.

Mars, the fifth finalist, is not included. Its round rests on a fixed 512-entry × 32-bit
S-box that has no compact formula and is not reproduced here.

## Block structure of one cipher unit

```
 in_* bus ──► input_interface ──► key writes ──► key_memory ──► keys[] ─┐
                    │                                                    ▼
                    └──► block + direction ──► <cipher unit> ──► output_interface ──► out_*
```

* `input_interface`: one bus carries both key words and data blocks.
  * `in_is_key = 1`: `in_data` (its low bits) is a round key word for address `in_addr`.
    Key words are always accepted and reach the key memory one cycle later.
  * `in_is_key = 0`: `in_data` is a 128-bit block and `in_mode` its direction
    (0 = encrypt, 1 = decrypt). Blocks pass through a one-entry buffer with valid/ready.
  * A transfer happens on a clock edge where `in_valid` and `in_ready` are both high.
* `key_memory`: the round keys, held in registers and all read in parallel. An iterative
  unit uses the key of the current round and the whitening key of the next block in the same
  cycle. A pipelined unit uses every round key at once.
* `output_interface`: one result register with valid/ready. When the receiver does not take
  a result, the unit stalls.
* `control_unit` (inside each iterative unit): sequences the rounds.

Key layouts:

| cipher   | key memory        | what address `i` holds                                           |
|----------|-------------------|------------------------------------------------------------------|
| Rijndael | 11 words × 128 bit | round key `i`; 0 is the initial whitening key                   |
| RC6      | 44 words × 32 bit  | `S[i]`, sent in the low 32 bits of `in_data`                    |
| Serpent  | 33 words × 128 bit | `K_i` packed `{X0, X1, X2, X3}`, word X0 in the top 32 bits     |
| Twofish  | 42 words × 32 bit  | subkey `K_i` for 0–39; S-box key words `S0`, `S1` at 40, 41; low 32 bits |

Decryption uses the same key set as encryption, in reverse order, so no second key
schedule is needed. Do not rewrite keys while blocks that use them are inside a unit.

Block byte order:
* Byte 0 of a block is `data[127:120]`.
* RC6, Serpent and Twofish split the block into four 32-bit words, each taken little-endian from
  consecutive bytes. This is the byte order of their published test vectors.

## The basic iterative units and how they reach `#rounds` cycles per block

The textbook form loads a block in one cycle and then spends `#rounds` cycles on rounds. That
is `#rounds + 1` cycles per block. These units overlap the two steps:

* **Loading.** The initial key addition is applied on the load path. For RC6 that is the
  pre-whitening `B += S[0], D += S[1]`; for Serpent decryption, the addition of K32.
* **Output.** The result of the last round (with RC6's post-whitening, or Serpent's K32
  addition) goes straight to the output interface.
* **Overlap.** In that same cycle the multiplexer may load the next block.

A stream of blocks therefore takes exactly `#rounds` cycles per block. If the output
interface is full, the unit holds in its last round until the result is taken.

`control_unit` is a two-state sequencer (idle/run) with a round counter:
* `ready = !busy || done`, so a new block is loaded in the cycle the previous result leaves.
* `stall` freezes the last round.

What each iterative unit shares between the two directions:
* **Rijndael.** The two directions share the register, the multiplexer, the control, the
  keys and one 512-entry S-box table: the forward S-box at addresses 0–255 and the inverse
  at 256–511, with the direction bit as the top address bit. Decryption is the plain
  inverse cipher (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns). ShiftRows and
  SubBytes commute, so both directions run the S-box layer first, then the row shift, then
  their own column mixing.
* **RC6.** The two 32×32-bit multipliers of `f(x) = (x·(2x+1)) <<< 5` are shared.
  Encryption feeds them B and D. Decryption feeds them A and C, which become B and D after
  the undoing rotation.
* **Serpent I8.** One implementation round is eight regular rounds in a row: key mixing,
  32 copies of S-box `i`, then the linear transformation. It is evaluated 4 times per
  block. In regular round 31 the linear transformation is replaced by the addition of K32.
  Decryption has its own eight inverse rounds (inverse linear transformation, inverse
  S-boxes, key mixing, in descending order) and uses the keys of implementation round
  `3 − c` in cycle `c`.
* **Twofish.** The two g functions (key-dependent S-boxes from `S0`, `S1`, then the MDS
  multiplication) are the bulk of the round, and both directions share them. Encryption
  feeds them R0 and R1 <<< 8. Decryption feeds them R2 and R3 <<< 8, then undoes the round
  with its own XORs and 1-bit rotations, using the subkeys in reverse order. The input
  whitening (K0–K3) is applied on the load path; the output whitening (K4–K7), with the
  final swap undone, on the output path.

## The fully pipelined units

Each unit is a chain of round modules: `rijndael_pipe_round`, `serpent_pipe_round`,
`rc6_pipe_round` or `twofish_pipe_round`. Each round holds `INNER_STAGES` registers:

| cipher   | stage 1 registers                                          | stage 2 registers                                  |
|----------|------------------------------------------------------------|----------------------------------------------------|
| Rijndael | S-box memory read (a synchronous read, as in a block RAM)  | ShiftRows + MixColumns + AddRoundKey, or inverses  |
| Serpent  | key mixing + S-boxes (decryption: inverse LT + inverse S-boxes) | linear transformation (decryption: key mixing) |
| RC6      | the two quadratic functions `f`                            | XOR, rotations, key addition                       |
| Twofish  | the two g functions (S-boxes + MDS)                         | PHT, subkey addition, XOR, 1-bit rotations         |

Stages 3 to k are plain registers on the round output. Synthesis is meant to move them
into the round logic by register retiming. This is the least certain part of the design:
the source gives the number of inner stages only implicitly, and not where they sit (see
below).

Other details of the pipelined units:
* **Direction.** A valid bit and a direction bit travel with every block. Consecutive
  blocks may go in different directions. Each round picks its encryption or its decryption
  key by the block's direction bit.
* **Keys per round.** Position `p` uses the encryption key of round `p` and the decryption
  key of round `#rounds + 1 − p`.
* **Whitening.**
  * Rijndael: XORs key 0 (encryption) or key 10 (decryption) in front of the first round.
  * Serpent: adds K32 in front of the first round for decryption.
  * RC6: applies pre-whitening at the input and post-whitening at the output, both
    combinational.
  * Twofish: applies input whitening at the input and output whitening at the output,
    both combinational.
* **Back-pressure.** When the output interface is full, a single enable holds every
  register of the unit, so no block is lost.

### Where the stage counts come from

The default `k` of each unit comes from the reported throughput and latency of the
pipelined implementations:

| cipher   | throughput  | clock = 128 bit / throughput | latency | cycles | rounds × k |
|----------|-------------|------------------------------|---------|--------|------------|
| Rijndael | 12.2 Gbit/s | 10.5 ns                      | 737 ns  | 70     | 10 × 7     |
| Serpent  | 16.8 Gbit/s | 7.62 ns                      | 733 ns  | 96     | 32 × 3     |
| RC6      | 13.1 Gbit/s | 9.77 ns                      | 5490 ns | 562    | 20 × 28    |
| Twofish  | 15.2 Gbit/s | 8.42 ns                      | 3092 ns | 367    | 16 × 23    |

The same reports give, for the basic iterative units, Rijndael 414.2 Mbit/s / 309 ns,
Serpent I8 431.4 Mbit/s / 297 ns, RC6 142.7 Mbit/s / 897 ns and Twofish 177.3 Mbit/s /
722 ns. All four match one block
per latency. The 80 block RAMs reported for pipelined Rijndael fit 8 dual-port RAMs per
round, each holding the combined forward/inverse table and serving 2 of the 16 byte
lookups. The RTL describes the 16 lookups of a round on one 512 × 8 table and leaves the
mapping to RAM primitives to synthesis.

## Where this RTL departs from, or adds to, the architecture it implements

Cipher internals:
* The round functions of Rijndael, Serpent, RC6 and Twofish come from the ciphers' public
  specifications. They are checked against published known-answer vectors:
  * AES-128: FIPS-197 appendices B and C.1.
  * Serpent-128: two NESSIE set-1 vectors.
  * RC6: the two vectors of the RC6 submission.
  * Twofish-128: the published known answer for key 0 and plaintext 0.
* The Rijndael S-box is computed at elaboration from its algebraic definition
  (GF(2⁸) inverse, then the affine map). Serpent's inverse S-boxes are computed from the
  forward table. Twofish's q0 and q1 are built from their 4-bit tables by the
  specification's construction. Twofish's S-boxes depend on the key, so they are
  computed in logic from S0 and S1, and only those two words are stored.

Architecture:
* Key scheduling is off chip. It is not part of this RTL, and the testbenches compute the
  round keys with reference models.
* The direction bit per block, the sharing choices listed above and the decryption form
  (straightforward inverse cipher) are this design's choices.
* The placement of inner pipeline registers is this design's choice.
* The stage counts are derived, not given (see the table above).
* Bus widths, the valid/ready handshakes, the one-entry input buffer, the parallel-read key
  memory and the asynchronous active-low reset (`rst_n`) are this design's choices.

Not included:
* Partial loop unrolling, partial outer-round pipelining, resource sharing inside a round,
  Serpent I1 (eight S-box sets behind a multiplexer, one regular round per clock) and
  Triple DES. These are alternatives or baselines, not part of the chosen architectures.
* Mars.

Lint:
* Verilator reports `SYNCASYNCNET` on `rst_n`. The reset is asynchronous for the flops,
  and the same signal also disables the concurrent assertions. This is intended.
* Verilator also reports some unused signals, such as the sequencer's `done` and the clock
  of the combinational S-box layer.

## Files

`rtl/` — one module or package per file:

* `aes_finalists_top.sv` — the eight units side by side. Parameters: `RJP_INNER_STAGES = 7`,
  `SPP_INNER_STAGES = 3`, `RCP_INNER_STAGES = 28`, `TWP_INNER_STAGES = 23`.
* `rijndael_pkg.sv`, `serpent_pkg.sv`, `rc6_pkg.sv`, `twofish_pkg.sv` — types, constants and round
  functions.
* `rijndael_iterative.sv`, `rc6_iterative.sv`, `serpent_i8.sv`, `twofish_iterative.sv` —
  the iterative units.
* `rijndael_pipelined.sv`, `serpent_pipelined.sv`, `rc6_pipelined.sv`,
  `twofish_pipelined.sv` — the pipelined units.
* `rijndael_pipe_round.sv`, `serpent_pipe_round.sv`, `rc6_pipe_round.sv`,
  `twofish_pipe_round.sv` — one pipelined round each.
* `rijndael_sbox_layer.sv` — the 16 Rijndael byte substitutions, in a combinational and a
  registered form.
* `control_unit.sv`, `key_memory.sv`, `input_interface.sv`, `output_interface.sv` — the
  common blocks.

`tb/`:

* `aes_ref_pkg.sv`, `rc6_ref_pkg.sv`, `serpent_ref_pkg.sv`, `twofish_ref_pkg.sv` — reference
  models (key schedule, encryption, decryption). They are written independently of the
  RTL, except that the Twofish model reuses the q permutations and MDS code
  of `twofish_pkg`; its known-answer check covers them.
* `tb_<module>.sv` — one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb_aes_finalists_top.sv` — runs all eight units at once, at the default parameters.
  Through the top-level buses it:
  * loads two key sets;
  * sends known-answer and random blocks in both directions;
  * checks every result, each unit's latency (+2) and block interval;
  * makes every mechanism happen: key loading, both directions, direction switches
    between consecutive blocks, output stalls, refused inputs, full pipelines.

## Simulating

The packages must come first on the command line. For example, the whole design:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/rijndael_pkg.sv rtl/rc6_pkg.sv rtl/serpent_pkg.sv rtl/twofish_pkg.sv \
  tb/aes_ref_pkg.sv tb/rc6_ref_pkg.sv tb/serpent_ref_pkg.sv tb/twofish_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/tb_aes_finalists_top.sv \
  --top-module tb_aes_finalists_top -Mdir obj_top
./obj_top/Vtb_aes_finalists_top
```

A single unit needs only its package, its reference package, its modules and its
testbench. For example, Serpent I8:

```
verilator --binary --timing --assert -Wno-fatal rtl/serpent_pkg.sv tb/serpent_ref_pkg.sv \
  rtl/control_unit.sv rtl/serpent_i8.sv tb/tb_serpent_i8.sv --top-module tb_serpent_i8
./obj_dir/Vtb_serpent_i8
```

All testbenches run at the modules' default sizes. Nothing is scaled down.
