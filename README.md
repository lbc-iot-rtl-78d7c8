# LBC-IoT: a 4-bit serial block cipher core

LBC-IoT is an ultra-lightweight block cipher for very small devices such as
RFID tags and IoT sensor nodes. It encrypts 32-bit blocks under an 80-bit key
in 32 Feistel rounds. It uses only rotations, XOR, one 4-bit S-box and two
fixed 16-bit bit permutations. Its published hardware estimate is about 548
gate equivalents. Most of that area is the 112 flip-flops that hold the key
and the state, so the logic is kept small by working on 4 bits at a time.

This repository has a synthesizable SystemVerilog core that follows that
serial organisation. Each round takes four clock cycles and uses one S-box in
the round function and one in the key schedule. The core both encrypts and
decrypts.

## The cipher as implemented

### Round function

The state is two 16-bit halves, `{L, R}`. The left half sits in the upper 16
bits of the block. Round *i* uses a 16-bit subkey K*i*:

```
L' = P2(R)
R' = P1( L xor Ki xor S(R <<< 7) )
```

`R <<< 7` rotates the right half left by 7 bits. `S(.)` applies the 4-bit
S-box to each of the four nibbles. There are 32 rounds, and the ciphertext is
the state after round 32. No final swap is undone.

### S-box

```
x    : 0 1 2 3 4 5 6 7 8 9 A B C D E F
S(x) : 0 8 6 D 5 F 7 C 4 E 2 3 9 1 B A
```

The S-box is built as an eight-gate bit-sliced network with 3 AND, 1 OR and
4 XOR gates (`rtl/lbc_sbox.sv`). With A = x[0], B = x[1], C = x[2] and
D = x[3]:

```
Z = A&B   X = C^Z   Y = B|C   H = D^Y   N = D&X   O = N^A   S = H&A   L = S^B
y = {O, H, L, X}
```

The published gate sequence does not say which input bit is A. This bit
order is the only one under which the gates reproduce the table, and the
testbench checks all 16 entries.

### Permutations P1 and P2

The two permutations are given as tables in FIPS numbering: bit 1 is the
most significant bit. Entry P(x) = y is read as "output bit x is input
bit y", which is the convention of the DES tables.

```
x      :  1  2  3  4  5  6  7  8  9 10 11 12 13 14 15 16
P1(x)  : 13 10  7 12  9 14  3  2  5 16 15  4  1  6 11  8
P2(x)  :  5  8 16 12  3 11  2 13  4  1 14  6  9 15  7 10
```

Neither permutation has a fixed point. If the table is meant to be read the
other way ("input bit x goes to position P(x)"), swap `perm_fwd` and
`perm_inv` in `rtl/lbc_pkg.sv`. The testbench model in `tb/lbc_ref_pkg.sv`
must then change the same way.

### Key schedule

This is the least fully specified part of the cipher. The published
description fixes these points:

- The subkeys are 16 bits wide. K1 to K5 are the key itself, starting with
  its least significant 16 bits.
- The key is split into two 40-bit halves, KM = key[79:40] and
  KL = key[39:0].
- Each generated subkey rotates KL left by 3 and XORs the result with KM.
  It then passes the result through S-boxes and XORs that with a P1
  permutation of KM.
- The dataflow diagrams send the S-box output back into the KL register.
  They send the final XOR result, which is the subkey, back into the KM
  register.

P1 is a 16-bit permutation, so this core reduces the 40-bit halves to their
low 16 bits where they meet the S-boxes and P1. The core generates subkeys
K6 to K32 with 27 steps of:

```
a   = KL <<< 3                        (40-bit rotation)
t   = S( a[15:0] xor KM[15:0] )       (4 S-box applications)
K   = t xor P1( KM[15:0] )            (the new subkey)
KL <= { a[39:16], t }
KM <= { K, KM[39:16] }                (K enters at the top of KM)
```

After the step that makes K*j*, that subkey sits in KM[39:24]. K3 straddles
the two halves: K3 = {KM[7:0], KL[39:32]}.

The reduction to 16 bits and the exact register updates are this design's
reading of the description. If you have LBC-IoT test vectors from another
source, check this block first.

### Decryption

The published description says decryption is the same structure with the
subkeys in reverse order. With P1 and P2 in the round that does not invert
the cipher, so this core inverts the round equations instead:

```
R_prev = P2^-1(L)
L_prev = P1^-1(R) xor Ki xor S(R_prev <<< 7)
```

The subkeys are used in the order K32 down to K1.

## Serial architecture

```
            +-------------+    k_nib (4)    +----------------+
 start ---->|  lbc_ctrl   |---------------->|  lbc_datapath  |---> blk_out
 decrypt -->| round, nib, |  nib, kidx,     |  L, R (16+16)  |
            | phase FSM   |  step, back     |  1 S-box       |
            +-------------+------+          +----------------+
                                 |                   ^
                                 v                   | k_nib
                          +----------------+         |
 key ------------------->|  lbc_keysched  |---------+
                          | KM, KL (40+40) |
                          | 1 S-box, 1 S^-1|
                          +----------------+
```

### One round in four cycles (`lbc_datapath`)

The R register stays fixed during a round. In cycle *c* (0 to 3, least
significant nibble first), a 4-to-1 multiplexer picks nibble *c* of
`R <<< 7`. The rotation is only wiring. The datapath then computes

```
y_c = L[3:0] xor k_nib xor S(nibble c of (R <<< 7))
```

L shifts right by four bits and takes `y_c` in at the top. After four cycles
L would hold the whole of `L xor K xor S(R <<< 7)`.

A bit permutation mixes all 16 bits, so it cannot be done a nibble at a
time. It is therefore applied to the whole registers on the same clock edge
as the fourth nibble: `L <= P2(R)` and `R <= P1(y)`. The permutations are
wiring too, so the datapath logic is one S-box, one 4-bit three-input XOR and
the multiplexers.

When decrypting, the ciphertext is loaded through the inverse permutations:
`L = P1^-1(C_R)` and `R = P2^-1(C_L)`. Every round then ends with
`L <= P1^-1(R)` and `R <= P2^-1(y)`. The last round leaves `L <= y` and keeps
R, so the registers hold the plaintext at the end. This reuses the same
nibble hardware for both directions.

### Subkeys one nibble per cycle (`lbc_keysched`)

- **Rounds 1 to 5 (K1 to K5):** the subkey nibble is a slice of the key
  registers, picked by the subkey index.
- **Rounds 6 to 32, encryption:** one S-box works through the four nibbles
  of `a[15:0] xor KM[15:0]`. Each cycle sends out
  `k_nib = t_c xor P1(KM[15:0])[c]`. A 12-bit holding register keeps
  t0 to t2, and on the fourth cycle KL and KM are updated together. The key
  registers stay fixed within a round, so `P1(KM[15:0])` is plain wiring.
- **Decryption:** the generator step can be run backwards. With
  `t = KL[15:0]` and `K = KM[39:24]`:

  ```
  m     = P1^-1(K xor t)          (the old KM[15:0])
  a_lo  = S^-1(t) xor m           (one inverse S-box, one nibble per cycle)
  KL   <= {KL[39:16], a_lo} >>> 3
  KM   <= {KM[23:0], m}
  ```

  The subkey of a backward round is simply KM[39:24]. A decryption starts
  with a **prepare phase** of 27 forward steps (108 cycles), which brings K32
  into KM[39:24]. After that, each round steps back once. By the end the key
  registers again hold the original key, and rounds K5 to K1 read it
  directly.

This avoids storing 27 subkeys. The cost is the 108-cycle prepare phase and
an inverse S-box.

### Controller (`lbc_ctrl`)

The controller is a four-state machine (IDLE, PREP, RUN, DONE) with a 5-bit
round counter and a 2-bit nibble counter. It sends the datapath and the key
schedule the nibble index, the subkey index (K1 to K32 forward, K32 to K1
backward), the step and backward flags, and the final-round flag.

## Interface and timing (`lbc_iot_top`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock |
| `rst_n`   | in  | 1     | asynchronous reset, active low; all registers reset to 0 |
| `start`   | in  | 1     | one-cycle request, accepted only when `busy = 0` |
| `decrypt` | in  | 1     | 0 = encrypt, 1 = decrypt; sampled with `start` |
| `key`     | in  | 80    | key, sampled with `start`; `key[15:0]` is K1 |
| `blk_in`  | in  | 32    | `{L, R}` plaintext or ciphertext, sampled with `start` |
| `blk_out` | out | 32    | result, valid while `done = 1` and held until the next `start` |
| `busy`    | out | 1     | operation in progress; a `start` during it is ignored |
| `done`    | out | 1     | one-cycle pulse |

Latency counts from the cycle `start` is high to the cycle `done` is high:

- encryption: 129 cycles (1 load cycle and 32 rounds of 4 cycles);
- decryption: 237 cycles (1 load cycle, 108 prepare cycles and 128 round
  cycles).

The key is loaded in parallel with each `start`. There is no separate key
setup.

## Departures from the published design, and how far to trust this core

- **Algorithm details chosen here:** the direction of the permutation
  tables, the S-box bit order, the 16-bit reduction of the key schedule and
  its register updates, and the decryption method. Each is explained above.
  No test vectors are published with the cipher, so this core matches its own
  reference model (`tb/lbc_ref_pkg.sv`) but may not interoperate with other
  LBC-IoT implementations.
- **Interface:** the published serial datapath loads the block 16 bits at a
  time and outputs it 4 bits at a time. It also loads the key 4 bits at a
  time. Here all three are parallel ports, which makes the core easy to drop
  into a system but adds multiplexers.
- **Area:** the published estimate (about 548 GE) counts only the 112 key
  and state flip-flops, two S-boxes, the XORs and a few multiplexers. This
  core also has:
  - a 12-bit holding register in the key schedule;
  - the controller's counters and state register;
  - an inverse S-box;
  - the inverse-permutation multiplexing for decryption.

  After generic synthesis it has 136 flip-flops. It has not been mapped to a
  standard-cell library, so no gate-equivalent figure is claimed.
- **The round S-box** is the 8-gate network. The published round-function
  area line quotes "4 AND, 4 XOR" for it, but the gate sequence published
  for the same S-box has 3 AND, 1 OR and 4 XOR gates, and that sequence is
  what is built.

## Files

| file | contents |
|------|----------|
| `rtl/lbc_pkg.sv` | widths, round count, rotations, P1/P2 and inverses, `op_e` |
| `rtl/lbc_sbox.sv` | bit-sliced S-box |
| `rtl/lbc_sbox_inv.sv` | inverse S-box (backward key schedule) |
| `rtl/lbc_datapath.sv` | L/R registers, serial round function |
| `rtl/lbc_keysched.sv` | KM/KL registers, serial forward and backward key schedule |
| `rtl/lbc_ctrl.sv` | sequencing state machine |
| `rtl/lbc_iot_top.sv` | top level |
| `tb/lbc_ref_pkg.sv` | independent word-level model: subkeys, encrypt, decrypt |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the testbench hangs. For example, to run the
end-to-end test from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lbc_iot_top \
    -y rtl -y tb +libext+.sv rtl/lbc_pkg.sv tb/lbc_ref_pkg.sv tb/tb_lbc_iot_top.sv
./obj_dir/Vtb_lbc_iot_top
```

For other testbenches, replace `tb_lbc_iot_top` with `tb_lbc_sbox`,
`tb_lbc_sbox_inv`, `tb_lbc_datapath`, `tb_lbc_keysched`, `tb_lbc_ctrl` or `tb_lbc_pkg`.

The tests check the following:

- **`tb_lbc_iot_top`:** runs 160 operations. It encrypts and decrypts
  random blocks under random keys, plus all-zero and all-ones vectors, and
  compares each result with the model. It also checks both latencies. It
  counts and requires each mechanism at least once:
  - encryption and decryption;
  - the prepare phase;
  - key-slice rounds and generated-subkey rounds;
  - backward key steps;
  - a `start` ignored while busy.
- **`tb_lbc_datapath`:** compares the state with the model after every
  round.
- **`tb_lbc_keysched`:** checks K1 to K32 forward, then K32 to K1 backward
  after the prepare phase. It also checks that the key registers return to
  the original key.
- **`tb_lbc_ctrl`:** checks the cycle-by-cycle sequence.
- **`tb_lbc_sbox`:** checks all 16 entries. It also rebuilds the
  difference-distribution and linear-approximation tables from the outputs
  and checks that the largest entries are 4 and ±4, the S-box's published
  strength figures.
- **`tb_lbc_sbox_inv`:** exhaustive.
- **`tb_lbc_pkg`:** checks the permutations bit by bit against the tables,
  checks that each inverse undoes its permutation, and checks the
  rotations.
