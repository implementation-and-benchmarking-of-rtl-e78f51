# LTE ciphering accelerator: 128-EEA1 (SNOW 3G) and 128-EEA2 (AES-CTR)

LTE protects user data in the PDCP sublayer with one of two confidentiality
algorithms: 128-EEA1, built on the SNOW 3G stream cipher, and 128-EEA2, which is
AES-128 in counter mode. At LTE and beyond-LTE downlink rates (100 to 300 Mbit/s),
doing this in software on the handset's processor takes too long. This RTL
implements both algorithms as hardware engines behind a single command and
data-stream interface, built for low power:

* **SNOW 3G** runs with a 32-bit data path and produces one keystream word per
  clock.
* **AES** runs with a 128-bit data path and needs 12 clocks per 128-bit
  keystream block: one load clock and 11 round clocks.
* **Every cryptographic S-box** (the Rijndael S-box of AES and of SNOW 3G S1,
  and the S_Q box of SNOW 3G S2) is built as a one-hot
  decoder / wire-switch / encoder, which toggles fewer nodes per input change
  than a look-up table or a composite-field inverter.
* **Optional second AES core.** The counter-mode engine can run two AES cores
  side by side (`NUM_AES = 2`), for data rates well beyond LTE.

All files are IEEE 1800-2017 SystemVerilog and can be synthesised. The
testbenches are self-checking and run under Verilator.

## Block structure

```
lte_cipher                      top: algorithm select, shared stream interface
├── eea1                        128-EEA1: key/IV formation, word counting, XOR, tail mask
│   └── snow3g_core             SNOW 3G mode control (load, 32 init clocks, discard, stream)
│       ├── snow3g_lfsr         S0..S15 and feedback part
│       │   ├── snow3g_mul_alpha    256 x 32 table on S0[31:24]
│       │   └── snow3g_div_alpha    256 x 32 table on S11[7:0]
│       └── snow3g_fsm          R1, R2, R3, two adders, two XORs
│           ├── snow3g_s1       4 x onehot_sbox(S_R) + column mix (0x1B)
│           └── snow3g_s2       4 x onehot_sbox(S_Q) + column mix (0x69)
└── eea2                        128-EEA2: counter mode, NUM_AES cores, keystream buffer
    ├── eea2_counter            T_1 from COUNT/BEARER/DIRECTION, +1 per block
    └── aes_core  (x NUM_AES)   STATE register, round control
        ├── aes_column (x4)     SubBytes (4 x onehot_sbox) / MixColumns / AddRoundKey
        └── aes_key_expansion   KEY register, 4 x onehot_sbox, XOR chain, round constant
lte_cipher_pkg                  types, constants, S-box and table formulas
```

## The one-hot S-box (`onehot_sbox`)

This is the unusual part of the design, and the reason it uses little power.
A conventional S-box is a 256-entry table decoded by logic in which many nodes
toggle whenever the input changes. The one-hot S-box splits the mapping into
three stages:

1. **Decoder.** Two 4-to-16 predecoders, one per nibble, feed 256 two-input
   AND gates. Exactly one of the 256 lines is high: line `x`.
2. **Switching block.** This stage is wiring only, with no gates: line `i`
   is connected to line `S(i)`. The permutation is the whole "content" of the
   S-box.
3. **Encoder.** Output bit `b` is the OR of the 128 switched lines whose
   index has bit `b` set.

When the input changes, only a few decoder nodes, two lines and the OR paths
to the changed output bits toggle. Parameter `KIND` selects the permutation:

* `SBOX_SR` is the Rijndael S-box: the inverse in GF(2^8) mod x^8+x^4+x^3+x+1,
  then the affine map with constant 0x63.
* `SBOX_SQ` is the SNOW 3G S_Q box. It evaluates
  x + x^9 + x^13 + x^15 + x^33 + x^41 + x^45 + x^47 + x^49, XORed with 0x25,
  in GF(2^8) mod x^8+x^6+x^5+x^3+1.

The package computes both permutations from these formulas during
elaboration, so the source contains no table.

There are 28 instances in the default configuration:

* 4 in SNOW 3G S1 and 4 in S2;
* 16 for AES SubBytes;
* 4 for AES key expansion.

## 128-EEA1 path

### SNOW 3G LFSR

The LFSR is sixteen 32-bit cells. On each clock every cell shifts down one
place, and S15 receives the feedback word:

```
v = (S0 << 8) ^ MUL_alpha(S0[31:24]) ^ S2 ^ (S11 >> 8) ^ DIV_alpha(S11[7:0]) ^ m
```

* `m` is the FSM output `F` during initialisation and zero during keystream
  generation.
* `MUL_alpha` and `DIV_alpha` are 256 x 32 look-up tables. Each entry packs
  four multiples of the input byte by fixed powers of the generator of
  GF(2^8) mod 0x1A9, computed at elaboration.

### SNOW 3G FSM

* Output: `F = (S15 + R1) ^ R2`, where `+` is addition modulo 2^32.
* Update on each clock:
  * `R1 <= R2 + (R3 ^ S5)`
  * `R2 <= S1(R1)`
  * `R3 <= S2(R2)`

### Keystream timing (`snow3g_core`)

Clock edges are counted from the one that samples `start`:

| edge    | action |
|---------|--------|
| 0       | LFSR loaded from key and IV, R1..R3 cleared |
| 1 .. 32 | initialisation mode (F fed back into the LFSR) |
| 33      | first keystream-mode clock; its output word is discarded |
| 34 ..   | `ks_valid` high, `ks_word = F ^ S0`; one word per clock while `ks_ready` is high |

### Key and IV (`eea1`)

`eea1` builds the SNOW 3G inputs as 128-EEA1 specifies:

* Key words: `KEY[127:96]` is k3 and `KEY[31:0]` is k0.
* IV words: IV3 = IV1 = COUNT, and IV2 = IV0 = BEARER | DIRECTION | 26 zero bits.

The engine then takes ceil(LENGTH/32) words.

## 128-EEA2 path

### AES core (`aes_core`)

The core encrypts one block in 12 clocks. Each round clock, the 128-bit STATE
register passes through four column slices, and the key expansion produces the
round key for that same clock.

| edge     | STATE                                   | KEY register |
|----------|-----------------------------------------|--------------|
| 0        | ← counter block                         | ← cipher key |
| 1        | AddRoundKey only                        | → round key 1 |
| 2 .. 10  | SubBytes, ShiftRows, MixColumns, AddRoundKey | → next round key |
| 11       | SubBytes, ShiftRows, AddRoundKey (no MixColumns) | |

ShiftRows costs no logic. The slices read STATE in shifted byte order:
row `r` of column `c` comes from column `c + r`.

The result stays in STATE with `out_valid` high. A new `start` is accepted
in that same cycle, so blocks can follow each other every 12 clocks.

### Round-key chain (`aes_key_expansion`)

The round key is generated one step per clock:

* `t = SubWord(RotWord(w3)) ^ Rcon`
* `w0' = w0 ^ t`
* `w1' = w1 ^ w0'`
* `w2' = w2 ^ w1'`
* `w3' = w3 ^ w2'`

Only the first word of this chain needs S-boxes.

### Counter mode (`eea2`)

`eea2_counter` holds the counter block:

* The first block is T_1 = COUNT | BEARER | DIRECTION | 90 zero bits.
* Each later block adds 1 to the low 64 bits.

Blocks are issued to the AES cores in turn and collected in the same order.
A finished block is copied into a 128-bit keystream buffer. The copy frees its
core, which starts the next counter block in the same clock. The buffer is
then drained as four 32-bit words, most significant word first, each XORed
with one data word.

If the data side stalls, the buffer stays full and a finished core holds its
result until the buffer can take it. With one core and no stalls:

* start is sampled at edge 0;
* the core loads at edge 1 and finishes at edge 12;
* the first data word moves in cycle 14;
* after that, one block is finished every 12 clocks.

With `NUM_AES = 2`, one block is finished about every 6 clocks.

## Interface of `lte_cipher`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (rising edge), asynchronous active-low reset |
| `start` | in | 1 | start one PDU; ignored while `busy` |
| `alg` | in | `alg_e` | `ALG_EEA1` or `ALG_EEA2`, sampled with `start` |
| `params` | in | `cipher_params_t` (182) | `key[127:0]`, `count[31:0]`, `bearer[4:0]`, `direction`, `length[15:0]` (bits), sampled with `start` |
| `in_valid`, `in_ready`, `in_data[31:0]` | in/out/in | | input words; the first PDU bit is bit 31 of the first word |
| `out_valid`, `out_ready`, `out_data[31:0]`, `out_last` | out/in/out/out | | output words; `out_last` marks the final word |
| `busy` | out | 1 | a PDU is in progress |

There is no FIFO between the input and output sides, so both sides move a
word in the same cycle:

* `out_valid` is `in_valid` gated by keystream availability.
* `in_ready` is `out_ready` gated the same way.
* A word transfers in a cycle where `in_valid` and `out_ready` are both high
  and keystream is available.

The engine processes ceil(LENGTH/32) words and returns the bits after LENGTH
as zero. Ciphering and deciphering are the same operation. If LENGTH = 0, the
engine returns to idle at once.

## Throughput

| engine | start-up | rate | clocks per byte |
|--------|----------|------|-----------------|
| 128-EEA1 | 34 clocks | 1 word (4 bytes) per clock | 0.25 (+34 per PDU) |
| 128-EEA2, 1 core | 14 clocks to first word | 1 block (16 bytes) per 12 clocks | 0.75 |
| 128-EEA2, 2 cores | 14 clocks | 1 block per 6 clocks | 0.375 |

The clock needed for a given processing time per byte is that cycle count
divided by the time. At 4 ns per byte, for example:

* 128-EEA2 with one core needs 187.5 MHz;
* 128-EEA1 needs about 63 MHz.

A 1000-byte PDU takes 283 clocks with 128-EEA1 and 759 clocks with 128-EEA2.

## What follows the design and what was chosen here

These points follow the design's description:

* the algorithm structure of both engines;
* the 32-bit SNOW 3G and 128-bit AES data paths;
* 32 initialisation clocks plus a discarded first word;
* 12 clocks per AES block, including one load clock;
* the MUL_alpha / DIV_alpha maps as look-up tables;
* the one-hot S-box everywhere;
* counter blocks built from COUNT/BEARER/DIRECTION and then incremented;
* the option of a second AES core.

The exact algorithm constants come from the public SNOW 3G, AES, 128-EEA1 and
128-EEA2 specifications. Those are:

* the S-box formulas and table powers;
* the SNOW 3G LFSR load pattern and FSM equations;
* the key/IV word order;
* the 64-bit counter increment.

The published test vectors confirm them (see below).

These are choices made in this implementation:

* combining both engines behind one interface, with the algorithm chosen per
  PDU;
* the 32-bit valid/ready stream and its zero-buffer pass-through;
* rounding LENGTH up to whole words and zeroing the tail bits;
* the 128-bit keystream buffer in 128-EEA2 and the round-robin use of several
  cores;
* the nibble predecoders inside the one-hot decoder;
* asynchronous active-low reset to zero.

The 32-bit and 64-bit AES data paths, and the composite-field and plain
look-up-table S-boxes, are the alternatives the design was weighed against.
They are not included.

## Verification

Every module has its own self-checking testbench in `tb/`. The testbenches
compare against `cipher_ref_pkg`, an independent software model. Its S-boxes
are derived differently: the inverse is found by search and the polynomial is
evaluated term by term.

The reference model and the RTL both reproduce these published vectors:

* FIPS-197 AES-128 (appendix B and C.1);
* SNOW 3G test set 1 (first words ABEE9704 7AC31373);
* 128-EEA1 test set 1;
* 128-EEA2 test set 1.

The testbenches also check the cycle counts above:

* 34-clock SNOW 3G start-up, then one word per clock;
* 12 clocks per AES block;
* 12 (or about 6) clocks per block in counter mode.

`tb_lte_cipher` runs the whole accelerator at its default parameters:

* both test sets;
* a 1000-byte PDU in each algorithm, with its cycle count;
* a maximum-length PDU (65535 bits) in each algorithm;
* 30 random PDUs with random stalls on both sides.

It counts each mechanism and fails if any one never occurs: algorithm
switch, input stall, output stall, a finished AES block waiting for the
buffer, a masked partial word, a start while busy, and LENGTH = 0.
`tb_eea2_dual` repeats the 128-EEA2 tests with two AES cores.

`tb_tti_workload` sends one 1 ms interval of downlink data at 100, 200 and
300 Mbit/s through each algorithm, as back-to-back 1500-byte PDUs, and checks
every word. The clock each interval needs is:

| data per 1 ms | 128-EEA1 | 128-EEA2 (1 core) |
|---------------|----------|-------------------|
| 100 kbit | 3431 clocks (3.4 MHz) | 9451 clocks (9.5 MHz) |
| 200 kbit | 6828 clocks (6.8 MHz) | 18888 clocks (18.9 MHz) |
| 300 kbit | 10225 clocks (10.2 MHz) | 28325 clocks (28.3 MHz) |

These are the minimum clocks for the cipher alone. The rest of the protocol
stack must also fit in the same millisecond, so a real system needs a faster
cipher, that is, a smaller time per byte.

## Simulating

All testbenches follow the same pattern. They print
`TB_RESULT checks=N failures=M` and end with `$finish`. List the two packages
explicitly and let Verilator find the modules by file name:

```
verilator --binary --timing --assert --top-module tb_lte_cipher -Irtl -y rtl \
    rtl/lte_cipher_pkg.sv tb/cipher_ref_pkg.sv tb/tb_lte_cipher.sv
./obj_dir/Vtb_lte_cipher
```

For any other testbench, replace `tb_lte_cipher` with its name, for example
`tb_aes_core`. The end-to-end test takes a few seconds to build and under a
second to run. For lint, run:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/lte_cipher_pkg.sv rtl/lte_cipher.sv
```

## Changing it

* **`NUM_AES`** on `lte_cipher` or `eea2` sets the number of parallel AES
  cores. The logic works for any value of 1 or more.
* **`INIT_CLOCKS`** on `snow3g_core` is the number of SNOW 3G initialisation
  clocks. Keep it at 32 for a standard-conforming cipher.
* **S-box kind.** To use a different substitution, change `sbox_value` in
  `lte_cipher_pkg`. The one-hot S-box takes its wiring from there.
* **Concurrent assertions.** `eea1` and `eea2` contain assertions for their
  transfer and buffer rules; they run with `--assert`.
