# Integrated security core for IoT devices

Small IoT endpoints such as RFID tags have only a few thousand gates to spend on
security, yet they need both confidentiality (a block cipher) and proof of
identity (an authentication protocol). This core puts both on one piece of
hardware and shares logic wherever the algorithms allow it:

* **Encryption unit** (`enc_core`): one iterative 64-bit datapath runs either
  **PRESENT** with a 128-bit key (31-round substitution-permutation network) or
  the **New** lightweight cipher (8-round Feistel network, 128-bit key). Both
  use the same two 32-bit state registers, the same two S-box units and the
  same 128-bit key register and key generator.
* **Authentication unit** (`hb_auth`): one datapath answers a reader's
  challenge with any of the four Hopper-Blum style protocols **HB**, **HB+**,
  **HB-MP** and **HB-MP+**. These protocols need no hash function; they rely
  on GF(2) dot products of secret vectors with random vectors, plus a noise
  bit. One dot product unit, two LFSR generators, a round key generator and a
  comparator are shared by all four.

The architecture follows the paper "The Hardware Design of Integrated Security
Core for IoT Devices". That paper gives the block structure, the algorithm flows
and the register names. It does not give every internal function. Where it does
not, this RTL makes its own choice, and the section
[Where this RTL departs from or extends the paper](#where-this-rtl-departs-from-or-extends-the-paper)
lists every such choice.

## Top level: `crypto_core`

```
             +----------------------- crypto_core -----------------------+
 key[127:0] -+-> enc_core  (PRESENT-128 / New)  -- ciphertext --+         |
 data_in ----+                                                  +-> data_out
 start,      |                                                  |         |
 sel_auth,  -+-> hb_auth   (HB / HB+ / HB-MP / HB-MP+) -auth_out-+         |
 protocols   |      key1 = key[127:64], key2 = key[63:0], a_i = data_in  |
             +-----------------------------------------------------------+
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `start` | in | 1 | starts an operation; ignored while `busy` |
| `sel_auth` | in | 1 | 0: encrypt; 1: run one authentication round |
| `enc_protocol` | in | 1 | `ENC_PRESENT` or `ENC_NEW` (`crypto_pkg::enc_alg_e`) |
| `auth_protocol` | in | 2 | `AUTH_HB`, `AUTH_HBP`, `AUTH_HBMP`, `AUTH_HBMPP` |
| `key` | in | 128 | cipher key; for authentication, secret x = `key[127:64]` and secret y = `key[63:0]` |
| `data_in` | in | 64 | plaintext, or the reader's challenge a_i |
| `data_out` | out | 64 | ciphertext, or the authentication response (see below) |
| `z_out` | out | 1 | response bit z_i of the last authentication round |
| `b_adjusted`, `auth_fail` | out | 1 | HB-MP status (see the comparator below) |
| `busy`, `done` | out | 1 | `done` pulses for one cycle when the result is ready |

The inputs are sampled only in the cycle in which `start` is accepted.
`data_out` holds its value until the next operation finishes. Only one unit
runs at a time.

| operation | cycles from the accepting edge to `done` |
|---|---|
| PRESENT-128 | 31 (one round per cycle; 310 µs at 100 kHz) |
| New | 8 (one round per cycle; 80 µs at 100 kHz) |
| HB | 3 |
| HB+ | 4 |
| HB-MP, HB-MP+ | 5 |

The parameters `BIT_SEED` (32 bits) and `NUM_SEED` (64 bits) set the reset
states of the two LFSRs. Both must be non-zero. Give each device its own
values.

## The unified encryption datapath (`enc_core`, `enc_keygen`)

The 64-bit state lives in `dreg_msb` and `dreg_lsb`. The key state lives in
the 128-bit `kreg`. `SBOX1` substitutes the upper state word and `SBOX2` the
lower one. Each is eight copies of the 4-bit PRESENT S-box. Multiplexers
driven by the latched `protocol` decide what reaches the S-boxes and what is
written back.

**PRESENT round** (rounds 1…31):

```
s      = {dreg_msb, dreg_lsb} ^ kreg[127:64]     // addRoundKey
s      = {SBOX1(s[63:32]), SBOX2(s[31:0])}       // sBoxLayer
state  = pLayer(s)                               // bit i -> 16*i mod 63
kreg   = keyupdate(kreg, round)                  // PRESENT-128 key schedule
```

After round 31, `ciphertext = state ^ kreg[127:64]`, which is the 32nd round
key. The key schedule rotates the key left by 61 bits, passes bits
127..120 through the S-box, and XORs the round counter into bits 66..62.
This is the standard PRESENT-128 schedule. The all-zero test vector gives
`96db702a2e6900af`.

**New cipher round** (rounds 1…8). Each round has two Feistel stages, and
both are computed in the same cycle:

```
ka = kreg[79:48]            kb = kreg[47:16]
stage 1:  lsb' = lsb ^ P(SBOX1(msb  ^ ka), ka) ^ ka
stage 2:  msb' = msb ^ P(SBOX2(lsb' ^ kb), kb) ^ kb
kreg   = keyupdate(kreg, round)
```

Here `P(x, k)` first spreads the bits of the 32-bit word (bit i goes to
8·i mod 31, and bit 31 stays in place). It then rotates the word left by
`k[4:0]`, so the permutation depends on the key. After round 8 the ciphertext
is `{dreg_msb, dreg_lsb}`. Every stage can be undone given the keys, so the
cipher can be inverted.

This is where the sharing happens. In both ciphers SBOX1 sees `dreg_msb` XOR a
key slice. For that slice the multiplexer picks `kreg[127:96]` (PRESENT) or
`kreg[79:48]` (New). SBOX2 sees either `dreg_lsb` (PRESENT) or the stage-1
result (New), XORed with `kreg[95:64]` or `kreg[47:16]`. Both ciphers share
one key generator.

## The unified authentication datapath (`hb_auth`)

One `start` computes one protocol round i for the challenge a_i. The reader
repeats rounds as many times as its protocol needs. With x = `key1` and
y = `key2`, and a dot product meaning `a·b = XOR of (a AND b)`:

| protocol | response | `data_out` / `auth_out` |
|---|---|---|
| HB | z = x·a ⊕ v | `{63'b0, z}` |
| HB+ | z = x·a ⊕ y·b ⊕ v, with b a fresh random vector | b |
| HB-MP | z = x·a ⊕ v; x_i = rotl(x, a[5:0]); b chosen so that b·x_i = z | b |
| HB-MP+ | as HB-MP but x_i = rotl(x ⊕ a, a[5:0]) | b |

The units and how the controller uses them:

1. **Start** (cycle 0). The controller latches x, y, a and the protocol. It
   pulses `rbu_valid_in` (noise bit), `rnu_valid_in` (random vector; not for
   HB) and `key_valid_in` (round key; HB-MP and HB-MP+ only). Each unit answers
   one cycle later with its `*_valid_out`. An assertion checks this.
2. **x·a**: the `sel_key`/`state` operand multiplexers route (x, a) to the
   single `dot_product_unit`.
3. **Second product**: for HB+ the unit computes y·b. For HB-MP it computes
   b·x_i. For HB the second operand of the z XOR is a constant 0, chosen by
   the protocol multiplexer.
4. **Comparator** (HB-MP and HB-MP+ only): `auth_comparator` checks b·x_i
   against z. If they differ, it inverts the lowest bit of b where x_i is 1.
   That flips the parity, so the equation holds after one step and the
   latency stays fixed. `b_adjusted` reports that this happened. If x_i is
   all zeros, no b can satisfy z = 1. This happens only when x = 0, or
   in HB-MP+ when a = x. In that case b is passed on unchanged and `auth_fail` is raised.

**Noise generator** (`rand_bit_unit`): a 32-bit Fibonacci LFSR with polynomial
x³²+x²²+x²+x+1. It advances one step per request, and the noise bit is the
bit it has just shifted in. The bit is therefore 1 about half the time.

**Random vector generator** (`rand_num_unit`): a 64-bit Fibonacci LFSR with
polynomial x⁶⁴+x⁶³+x⁶¹+x⁶⁰+1. It advances 64 steps per request, unrolled
into one cycle, so each vector is made of 64 new LFSR output bits
rather than the previous vector shifted by one.

## Where this RTL departs from or extends the paper

* **New cipher internals.** The paper gives the flow of the New cipher:
  8 Feistel rounds, each with two stages of key add, S-box layer,
  key-dependent permutation and key add. It also gives the `SBOX1`/`SBOX2`
  units and the key slices on the SBOX1 multiplexer. It does not give the
  S-box, the permutation, the exact stage wiring or the key schedule. This RTL
  uses the PRESENT S-box and key schedule, the permutation `P` above, and the
  key slices shown above. The New path is therefore a cipher of the described
  shape, but its ciphertexts will not match another implementation of the
  original New algorithm. PRESENT-128 is complete and matches the standard.
* **PRESENT permutation.** The datapath drawing shows two 32-bit P-boxes.
  The PRESENT bit permutation moves bits between the two halves, so here it
  is one 64-bit wiring permutation.
* **Key slices.** The round key slices `kreg[127:96]`/`kreg[95:64]`
  (PRESENT) and `kreg[79:48]`/`kreg[47:16]` (New) are this design's
  assignment. `kreg[63:32]`, which the paper's drawing also shows, is not used.
* **HB-MP / HB-MP+ response.** The paper's flow for these two protocols
  computes z_i from y·b_i before b_i has been generated. This RTL computes
  z_i = x·a_i ⊕ v_i and then generates b_i with b_i·x_i = z_i. The round key
  function f(a_i, x) is not given in the paper. The rotations above are this
  design's choice, and they make HB-MP and HB-MP+ differ.
* **Generating b_i.** This RTL does not redraw random numbers until the
  equation holds. It corrects the candidate in one step (one bit flip), as
  described under the comparator.
* **Noise rate.** The paper only says the noise bit is random. Here it is
  1 half the time. A deployment that needs a noise rate below ½ has to change
  `rand_bit_unit`, for example by ANDing several LFSR bits.
* **Host interface.** The paper shows a data/control interface but does not
  specify it. The top exposes plain start/done ports. The 128-bit key port
  also supplies x and y, and `data_in` serves as both plaintext and
  challenge.
* **Handshakes and reset.** The `*_valid_in`/`*_valid_out` pairs follow the
  paper's signal names. Their one-cycle request/answer timing, the
  synchronous active-low reset and the latencies of the authentication unit
  are this design's own.
* **Not reproduced.** The paper's FPGA results (1130 Spartan-6 slices at
  189 MHz) need the vendor tools. The generic synthesis of `crypto_core` has
  about 700 flip-flop bits.

## Files

| file | contents |
|---|---|
| `rtl/crypto_pkg.sv` | algorithm enums, S-box, permutations, key schedule step, f(a, x) |
| `rtl/crypto_core.sv` | top level |
| `rtl/enc_core.sv`, `rtl/enc_keygen.sv` | encryption datapath and key register |
| `rtl/hb_auth.sv` | authentication controller and operand multiplexers |
| `rtl/rand_bit_unit.sv`, `rtl/rand_num_unit.sv` | LFSR generators |
| `rtl/dot_product_unit.sv`, `rtl/auth_keygen_unit.sv`, `rtl/auth_comparator.sv` | authentication units |
| `tb/tb_ref_pkg.sv` | reference models, written separately from the RTL |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops on a watchdog if the design
hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/crypto_pkg.sv tb/tb_ref_pkg.sv tb/tb_crypto_core.sv \
    --top-module tb_crypto_core -o sim
./obj_dir/sim
```

`tb_crypto_core` runs the top level at its default parameters. It runs about
300 random mixed operations and checks every ciphertext, response, `z` bit
and latency against the reference models. It also counts how often each
mechanism happened: each of the six algorithms, a start ignored while busy,
a noise bit of 1, a comparator that keeps b, one that adjusts it, and an
unsatisfiable HB-MP+ round. A mechanism that never happened counts as a
failure. The unit testbenches compare their module against the same
reference models. `tb_enc_core` also checks the published PRESENT-128
all-zero test vector and the exact round counts.

`tb_encrypt_time` runs the core on a 100 kHz clock. It checks that one
block takes 310 µs with PRESENT-128 and 80 µs with the New cipher.

To change an algorithm, edit the function in `crypto_pkg` and its twin in
`tb/tb_ref_pkg.sv`. The testbenches will catch any mismatch between the two.
