# Hummingbird encryption core

Hummingbird is an ultra-lightweight cipher for small devices such as RFID
tags, smart cards and sensor nodes. It combines a block cipher and a stream
cipher. Every 16-bit data word goes through four small keyed block ciphers in
a row. The input of each cipher is offset by one of four 16-bit internal
state registers, and after each word those registers (plus a 16-bit LFSR)
are updated from the intermediate values. The same plaintext word therefore
encrypts differently each time, as in a stream cipher, while the core stays
very small: one 16-bit substitution-permutation cipher, used four times.

This RTL implements the encryption module of a Virtex-5 Hummingbird design
that was published with its block diagram and its 16-bit block cipher, but
without the rest of the algorithm's equations. Everything around the block
cipher follows the published Hummingbird-1 specification. Where this RTL
fills gaps, it says so below and in each file's header.

| Size | Value |
|---|---|
| key | 256 bits, as four 64-bit subkeys k1..k4 |
| block | 16 bits |
| nonce | 64 bits, as four 16-bit words |
| internal state | 80 bits: RS1..RS4 and the LFSR |
| words per operation | 4 (e_pt0..e_pt3 in, e_ct0..e_ct3 out) |

## The 16-bit block cipher E_k (`hb_cipher`)

E_k takes one 64-bit subkey k = K1‖K2‖K3‖K4, with K1 in bits [63:48]:

```
for j = 1..4:  m ^= Kj;  m = S(m);  m = L(m)
m ^= K1 ^ K3;  m = S(m);  m ^= K2 ^ K4
```

* **S (`hb_sbox_layer`)** cuts the word into nibbles A = [15:12], B, C,
  D = [3:0] and returns S1(A)‖S2(B)‖S3(C)‖S4(D). The four 4x4 tables in
  `hb_pkg` are the Hummingbird-1 boxes:
  S1 = 865F1CA9EB2470D3, S2 = 07E15B823AD6FC49, S3 = 2EF5C19AB468073D,
  S4 = 0734C1AFDE6B2895 (one hex digit per entry, entry 0 first). The
  design's own description says only that there are four balanced,
  non-linear, Serpent-style 4x4 boxes. To use other tables, edit
  `SBOX`.
* **L (`hb_perm`)** is L(m) = m ⊕ (m ≪ 6) ⊕ (m ≪ 10). The description
  does not say whether ≪ rotates or shifts. The default (`ROTATE = 1`)
  rotates, as Hummingbird-1 does, and `ROTATE = 0` shifts. Either way
  L¹⁶ is the identity, so L⁻¹ = L¹⁵, which `hb_pkg::lin_inv` folds into a
  fixed XOR network.

The whole cipher is one combinational path. `hb_decipher` is its exact
inverse, used for decryption: it undoes the final step, then runs
L⁻¹, S⁻¹ and ⊕Kj for j = 4 down to 1.

## Chaining and state update: the hard part

All additions are modulo 2¹⁶. `Ek1` means E keyed with subkey k1, and so on.

**Initialization (`hb_init`, four rounds).** The state starts as RS1..RS4 =
nonce words 0..3, and each round does:

```
V12 = Ek1(RS1 + RS3)    V23 = Ek2(V12 + RS2)
V34 = Ek3(V23 + RS3)    TV  = Ek4(V34 + RS4)
RS1 += TV   RS2 += V12   RS3 += V23   RS4 += V34
```

After round four the LFSR gets TV | 0x1000, which can never be zero, and
TV is kept on `e_tv3`.

**One data word (`hb_encdec`).** Encryption does:

```
V12 = Ek1(PT + RS1)   V23 = Ek2(V12 + RS2)   V34 = Ek3(V23 + RS3)   CT = Ek4(V34 + RS4)
```

Decryption runs the chain backwards with D = E⁻¹:

```
V34 = Dk4(CT) − RS4   V23 = Dk3(V34) − RS3   V12 = Dk2(V23) − RS2   PT = Dk1(V12) − RS1
```

Both recover the same V12, V23 and V34. First the LFSR steps (L' is the
new value), then the state is updated in this order:

```
RS1' = RS1 + V34
RS3' = RS3 + V23 + L'
RS4' = RS4 + V12 + RS1'
RS2' = RS2 + V12 + RS4'
```

Encryptor and decryptor stay in step only if they start from the same key
and nonce and process the same words in the same order. To decrypt a
message, initialize again with its nonce and feed the ciphertext words in
order.

**LFSR (`hb_lfsr`).** Its polynomial is x¹⁶+x¹⁵+x¹²+x¹⁰+x⁷+x³+1
(Hummingbird-1), in Fibonacci form. One step shifts right and feeds
s15⊕s12⊕s10⊕s7⊕s3⊕s0 into bit 15. It exports the stepped value on
`q_next`, so the word datapath can use L' in the same clock. The testbench
confirms the period is 2¹⁶−1.

## Top level `encryption`: pins and timing

The port names and widths match the published block diagram. What the
control pins do is not described there, so the meanings below are this
design's own choices. All inputs are sampled on the rising edge of `clock`.

| Pin | Function |
|---|---|
| `reset` | synchronous, **active low** (the core runs while it is 1); clears key, state, LFSR and outputs |
| `e_data_in[63:0]`, `e_write` | store the next subkey, in the order k1, k2, k3, k4 (k1 = key bits [255:192]) |
| `t_cl_in` | clear the key and restart loading at k1 |
| `e_nonce0..3`, `t_in` | start initialization: RS1..RS4 ← nonce, then four rounds |
| `e_pt0..3`, `t_enc`, `t_if` | start one four-word operation; `t_if` = 1 decrypts instead of encrypting |
| `e_ct0..3` | results of the last operation |
| `e_rs1..4`, `e_tv3` | internal state, and TV of the fourth initialization round |
| `e_busy`, `e_done` | operation running, and a one-clock completion pulse (these two pins are additions) |

Timing:

* Initialization and a four-word operation each take **four clocks**. The
  start edge itself processes round 1 or word 0, using `e_nonce*` or
  `e_pt0` straight from the pins. `e_done` is high after the fourth edge,
  and the results and state are valid then.
* `e_pt1..3` are captured on the start edge, so they may change afterwards.
* Starts, key writes and clears are ignored while `e_busy` is high.
  `t_in` wins over `t_enc` if both are raised together.
* If you encrypt without initializing first, the core uses whatever state it
  holds (zero after reset).

One word per clock goes through four ciphers plus adders: about 20 S-box
levels and several 16-bit additions between registers. This keeps the clock
count low, which is what the original design aimed for. The cost is a long
combinational path, so a fast clock would need pipeline registers that this
RTL does not have. An assertion in `encryption` checks that `e_done` only
ever comes with the return to idle.

## How far to trust it

* The block cipher matches the published algorithm step for step. The only
  open points are the rotate-or-shift reading of ≪ (a parameter) and the
  bit order: message bit m0 is the MSB.
* The S-box contents, the initialization and update equations, the LFSR
  polynomial and the 0x1000 seed constant come from the Hummingbird-1
  specification. They were written from that specification's equations
  with no official test vectors available. The testbenches compare the RTL
  against an independently written model of the same equations, so they
  catch RTL slips, but not a constant that is wrong in both. If you need
  bit-exact Hummingbird-1, check against a reference implementation.
* The original FPGA design was reported at 4242 slice registers, 152.9 MHz
  and 262.57 mW on a Virtex-5. This RTL has about 360 flip-flops after
  generic synthesis, so it is structurally much leaner than that
  implementation. No FPGA timing or power figures have been measured for it.
* Not built: the 64-bit message authenticator that Hummingbird can produce.
  The original design mentions it only as a capability of the algorithm.

## Files

`rtl/`:

* `hb_pkg.sv`: types, S-box tables, L and L⁻¹, subkey selection
* `hb_sbox_layer.sv`, `hb_perm.sv`: cipher layers, forward and inverse
* `hb_cipher.sv`, `hb_decipher.sv`: E_k and D_k
* `hb_lfsr.sv`: 16-bit LFSR
* `hb_init.sv`: one initialization round
* `hb_encdec.sv`: one data word plus the state update
* `encryption.sv`: the top level: registers, key loading, sequencing

`tb/`:

* `hb_ref_pkg.sv`: reference model used by the testbenches
* `tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_encryption` runs twelve sessions at the default parameters. Each
session loads a key, initializes, encrypts one to eight messages, then
re-initializes and decrypts them. It also checks the four-clock latency,
ignored starts while busy, key clearing, and a reset in mid-operation.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/hb_pkg.sv tb/hb_ref_pkg.sv tb/tb_encryption.sv --top-module tb_encryption
./obj_dir/Vtb_encryption
```

To run another testbench, replace `tb_encryption` with its name. Each
testbench finishes in well under a second of simulation time.
