# Reversible-logic text cipher

This design encrypts and decrypts a stream of 8-bit ASCII characters with a
small symmetric cipher built only from reversible gates: CNOT, Toffoli and
3-control CNOT (3-CNOT). In a reversible circuit every output pattern maps
back to exactly one input pattern. Decryption is therefore the same gate
cascade run backwards, and no information is destroyed inside the cipher.
A linear feedback shift register (LFSR), seeded with a private key
character, gives a fresh key character for every message character. A
sender and a receiver, each with its own LFSR, are joined by a ciphertext
channel. When both ends hold the same private key, the message comes out
of the receiver unchanged.

## The gates

All three gates pass their control lines through unchanged and may invert
one target line. Each gate is its own inverse.

| module        | lines | function                                   |
|---------------|-------|--------------------------------------------|
| `rev_cnot`    | 2     | `(x, y) -> (x, y ^ x)`                     |
| `rev_toffoli` | 3     | `(a, b, c) -> (a, b, c ^ a&b)`             |
| `rev_kcnot`   | N+1   | `t -> t ^ (k1 & ... & kN)`; N = 3 by default |

## The bit-pair cell: the core of the cipher

A character is cut into four bit pairs: `(p0,p1) = (p[2j], p[2j+1])` for
j = 0..3. Each pair is encrypted by its own 4-line cell, together with the
key bits at the same positions, `(k0,k1) = (k[2j], k[2j+1])`. The cells do
not interact: one character uses four cells, which is 8 CNOT, 4 Toffoli and
4 3-CNOT gates.

The encryption cell (`rlc_enc_pair`) is this cascade:

```
 1. CNOT     ctrl k0,  tgt p0                 -> lines  k0, k0^p0
 2. Toffoli  (k0, k1, p1)                     -> k0, k1, p1 ^ k0k1
 3. 3-CNOT   ctrls (k0, k1, k0^p0), tgt p1^k0k1 -> p1 ^ k0k1 ^ k0k1(k0^p0)
                                                = p1 ^ k0k1p0
 4. CNOT     ctrl k1,  tgt k0^p0              -> k1, k0^k1^p0
```

Reduced to equations:

```
 en0 = p0 ^ k0 ^ k1
 en1 = p1 ^ (k0 & k1 & p0)
```

The four output lines are `(k0, k1, en0, en1)`. The two "garbage" lines
carry the key bits. This is why the decryption cell can take its inputs in
exactly that order.

The decryption cell (`rlc_dec_pair`) applies the same four gates in
reverse order:

```
 1. CNOT     ctrl k1,  tgt en0                -> k1, k0^p0
 2. 3-CNOT   ctrls (k0, k1, k0^p0), tgt en1   -> p1 ^ k0k1
 3. Toffoli  (k0, k1, p1^k0k1)                -> p1
 4. CNOT     ctrl k0,  tgt k0^p0              -> p0
```

Encryption and decryption both have the same depth of four gates, so the
two directions take the same time. For a fixed key, each cell is a
one-to-one map of the 2-bit plaintext to the 2-bit ciphertext. Two design
choices were made here:

* The first CNOT of the encryption cell is controlled by the key bit `k0`.
  The ciphertext would be the same with `p0` as control, but then the
  garbage lines would carry `p0`, and the decryption wiring would not
  match.
* The last CNOT combines 3-CNOT outputs 2 and 3. This final CNOT is what
  makes the count of 8 CNOTs per character come out.

### How strong this is

The cipher works on each character separately, with no diffusion between
bit pairs. `en0` is a plain XOR with key bits. `en1` differs from `p1` only
when `k0 = k1 = p0 = 1`. Secrecy therefore rests almost entirely on the key
stream. Treat it as a lightweight obfuscation primitive, not as a
replacement for a standard block cipher.

## Key stream

`rlc_lfsr_keygen` is an 8-bit Fibonacci LFSR with the polynomial
x^8 + x^6 + x^5 + x^4 + 1:

* The next state is `{s[6:0], s[7]^s[5]^s[4]^s[3]}`.
* The period is 255.
* The feedback XOR is a chain of CNOT gates on a constant-0 line, so the
  generator uses the same gate set as the cipher.
* `load_i` loads the private key character as the seed. That seed is the
  key for the first message character.
* `step_i` advances the register once per character.
* A zero seed would lock the register at zero, and a zero key leaves the
  text unchanged, so a zero seed is replaced by `8'h01`.

The width, the polynomial and the zero-seed rule are choices of this
design. The cipher only asks for an LFSR key generator.

## Sender, receiver and link

* **`rlc_sender`** accepts plaintext on a valid/ready byte stream. It
  encrypts each accepted character with the current key, puts the result
  in an output register, and steps the LFSR.
* **`rlc_receiver`** is the mirror image: it decrypts each accepted
  ciphertext character.

Timing for both sides:

* They run at one character per clock, with one cycle of latency.
* When the downstream side is not ready, the output holds and the input
  ready drops (stall).
* While `key_load_i` is high, no character is accepted.
* An assertion in each module checks that a presented output stays stable
  until it is taken.

`rlc_secure_link` (the top) connects the two by a direct channel:

* Latency is two cycles from `pt_data_i` to `pt_data_o`.
* Back-pressure at the output propagates back to `pt_ready_o`.
* The channel signals are brought out as `chan_*` for observation.

Each end has its own key port (`tx_key_*`, `rx_key_*`). How the private
key reaches the receiver securely is outside this RTL. The ends stay in
step as long as both load the same key before the message and see the
same number of characters.

Reset is synchronous and active low. The sender and receiver registers
reset to empty, and the LFSRs reset to `8'h01`.

## Where this departs from or goes beyond the source description

* The cipher equations, the gate cascades and the per-pair structure
  follow the published circuit.
* These are choices of this design:
  * which gate input is the control where the drawing does not say;
  * the LFSR parameters;
  * the stream interface, the registers and the latency;
  * the handling of a zero key.
* The secure key-distribution step and the host-side text handling
  (reading a file, converting characters to ASCII) are not part of the
  RTL.
* Synthesis results (cells, power, device placement) were not
  re-evaluated. The character encryptor matches the published schematic
  at 16 gates and 24 data ports (8 plaintext, 8 key, 8 ciphertext). It
  also brings out its 8 garbage lines.

## Files

| file | contents |
|------|----------|
| `rtl/rlc_pkg.sv` | widths, character/key types, LFSR taps |
| `rtl/rev_cnot.sv`, `rev_toffoli.sv`, `rev_kcnot.sv` | reversible gates |
| `rtl/rlc_enc_pair.sv`, `rlc_dec_pair.sv` | 2-bit encryption / decryption cells |
| `rtl/rlc_encrypt_char.sv`, `rlc_decrypt_char.sv` | 8-bit character encryptor / decryptor |
| `rtl/rlc_lfsr_keygen.sv` | key-stream LFSR |
| `rtl/rlc_sender.sv`, `rlc_receiver.sv` | streaming transmit / receive sides |
| `rtl/rlc_secure_link.sv` | top: sender + channel + receiver |
| `tb/tb_rlc_ref_pkg.sv` | reference cipher and LFSR models, written from the equations |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The gates are checked against their full truth tables.
* The pair cells are checked exhaustively, including reversibility.
* The character encryptor and decryptor are checked over all 65 536
  (character, key) pairs.
* The LFSR is checked for stepping, load priority, the zero seed, and a
  full 255-state period.
* The sender and receiver run random traffic with random back-pressure.
  They check the one-cycle latency, stalls and key reload.

`tb_rlc_secure_link` sends generated English text through the whole link
at its only configuration:

* 600 characters at full rate, long enough for the key stream to wrap;
* 300 characters under random back-pressure;
* 100 characters with a zero key;
* 100 characters with mismatched keys, which must fail to decrypt.

It also counts each mechanism (key loads, zero-seed substitution,
full-rate transfers, stalls reaching the sender, key wrap-around,
wrong-key rejection) and fails if one never occurred.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rlc_pkg.sv tb/tb_rlc_ref_pkg.sv tb/tb_rlc_secure_link.sv \
  --top-module tb_rlc_secure_link -Mdir obj
./obj/Vtb_rlc_secure_link
```

Other testbenches work the same way: swap in the testbench file and its
module name. `-Irtl` lets Verilator find the modules by file name.
