# Message-dependent key generation and table-substitution encryption in reversible-gate style

This RTL implements a small asymmetric-style scheme. All of its keys are
derived from the message itself:

* a **public key** of any length in bytes, grown from the product of the
  first and last message bytes by a nibble-swapping Fibonacci-like
  recurrence;
* a **private key**, used as a one-time password (OTP), taken from the cycle
  of a 9-bit LFSR seeded with nine message bits;
* an **encryption** step that seeds an 8-bit LFSR from message and public
  key, writes its 255 states into a 16 x 16 byte table, and replaces every
  message byte by the table entry it addresses;
* a **decryption** step that first checks the user's OTP against the
  private key and then finds each cipher byte in the table: the row and
  column where it is found form the plain byte.

The arithmetic is written in terms of reversible gates: Feynman (CNOT),
Toffoli, Peres, TR and a 4x4 "MTS" full-adder cell. These are the primitives
of a low-power reversible-logic implementation. Functionally the design is
ordinary synchronous logic. The gate structure is kept so that it can be
mapped and counted, but every block is also checked against plain
arithmetic.

The design makes no cryptographic strength claim, and none should be
assumed. The table is a permutation fixed by one seed byte, so encryption is
a byte-wise substitution with at most 255 distinct tables.

## Worked example (the default configuration)

With the 128-bit message `2b7e151628aed2a6abf7158809cf4f3c`, the RTL
produces the following values. The top-level testbench checks all of them.

| quantity | value |
|---|---|
| public key (128 bit) | `0a14e15f0436a39d041ae1bf0a9c6a60` |
| private key / OTP (16 bit) | `5ebf` |
| encryption LFSR seed | `a0` |
| table entries 0.. | `a0 41 82 04 09 13 27 4e 9d 3b 76 ec ...` |
| cipher | `71324c988e5a17a24bb64cf73b22f2c7` |
| decrypted with token `5ebf` | the message |
| token `5ecf` | refused (`otp_invalid`) |

## Public key recurrence (`pubkey_gen`)

```
p      = msg[first byte] * msg[last byte]        (8x8 Vedic multiplier)
k[0]   = p[15:8],  k[1] = p[7:0]
k[i]   = swap_nibbles((k[i-1] + k[i-2]) mod 256)   for i >= 2
key    = {k[0], k[1], ..., k[KEY_BITS/8-1]}        (k[0] most significant)
```

For example, `0x2b * 0x3c = 0x0a14` gives `0a 14`. Then `0a+14 = 1e` is
swapped to `e1`, and `e1+14 = 0xf5` is swapped to `5f`. Later, `5f+e1 =
0x140` loses its carry, giving `40`, which is swapped to `04`. Each
discarded carry pulses `carry_drop`.

The clock that samples `start` stores bytes 0 and 1. After that the
generator produces one byte per clock. `done` pulses `KEY_BITS/8 - 2` clocks
after the start clock.

### Arithmetic blocks

* `vedic_mul8`: four `vedic_mul4` produce `q0 = aL*bL`, `q1 = aH*bL`,
  `q2 = aL*bH` and `q3 = aH*bH`. Then:
  * `c[3:0] = q0[3:0]`;
  * `temp = q1 + q0[7:4]` (8-bit MTS ripple adder);
  * `s2 = q2 + (q3<<4)` (12-bit adder);
  * `c[15:4] = s2 + temp` (12-bit adder).

  Feynman gates make every copy, because reversible logic has no fan-out.
  `vedic_mul4` uses the same arrangement over four `vedic_mul2`, with 4- and
  6-bit adders. `vedic_mul2` is built from four Toffoli ANDs and two Peres
  half adders.
* `mod256_adder`: an 8-bit MTS ripple adder, followed by a 9-bit TR-gate
  ripple subtractor. When the carry is set, the subtractor removes
  `9'b1_0000_0000`. Each full subtractor is two TR half subtractors. Their
  borrows are merged by a Feynman XOR, which is safe because the two borrows
  are never both 1. The result equals dropping the carry.
* `mts_gate`: `sum = a^b^cin` and `cout = maj(a,b,cin) ^ zero`. The garbage
  lines are `a` and `a^b`.

## Private key / OTP (`privkey_gen`, `lfsr9`)

* `lfsr9` shifts towards bit 8 and feeds `(Z5^Z4)^(Z8^Z7)` into bit 0
  (x^8+x^7+x^5+x^4+1). Its period is 511.
* On `start` it is loaded with `msg[32:24]` (`000001001` in the example) and
  stepped 511 times.
* Combination *n* is written to entry `n mod 256` of a 256 x 9-bit buffer.
  The seed is combination 1. When the run ends, entry *j* holds the LFSR
  state `j + 255` steps after the seed.
* The key is the low `PRIV_BITS` bits of `{entry[242], entry[244], ...}`.
  For 16 bits that is `{000101111, 010111111}[15:0] = 5ebf`.

`done` pulses 511 clocks after the start clock.

The cyclic buffer order is a reconstruction. It is the simplest storage
rule that makes the published example (entries 242 and 244 giving `5ebf`)
come out. The source design also lists key lengths from 128 to 4096 bits,
built from "odd" and "even" combinations, but it does not say which
combinations those are. Longer keys here take entries 242, 244, 246, ...
(mod 256). Treat the non-16-bit private keys as this implementation's
choice. They are internally consistent: decryption checks whatever key was
generated.

## Encryption (`enc_seed`, `lfsr8`, `table_memory`, `encrypt_unit`)

1. `enc_seed` prepares the message and the key:
   * **Message:** it keeps the first 128 message bits. A shorter message is
     zero-padded after its last bit.
   * **Key:** it XORs all 128-bit chunks of the key together. A short key,
     or a short last chunk, is zero-padded after its last bit.
   * **Seed:** it XORs the two 128-bit values, then XORs the 16 bytes of the
     result into the seed byte.
2. `lfsr8` shifts towards bit 7 and feeds `(Z1^Z2)^(Z3^Z7)` into bit 0. Its
   period is 255. It is loaded with the seed and clocked 255 times, and
   table entry *i* receives the state *i* steps after the seed. The table is
   cleared when the run starts, so entry 255 stays `00`. This makes the
   table a permutation of all 256 byte values.
3. Each message byte, most significant first, addresses the table, and the
   entry read there becomes the cipher byte.

`done` pulses `255 + MSG_BITS/8` clocks after the start clock (271 at the
defaults). `table_done` pulses between the two parts.

## Decryption (`decrypt_unit`)

On `start`, the unit compares `token` with `privkey`:

* **Mismatch:** it raises `otp_invalid` and clears `plain`. `done` comes
  with the start clock.
* **Match:** it raises `otp_ok` and runs the search, one byte per clock. The
  table's search port compares the cipher byte with all 256 entries in
  parallel, and returns the lowest address that matches. That address
  `{row, column}` is the plain byte. A byte that is in no entry gives `00`
  and raises `not_found`. This cannot happen with a table written by
  `encrypt_unit`. `done` comes `MSG_BITS/8` clocks after the start clock.

## Top level (`pqc_keygen_top`)

Parameters: `MSG_BITS = 128`, `PUB_BITS = 128`, `PRIV_BITS = 16`.

A `start` pulse is accepted when all units are idle. It starts both key
generators on `msg`. When the public key completes, encryption starts on the
same `msg`, so hold `msg` stable until `pub_ready`. The table is shared:
encryption drives its write, clear and read ports, and decryption drives
its search port.

`dec_start` is accepted only while `dec_ready` is high. `dec_ready` needs the
cipher and the private key both ready, and no decryption in progress.

Readiness, counted in clocks after the start clock at the defaults:

| flag | clocks |
|---|---|
| `pub_ready` | 15 |
| `enc_ready` | 287 |
| `priv_ready` | 512 |

Every unit resets asynchronously (`rst_n` low). Every unit ignores `start`
while busy.

The larger configuration, a 1024-bit message with 512-bit public and
private keys, is the same RTL with
`#(.MSG_BITS(1024), .PUB_BITS(512), .PRIV_BITS(512))`.

## Where this RTL departs from, or fills in, the original description

* **Reversible gate definitions:** the Toffoli, Peres and TR equations are
  the standard ones. The MTS cell's two garbage outputs are this design's
  choice.
* **2x2 and 4x4 multipliers:** their internals are this design's choice,
  modelled on the 8x8 block.
* **Table entry 255 and clearing:** the LFSR produces only 255 values, so
  entry 255 is filled by clearing the table first.
* **Key lengths other than 16 bits:** the private key entry selection rule
  for these lengths is assumed (see above).
* **Timing:** the byte-per-clock schedules, the handshakes and all
  latencies are this implementation's. The original gives no timing.
* **Search order:** the order for a byte present twice is lowest address
  first. This only matters for hand-filled tables.
* **Gate that is not built:** a gate named "FRG1" in the original gate
  counts is not implemented, because its function is not described.
* **LFSR loading:** the original loads both LFSRs "on reset" and lets
  them run when reset is released. Here `rst_n` only clears state, and the
  `start` pulse of each unit loads the seed.
* **Key sizes:** the key sizes are build-time parameters (`PUB_BITS`,
  `PRIV_BITS`). The original lets the user pick the key size at run time.
* **Gate counts:** the original's gate-count tables are not reproduced. For
  example, it gives 12 MTS cells for the whole public key generator, but the
  8x8 multiplier built here uses 32 MTS cells on its own.
* **Nikhilam sutra:** the original mentions it as an alternative multiplier
  method. The drawn Urdhva-Tiryakbhyam structure is what is built.

## Simulating

Each `rtl/<name>.sv` holds one module or package; `rtl/pqc_pkg.sv` must be
read first. Each block has a self-checking testbench `tb/tb_<name>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog.

```
verilator --binary --timing --assert -Irtl -Itb rtl/pqc_pkg.sv \
    tb/tb_pqc_keygen_top.sv --top-module tb_pqc_keygen_top -o sim
./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_pqc_keygen_top` | The whole design at its default sizes: the worked example above, the latencies, random round trips, and refused OTPs. It counts each mechanism (discarded carry, table fill, accepted OTP, refused OTP) and fails if one never occurs. |
| `tb_workload_1024` | The 1024/512/512 configuration, on random round trips. |
| gate and arithmetic testbenches | Exhaustive, except the 12-bit adder, which is random. |
| LFSR testbenches | Periods (511 and 255) and next-state equations. The 8-bit one also checks the table prefix above. |

All runs finish in seconds.
