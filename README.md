# Single-cycle smart card memory ciphering system

A smart card's CPU keeps secrets (keys, balances, identity data) in its data
memory, and an attacker who can probe the memory bus or the memory array
reads them in the clear. This design sits between an 8-bit smart card CPU and
its data memory. It makes sure that nothing stored in that memory is
plaintext:

* **write:** the CPU's byte is widened to a 128-bit block and encrypted with
  AES-128 under a key from an on-chip key generator. The ciphertext is XORed
  with 128 bits of *scramble data* derived from the user's PIN, and the result
  is stored.
* **read:** the stored word is XORed with the same scramble data, giving back
  the ciphertext. That is decrypted with AES-128 and the plaintext byte is
  returned.

The defining property is speed. Each direction, cipher included, completes in
**one CPU clock cycle**: 40 ns at the 25 MHz CPU clock the design targets,
with a 128-bit block moved every cycle. Two layers protect the data. The AES
key is not known outside the chip. Without the right PIN, even the correct
key does not help, because the scramble layer cannot be removed.

```
 cpu_wdata ─► zero-extend ─► AES-128 encrypt ─► XOR ──┬── scr_enc ──────────► secure_mem
                                   ▲ key         ▲     │                            │ mem_rdata
                               rng_keygen    scrambler │ (bypass when we & re)      ▼
                                   ▼ key               └────────────────────► read_word
 cpu_rdata ◄─ read reg ◄─1─ AES-128 decrypt ◄── XOR ◄───────────────────────────────┘
                       ◄─0─ scr_enc              ▲
              select: decrypt_enable        descrambler
```

## Files

| file | what it is |
|---|---|
| `rtl/mcs_pkg.sv` | widths, types, S-boxes (computed at elaboration), AES round functions, key-schedule step |
| `rtl/mem_cipher_sys.sv` | **top**: wires everything below into the ciphering system |
| `rtl/aes_encrypt.sv` | unrolled AES-128 cipher (combinational), uses `aes_enc_round`, `aes_key_expand` |
| `rtl/aes_decrypt.sv` | unrolled AES-128 inverse cipher (combinational), uses `aes_dec_round`, `aes_key_expand` |
| `rtl/aes_key_expand.sv` | AES-128 key schedule, 11 round keys, combinational |
| `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv` | one forward / inverse round |
| `rtl/rng_keygen.sv` | 128-bit LFSR key generator with fixed seed |
| `rtl/scramble_gen.sv` | PIN/serial/address → 128-bit scramble word |
| `rtl/scrambler.sv`, `rtl/descrambler.sv` | XOR the scramble word on and off |
| `rtl/secure_mem.sv` | 256 × 128-bit secured memory, synchronous write, asynchronous read |
| `rtl/cpu_read_mux.sv` | decrypt-enable multiplexer and the CPU read register |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mem_cipher_sys` for the whole system |
| `tb/aes_ref_pkg.sv`, `tb/mcs_ref_pkg.sv` | behavioural reference models used by the testbenches |

## How one cycle is enough

In a conventional smart card AES, the cipher iterates one round per clock,
and more than 20 cycles pass between the CPU's request and the stored word.
Here the ten AES rounds and the key schedule are unrolled into combinational
logic (`aes_encrypt`, `aes_decrypt`, each with its own `aes_key_expand`). The
scramble data is also combinational. So the only state on the path is the
memory array and the CPU read register:

| request (cycle *n*) | at the rising edge ending cycle *n* | visible in cycle *n+1* |
|---|---|---|
| `cpu_we` | `AES(key, {120'b0, cpu_wdata}) ^ scramble(pin, serial_id, cpu_addr)` written to `secure_mem[cpu_addr]` | `enc_done = 1` |
| `cpu_re`, `decrypt_enable = 1` | `AES⁻¹(key, mem[cpu_addr] ^ scramble(...))` loaded into the read register | `cpu_rblock`, `cpu_rdata` (low byte), `dec_done = 1` |
| `cpu_we` and `cpu_re` together | word stored **and** passed straight through descrambler and decryption | plaintext just written in `cpu_rblock`, both done flags |

The last row is the *round trip*: encrypt, scramble, descramble and decrypt
all happen within one cycle. It is how the system demonstrates its
40 ns figure. Requests may be issued every cycle. Throughput is one 128-bit
block per clock in each direction, i.e. 128 × f<sub>clk</sub> bit/s. For
example, 128 bits × 70.98 MHz ≈ 9085 Mbit/s if the path closes at that
frequency.

The price is a long combinational path. In one cycle it runs through
10 AES rounds + the key schedule + the scramble XOR for a write. A read goes
through memory read + descramble + 10 inverse rounds + a second key schedule.
No clock frequency is claimed for this RTL. Where timing does not close, the
clean cut points are between rounds, in `aes_encrypt`/`aes_decrypt`'s
`state[]` arrays. That trades the one-cycle latency for frequency.

`decrypt_enable` low turns the read register into a window on the write
path. On a write, it captures the scrambled ciphertext being stored. The
output multiplexer exists for this purpose: input 0 is the scrambled
ciphertext, input 1 the decrypted plaintext. With `decrypt_enable` low, a
read with no write in the same cycle loads whatever the write path holds
for the current `cpu_wdata`. That value is not meaningful.

## The AES-128 units

They implement standard FIPS-197 AES-128 and match the published example
vectors. The state is a 128-bit vector; byte *n* is bits `[127-8n -: 8]`
(row *n* mod 4, column *n*/4), as in FIPS-197.

* Encryption: AddRoundKey(k0), then nine rounds of SubBytes, ShiftRows,
  MixColumns, AddRoundKey, then a final round without MixColumns.
* Decryption: AddRoundKey(k10), InvShiftRows, InvSubBytes, AddRoundKey(k9),
  then nine rounds of InvMixColumns, InvShiftRows, InvSubBytes,
  AddRoundKey(k8 … k0). It uses the forward key schedule in reverse order, not
  the "equivalent inverse cipher".
* The S-box and its inverse are not typed in. `mcs_pkg::gen_sbox()` fills
  them at elaboration by walking GF(2⁸)* with generator 3, and uses the
  inverse walk to get each element's multiplicative inverse. The FIPS
  affine map (x ⊕ rotl¹ ⊕ rotl² ⊕ rotl³ ⊕ rotl⁴ ⊕ 0x63) is applied to that
  inverse. S(0) = 0x63.
* AES-128 has 10 rounds: 9 with MixColumns plus a final one. The
  architecture's description speaks of "9 rounds". That counts the
  repeated rounds only; the unit is FIPS-compliant.

## Key generator

`rng_keygen` is a 128-bit Fibonacci LFSR that shifts left. Its new bit 0 is
bit127 ⊕ bit125 ⊕ bit100 ⊕ bit98, i.e. x¹²⁸+x¹²⁶+x¹⁰¹+x⁹⁹+1. Reset loads the
fixed `SEED` parameter. A cycle with `advance` (the top's `key_refresh`)
moves it one step. Otherwise the key holds.

The key is meant to be fresh for every transaction. A refresh is therefore a
session boundary: everything written under the previous key reads back as
garbage afterwards (the testbench checks this). The system software must
refresh only when stored data is disposable, or re-write what it needs.
In a production chip the LFSR would give way to a true random source. An
LFSR with a fixed seed is predictable and only suits prototyping. Polynomial
and seed are this design's choices.

## Scrambler and descrambler

The scramble layer only needs to be 128 bits wide, depend on the user PIN and
be reproducible on read. `scramble_gen` forms the seed
`{pin, serial_id, ~pin, 32-bit address}`. Three rounds of 128-bit xorshift
(`x ^= x<<29; x ^= x>>41; x ^= x<<7`) turn it into the scramble word. Each
step is an invertible linear map, so different seeds always give different
words:

* a wrong PIN always descrambles to a wrong ciphertext. The decrypted
  result is then unrelated to the plaintext;
* the same byte stored at two addresses gives two different words.

The scramble function is not cryptographically strong on its own. It is a
second, PIN-dependent layer over AES and was chosen as the simplest function
with the properties above. Replace `scramble_gen` to change it. Scrambler and
descrambler both instantiate it, so they stay consistent. The PIN width
(32 bits) and the use of the serial number and address are this design's
choices.

Internal net names of the top follow the usual waveform names of this system.
They are `skey` (cipher key), `encrypted_text`, `scr_tx`/`scr_enc`
(scramble data and scrambled ciphertext on the write path),
`scr_rx`/`scr_dec` (the same on the read path) and `decrypted_text`.
`scr_tx` and `scr_rx` feed nothing at the top. They exist to be watched.

## Interface of the top, `mem_cipher_sys`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | CPU clock |
| `rst_n` | in | 1 | asynchronous reset, active low (key ← seed, read register and flags ← 0) |
| `key_refresh` | in | 1 | step the key generator (new transaction) |
| `pin` | in | 32 | user PIN |
| `serial_id` | in | 32 | card serial number |
| `cpu_we`, `cpu_re` | in | 1 | write / read request |
| `cpu_addr` | in | `ADDR_W` | word address (one 128-bit word per CPU byte) |
| `cpu_wdata` | in | 8 | byte to store |
| `decrypt_enable` | in | 1 | read register takes plaintext (1) or scrambled ciphertext (0) |
| `cpu_rdata` | out | 8 | low byte of `cpu_rblock` |
| `cpu_rblock` | out | 128 | read register |
| `enc_done`, `dec_done` | out | 1 | write / decrypting read finished in the previous cycle |

Parameters: `ADDR_W` (default 8, 256 words, 32 kbit of storage) and
`KEY_SEED`. `secure_mem` has no reset. A word reads as unknown until it has
been written.

Not included: the CPU itself, the other smart card memories (program ROM,
EEPROM, internal and external RAM), the reader UART, timers, watchdog,
interrupt controller, clock and power circuits, and sensors. A true RNG for
an ASIC and the separate cipher clock of the original prototype are also not
included. These connect to the top's ports. A read-only memory (for example
encrypted program code) uses the read path only.

## Where this departs from or extends the source description

* The cipher is combinational and clocked by the CPU clock. The original
  prototype used a separate fast cipher clock and a load/done handshake per
  cipher. Here `cpu_we` plays the load role, and `enc_done`/`dec_done` are
  the done flags.
* Key refresh on request instead of a new key every cycle. The latter would
  make stored data unreadable.
* The scramble word is fixed per (PIN, serial number, address). In the
  original prototype the scrambled ciphertext changed twice per cipher-clock
  cycle; that time dependence is not reproduced, because a scramble word must
  be regenerated exactly when the word is read back.
* No separate read-only (ROM) path. Code in a read-only memory would need
  only descrambling and decryption. But its contents are fixed, so they
  cannot follow a key that changes per transaction. A ROM path would need a
  fixed key of its own, which is left open.
* The secured memory holds one 128-bit word per CPU byte, 256 words deep.
  The surrounding card has 64 kb ROM, 6 kb EEPROM, 256 B internal RAM and
  4 kb external RAM. How much of that sits behind the ciphering system is
  not fixed here; set `ADDR_W`.
* Scramble function, PIN width, address dependence, LFSR polynomial and seed,
  memory depth, the read register and the write-to-read bypass are this
  design's own choices.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops, with a
watchdog against hangs. For example, for the full system at its default size:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb rtl/mcs_pkg.sv tb/aes_ref_pkg.sv tb/mcs_ref_pkg.sv \
  tb/tb_mem_cipher_sys.sv --top-module tb_mem_cipher_sys -Mdir obj -o sim
./obj/sim
```

Verilator finds the other modules through `-Irtl`. Substitute another
`tb_<module>.sv` to test one block. The reference packages are independent
re-implementations, against which the RTL is compared:

* `aes_ref_pkg`: byte-array AES with the S-box found by brute-force inversion
  at run time.
* `mcs_ref_pkg`: LFSR and scramble function.

The AES testbenches also check the FIPS-197 appendix B/C.1 and SP 800-38A
ECB vectors. `tb_mem_cipher_sys` covers the following, with a clock period of
40 ns:

* the byte 0x01 stored and read back;
* all 256 addresses written and read in random order;
* 64 back-to-back writes then 64 back-to-back reads, one block per cycle;
* the one-cycle round trip;
* wrong-PIN reads, which must fail;
* key refresh, after which old words are unreadable and new ones readable.

It counts each of these mechanisms and fails if one never happened.
