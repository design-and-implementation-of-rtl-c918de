# A six-coprocessor crypto system on one 32-bit bus

This is the hardware half of an embedded security processor. A small control
CPU runs the protocols: encrypting a file, signing it, compressing it,
checking a signature. The arithmetic those protocols spend their time on
runs in six dedicated coprocessors:

| Select | Coprocessor | What it computes |
|---|---|---|
| 0 | AES | AES-128 encryption and decryption of 128-bit blocks |
| 1 | SHA-1 | SHA-1 compression of padded 512-bit blocks, chained |
| 2 | MAP | 163-bit modular division, multiplication, addition and reduction mod a prime p |
| 3 | RSA | modular exponentiation X^E mod M for moduli up to 1024 bits |
| 4 | ECC | point multiplication k·P and affine point addition over GF(2^163), curve sect163k1 by default |
| 5 | LZSS | lossless compression and decompression of 16-bit symbols, one symbol per clock |

`crypto_top` holds all six, plus the bus decoder. The CPU itself is not
included, and neither are its memories, UART, timer or parallel I/O. Its
bus is brought out as the master port (`m_address`, `m_read`, `m_write`,
`m_writedata`, `m_readdata`), and each coprocessor's "result ready" flag
appears on `irq[5:0]`. A testbench, or a CPU model you attach, drives that
port exactly as the firmware would.

All logic is synchronous to one clock `clk`. Reset `rst_n` is
asynchronous and active low.

## The bus and the address map

The master uses 32-bit word addresses, 12 bits wide:

```
m_address[11:9]  coprocessor select (table above; 6 and 7 read as 0)
m_address[8:0]   register or memory word inside the coprocessor
```

`avalon_interconnect` decodes the select field into a one-hot chipselect.
It raises chipselect only while a read or write strobe is high, and returns
the selected slave's `readdata` in the same clock. Every slave answers
combinationally, so a read or write takes one clock with no wait states.
There is no arbitration, burst or byte-enable support, because there is one
master and all registers are 32-bit words. An assertion checks that read
and write are never high together.

Each coprocessor's local map:

- **AES** (`aes_avalon`)
  - 0–3: key (word 0 holds bits 127:96).
  - 4–7: input block.
  - 8: control. Bit 0 starts a block, bit 1 selects encrypt (1) or decrypt (0), bit 2 loads the key first.
  - 9: status. Bit 0 means the result is ready, bit 1 busy.
  - 12–15: output block.
- **SHA-1** (`sha1_avalon`)
  - 0: write 16 times to load one padded block, M0 first.
  - 1: control. Bit 0 starts, bit 1 marks the first block (start from the initial hash value; otherwise chain on the previous digest).
  - 2: status.
  - 8–12: digest H0..H4.
- **MAP** (`map_avalon`)
  - 0–7: a; 8–15: b; 16–23: p; 24–31: y. Each is eight words, least significant first.
  - 32: control. Bit 0 = a/b, bit 1 = a·b, bit 2 = a+b, all mod p.
  - 33: status.
- **RSA** (`rsa_modexp`). The local address is `{region[2:0], index[4:0]}`, index 0 least significant.
  - Region 0 registers: 0 control (bit 0 start), 1 status (bit 0 finished, bit 1 idle), 2 exponent length in bits, 3 modulus length n in bits.
  - Regions 1–4: M, R² mod M, E and X.
  - Region 5: the result.
- **ECC** (`ecc_core`). The local address is `{region[1:0], register[3:0], word[2:0]}`.
  - Region 0: word 0 control (bit 0 point multiplication, bit 1 point addition); word 1 status (bit 0 done, bit 1 idle, bit 2 the result is the point at infinity).
  - Region 1: the key k.
  - Region 2: the 16-entry register file.
- **LZSS** (`lzss_avalon`)
  - 0: write a symbol to compress. Bit 16 marks the last one.
  - 1: control. Bit 0 starts compression, bit 1 starts decompression.
  - 2: pop a compressed 32-bit packet.
  - 3: push a packet to decompress.
  - 4: number of symbols to decompress.
  - 5: pop a decompressed symbol.
  - 6: status. Bit 0 last packet produced, bit 1 decompression done, bit 2 decompressor can take a packet, bits 14:8 packets waiting, bits 22:16 symbols waiting.

## AES-128: one datapath for both directions

`aes_core` runs one round in four clocks on a 128-bit state register. Each
block takes 43 clocks: a load clock, the initial AddRoundKey, and ten
rounds. The S-box is not a table. `aes_sbox` computes the GF(2^8) inverse
as x^254, using a chain of squarings and multiplications, then applies the
affine map. The inverse S-box does the same steps in reverse.

Decryption uses the *equivalent inverse cipher*. InvSubBytes, InvShiftRows
and InvMixColumns run in the same order as the forward rounds, so one
datapath serves both directions. This works because every decryption round
key except the first and last is passed through InvMixColumns
(`ark_key = mix_columns(rk, inverse)`).

`aes_keygen` computes round keys on the fly: forwards for encryption, and
backwards from the last round key for decryption. After a key load, the
first decryption must first run the key schedule forwards once to find that
last round key. It then keeps it, so the first decryption takes 86 clocks
and later ones 43.

## RSA: Montgomery exponentiation with constant work per bit

`rsa_modexp` computes P = X^E mod M by right-to-left binary
exponentiation, working in the Montgomery domain with R = 2^(n+2).

```
P = MonMult(1, R^2)        Z = MonMult(X, R^2)
for each exponent bit e_i (LSB first):
    T = MonMult(P, Z);  Z = MonMult(Z, Z);  if e_i: P = T
P = MonMult(P, 1)
```

Both products are formed for every bit, so the run time depends only on
the exponent length and not on its bit values. `rsa_monmult` is a radix-2
Montgomery multiplier. It does one iteration per clock, n+3 iterations for
an n-bit modulus. The extra two bits of R keep every intermediate value
below 2M, so no final subtraction is needed. The result leaves LSB first
through a 1-to-32-bit shift register (`rsa_mm2me32`) into the result RAM.

The host must supply R² mod M = 2^(2n+4) mod M, and M must be odd. One
exponentiation takes (2·len(E)+3)·(n+5) + n + 4 clocks. That is 2.1 M
clocks for a 1024-bit private-key operation, about 32 ms at 66 MHz.

## ECC: a microcoded Montgomery ladder over GF(2^163)

The ECC core is the most involved block. It computes Q = k·P on
y² + xy = x³ + ax² + b over GF(2^m) in polynomial basis. By default m = 163
with the sect163k1 reduction polynomial x^163 + x^7 + x^6 + x^3 + 1. The
field size `M` and the polynomial `F` are parameters.

**Datapath.**
- A register file of 16 field elements.
- `ecc_lsd_mult`, a least-significant-digit-first multiplier. It consumes D bits of one operand per clock (parameter `D`, default 16), so a product takes ceil(m/D) clocks.
- `ecc_squarer`, a parallel squarer that squares once per clock and can repeat n times.
- XOR for field addition.
- A zero test.

**Control.** A microsequencer steps through a ROM of micro-instructions:
`MUL`, `SQR n`, `ADD`, `MOV`, `SET1`, two loop-control words and a
"jump to infinity if zero" word. The ROM is not a data file. The function
`ecc_pkg::gen_urom(m)` generates it while the design elaborates, so it
follows `M`. It holds two microprograms:

1. **Point multiplication** (control bit 0).
   - A scan counter first skips the leading zeros of k.
   - The microprogram converts P to projective form: (X1, Z1) = (x, 1) and (X2, Z2) = (x⁴ + b, x²).
   - It then runs the López–Dahab ladder step once for each remaining key bit, 96 clocks per bit at D = 16. Each step is an add followed by a double.
   - The step is written once, for key bit 1. For key bit 0 the sequencer swaps the register addresses of (X1, Z1) and (X2, Z2). Both branches therefore run the same instructions in the same time, which is why this ladder was chosen.
   - Finally the microprogram converts back to affine x and y. That needs one field inversion, done as an Itoh–Tsujii chain of squarings and multiplications. The chain is built from the binary expansion of m−1 and costs 9 multiplications at m = 163.
2. **Point addition** (control bit 1), from ROM address 64.
   - It computes λ = (y1+y2)/(x1+x2), x3 = λ²+λ+x1+x2+a and y3 = λ(x1+x3)+x3+y1. The division reuses the same inversion chain.
   - If x1 = x2, it reports the point at infinity. That is correct when P2 = −P1. Doubling (P1 = P2) is not handled here; compute 2·P with the multiplier.

**Register use.**
- Point multiplication: load x, y and b into r4, r5 and r6, and the key into region 1. The result is returned in r11 (x) and r12 (y).
- Point addition: load P1 into r4/r5, P2 into r0/r1, and a into r3. The result is returned in r11/r12.
- If k·P is the point at infinity, status bit 2 is set.
- The y recovery assumes that (k+1)·P is not the point at infinity.

**Timing at D = 16.**
- A random 163-bit key takes about 16,800 clocks.
- One point addition takes 350 clocks.

## SHA-1

`sha1_engine` performs one SHA-1 step per clock. The 16-word message
schedule sits in a shift register (`sha1_msg_expansion`) that produces W_t
on the fly. The host loads the 16 words of a padded block (16 clocks), and
the block is then hashed in 81 clocks. The `first` bit chooses between
starting from the standard initial value and chaining on the previous
digest. Padding is the host's job.

## LZSS: one symbol per clock, both directions

**Compression.** `lzss_compressor` is made of three stages.

1. `lzss_coder` keeps the last 256 symbols in a shift-register window. It compares every new symbol with all 256 positions at once. Each position keeps a "still matching" flag that survives only if the next symbol also matches, so the match state is updated in a single clock whatever the data. When no position survives, or the match reaches 16 symbols, the coder emits the phrase. A one-symbol phrase becomes a literal; a longer one becomes a (length, offset) match.
2. `lzss_huff_enc` turns the phrase into a fixed prefix code, sent most significant bit first:

   ```
   literal : 0  s[15:0]                      17 bits
   match   : 1  L  (offset-1)[7:0]           offset 1..256
             L = 00 (len 2), 01 (len 3), 100 (len 4), 101 (len 5),
                 11 llll (len 6..21, llll = len-6)
   ```

3. `lzss_packer` fills 32-bit packets starting at bit 31. The last packet is zero-padded.

**Decompression.** `lzss_decompressor` is also a chain of stages.

- `lzss_unpacker` is a 64-bit bit buffer. It shows the next 32 bits to the prefix decoder.
- `lzss_huff_dec` decodes one codeword per clock and tells the buffer how many bits it used.
- A small FIFO decouples the decoder from `lzss_expander`.
- `lzss_expander` writes one symbol per clock into a 256-entry history. A match copies from `offset` positions back, and the copy may overlap the symbols it is producing.

The stream carries no end marker, so the host gives the symbol count. The
consumer can pause the output with `out_ready`. In `lzss_avalon` this
happens automatically when the 64-entry symbol FIFO is nearly full.

## MAP: 163-bit modular arithmetic on an add-and-shift datapath

`map_core` is split into `map_fsm`, the control, and `map_dpu`, the
datapath. They exchange a control struct and a status struct, which are
defined in `map_pkg`.

The datapath has four registers: A and B, of N bits, and U and V, of N+2
bits in two's complement. It also has two add/subtract units, shifters and
comparators.

- **Division** y = a/b mod p uses Shantz's binary algorithm. It starts from (A, B, U, V) = (b, p, a, 0) and repeatedly halves or subtracts until A = B. Each halving of U or V adds p first when the value is odd. There is no separate inversion; a/1 or 1/b are just special cases.
- **Multiplication** is LSB-first interleaved add-and-shift, with a reduction after each step.
- **Addition** adds, then subtracts p while the value is at least p. With b = 0, the same operation reduces a.

All clock counts depend on the data. For random 163-bit operands the
averages are about 400 (division), 560 (multiplication) and 2 (addition).

## ECDSA on the coprocessors

The cores are sized for ECDSA over sect163k1 with SHA-1: n, the group
order, is a 163-bit prime. `tb_ecdsa` runs the protocol through the bus
the way CPU software would.

| Operation | Steps | Cores used |
|---|---|---|
| Key pair | Q = d·G | ECC |
| Signing | e = SHA-1(message); R = k·G; r = x(R) mod n; s = (e + d·r)/k mod n | SHA-1, ECC, then the MAP reduce, multiply, add and divide operations |
| Verification | u1 = e/s and u2 = r/s mod n; X = u1·G + u2·Q; accept if x(X) mod n = r | MAP divisions, two point multiplications, one point addition, a final MAP reduction |

The testbench checks the signature against a software reference. It also
checks that a tampered digest is rejected.

## Clock counts next to the published core

| Operation | This RTL | Published |
|---|---|---|
| AES-128 block, encrypt | 43 | 43 |
| AES-128 first decryption after key load | 86 | 86 |
| RSA-1024, 1024-bit exponent | ≈2.11 M (32.0 ms @ 66 MHz) | 31.93 ms @ 66 MHz |
| RSA-1024, 5-bit exponent | 14,401 (0.22 ms @ 66 MHz) | 0.25 ms |
| ECC k·P, m = 163, D = 16 | ≈16,800 | 16,599 |
| ECC affine point addition, D = 16 | 350 | 705 |
| SHA-1, one block | 16 load + 81 | 120 |
| MAP division / multiplication / addition | ≈400 / ≈560 / 2 (data dependent) | 806 / 866 / 40 |
| LZSS | 1 symbol per clock | 1 symbol per clock |
| ECDSA key pair / sign / verify (bus transfers included) | 16,577 / 18,220 / 35,557 | 36,846 / 23,567 / 42,685 |

## Where this RTL differs from the published design

- The published design is a complete system with a CPU and its
  peripherals. Here only the coprocessors and the bus decoder are built; the
  CPU side is a port.
- The register maps, control bits, ready flags and the bus wrappers are this
  design's own. The published description names the bus and its 32-bit
  data path but not the slave registers.
- The published Montgomery multiplier is a linear systolic array of
  bit-slice cells. `rsa_monmult` does the same iteration with one full-width
  adder row per clock. The iteration count matches, but there is no
  pipeline fill.
- Also in the published design, but left out here:
  - The ECC processor's support for several polynomials at run time. Here the polynomial is a parameter.
  - The other ECC digit sizes 8, 32 and 64. They are a parameter change, but were not simulated.
- Not given in the published description, so chosen here:
  - the LZSS window (256), the longest match (16) and the exact prefix code;
  - the decompressor's internals;
  - the ECC micro-instruction set and register allocation;
  - the MAP multiplication and addition algorithms.
- The SHA-1 core is faster (97 clocks against 120), and so are the MAP
  operations.
- ECDSA runs on the CPU in the published system. Here `tb_ecdsa` plays that
  role over the bus. Its clock counts include the bus transfers of a
  simple testbench master, not the CPU's software overhead.

## Simulating

Every block has a self-checking testbench in `tb/`, and `tb_crypto_top`
exercises the whole system through the bus. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv rtl/ecc_pkg.sv rtl/lzss_pkg.sv rtl/map_pkg.sv \
    tb/ecc_ref_pkg.sv tb/lzss_ref_pkg.sv tb/rsa_ref_pkg.sv \
    tb/tb_crypto_top.sv --top-module tb_crypto_top -o sim
./obj_dir/sim
```

Swap in another `tb_*.sv` and `--top-module` to run a single block. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs.

- **References.** The testbenches compare against independent reference
  models written in the testbench language:
  - `rsa_ref_pkg` does big-number modular arithmetic for RSA and MAP;
  - `ecc_ref_pkg` does affine double-and-add on sect163k1;
  - `lzss_ref_pkg` is a bit-level LZSS encoder and decoder;
  - AES and SHA-1 are checked against the FIPS-197 and FIPS 180 test vectors.
- **The system test** runs at the default sizes and passes 41 checks. It
  covers:
  - AES encryption, first and repeated decryption;
  - SHA-1 single and chained blocks;
  - MAP division, multiplication and addition;
  - two 1024-bit RSA exponentiations;
  - an ECC point multiplication run while the other cores work, the point at infinity, and a point addition;
  - LZSS compression of 700 symbols and their decompression, with the decompressor forced to stall on a full output FIFO.

  It counts each of these events and fails if any never happened.
- **`tb_ecdsa`** runs ECDSA key generation, signing and verification on
  the full system.
- **`tb_secure_transfer`** runs the application the system was designed
  for, in about 25 seconds of simulation.
  - The sender AES-encrypts a 64-byte file under a fresh session key, sends
    that key under RSA-1024, and signs the file's SHA-1 digest with ECDSA.
  - The receiver recovers the key with a full 1024-bit private exponent,
    decrypts the file, and verifies the signature.
