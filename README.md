# Prime-field vs. binary-field multi-precision ECC datapaths (P-192 and c2tnb191v1)

Elliptic-curve cryptography on a small embedded chip is usually built one of two ways: with
integer arithmetic modulo a prime p, or with polynomial arithmetic over a binary field
GF(2^m). This RTL holds both side by side at almost the same key size, both built the same
way. Each is a 16-bit word-serial datapath that splits a 192-bit field element into twelve
16-bit words in a single-port RAM. Each computes field additions, multiplications and
squarings one word at a time with a multiply-accumulate (MAC) unit. The two sides differ only
where the fields differ:

| | prime side (`fp_engine`) | binary side (`f2m_engine`) |
|---|---|---|
| field | GF(p), p = 2^192 − 2^64 − 1 (NIST P-192) | GF(2^191), f(z) = z^191 + z^9 + 1 (ANSI X9.62 c2tnb191v1) |
| word multiplier | 16×16 integer array, AND + half/full adders (`int_mul`) | 16×16 carry-less array, AND + XOR (`clmul`) |
| MAC accumulator | 40 bits, with carries (`mac_int`) | 32 bits, XOR only (`mac_bin`) |
| addition | carry chain, then compare with p and subtract | word-wise XOR, nothing else |
| squaring | off-diagonal products computed once, added twice | only the 12 diagonal products A[i]·A[i] |
| reduction | column sums of shifted 64-bit chunks, carry fold, final subtract | wired 1- and 9-bit shifts plus XOR (`f2m_red_logic`) |
| data memory | 100 × 16 bit | 90 × 16 bit |

The design follows the paper "Exploring the Design Space of Prime Field vs. Binary Field
ECC-Hardware Implementations". That paper compares two small 16-bit ECC processors. From it
come the word size, the two fields and curves, the multiplier arrays, product scanning with a
MAC, the algorithms for addition, squaring and fast reduction, and the memory sizes. The
paper's processors run these algorithms as programs on a 16-bit microcontroller whose
instruction set it does not give. Here a hardware sequencer (`fp_engine`, `f2m_engine`) takes
the place of that program. The sequencer, its interface and its cycle counts are therefore
this design's own (see *Departures*).

## Structure

```
ecc_top
├── fp_engine ── mac_int ── int_mul          prime side
│             └─ neptun_alu
├── sp_ram (100 words)
├── f2m_engine ─ mac_bin ── clmul            binary side
│             ├─ neptun_alu
│             └─ f2m_red_logic
└── sp_ram (90 words)
ecc_pkg      word size, word counts, P-192 constant, operation/MAC/ALU encodings
```

The two sides share only the clock and reset. Each side's data memory has a host port. The
host reaches the memory only while that side's engine is idle, and accesses made while the
engine is busy are ignored. The host port is where a controlling CPU would connect: it loads
operands, starts field operations, and reads results back.

## Operating a field engine

Field elements sit in memory as 12 consecutive words, least significant word first. To run an
operation:

1. Write the operands through the host port (`*_host_en`, `*_host_we`, `*_host_addr`,
   `*_host_wdata`). A read returns its data on `*_host_rdata` one cycle later.
2. Pulse `*_start` for one cycle. In the same cycle give `*_op` and four word addresses:
   - `a_base`: operand a;
   - `b_base`: operand b;
   - `c_base`: the result c;
   - `t_base`: a 24-word scratch area that holds the double-length product.

   `op` is one of `FOP_ADD`, `FOP_SUB`, `FOP_MUL` or `FOP_SQR`. On the binary side
   `FOP_SUB` is the same as `FOP_ADD`. `FOP_SQR` ignores `b_base`.
3. `*_busy` is high while the operation runs. `*_done` pulses for one cycle at the end. A new
   start is taken only while `busy` is low, that is from the cycle after `done`.

Rules: inputs must be reduced, that is below p, or of degree below 191. c may be the same
area as a or b, so operations can work in place. The scratch area must not overlap a, b or c.
Every result is fully reduced.

## Product scanning and the MAC units

A multiplication forms the 24-word product column by column. For column k, the engine reads
A[i] and B[k−i] for every valid i and issues `MAC_MUL`, which adds the 32-bit product into
the accumulator. The low word of the accumulator is then product word k: it is written to the
scratch area, and `MAC_SHR` shifts the accumulator down one word. The carries stay for the
next column.

- **Prime side.** Column 11 sums 12 products, so the accumulator carries 8 guard bits
  (40 bits in all).
- **Binary side.** Products are XORed in, nothing carries, and 32 bits are enough.

Each word product costs three cycles: two reads from the single-port memory, then the MAC.

Squaring is where the two fields differ most:

- **Prime side.** A[i]·A[j] and A[j]·A[i] are equal, so the engine visits only i ≤ j. It adds
  off-diagonal products twice (`MAC_MUL2`), which nearly halves the number of products.
- **Binary side.** Cross terms cancel in characteristic 2, so the square is the operand with a
  zero between each pair of bits. The engine forms only the 12 products A[i]·A[i], each
  written out as two words. A binary squaring therefore costs about as much as an addition.

## P-192 reduction

Split the 384-bit product into six 64-bit chunks D5…D0. Because 2^192 ≡ 2^64 + 1 (mod p), the
product reduces to the sum of five shifted rows:

```
  D2 D1 D0      the low half
+ D5 D4 D3      the high half, times 1
+ D4 D3 ·       the high half, times 2^64; its top chunk D5 would land at 2^192,
+ ·  D5 ·       so it comes back as D5 · 2^64
+ ·  ·  D5      and D5 · 1
```

The engine adds these rows one 16-bit column at a time. It uses the MAC accumulator as an
adder (`MAC_ADD`), with 3 or 4 terms per result word:

| result word j | terms (product words T[·]) |
|---|---|
| 0–3 | T[j], T[j+12], T[j+20] |
| 4–7 | T[j], T[j+12], T[j+8], T[j+16] |
| 8–11 | T[j], T[j+12], T[j+8] |

The sum can exceed 2^192 by a carry of up to 3. That carry c is added back as c·2^64 + c, at
word 4 and word 0, by a pass through the ALU. The pass repeats in the rare case that the fold
itself carries. Last comes the same test as in modular addition: compare with p from the most
significant word down, and subtract p if the result is greater or equal.

Modular addition follows the same pattern, as in the paper's Algorithm 1: add word by word with
carry, then subtract p in place if there was a carry out or if c ≥ p. Subtraction adds p back
after a borrow.

## Binary-field reduction (`f2m_red_logic`)

With f(z) = z^191 + z^9 + 1, let L be the low 191 bits of the product T and H = T >> 191.
Then T ≡ L + H + z^9·H. The shift by 191 is a shift by 1 bit across 16-bit words
(191 = 11·16 + 15), and z^9 is a shift by 9. Neither is a whole-word move, so this small
XOR block does them in wiring:

```
H[j]  = { T[12+j][14:0], T[11+j][15] }
R[j]  = T[j] ^ H[j] ^ (H[j] << 9) ^ (H[j-1] >> 7)        (no H[j-1] term for j = 0)
```

z^9·H reaches up to bit 198. Its bits 191…198 are G = T[23][12:5], the top product bits. They
wrap around a second time as G + z^9·G, into words 0 and 1. Bit 191 of word 11 is cleared.
The engine produces the words from 11 down to 0, so G is known before words 0 and 1 are
written. It keeps T[12+j], T[11+j] and T[10+j] in a three-word window of registers. Each
result word then costs one product read, one read of T[j] and one write.

## Multiplier arrays

`int_mul` is the classic array multiplier. Row i ANDs A with B[i] and adds the result to the
previous row's sum, shifted down one place, through a ripple of adder cells: a half adder at
the low end and full adders above it. The low sum bit of each row is product bit i.
`clmul` has the same partial products, but each column is only XORed together. There is no
carry chain, so the critical path is shorter and the cells are smaller. Both take a width
parameter W (default 16). At W = 4 they are the small arrays usually drawn to explain them.

## The ALU

`neptun_alu` is the 16-bit ALU the processor's CPU is described as having: add and subtract
with carry or borrow, AND, OR, XOR, one-bit shifts through the carry, and a zero flag. Both
engines use it: the prime side for its carry chains and the binary side for XOR. The flag
conventions and encodings are this design's own.

## Cycle counts

These are measured from the first cycle after `start` to `done`. The paper's figures are for
its unrolled CPU programs and are given for comparison only.

| operation | prime side | paper (prime) | binary side | paper (binary) |
|---|---|---|---|---|
| add / sub | 38–84 / 36–60 | 64 | 36 | 38 |
| multiplication | 571–665 | 329 | 495 | 265 |
| squaring | 373–467 | 190 | 87 | 45 |
| inversion | 187,362 (host-sequenced a^(p−2), 192 S + 190 M) | 46,560 | 22,874 (host-sequenced, 190 S + 12 M) | 14,611 |
| Q = k × P | 2,251,301 (190-bit k, incl. final inversion) | 1,312,616 | 692,836 (190-bit k, incl. final inversion) | 399,635 |

Binary-side counts are fixed: 3M for an addition, 3M² + 2M + 3 + 3M for a multiplication
and 4M + 3 + 3M for a squaring, with M = 12. Prime-side counts depend on the data. The
fixed part is the addition pass (36) or the product scan and reduction (about 570 for a
multiplication, 370 for a squaring). On top of that come up to 24 cycles for the comparison
with p, 24 for subtracting p, and 24 for each fold pass (at most two). The upper bounds are
checked; the random operands in the tests reached 84, 633 and 435.

Most of the gap to the paper is the single-port memory: every word product here waits for two
reads, where the paper's programs are unrolled and hand-scheduled for its CPU.

## Departures from the paper, and what is not here

- **No CPU and no program memory.** The paper's microcontroller (12 special-purpose
  registers, Harvard architecture) and its program ROM are not given in enough detail to
  build. The field engines do its arithmetic work; point multiplication, inversion, ECDSA and
  SHA-1 are left to whatever drives the host port.
- **Prime-field inversion and point multiplication.** The paper inverts with Montgomery
  inversion and multiplies points with a ladder whose formulae it names (12 mul, 4 sqr,
  16 add per key bit) but does not print. Neither fits the engine's four operations as
  given. The prime-side point-multiplication test therefore uses other, well-known
  choices: the x-only ladder formulae for curves with a = −3 (14 mul, 5 sqr, 13 add per key
  bit) and inversion as a^(p−2). Those figures show what the engine can do; they do not
  reproduce the paper's program.
- **Full reduction, not partial.** The paper notes that keeping results in [0, 2^192) would
  save the comparison with p. This design always compares, so every result is below p.
- **Cycle counts** differ from the paper, as shown in the table above.
- **The 8-bit integer MAC** that the paper adds to the binary processor for ECDSA is
  `mac_int` with `DW = 8`. It is tested but not wired into `ecc_top`, which holds the
  point-multiplication configuration.
- **Data memory.** Each memory is a synthesizable array standing for a compiled single-port
  RAM macro, with a synchronous one-cycle read. The point-multiplication ladder needs 120
  words with this engine's 24-word product area, more than the 90 built. Its test therefore
  enlarges the binary memory to 128 words (`B_RAM_DEPTH`). The prime-side ladder test
  needs 144 words and uses 160 (`P_RAM_DEPTH`, with `AW` = 8).
- **Reset and handshake.** All control state resets asynchronously on `rst_n` low. Memory
  contents are not reset. The start/busy/done handshake is this design's own.

## Testbenches

Each testbench checks its block against arithmetic computed independently in the testbench. It
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_int_mul`, `tb_clmul` | all 4-bit products, random and corner 16-bit products |
| `tb_mac_int`, `tb_mac_bin` | random command streams against a model (including the 8-bit integer MAC), one full product-scanning multiplication |
| `tb_neptun_alu` | random operations, carries and flags |
| `tb_sp_ram` | write/read-back, read latency, read data held between reads |
| `tb_f2m_red_logic` | every result word of random products against bitwise reduction |
| `tb_fp_engine`, `tb_f2m_engine` | all operations against a memory model, edge cases (sum = p, carry out, borrow, fold, high-degree products), cycle counts |
| `tb_ecc_top` | both sides end to end through the host ports, at default sizes. Checks that each reduction path occurs: carry out, c ≥ p, borrow, fold, final subtract after a product, second binary fold |
| `tb_f2m_point_mult` | binary-field inversion (operation counts checked) and Q = k × P on the c2tnb191v1 base point with the Montgomery ladder and López–Dahab formulae (6 mul, 5 sqr, 3 add per key bit), compared with an affine double-and-add reference |
| `tb_fp_point_mult` | Q = k × P on the P-192 base point with the x-only Montgomery ladder, then X/Z by a^(p−2). Operation counts are checked and x is compared with an affine reference |

To run one with Verilator (the simulation is two-state, so start with random initial values):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/tb_ecc_top.sv --top-module tb_ecc_top
./obj_dir/Vtb_ecc_top +verilator+rand+reset+2
```

Every testbench finishes in a few seconds. `tb_ecc_top` uses `ecc_top` with no parameters
changed.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ecc_top` | `P_RAM_DEPTH`, `B_RAM_DEPTH` | 100, 90 | data memory words per side (the paper's point-multiplication processors) |
| `ecc_top`, engines | `AW` | 7 | word-address width |
| `int_mul`, `clmul` | `W` | 16 | operand width |
| `mac_int` | `DW`, `ACC_W` | 16, 40 | word and accumulator width |
| `mac_bin`, `neptun_alu` | `DW` | 16 | word width |
| `sp_ram` | `DEPTH`, `DW`, `AW` | 100, 16, 7 | memory shape |

The field engines and `f2m_red_logic` are written for W = 16 and 12-word operands from
`ecc_pkg`. The binary reduction is hard-wired to z^191 + z^9 + 1, and the prime reduction to
the P-192 chunk pattern.
