# EHSP: a hybrid signcryption processor over GF(2^163)

Signcryption encrypts a message and signs it in one pass. This design does it
with two engines: an elliptic-curve engine for the public-key part and a
sponge hash for the symmetric part.

1. The **ECC processor** multiplies a point by a scalar on a binary elliptic
   curve over GF(2^m). It turns the sender's secret scalar `k` and the
   receiver's public point `P` into a shared point `S = k x P`.
2. The **MKD hash** is a 1600-bit permutation used as a sponge. It absorbs `S`,
   and its state becomes the session key (key encapsulation).
3. The same sponge then encrypts and authenticates the message (data
   encapsulation and signature). It runs in duplex mode, one 163-bit block at
   a time.

The main configuration is the 163-bit binary field with the NIST B-163
polynomial `f(x) = x^163 + x^7 + x^6 + x^3 + 1`. The ECC datapath, the memory
words and the hash rate are all 163 bits wide.

The arithmetic unit is built around a **flexible bit-serial multiplier**. Its
field size and reduction polynomial are run-time inputs, so one circuit
multiplies in any field up to 571 bits. It spends one clock per multiplier
bit, which keeps the area small.

## Files

| file | block |
|---|---|
| `rtl/ehsp_pkg.sv` | shared enums and structs: ALU operations, memory-slot names, micro-op word, hash commands |
| `rtl/gf2m_squarer.sv` | combinational squarer: spreads the input bits apart, then a constant XOR reduction |
| `rtl/gf2m_flex_multiplier.sv` | bit-serial multiplier with run-time `m` and polynomial |
| `rtl/ecc_alu.sv` | arithmetic unit: XOR adder, squarer, multiplier, result register |
| `rtl/ecc_regfile.sv` | memory unit: 16 x M register file, 1 write port, 2 read ports |
| `rtl/ecc_control.sv` | control unit: FSM plus micro-program for the Montgomery ladder |
| `rtl/ecc_processor.sv` | ECC processor = control + memory + arithmetic units |
| `rtl/mkd_round.sv` | one combinational round of the 1600-bit permutation |
| `rtl/mkd_permutation.sv` | iterative permutation, one round per clock, 24 rounds |
| `rtl/mkd_hash.sv` | sponge with a 163-bit rate (absorb / squeeze) |
| `rtl/ehsp_top.sv` | top level: sequencer chaining ECC → key encapsulation → data encapsulation → tag |

## One signcryption, step by step (`ehsp_top`)

| phase | what happens | cycles (M = 163) |
|---|---|---|
| ECC | `S = (sx, sy) = k x (px, py)` | ≈ 193,000 for a 163-bit `k` |
| key encapsulation | sponge cleared; absorb `sx`, then `sy`; `key_out` = first 163 state bits | ≈ 52 |
| data encapsulation | for each message block `m_i`: `c_i = m_i XOR rate`, then absorb `m_i` | 26 per block |
| signature | absorb the block `1`; `tag` = first 163 state bits | 26 |

Here `rate` means the first 163 bits of the sponge state. Each ciphertext
block therefore depends on the key and on all earlier plaintext. The tag
depends on `S` and on the whole message. A receiver who knows `S` can undo
the encryption: it runs the same sponge, recovers `m_i = c_i XOR rate`, and
then absorbs `m_i`. The receiver side (unsigncryption) is not built here.

Interface of `ehsp_top`:

- `start` is a one-cycle pulse. Hold `k`, `px`, `py` and `b` stable until
  `done`.
- Message blocks arrive on a valid/ready stream: `msg_valid`, `msg_ready`,
  `msg_data`, `msg_last`. `msg_ready` goes high only in the message phase,
  and only while the sponge is idle. A block offered earlier simply waits.
- A ciphertext block is valid on `ct_data` in the cycle its message block is
  accepted; `ct_valid` is that handshake.
- `done` pulses once, and `tag` is then valid. `sx`, `sy` and `key_out` stay
  readable afterwards.
- `ladder_step` and `ladder_bit` pulse once per ladder iteration, for
  monitoring.

## The ECC processor: how the ladder is sequenced

This is the densest part of the design. The processor computes `Q = k x P` on
`y^2 + xy = x^3 + a x^2 + b` with the Montgomery ladder in López-Dahab
projective coordinates. Only the X and Z coordinates are tracked, and the
curve coefficient `a` is never needed.

**Memory unit (`ecc_regfile`).** This is a register file of 16 slots of M bits
each. It has one synchronous write port and two combinational read ports, so
one ALU operation reads any two slots and writes any slot.

| slot | contents |
|---|---|
| X, Y | the input point (loaded at start) |
| B, ONE | the curve constant `b` and the field element 1 |
| M1, M3 | `X1`, `Z1`: the running point `kP` |
| M2, M4 | `X2`, `Z2`: the running point `(k+1)P` |
| TMP, T2 … T6 | temporaries |
| QX, QY | the affine result |

**Arithmetic unit (`ecc_alu`).** It runs one operation at a time:

- `ADD`: XOR.
- `SQR`: the squarer.
- `MOV`: copy.
- `MUL`: the bit-serial multiplier.

ADD, SQR and MOV finish one cycle after `start`. MUL finishes M+2 cycles
after `start`.

**Control unit (`ecc_control`).** An FSM walks a 46-entry micro-program. Each
entry is an `alu_uop_t` of the form `{op, dst, srca, srcb}`. The program is
split into segments, and the FSM moves between them:

```
LOAD  x, y, b, 1 into X, Y, B, ONE                      (4 cycles)
if k == 0 or x == 0            -> INF
SCAN  shift k left past its leading zeros and its leading one
INIT  M1 = x, M3 = 1, M4 = x^2, M2 = x^4 + b             (pc 0-4)
for each remaining key bit, MSB first:
      LADDER: point add into (M1,M3), point double of (M2,M4)   (pc 5-18)
if Z1 == 0  -> INF : Q = (0,0)                          (pc 19-20)
if Z2 == 0  -> NEG : Q = -P = (x, x+y)                  (pc 21-22)
PRE   TMP = x*Z1*Z2, T6 = Z1*Z2, T2 = TMP                (pc 23-26)
INV   repeat M-2 times: T2 = T2^2 * TMP                  (pc 27-28)
CONV  T2 = T2^2 (= TMP^-1), then x3, y3 into QX, QY      (pc 29-45)
```

Ladder step for a key bit equal to 1:

```
add:    TMP = X1*Z2; T2 = X2*Z1; Z1 = (TMP+T2)^2; X1 = x*Z1 + TMP*T2
double: TMP = X2^2; T2 = Z2^2; Z2 = TMP*T2; X2 = TMP^2 + b*T2^2
```

For a key bit equal to 0, the roles of the two points swap. The data is not
moved to do this. The control unit relabels the slot addresses of the same
14 micro-ops, exchanging M1↔M2 and M3↔M4. That is why the ladder segment
exists only once.

Each ladder step costs 6 multiplications, 8 single-cycle operations and one
issue cycle per operation, so 6M+34 cycles (1012 at M = 163).

The final conversion needs a single inversion. It uses Fermat's theorem,
`a^-1 = a^(2^M - 2)`, computed as M-2 square-and-multiply steps followed by
one squaring. This costs (M-2)(M+5) cycles, about 27,000 at M = 163.

Total: about `(t-1)(6M+34) + (M-2)(M+5) + 11(M+3) + 30` cycles for a key
whose top set bit is bit t-1. Measured values:

- 188,813 cycles for a 159-bit key at M = 163;
- 2,302,838 cycles for a 571-bit key at M = 571.

The ladder performs the same operations for either key-bit value. The
leading-zero scan and the early exits do depend on the key, so this is not
a constant-time implementation.

## The flexible multiplier (`gf2m_flex_multiplier`)

When `start` is asserted, the multiplier latches four things:

- the multiplicand into register **A**;
- the multiplier into **B**;
- the polynomial's low part `p(x) - x^m` into register **P**;
- a mask of the low `m` bits.

Each of the next `m` cycles takes one bit of B, most significant first, and
updates the accumulator:

```
C <- ((C << 1) & mask) ^ (C[m-1] ? P : 0) ^ (b_i ? A : 0)
```

`C[m-1]` and `b_i` are picked by multiplexers driven by the run-time `m` and
a down-counter. That is the whole source of the flexibility. Nothing is
resized, and the same gates serve m = 8 and m = 571.

`done` rises m+1 cycles after `start`. The product stays in `c` until the
next `start`.

Inside the processor the multiplier is built with `MMAX = M`, and its `m` and
`poly` inputs are tied to the processor's field.

## The squarer (`gf2m_squarer`)

Squaring in a polynomial basis is linear. It spreads the input bits apart
(`a_i -> x^(2i)`) and then reduces the result modulo `f(x)`. Because `f(x)` is
a parameter, the reduction loop in the RTL unrolls into a fixed XOR network,
with no multiplexers. The result is registered in the ALU, giving a one-cycle
square.

## The MKD hash (`mkd_round`, `mkd_permutation`, `mkd_hash`)

The state is 1600 bits: 5 x 5 lanes of 64 bits. Lane (x, y) holds bits
`64(x+5y) … 64(x+5y)+63`. A round has five steps:

1. **Column parity:** `K[x]` is the XOR of column x.
2. **Mixing:** `D[x] = K[x-1] ^ rot(K[x+1],1)` is XORed into every lane of
   column x.
3. **Rotate and permute:** lane (x,y) is rotated and moved to (y, 2x+3y).
4. **Nonlinear step:** `B[x] ^ (~B[x+1] & B[x+2])` along each row.
5. **Round constant:** a constant is XORed into lane (0,0).

These are the steps of Keccak-f[1600]. The rotation amounts and the 24 round
constants are those of Keccak, and both are computed by elaboration-time
functions in `mkd_round.sv`:

- rotations: triangular numbers along the (x,y) → (y, 2x+3y) walk;
- constants: an 8-bit LFSR with polynomial x^8+x^6+x^5+x^4+1.

The permutation therefore matches the standard one bit for bit. The
testbench checks it against the published zero-state result and against
SHA3-256("abc").

`mkd_permutation` applies one round per clock. The accepting edge loads the
state, and `done` comes 25 cycles after `start`.

`mkd_hash` wraps the permutation as a sponge with a rate equal to the field
size (163 bits). Its commands, on a `cmd_valid`/`cmd_ready` handshake, are:

| command | effect |
|---|---|
| `HC_INIT` | clear the state (1 cycle) |
| `HC_ABSORB` | XOR `blk` into state bits 162..0, then permute (25 cycles) |
| `HC_SQUEEZE` | permute without input (25 cycles) |

`rate_out` always shows state bits 162..0. The caller handles padding.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ehsp_top`, `ecc_processor`, `ecc_alu` | `M` | 163 | field size, datapath width |
| same | `POLY` | `'hC9` | `f(x) - x^M` (B-163 pentanomial); for M = 571 use `'h425` |
| `gf2m_flex_multiplier` | `MMAX` | 571 | largest run-time field size |
| `ecc_regfile` | `REGS` | 16 | memory-unit slots |
| `mkd_permutation` | `ROUNDS` | 24 | rounds per permutation |
| `mkd_hash` | `RATE` | 163 | sponge rate in bits |

The processor's field is fixed when it is built (`M`, `POLY`). Run-time field
switching exists only in the multiplier. A processor for the 571-bit field is
the same RTL built with `M = 571` and `POLY = 'h425`; `tb_ecc_processor_571`
runs it.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F`. Expected values come from independent
models:

- a shift-and-add field multiplier written in the testbench;
- affine double-and-add point arithmetic, used to precompute the expected
  points;
- published Keccak / SHA3-256 results and a sponge model.

| testbench | covers |
|---|---|
| `tb_gf2m_squarer` | 204 squares, including the edge cases |
| `tb_gf2m_flex_multiplier` | m = 8 (AES field, `0x53*0xCA = 1`), 163, 233, 571; latency m+1 |
| `tb_ecc_alu` | all four operations and their latencies |
| `tb_ecc_regfile` | reset values; random writes with two-port reads |
| `tb_ecc_control` | the FSM against a behavioural ALU and memory: results, ladder-step and micro-op counts |
| `tb_ecc_processor` | B-163: k = 1, 2, 3, a 24-bit and a 163-bit key; k = n-1 (Z2 = 0 path), k = n (Z1 = 0), k = 0, x = 0 |
| `tb_ecc_processor_571` | one 571-bit scalar multiplication at M = 571 (≈ 25 s of simulation) |
| `tb_mkd_permutation` | zero-state permutation, SHA3-256("abc"), latency, load-only |
| `tb_mkd_hash` | init / absorb / squeeze sequence against the sponge model; latencies; ready |
| `tb_ehsp_top` | two complete signcryptions at default parameters, described below |

`tb_ehsp_top` exercises, and counts:

- ladder steps on both key-bit values;
- a pause by the message source;
- back-pressure;
- the point-at-infinity result;
- the ciphertext blocks and the tags.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ehsp_pkg.sv tb/tb_ehsp_top.sv --top-module tb_ehsp_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_ehsp_top` with any other testbench name. Every testbench finishes
in a few seconds except `tb_ecc_processor_571`, which takes about 25 s.

## Design choices and limits

- **How the engines are chained** (the ECC result feeds the sponge, duplex
  encryption, the end-marker tag) is this design's own concrete protocol. The
  source architecture assigns key encapsulation to the hash and data to the
  ECC engine, but it does not fix the data flow between them. The "tag" is a
  sponge MAC. It is not an aggregate signature.
- **Only the sender side is built.** There is no decrypt/verify mode, no
  ephemeral point `R = k x G` for the receiver, and no random-number
  generator: `k` is an input.
- **Field polynomial.** The squarer's reduction is described as using a
  trinomial. The 163-bit field uses the NIST pentanomial here, and the
  polynomial is a parameter.
- **Inversion** uses Fermat exponentiation, which is simple but slow (about
  14% of a scalar multiplication at M = 163). An Itoh-Tsujii addition chain
  would need about 9 multiplications instead of 161.
- **Multiplier-bit selection** uses multiplexers where the reference
  architecture mentions tristate buffers.
- **Wide ports.** Operands and results are full-width parallel ports, 163
  bits each. A device-pin-limited build would need a serial loading wrapper.
- **Not side-channel hardened.** The key-dependent scan, the early exits, and
  the key-bit-dependent slot addressing are visible in timing and power.
- **Reset** is asynchronous and active low, and clears every register. The
  inputs of `ecc_processor` are sampled during the five cycles after `start`
  and must stay stable until `done`.
- **Padding** is left to the user of `mkd_hash`. `ehsp_top` only handles
  whole 163-bit blocks.
