# Bit-serial RSA encryption for a passive RFID tag

A passive RFID tag has very little area and power, and a tight deadline, to
answer a reader. Normal Montgomery-based RSA needs two extra steps on the tag.
First the message is converted into Montgomery form (x·r mod n). At the end the
result is converted back, which needs a multiplier and a divider. This engine
does neither. It feeds the raw message, exponent and modulus into a chain of
Montgomery products. Each product drops one factor of 2^k, so the tag sends a
*partial ciphertext*

    C' = M^E · 2^(-k·(E-1)) mod N          (k = SIZE, the modulus width)

The reader holds the same public key. Once per key it computes the constant
X = 2^(k·(E-1)) mod N, and then recovers the real ciphertext with one modular
multiplication: C = C'·X mod N = M^E mod N. Only public values go into X, so
C' tells an eavesdropper nothing that C would not.

The tag keeps one small bit-serial Montgomery multiplier. A controller uses it
again and again for left-to-right square-and-multiply exponentiation.

## Blocks

```
                 +------------------- rsa_crypto --------------------+
 start --------->| rsa_exp_ctrl  --cmd-->  rsa_memory                |
 clock, reset -->|  (13-state FSM) <-E[count]- M, E, N, temp,       |--> c (C')
                 |     | upsun ^ finish     Ins1, Ins2, Modulus, C  |
 m, e, n ------->|     v       |                |  ^ product        |--> stop
                 |   mont_mult (6-state FSM) <--+--+                 |
                 |     mm_add (shared adder), mm_reduce (compare/sub)|
                 +---------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/rsa_pkg.sv` | state encodings of both FSMs, the memory command enum |
| `rtl/rsa_crypto.sv` | top: wires controller, memory and multiplier |
| `rtl/rsa_exp_ctrl.sv` | exponentiation controller (states 0–12) |
| `rtl/rsa_memory.sv` | operand registers, one command per cycle |
| `rtl/mont_mult.sv` | bit-serial Montgomery multiplier (states 0–5) |
| `rtl/mm_add.sv` | the multiplier's adder (A·b_i, or N·S_0 and halve) |
| `rtl/mm_reduce.sv` | the multiplier's compare-and-subtract |

There is one parameter, `SIZE`, the modulus width in bits. It defaults to 128,
the largest width that fits the tag's area and power budget. Every module has
been simulated at 16, 32, 64, 128, 256, 512 and 1024 bits.

## The Montgomery multiplier (`mont_mult`)

The multiplier computes `out = A·B·2^(-SIZE) mod N` for an odd N and operands
below N. It scans B one bit at a time from bit 0, and each bit takes three
steps, one state each:

1. `S = S + A·B[i]`
2. `S = (S + N·S[0]) / 2`. Adding N when S is odd makes the sum even, so the
   halving is exact.
3. While `S ≥ N`, `S = S − N`, one subtraction per cycle.

State 4 counts `size1` down from SIZE−1 to 0. State 5 copies S to `out` and
raises `finish`. S is never larger than 1.5·N after the halving. So state 3
makes at most one subtraction per bit, and S stays within SIZE+2 bits. The
module is deliberately small: one SIZE+2-bit adder (`mm_add`) does both
additions, and one comparator/subtractor (`mm_reduce`) does the reduction.

The latency is `4·SIZE + 2 + s` cycles, where s is the number of
subtractions (0 ≤ s ≤ SIZE). That is from the cycle in which `start` is first
seen high to the cycle in which `finish` goes high.

The handshake is four-phase:

- The controller raises `start` and holds it.
- `finish` rises when the product is ready and stays high until `start` falls.
- A new product starts only after `start` has been low for a cycle.

An assertion checks that `start` is not dropped while a product is being
computed.

## The exponentiation controller (`rsa_exp_ctrl`)

The controller's states follow a 13-state diagram:

| state | action |
|---|---|
| 0 | wait for `start`; load M, E, N |
| 1 | temp = M if E[SIZE−1] is set; count = SIZE−2 |
| 2–5 | square: Ins1 = Ins2 = temp; raise `upsun`; wait for `finish`; temp = product; drop `upsun` |
| 6 | if E[count] = 1 go to 7, else go to 11 |
| 7–10 | multiply: Ins1 = temp, Ins2 = M; same handshake |
| 11 | if count = 0 go to 12, else count − 1 and go to 2 |
| 12 | C = temp; raise `stop` |

To see why the tag's result carries the factor 2^(-k(E-1)), write a value as
M^a·2^(-k(a-1)):

- Squaring it gives M^(2a)·2^(-k(2a-1)).
- Multiplying it by M gives M^(a+1)·2^(-k·a).

Both results have the same form again. So after the whole scan the engine
holds M^E·2^(-k(E-1)), the value the reader corrects.

**Exponents shorter than SIZE bits.** The plain diagram seeds temp with
M·E[SIZE−1]. If E's top bit is 0, that seed is 0, and every later product is 0
too. Real public exponents are usually much shorter than the modulus: the
reference keys all use an exponent half as long. So the controller has one
extra flag, `primed`, which records whether temp yet holds a power of M:

- While `primed` is clear, a bit costs 3 cycles (states 2 → 6 → 11) and no
  product.
- The first 1 bit sets temp = M and sets `primed`.

When E[SIZE−1] = 1, the behaviour is exactly the 13-state diagram. E = 0 is
not supported: the engine returns 0, while M^0 = 1.

## Operand memory (`rsa_memory`)

These registers hold the operands. M, E, N and C are SIZE bits. The
exponentiation temporary and the transfer registers Ins1 and Ins2 are SIZE+2
bits, the width of the multiplier's partial sum. The multiplier also needs the
modulus transfer register, its own A, B and N copies, the partial sum and
`out`. In all, the 128-bit engine has 1710 flip-flop bits. A 128-bit FPGA build
of the same design reported 1697 registers.

The memory takes one command per cycle from the controller (`mem_cmd_t`):

| command | effect |
|---|---|
| LOAD | capture M, E and N |
| SEED | temp = E[SIZE−1] ? M : 0 |
| SETSQ | Ins1 = Ins2 = temp, Modulus = N |
| SETMU | Ins1 = temp, Ins2 = M, Modulus = N |
| RES | temp = product |
| TAKEM | temp = M |
| OUT | C = temp |

M, E and N are loaded in parallel. On a tag they would arrive serially over
the air. That receiver is not part of this RTL.

## Timing

An encryption takes this many clock edges, from the edge that samples `start`
to the edge that raises `stop`:

    3 + Σ over bits i = SIZE-2 … 0 of
          primed:      (4·SIZE + 8)  +  (4·SIZE + 6 if E[i] = 1)
          not primed:  3
      + total subtractions in all products

`tb/rsa_ref_pkg.sv` holds this count as `engine_cycles()`, and the testbenches
check it exactly. For the reference keys, whose exponents are half the
modulus length, the counts are:

| modulus bits | cycles | reference cycles | ms at 6.78 MHz |
|---|---|---|---|
| 16 | 825 | 1547 | 0.12 |
| 32 | 2983 | 2951 | 0.44 |
| 64 | 13586 | 13531 | 2.00 |
| 128 | 50480 | 50352 | 7.45 |
| 256 | 194666 | 194410 | 28.7 |
| 512 | 821962 | 821450 | 121.2 |
| 1024 | 3236794 | 3235770 | 477.4 |

From 32 bits up, the counts are within 1.1% of the reference implementation's.
The gap is close to SIZE cycles. Both designs make the same products with
the same subtractions, so the gap lies in control overhead, such as this
design's 3 cycles per leading-zero exponent bit. At 16 bits the reference figure is almost twice the
count of any 8-bit exponent, so that row is not comparable. The clock is
6.78 MHz, half of the 13.56 MHz carrier. At that clock a 128-bit encryption
takes 7.45 ms, which is inside the 10.9 ms window between a write and a read
command.

## Departures and choices

These points are this design's own choices, not taken from the reference
design:

- **Leading-zero skip.** Described above. Without it, exponents shorter than
  SIZE would give 0.
- **Reset.** Every register has a synchronous, active-high reset.
- **`stop`.** It stays high until the next `start`.
- **Handshake and command set.** The four-phase multiplier handshake and the
  memory command set are this design's. The reference gives the register
  transfers of each state, but no signalling.
- **E and the multiplier.** E is not wired to the multiplier. Only the
  controller reads it.
- **Shared adder.** One adder does both additions of a Montgomery step.
- **Not included:**
  - the reader's conversion (modelled in the testbenches);
  - the random-number generator for OAEP padding;
  - the analog front end and the over-the-air serial input.

## Verification

Every testbench checks its results against wide integer arithmetic
(`tb/rsa_ref_pkg.sv`). None uses a copy of the hardware algorithm, except that
`tb_mont_mult` models how many subtractions to expect.

| testbench | what it runs |
|---|---|
| `tb_mm_add`, `tb_mm_reduce` | random and corner operands, 16 bits |
| `tb_mont_mult` | 300+ random products, 16 bits: value, exact latency, handshake |
| `tb_rsa_memory` | every command, every E bit |
| `tb_rsa_exp_ctrl` | the controller against a model memory and multiplier with random latency; checks the square/multiply sequence for 200+ exponents |
| `tb_rsa_crypto` | end to end at 16 bits; see below |
| `tb_rsa_full` | default 128 bits, reference key; checks C', the reader's ciphertext, exact cycles, and cycles within 2% of 50352; then runs the 16-bit key on the same 128-bit engine (k = 128 in the correction) |
| `tb_rsa_vectors` | the seven reference keys, 16 to 1024 bits, side by side |

`tb_rsa_crypto` runs the reference 16-bit key (N = 41989, E = 181,
M = 41641). It checks C' = 21340, X = 23198, and C = 36999. It also runs corner
cases and 60 random keys, and checks exact cycle counts. It counts each
mechanism and fails if one never happens: squaring, multiplying, reduction
subtraction, multiplier wait, leading-zero skip, full-width exponent, and
back-to-back runs.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/rsa_pkg.sv tb/rsa_ref_pkg.sv tb/tb_rsa_full.sv --top-module tb_rsa_full
./obj_dir/Vtb_rsa_full
```

Every testbench ends with `TB_RESULT checks=N failures=F`. The 1024-bit run in
`tb_rsa_vectors` takes a few seconds.
