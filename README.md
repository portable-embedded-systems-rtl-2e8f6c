# A GF(2^163) elliptic-curve coprocessor with collapsed points

This is an elliptic-curve cryptography coprocessor for the binary field
GF(2^163). It computes the two operations that public-key protocols need:

- **point multiplication** `k·P`, for key generation and Diffie-Hellman shared secrets;
- **point addition** `M ± S`, for encrypting or decrypting a message point with a stored shared secret.

Its main idea is that **a curve point always travels as one 163-bit word**, not
as two coordinates. The processor works on these collapsed points at its
inputs and outputs, so a point costs the same bandwidth as a single field
element. A control block connects the processor to two sides:

- a host PC, through eight 32-bit registers;
- a MicroBlaze soft processor, through 32-bit GPIO data registers and 12-bit GPIO command registers. The MicroBlaze relays points to a remote system over a serial link.

The curve is `y² + xy = x³ + ax² + b` over GF(2^163) in polynomial basis, with
`P(x) = x^163 + x^7 + x^6 + x^3 + 1`. The coefficients are those of NIST
B-163, with `a = 1`. The public-key base point is the B-163 generator. All of
these are constants in `rtl/gf2m_pkg.sv` and `rtl/ecpc.sv`.

## Collapsed points

Every point `(x, y)` of the prime-order subgroup satisfies `T(x) = T(a)`,
where `T` is the field trace. In this basis the trace is cheap:
`T(A) = a0 ⊕ a157`. So bit 0 of `x` carries no information: it can be
recomputed as `a0 = T(a) ⊕ a157`.

The collapsed word stores `T(y/x)` in bit 0 instead. That one bit is enough to
recover `y` later. Given `x`, the value `z = y/x` is one of the two roots of
`z² + z = g`, where `g = x + a + b/x²`. The trace picks which root.

`ec_point_codec` packs and unpacks this word. The trick only works for points
in the prime-order subgroup. Test points are therefore generated as doubles of
random curve points.

## Field units

All units take their operands on the clock edge where `start` is sampled high
while `busy` is low. `done` is a one-cycle pulse, and the result is held until
the next start. Assertions in each sequential unit check that no start arrives
while it is busy, and that `done` follows a start after exactly the latency
below.

| Unit | Function | Latency from start cycle to `done` |
|---|---|---|
| `gf_mult` | `a·b`; digit-serial, four bits of `b` per clock | 43 |
| `gf_div` | `a/b` or `1/b` (Brunner's extended Euclid) | 327 |
| `gf_root` | `z` with `z² + z = g` and `T(z) = t` | 42 |
| `gf_sqr` | `a²` | combinational |
| `gf_trace_mult` | `T(a·b)` without forming the product | combinational |
| `gf_mulx`, `gf_divx` | `x·a`, `a/x` modulo `P(x)` | combinational |

### Multiplier (`gf_mult`)

The multiplier keeps four accumulators, Z0 to Z3. Accumulator `Zj` collects the
terms `b_(4i+j)·x^(4i)·A`. Each clock adds the current `A` into the four
accumulators, gated by four bits of `B`. It then multiplies `A` by `x⁴`
through four chained `gf_mulx` cells, so reduction happens on the way and
needs no separate step.

After 41 iterations one more clock forms `Z0 + x·Z1 + x²·Z2 + x³·Z3`. The
count is 41 iterations, plus one combine cycle, plus one cycle back to idle,
which gives 43.

### Divider (`gf_div`)

The divider keeps four registers:

- R and S, each 164 bits, hold the divisor and `P(x)`;
- U and V hold the dividend and 0.

A degree-difference counter `delta` steers the steps. Each clock looks only at
`r163`, `s163` and whether `delta = 0`. It then does one of five moves; the
table is in the module header. Only U and V need modular `·x` and `/x` cells.

After `2k = 326` steps the quotient is in U. The result is produced in the
last step, and the return to idle makes 327 cycles. Because the control never
looks at U or V, the step sequence depends on the divisor alone.

### Root unit (`gf_root`)

For odd `k`, the sum of `g^(2^i)` over the odd `i` below `k` equals `z + T(z)`.
The unit walks through the powers four at a time, using four chained squarers
that produce the 2nd, 4th, 8th and 16th powers. Each clock adds two of those
terms.

Since `163 mod 4 = 3`, the last of the 41 iterations adds only one term. In
that last clock the requested trace bit goes into bit 0 of the result.

### Trace of a product (`gf_trace_mult`)

`T(A·B)` depends only on the product coefficients whose reduced power has a
nonzero trace. For this field those are the exponents
`{0, 157, 163, 313, 314, 317, 319, 323}`. The unit XORs the partial products
`a_i·b_(n−i)` for those `n` and nothing else. The package computes the set
from `P(x)`.

## Point multiplication

The multiplication uses the Montgomery ladder in projective coordinates with
`x` only, in `ec_processor`. The scalar is as long as the group order, so its
top bit is taken as 1. One initialisation cycle sets:

- `(X0, Z0) = P`
- `(X1, Z1) = 2P = (x⁴ + b, x²)`

Each of the remaining 162 bits `s` then takes two rounds, and each round runs
the three multipliers in parallel. Below, `s̄` is the other index and `d` is
the constant with `d⁴ = b`:

| Round | Updates |
|---|---|
| 1 | `X_s̄ = X_s·Z_s̄`<br>`Ax1 = X_s̄·Z_s`<br>`Z_s̄ = (X_s̄ + Ax1)²`<br>`Ax2 = (d·Z_s)⁴` |
| 2 | `X_s̄ = x·Z_s̄ + X_s̄·Ax1`<br>`Z_s = (X_s·Z_s)²`<br>`X_s = Ax2 + X_s⁴` |

The results of a round are written back, and the next round's multipliers are
started, in the same cycle. A scalar bit therefore costs exactly 2 × 43 = 86
cycles.

### Conversion back to a collapsed point

The result must end up as `x_R = X0/Z0` together with the bit `T(y_R/x_R)`,
without ever computing `y`. The identity used is:

```
T(y_R/x_R) = T(y/x) + T( (x·Z0 + X0)·(x·(X0·Z1 + X1·Z0) + X0·X1) / (x·X0·Z0·Z1) )
```

It runs in four steps:

1. Three products.
2. Three more products.
3. One inversion, with two multiplications in its shadow.
4. A final multiplication that yields `x_R`.

Meanwhile the trace-of-product unit reads the numerator and the inverse, and
gives the trace bit in the last cycle. `illegal_key` is raised when `Z0 = 0`,
which means the product is the point at infinity.

## Point addition

The processor keeps the last multiplication result as its stored point `R`,
which is normally the shared secret. An addition computes `P + R`, or `P − R`
when `decrypt` is set.

Before the first addition, the processor recovers `y_R` from the collapsed
form:

1. `g(x_R)` on the divider.
2. The root, with trace `T(y_R/x_R) ⊕ decrypt`. Negating a point flips this trace.
3. One multiplication.

This takes 327 + 42 + 43 cycles. The recovered `y_R` is kept for further
additions. It is recomputed in three cases:

- after a new point multiplication;
- when `decrypt` changes;
- after `msg_reset`.

Each addition then proceeds as follows:

1. `g(x)` of the input point on the divider.
2. `1/(x + x_R)` on the divider, while the root unit and a multiplier recover `y`.
3. `λ = (y + y_R)/(x + x_R)` as one multiplication, then `x3 = λ² + λ + x + x_R + a` from the squarer.
4. `1/x3` on the divider, while `y3 = λ(x3 + x_R) + x3 + y_R` is formed.
5. The output trace `T(y3 · 1/x3)` from the trace-of-product unit.

## Timing

All counts run from the start cycle to the done cycle. The "Reference design"
column gives the figures of the design description this RTL follows.

| Operation | This RTL | Reference design | Why they differ |
|---|---|---|---|
| Field multiplication | 43 | 43 | — |
| Inversion or division | 327 | 327 | — |
| Root | 42 | 42 | — |
| Ladder, per scalar bit | 86 | 86 | — |
| Conversion to collapsed point | 456 | 413 | The reference schedules two multiplications and one inversion. Here the inverse is needed both for `x_R` and for the trace, which costs one more multiplication after the inversion. |
| Point multiplication | 14,391 | 14,303 | 1 capture + 1 initialisation + 162 × 86 + 456 + 1 final-trace cycle |
| Point addition | 1,026 | 1,024 | One input-capture cycle and one final-trace cycle |
| First addition after a new secret | 1,438 | 1,436 | The 412-cycle `y_R` recovery, plus the same two cycles |

At 50 MHz this works out as follows:

- A point multiplication takes 288 µs, about 566 kbit/s of 163-bit keys.
- A point addition takes 20.5 µs, about 7.9 Mbit/s of message points.

A serial link at 115,200 bit/s is therefore the bottleneck of a complete system
by a wide margin.

## Processor interface (`ec_processor`)

| Port | Direction | Meaning |
|---|---|---|
| `start_key` | in | Start `key_in · coord_in` |
| `start_msg` | in | Start `coord_in ± stored point` |
| `decrypt` | in | Subtract instead of add |
| `msg_reset` | in | Taken while idle. Drops the stored `y`, ending a run of additions. |
| `coord_key` / `done_key` | out | Multiplication result and its one-cycle done pulse |
| `coord_msg` / `done_msg` | out | Addition result and its one-cycle done pulse |
| `busy` | out | The processor is working |
| `received` | out | Pulses the cycle after an addition has taken `coord_in` |
| `illegal_key` | out | Set with `done_key` when the product is the point at infinity |

Starts are accepted only while `busy` is low, and only one start may be high
at a time. Assertions check both rules.

The following inputs are not handled:

- the point at infinity;
- a scalar shorter than 163 bits;
- adding a point to itself or to its negative.

## Control block (`ecpc`)

### Host side: eight write and eight read registers

| Register | Write | Read |
|---|---|---|
| 0–5 | 163-bit operand, word 0 holding bits 31:0 | Last decrypted point |
| 6 | Command `{strobe[31], code[3:0]}` | Notification `{strobe[31], result_valid[9], slot_free[8], code[3:0]}` |
| 7 | Unused | Unused |

A command or notification is new when its strobe bit differs from the previous
one. The host commands are:

| Command | Effect |
|---|---|
| 1 LOAD_KEY | Store the private key `k`. Waits while a queued job still needs the previous key. |
| 2 PUBKEY | Send `k·G` to the MicroBlaze |
| 3 SECRET | Shared secret `k·Q` from a host-supplied `Q` |
| 4 ENCRYPT | Send `M + S` to the MicroBlaze |
| 5 READ_ACK | The decrypted point has been read |
| 6 END | End of a message session |

The notifications are:

| Notification | Meaning |
|---|---|
| 1 ACK | A command was accepted. Every command except READ_ACK gets one. |
| 2 SECRET | The shared secret is ready |
| 3 RESULT | A decrypted point is in registers 0–5 |
| 4 ILLEGAL | A product was the point at infinity. Nothing is sent for it. |

### MicroBlaze side

The input command is `{strobe[11], unused[10:4], code[3:0]}`. The output
command is `{strobe[11], word_index[10:8], unused[7:5], taken_strobe[4], code[3:0]}`.

**From the ECPC to the MicroBlaze.** The ECPC sends a point as six words with
code WORD. It sends each next word only after the MicroBlaze answers with code
ACK and a complemented strobe.

**From the MicroBlaze to the ECPC.** The MicroBlaze sends six words with code
PUBKEY or CIPHER:

- PUBKEY carries a remote public key. The ECPC computes the shared secret and notifies the host.
- CIPHER carries a ciphertext. The ECPC computes `C − S` and gives the result to the host.

The ECPC takes each word the cycle after it arrives. The exception is the
sixth word of a point: it waits while the MicroBlaze job slot is still full.
Bit 4 of the output command echoes the last strobe the ECPC has taken. The
MicroBlaze writes a new command only when that bit matches its own strobe.

### Queueing

One job from the host and one from the MicroBlaze can wait while the processor
is busy. The host's ACK therefore comes back while the previous computation
is still running, and the next input can be sent in parallel.

A job is started only when the destination of its result is free:

- for an encryption or public key, the MicroBlaze stream must be idle;
- for a decryption, the host must have acknowledged the previous result.

When both jobs are ready, the host job goes first.

Host commands, the MicroBlaze command format and the queue are choices of
this RTL. The design description fixes only:

- the eight-register map with one command register;
- the strobe-toggle rule;
- six words per point;
- a per-word acknowledgment towards the MicroBlaze;
- no acknowledgment in the other direction;
- buffering of new input during a computation.

## Top level (`ecc_top`)

`ecc_top` joins `ecpc` and `ec_processor`, with one clock and an active-low
asynchronous reset. Its ports are the host register port and the MicroBlaze
GPIO port. These parts of a full system sit outside it:

- the card-bus controller;
- the MicroBlaze with its GPIO and UART;
- the RS-232 level shifter.

## Departures from the design description and judgement calls

- **Ladder round 1.** `Ax2` is formed from `Z_s`, the Z of the same ladder
  point, as the Montgomery formulas require (`X_s ← X_s⁴ + b·Z_s⁴`). The
  description writes it with the other Z. That variant gives wrong products.
- **The constant `d`.** It is computed as `b^(2^(k−2))`, which satisfies
  `d⁴ = b`.
- **λ in point addition.** It uses the sum `y + y_R`.
- **Divider control.** It follows Brunner's algorithm, with `delta` counted
  down in the shrinking steps.
- **Cycle counts.** See the timing table: the conversion takes 456 cycles, and
  addition has two cycles of overhead.
- **Curve constants and generator.** The NIST B-163 values are used. The field
  polynomial is the one implied by the trace vector and the product-trace
  exponent set.

## Verification

Each block has a self-checking testbench in `tb/`. The reference arithmetic
in `tb/gf_ref_pkg.sv` is independent of the RTL. It uses:

- shift-and-add multiplication;
- Fermat inversion;
- the trace as a sum of conjugates;
- the half-trace;
- affine double-and-add.

| Testbench | What it checks |
|---|---|
| `tb_gf_mult`, `tb_gf_div`, `tb_gf_root` | Random operands against the reference, plus the 43 / 327 / 42-cycle latencies |
| `tb_gf_sqr`, `tb_gf_mulx`, `tb_gf_divx`, `tb_gf_trace_mult`, `tb_ec_point_codec` | Random and single-bit inputs |
| `tb_ec_processor` | A key exchange, random multiplications, scalar 2^162, encryption and decryption with and without `y` recovery, `msg_reset`, `received`, `illegal_key` for n·G, and all cycle counts |
| `tb_ecpc` | The control block with a small processor stand-in: operand routing, result routing, status bits, back-pressure, session end and the infinity report |
| `tb_ecc_top` | The whole design at its default parameters, with host and MicroBlaze models (details below) |
| `tb_ecc_stream` | The two streaming uses, shortened: three (new key, public key) pairs and six encrypted message points, issued back to back |

`tb_ecc_top` runs, in order:

1. Public-key stream.
2. Shared secret from the MicroBlaze.
3. Two back-to-back encryptions, the second queued while the processor is busy.
4. Three decryptions to a slow host.
5. A shared secret from the host.
6. A session end.

It checks every processor job's cycle count. It counts each mechanism and
fails if any never happens.

`tb_ecc_stream` measures the sustained rates with the job queue keeping the
processor busy:

- 14,407 cycles per public key, which is 14,391 plus the hand-over to the MicroBlaze link;
- 1,115 cycles per message point, averaged over six points including one `y` recovery.

A long stream therefore runs at about 1,030 to 1,050 cycles per point. The
exact figure depends on how quickly the MicroBlaze acknowledges words.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_ecc_top \
    rtl/gf2m_pkg.sv tb/gf_ref_pkg.sv rtl/*.sv tb/tb_ecc_top.sv
./obj_dir/Vtb_ecc_top
```

Each testbench ends with a `TB_RESULT checks=N failures=M` line. The
end-to-end run is several tens of thousands of clock cycles: a few seconds of
simulation after a build of under a minute. No parameters need to be reduced.

## Files

| File | Contents |
|---|---|
| `rtl/gf2m_pkg.sv` | Field and curve constants, small field functions, latencies |
| `rtl/gf_mulx.sv`, `rtl/gf_divx.sv`, `rtl/gf_sqr.sv` | Combinational field cells |
| `rtl/gf_mult.sv`, `rtl/gf_div.sv`, `rtl/gf_root.sv`, `rtl/gf_trace_mult.sv` | Field units |
| `rtl/ec_point_codec.sv` | Collapsed-word packing and unpacking |
| `rtl/ec_processor.sv` | Point multiplication and addition |
| `rtl/ecpc.sv` | Host and MicroBlaze register interface, job queue |
| `rtl/ecc_top.sv` | Top level |
| `tb/*.sv` | Testbenches and the reference package |
