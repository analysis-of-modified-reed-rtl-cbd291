# Reconfigurable Reed-Solomon encoder and decoder

Reed-Solomon (RS) codes protect a block of `k` data symbols, each `m` bits wide,
with `2t` parity symbols. The receiver can then repair up to `t` corrupted
symbols per block, wherever they are and however many bits each one has lost.
Most RS cores are built for one code, for example RS(255,223) over GF(2^8).
This design works the other way. The field size `m` and the correction capability `t`
are inputs, set at run time, so one piece of hardware serves every block
length `n = 2^m - 1` from 7 to 255 symbols. The field-dependent constants
(primitive polynomial, powers of the field generator alpha, inverses and
generator-polynomial coefficients) come from look-up tables. These tables are
rebuilt whenever a new configuration is loaded.

| setting | range | intended use |
|---|---|---|
| `m` (field, symbol width) | 3 .. 8 | 6, 7, 8 are the main configurations, 4 is the small reference case |
| `t` (symbols corrected per block) | 1 .. `TMAX` (16), with `2t < n` | 12 .. 16 for the main configurations |
| `n` (block length) | `2^m - 1` | full-length codes only |
| `k` (data symbols) | `n - 2t` | |

All of it is plain synthesizable SystemVerilog. It uses no vendor primitives
and has no hidden state beyond what is described below.

## Code conventions

These conventions decide whether the design interoperates with another RS
implementation, so they come first.

* **Primitive polynomials** (`rs_pkg::prim_poly`):
  m=3 `x^3+x+1`, m=4 `x^4+x+1`, m=5 `x^5+x^2+1`, m=6 `x^6+x+1`,
  m=7 `x^7+x^3+1`, m=8 `x^8+x^4+x^3+x^2+1` (0x11D).
* **Generator polynomial**: `g(x) = (x+alpha^1)(x+alpha^2)...(x+alpha^2t)`.
  The first consecutive root is alpha^1, not alpha^0.
* **Systematic code, highest power first.** Symbol 0 of a block is the
  coefficient of `x^(n-1)`. The `k` data symbols occupy `x^(n-1) .. x^(2t)` and
  are sent unchanged. The parity symbols follow, from `x^(2t-1)` down to `x^0`.
* **Symbols** are carried in 8-bit words. For `m < 8` the upper bits must be
  zero.

Reference vector, RS(15,9) with `m=4` and `t=3`. The data symbols 8, 7, 6, 5, 4, 3, 2, 1, 0
(sent in that order) produce the parity symbols 12, 5, 3, 2, 5, 13. The
generator polynomial is `x^6 + 7x^5 + 9x^4 + 3x^3 + 12x^2 + 10x + 12`. If a
single error turns the first symbol from 8 into 7, the decoder restores it and
reports `error_count = 1`.

## Galois-field arithmetic with a run-time field

All arithmetic is in GF(2^m), where `m` is only known at run time.
`rs_pkg::gf_mul(a, b, p, m)`, wrapped as the module `rs_gf_mul`, therefore
takes the polynomial `p` and `m` as operands. It multiplies shift-and-add,
most significant bit of `b` first. After each shift it clears bit `m` by
XOR-ing in `p`. With `m = 8` this is an ordinary GF(2^8) multiplier. For smaller `m` the
same gates reduce at a lower bit. Every multiplier in the design is of this
kind: roughly 190 in the encoder and decoder together at `TMAX = 16`. This
flexibility has a cost: a multiplier by a fixed constant would be much
smaller.

Two blocks build the tables when `cfg_start` is pulsed:

* **`rs_field_lut`** (decoder side) walks the field once. Per clock it steps
  `u = alpha^i` up by alpha and `d = alpha^-i` down by alpha^-1. It writes
  `inv[u] = d` into a 256 x 8 inverse RAM and keeps `alpha^0 .. alpha^32` in
  registers. Because a primitive polynomial has constant term 1, alpha^-1 is simply
  `p >> 1`. This takes `n` clocks; `ready` follows one clock later.
* **`rs_gen_poly`** (encoder side) starts from `g(x) = 1` and multiplies in one
  factor `(x + alpha^i)` per clock with 32 parallel multipliers. This takes `2t`
  clocks plus one.

The top module's `cfg_ready` is the AND of both. A configuration is therefore
ready `2^m` clocks after `cfg_start`. Loading a new configuration drops any
block that is in progress. `rs_pkg::cfg_ok` states which `(m, t)` pairs are legal. An assertion in the
top module flags an illegal pair in simulation; the logic itself does not
reject one.

## Encoder (`rs_encoder`)

The encoder is the standard division circuit: a linear-feedback shift register
of `2t` parity registers. In each clock of the data phase:

```
fb      = in_data ^ par[2t-1]
par[j]  = par[j-1] ^ fb * g[j]      (par[-1] = 0)
```

Meanwhile the data symbol goes straight to the output. After `k` symbols the
register holds the remainder of `x^2t * M(x) / g(x)`, which is shifted out
highest first. This shift also clears the register for the next block.
Register `2t-1` is picked by a run-time index. Registers above it exist (there
are `2*TMAX`) but are never read.

Handshake: valid/ready on both sides. The output is registered, so it lags by
one clock. `in_ready` is low for exactly `2t` clocks per block while parity
leaves, and whenever `out_ready` holds the output. With `out_ready` high one
codeword symbol leaves per clock, so `n` clocks carry `k` data symbols.
`out_sop` and `out_eop` mark the first and last symbol of each codeword.

## Decoder (`rs_decoder`)

The decoder is a three-stage block pipeline. While block `b` is being
corrected, block `b+1` is in the key-equation solver and block `b+2` is still
arriving.

```
in_data ──► rs_syndrome ──► rs_kes ──► rs_chien_forney ──► out_data
   │        S1..S2t         Λ, Ω, L     Λ(x)=0 ?  e = Ω·x / odd(x)      ▲
   └──────────────► rs_delay_fifo (received symbols) ──────────────────┘
                    rs_field_lut: alpha^j, inverse table, polynomial
```

**Syndromes** (`rs_syndrome`). `S_i = R(alpha^i)` for `i = 1..2t` is computed
by Horner's rule as the symbols arrive: `S_i <- S_i * alpha^i + r`. There are 32
accumulators in parallel. After the `n`-th symbol the results move to a
holding register, and the accumulators start on the next block in the very
next clock.

**Key equation** (`rs_kes`). The error locator `Lambda(x)` comes from the
inversion-free Berlekamp-Massey algorithm, one iteration per clock:

```
delta   = sum_j Lambda_j * S_(r+1-j)
Lambda <- gamma * Lambda + delta * x * B
if delta != 0 and 2L <= r:  B <- old Lambda,  L <- r+1-L,  gamma <- delta
else:                       B <- x * B
```

After `2t` iterations the same discrepancy datapath produces the error
evaluator. `Omega_k = sum_j Lambda_j * S_(k+1-j)` takes one coefficient per
clock for `k < t`, so it needs no extra multipliers. Both polynomials carry
the same unknown factor `gamma`. The factor cancels in the error-value formula,
so the solver never divides. The result, with `L` (the number of errors
`Lambda` claims), is ready `3t` clocks after the syndromes were taken.

**Chien search and Forney** (`rs_chien_forney`). The stage produces one output
symbol per clock. For output symbol `k` (position `p = n-1-k`) it evaluates
`Lambda`, `Omega` and the odd part of `Lambda` at `x = alpha^(k+1) = alpha^-p`.
Each polynomial term has a register that is multiplied by `alpha^j` every
clock. If `Lambda(x) = 0`, symbol `k` is wrong, and its error value for first
root alpha^1 is

```
e = Omega(x) / Lambda'(x) = Omega(x) * x * inv(odd(x)),   odd(x) = x * Lambda'(x)
```

The inverse is read from the field table in the same clock. The delayed
received symbol is XORed with `e` and registered out. A new block is loaded in
the clock of the previous block's last symbol, so blocks leave back to back.

**Delay buffer** (`rs_delay_fifo`). This 1024 x 8 circular buffer holds
received symbols until their corrections are known. At most three blocks are
inside the decoder at once, which is 765 symbols for GF(2^8). An assertion
checks that the buffer never fills.

### Status outputs

`block_start` and `block_end` mark the first and last symbol of each
corrected codeword. The output is the whole codeword, parity included. With
`block_end`, two outputs are updated and then held until the next block ends:

* `error_count` is the number of symbols corrected in that block.
* `fail` is set if the block could not be decoded. That means `L > t` (in that
  case nothing is corrected and the block passes unchanged), or the number of
  roots found differs from `L`, or `Lambda` has a repeated root.

With more than `t` errors a block is usually flagged. As with any bounded-distance RS
decoder, it can instead be miscorrected into a different valid codeword
without `fail`.

### Timing and throughput

* Latency: `block_start` comes `3t + 3` clocks after the clock that took the
  last symbol of the block, provided the pipeline is free. From first symbol in to
  first symbol out this is `n + 3t + 3` clocks.
* Rate: one symbol per clock, blocks back to back, as long as `3t + 1 <= n`.
  That covers every `m >= 6` configuration and, for example, RS(15, 15-2t) up to
  `t = 4`. Otherwise the key-equation solver is the bottleneck: `in_ready`
  drops until it catches up, and no symbol is lost.
* The symbol count gives the block framing. The decoder counts `n` accepted
  symbols per block, from the first symbol after configuration.

## Test system (`rs_codec_top`)

The top module chains encoder, channel and decoder, as in a
transmit-corrupt-receive test set-up:

```
data_in_enc ─► rs_encoder ─► data_out_enc ─► XOR err_in ─► rs_decoder ─► data_out
                                                                         block_start/end
                                                                         error_count, fail
```

One configuration port (`cfg_start`, `cfg_m`, `cfg_t`, `cfg_ready`) drives
both ends. When the decoder drops `in_ready_dec`, the encoder output stalls.
`err_in` is applied to the symbol on `data_out_enc` in every clock where
`out_valid_enc && in_ready_dec`. `in_ready_dec` is brought out so that a
testbench knows which symbol it is corrupting. `data_in_dec` shows the
corrupted symbol as the decoder receives it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TMAX` | 16 | largest `t`: 32 parity registers and syndrome cells, 17 locator terms |
| `DEPTH` | 1024 | delay-buffer entries (power of two, at least `3 * 255`) |
| `rs_pkg::MMAX` | 8 | symbol width, largest `m` |

Size at the defaults after generic synthesis: about 9.6k word-level cells,
2.4k flip-flops and 10 kbit of memory (the inverse RAM and the delay buffer).
The key-equation solver and the encoder are the largest parts.

## Where the design departs from its source description

* **Latency.** The design this RTL follows quotes a configurable latency of
  about `2^m - 2(n-k)` clock cycles. Here it is `n + 3t + 3` clocks, set by the
  pipeline above. The design makes no attempt to match the quoted figure.
* **Block length.** The configurations were described as block lengths of
  "64 to 256 symbols" for `m = 6..8`. These are taken to mean the full-length
  codes `n = 2^m - 1`, i.e. 63 to 255.
* **Shortened codes and `m` up to 16** were described only as possible
  extensions and are not implemented. Only full-length codes with `m <= 8` are
  built.
* **What the tables hold and how they are filled** was not specified. Here one
  ROM holds the primitive polynomials. The other tables are computed when a
  configuration is loaded, so no table for each `(m, t)` pair is stored.
* The **algorithms** are this design's choices: Horner syndromes,
  inversion-free Berlekamp-Massey, Chien search with Forney's formula. So are
  the valid/ready handshakes, the shared configuration port, the `fail`
  rules, the output timing and the primitive polynomials for `m != 4`. The
  source named the decoding stages, the table-driven field constants and the
  status signals.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against `tb/rs_ref_pkg.sv`, an independent model. Its multiplication is a
carry-less product followed by long division, its encoder is polynomial long
division, and its syndromes are direct power sums. Each testbench prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_rs_gf_mul` | every product for every `m` |
| `tb_rs_field_lut` | build time `n+1`, polynomial, alpha powers, every inverse, all `m` |
| `tb_rs_gen_poly` | coefficients for many `(m, t)`, build time `2t+1`, the RS(15,9) vector |
| `tb_rs_encoder` | RS(15,9) vector, random codes with gaps and back-pressure, `2t` parity stall, full rate at RS(255,223) |
| `tb_rs_syndrome` | power-sum syndromes, codewords give zero, back-pressure |
| `tb_rs_kes` | locator degree and roots at the true error positions, Omega, `3t` latency, more than `t` errors |
| `tb_rs_chien_forney` | correction with scaled locators, `fail` on `L > t` and wrong `L`, no gaps between blocks |
| `tb_rs_delay_fifo` | random traffic against a queue, full and empty |
| `tb_rs_decoder` | random codes and errors, `3t+3` latency, full rate at `3t+1 <= n` and stalls beyond it (n=15 with t=4 and t=5, n=7 with t=3) |
| `tb_rs_codec_top` | whole chain at default parameters: RS(15,9) reference case, ramp and triangle data at m=6/7/8, 0..t and more than `t` errors, back-pressure at m=3, reconfiguration; counts each of these |

Simulate one with Verilator 5. The package goes first, then the other design
files, the reference package and the testbench:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rs_pkg.sv tb/rs_ref_pkg.sv $(ls rtl/*.sv | grep -v rs_pkg) \
  tb/tb_rs_codec_top.sv --top-module tb_rs_codec_top -o sim && ./obj_dir/sim
```

The simulations are two-state. Every register is reset, and each memory
entry is written before it is read.
