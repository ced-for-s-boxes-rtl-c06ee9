# Concurrent error detection for the PP-1 S-box with two parity bits

An 8×8 S-box is normally a 256 × 8 look-up memory. Fault attacks on a cipher
work by disturbing such a look-up (a flipped address line, a corrupted memory
cell, a glitch on the output bus) and then studying the faulty ciphertext. This
design detects such faults while the S-box is in use. The memory is widened to
256 × 10 bits. The two extra columns hold, for every row, a parity bit of the
row's **address** and a parity bit of the row's **contents**. Two parity
generators and two XOR comparators check every look-up against these stored
bits in the same cycle. No second copy of the S-box and no second look-up are
needed. The cost is 512 memory bits (25 %) and a few XOR gates per S-box.

The protected S-box is placed in the nonlinear layer of the PP-1 block cipher.
PP-1 is a scalable SP-network for small devices. Its S-box is an involution
(S(S(x)) = x), and each round keys its bytes with XOR, addition and
subtraction modulo 256 around the S-boxes.

## How the two checks work

Each row `x` of the memory (`rtl/sbox_mem.sv`) holds

| field     | bits | contents            |
|-----------|------|---------------------|
| `par_in`  | 1    | parity of `x`       |
| `par_out` | 1    | parity of `S(x)`    |
| `data`    | 8    | `S(x)`              |

`rtl/ced_sbox.sv` computes:

* **input check**, `err_in = parity(x) ^ par_in[row read]`. The parity is taken
  from the byte presented at the S-box input, before the address decoder. If a
  fault makes the memory deliver a row other than `x`, the stored `par_in` is
  the parity of the wrong address. The check fires whenever the wrong address
  differs from `x` in an odd number of bits. A flip of the stored `par_in` cell
  also fires it.
* **output check**, `err_out = parity(y) ^ par_out[row read]`. The parity is
  taken from the byte that leaves the S-box. It fires when the data columns of
  the row, or the output bus after the memory, carry an odd number of wrong
  bits. A flip of the stored `par_out` cell also fires it.

`err = err_in | err_out`. Both partial flags are also brought out.

An address fault is invisible to the output check: a wrong row is internally
consistent. An output fault is invisible to the input check. That is why two
stored bits are needed. A single output-parity column (the usual single-parity
scheme) cannot see address faults at all.

### What is not detected

Parity sees only odd-weight errors. An even number of flipped address bits, or
an even number of wrong data bits in one read, goes through. Stuck-at faults
can also be invisible: a bit stuck at the value it already holds causes no
error. For a transient fault on a single access that happens about half the
time. `tb/ced_fault_campaign_tb.sv` measures all of this; typical numbers from
its output are:

| fault class (one S-box)                         | detected / injected |
|-------------------------------------------------|---------------------|
| single bit flip, any location, transient or permanent | 100 %        |
| single stuck-at-0/1, transient (one access)     | ≈ 48–50 % (every fault that changed the value read was caught) |
| single stuck-at-0/1, permanent, over all 256 inputs | ≈ 80 % overall; 100 % on input and output lines, ≈ 40–55 % for one memory cell |
| 2 or 4 flipped address or output bits           | 0 %                 |
| 3 or 5 flips                                    | 100 %               |
| multiple stuck-at faults on input/output, permanent | 100 %           |

The permanent stuck-at numbers depend on where the fault sits. A stuck
address or output line takes effect for many inputs, and some of those
errors have odd weight, so it is always caught. A single stuck memory cell
either already holds its stuck value (no error, never caught) or differs by
one bit (always caught). The originally reported figures for this scheme
give 100 % for permanent faults of every multiplicity. This model reaches
that only for faults on the input and output lines. For even numbers of
simultaneous bit flips it reaches 0 %, by the nature of parity.

## The S-box function

`S(0) = 0` and `S(x) = x⁻¹` in GF(2⁸), with the field defined by the primitive
polynomial `POLY` (default `9'h11D`, i.e. x⁸+x⁴+x³+x²+1). The inverse is an
involution, as PP-1 needs. The table is generated at elaboration by walking
the powers gⁱ of the generator g = 0x02 and storing g^(255−i) in row gⁱ. Any
primitive polynomial can be used; one that is irreducible but not primitive
(for example the AES polynomial 0x11B) cannot, because 0x02 is then not a
generator.

The S-box of the real PP-1 cipher is also built from a GF(2⁸) inverse. It is
reported to have nonlinearity 110, whereas the plain inverse has 112. The real
PP-1 table therefore differs in a detail that is not reproduced here. Put the
real table into `sbox_mem` if bit-exact PP-1 is needed. The CED scheme does
not depend on the table's contents.

## Where the S-boxes sit: NL element and round layer

A PP-1 round on an n-bit block runs t = n/64 identical 64-bit paths **NL** in
parallel and then applies an involutive n-bit bit permutation **P**. Each NL
(`rtl/nl_element.sv`) splits its 64 bits into eight byte lanes. Lane 0 is the
most significant byte.

| lane               | 0   | 1   | 2   | 3   | 4   | 5   | 6   | 7   |
|--------------------|-----|-----|-----|-----|-----|-----|-----|-----|
| before S, with k′  | xor | add | xor | sub | sub | xor | add | xor |
| after S, with k″   | xor | sub | xor | add | add | xor | sub | xor |

`add`/`sub` are modulo 256, and `sub` is *data − key*. The tables are
`PRE_OPS`/`POST_OPS` in `rtl/pp1_pkg.sv`. Every S-box is a `ced_sbox`, and the
NL reports the eight flags (`err_lane`, MSB = lane 0) and their OR.

`rtl/pp1_ced_round.sv` is the top. It instantiates t NL elements; NL 0 takes
the most significant 64 bits of `x`, `k1` (k′ = k₂ᵢ₋₁) and `k2`
(k″ = k₂ᵢ). It registers their n-bit output `v` together with one error bit
per S-box.

### Top interface and timing

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | synchronous, active-low reset |
| `in_valid`  | in  | 1     | `x`, `k1`, `k2` are sampled this cycle |
| `x`         | in  | N     | round input |
| `k1`, `k2`  | in  | N     | the two round keys |
| `out_valid` | out | 1     | high one cycle after `in_valid` |
| `v`         | out | N     | NL-layer result, the value that permutation P takes |
| `err_sbox`  | out | N/8   | per-S-box CED flag, MSB = most significant byte of `v` |
| `err`       | out | 1     | OR of `err_sbox` |

Latency is one clock and a new block is accepted every clock. `v` holds its
value in idle cycles, and `err` is low in idle cycles. Parameters: `N`
(default 64, any multiple of 64) and `POLY`.

## What is not included

* **Permutation P.** Only its size and its involution property are known here,
  not its bit mapping, so `v` is a port and P must be added outside.
* **Key schedule, round count r, round iteration and output transformation.**
  Round keys are inputs. Decryption uses the same hardware with the round keys
  in reverse order, because S and P are involutions.
* **The schemes this one is usually compared with** are not built: a single
  output-parity bit, and recomputation using the involution S(S(x)) = x, which
  costs a second look-up.

Choices that are this design's own, not fixed by the scheme: even parity (odd
parity would detect exactly the same errors); asynchronous memory read; the
byte order and the data − key order of subtraction; the output register, the
valid handshake and the reset; the OR of the flags; N = 64 by default; and
`POLY`.

## Files

| file | contents |
|------|----------|
| `rtl/pp1_pkg.sv` | shared types (`sbox_word_t`, `lane_op_e`), lane operation tables, GF helpers |
| `rtl/parity_gen.sv` | W-bit parity generator |
| `rtl/sbox_mem.sv` | 256 × 10 S-box memory, table generated from `POLY` |
| `rtl/ced_sbox.sv` | S-box with the two parity checks |
| `rtl/nl_element.sv` | 64-bit NL element with eight CED S-boxes |
| `rtl/pp1_ced_round.sv` | top: t NL elements and the output register |
| `tb/gf_ref_pkg.sv` | independent reference model (carry-less multiply, inverse by search, NL) |
| `tb/*_tb.sv` | one self-checking testbench per module, plus the ones below |
| `tb/pp1_ced_round_tb.sv` | top at its default size: random stream with idle cycles, resets and injected memory faults |
| `tb/pp1_ced_round_wide_tb.sv` | the same at N = 128 (two NL paths) |
| `tb/ced_fault_campaign_tb.sv` | fault-coverage campaign: flip / stuck-at-1 / stuck-at-0, 1–5 faulty bits, input / output / memory, transient / permanent |

The testbenches inject faults by writing into the memory array through
hierarchical references (`dut.u_mem.mem[...]`). All three fault locations are
modelled that way. An address fault makes row x hold the contents of the
faulty address. An output fault corrupts the data column but keeps the stored
parities. A memory fault corrupts the row.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pp1_pkg.sv tb/gf_ref_pkg.sv tb/pp1_ced_round_tb.sv \
    --top-module pp1_ced_round_tb -o sim
./obj_dir/sim
```

Substitute any other testbench name. Each one prints
`TB_RESULT checks=<n> failures=<m>` at the end, and the campaign testbench
also prints its coverage table. All of them run in a few seconds.
