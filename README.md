# Montgomery RSA exponentiator with carry-save multiplier and word-serial adder

This design computes the RSA operation `M^e mod N` for a 1024-bit modulus. It reuses a single
Montgomery modular multiplier for every step. The multiplier keeps its running value in
carry-save form, so no carry has to ripple across 1024 bits during the loop. It turns the result
back into binary with a 32-bit adder used 32 times, not a 1024-bit adder. The multiplier divides
by `R = 2^(n+2)`, two bits more than the modulus width. With that choice no multiplication needs
a final compare-and-subtract, and every result can go straight back in as an operand.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has been checked with Verilator 5
(lint and simulation) and with the slang front end of Yosys.

## Top-level behaviour

`rsa_modexp` (parameters `N_BITS = 1024`, `WORD = 32`, `E_BITS = N_BITS`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse to begin |
| `m` | in | N_BITS | plaintext, `M < N` |
| `e` | in | E_BITS | exponent |
| `n` | in | N_BITS | modulus, must be odd, `N < 2^N_BITS` |
| `r2` | in | N_BITS | `R^2 mod N = 2^(2*N_BITS+4) mod N`, computed by the user |
| `result` | out | N_BITS | `M^e mod N`, valid from `done` until the next `start` |
| `mont_m` | out | N_BITS+1 | `M*R mod N` (the plaintext in Montgomery form, below 2N) |
| `busy`, `done` | out | 1 | running; one-cycle pulse at the end |

Hold `m`, `e`, `n` and `r2` stable from `start` until `done`. They are used in place and not
copied. `r2` depends only on `N`, so a key needs it only once. It must be computed outside the
design, for example in software.

## How the exponentiation is sequenced

Write `MMM(A, B) = A*B*R^-1 mod N`, which is what the multiplier computes. The sequencer
(`modexp_ctrl`) runs:

```
M' = MMM(M, R^2 mod N)            -- M*R mod N, plaintext mapped into Montgomery form
S  = MMM(R^2 mod N, 1)            -- R mod N, "1" in Montgomery form
for i = E_BITS-1 downto 0:
    S = MMM(S, S)
    if e[i] == 1: S = MMM(S, M')
S  = MMM(S, 1)                    -- back out of Montgomery form: S = M^e mod N
```

S starts as the Montgomery form of 1, not as M. So the loop needs no special case for the
exponent's leading bit, and `e = 0` works (the result is 1). The cost is a fixed
`3 + E_BITS + popcount(e)` multiplications, at most `2*E_BITS + 3`. The exponent is scanned from
its most significant bit, as square-then-multiply requires.

Datapath around the multiplier:

- `operand_mux`: two multiplexers choose operands A and B from M, the constant 1, `R^2 mod N`, the
  running result S and M'. Two registers hold the chosen operands through the whole
  multiplication.
- `result_demux`: each result is written either to the M' register or to the S register. Both
  registers feed back into `operand_mux`.
- `modexp_ctrl`: each multiplication has three phases. LOAD takes the operands into their
  registers, GO pulses the multiplier's start, and WAIT waits for its done, when the result is
  routed.

## The Montgomery multiplier (`mmm`)

This block needs the most care. The multiplier runs `n+2` iterations of radix-2 Montgomery
multiplication. Bit `a_i` of A is taken least significant bit first. The value S is held as two
registers, SS (sum) and SC (carry), with `S = SS + SC`. One iteration is one clock:

1. The first carry save adder computes `SS + SC + a_i*B = s1 + 2*c1`.
2. `q = s1[0]` is the parity of that sum. The shifted carry vector `2*c1` has a zero LSB, so
   `s1[0]` alone decides it.
3. The second carry save adder adds `q*N`: `s1 + 2*c1 + q*N = s2 + 2*c2`. N is odd, so this sum
   is even and `s2[0] = 0`.
4. The sum is halved: `SS <= s2 >> 1`, `SC <= c2`.

**Why no final subtraction is needed.** If `A, B < 2N` and `R = 2^(n+2) > 4N`, the result
`(A*B + Q*N)/R` with `Q < R` is below `N*(4N/R + 1) < 2N`. So every result is a valid input for
the next multiplication. Only the last step, `MMM(S, 1)`, brings the value into `[0, N]`, and it
equals N only if `S ≡ 0 (mod N)`, which a plaintext coprime to N never gives. Inside an
iteration the carry-save value stays below `5N`, so SS and SC are `n+3` bits wide.

**Conversion.** After the loop `SS + SC < 2N < 2^(n+1)`, so SS and SC are each below `2^(n+1)`.
`mcpa` adds their low `n` bits. Bit `n` of the result is `SS[n] ^ SC[n] ^ carry_out`. This sum
cannot carry further, because the total fits in `n+1` bits.

Two assertions in `mmm` check these claims during simulation: each halved sum is even, and SS
and SC fit in `n+1` bits before conversion.

## The word-serial adder (`mcpa`, `sipo_shift_reg`)

`mcpa` adds two `WORD*WORDS`-bit vectors (32 x 32 = 1024 bits by default) with one `WORD`-bit
adder:

- Two multiplexers, driven by a `log2(WORDS)`-bit word select (5 bits), pick word k of each
  operand.
- Two input registers hold the two words.
- The adder adds them plus the carry register. Its carry out is stored for word k+1.
- The 32-bit sum word is shifted into `sipo_shift_reg`. This is a chain of 32 registers of 32
  bits. A word enters register 1 and moves one register on each shift. All registers together
  form the 1024-bit output. Register 1 is the most significant word, so after 32 shifts of a
  stream sent least significant word first the output is in order.

The carry register is cleared at `start`. Words go least significant first.

## Timing

| step | cycles (defaults) | formula |
|---|---|---|
| word-serial addition | 33 | `WORDS + 1` (32 words plus the input-register stage) |
| one Montgomery multiplication, `start` to `done` | 1060 | `1 + (n+2) + (WORDS+1)` |
| one multiplication inside the exponentiator | 1062 | the above plus LOAD and GO |
| full exponentiation, `start` to `done` | `1 + (1027 + popcount(e)) * 1062` | at most 2,178,163 for a 1024-bit e |

A textbook count for this scheme is `n+2+32` cycles per multiplication. This implementation adds
two cycles: one to accept `start` and clear SS/SC, and one for the input registers in front of the
32-bit adder.

## Departures and choices

- **Mapping constant.** One way to state the algorithm maps with `MMM(M, R mod N)` and
  initialises with `MMM(R mod N, 1)`. That returns M and 1, not their Montgomery forms. This
  design takes `R^2 mod N` as input instead, which gives `M*R mod N` and `R mod N` as needed.
- **Exponent bit order.** The exponent is scanned most significant bit first, as above.
- **Exponent width.** `E_BITS` defaults to the modulus width, since an RSA private exponent is
  below N.
- **Clock control.** The reference architecture has a "clock control" block whose function is not
  specified. This design has no such block: it runs on one free-running clock, and all
  sequencing is in `modexp_ctrl`.
- **Handshakes, encodings and reset.** The start/busy/done handshakes, the select codes (in
  `rsa_pkg`), the shift enable and clear of the shift register, and the asynchronous active-low
  reset to zero of all registers are this design's own choices.
- **Widths.** The SS/SC widths (`n+3`), the extra result bit beside the 1024-bit adder, and
  operands of `n+1` bits are derived from the `< 2N` bound above. They are not taken from a
  specification.
- **Not included.** Computing `R^2 mod N`, loading operands through a narrow bus, and any key
  handling are outside the design.

## Files

`rtl/`:

| file | contents |
|---|---|
| `rsa_pkg.sv` | default sizes, operand-source and result-destination enums |
| `rsa_modexp.sv` | top level |
| `modexp_ctrl.sv` | exponentiation sequencer |
| `operand_mux.sv` | operand multiplexers and operand registers |
| `result_demux.sv` | result routing and result registers |
| `mmm.sv` | carry-save Montgomery multiplier |
| `csa.sv` | carry save adder |
| `mcpa.sv` | word-serial carry propagation adder |
| `sipo_shift_reg.sv` | word shift register |

`tb/`: each testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_csa` | `x+y+z == s+2c` on random and corner vectors |
| `tb_sipo_shift_reg` | against a reference model; word order; clear |
| `tb_mcpa` | sum and carry against full-width `x+y`, including a carry through every word; latency 33 |
| `tb_mmm` | at n = 1024: `S*2^(n+2) ≡ A*B (mod N)`, `S < 2N`, latency 1060; random and corner operands |
| `tb_modexp_ctrl` | the list of requested multiplications against the one derived from e, with a stand-in multiplier |
| `tb_operand_mux`, `tb_result_demux` | every source and destination; holding |
| `tb_rsa_modexp` | end to end at n = 64: textbook RSA pair (N = 3233, e = 17, d = 2753), e = 0, e = 1, all-ones e, random cases; multiplication and cycle counts; counts each mechanism (mapping, initialisation, squaring, multiply on 1 bits, skip on 0 bits, remapping, both result routes, carries between adder words) and fails if one never occurs |
| `tb_rsa_modexp_full` | default parameters (1024-bit N and e): e = 65537 and a random 1024-bit e against plain binary exponentiation; exact cycle counts (1,092,799 and 1,643,977 for the seeds used); a few seconds in Verilator |

The reference values in every testbench come from plain wide-integer arithmetic (`*` and `%`),
not from Montgomery arithmetic.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rsa_pkg.sv tb/tb_rsa_modexp_full.sv --top-module tb_rsa_modexp_full -o sim
./obj_dir/sim
```

To change the size, override `N_BITS` (a multiple of `WORD`), `WORD` and `E_BITS` on
`rsa_modexp`. `tb_rsa_modexp` shows a reduced instance.
