# Reversible PROM: half and full adder/subtracter and Boolean functions from a reversible decoder

A programmable read-only memory (PROM) is a fixed AND array (a decoder that raises one line per
input minterm) followed by a programmable OR array (fuses that connect chosen minterm lines to
each output). This design builds that structure entirely from *reversible* gates: gates with as
many outputs as inputs, whose input can always be recovered from their output. Fan-out is not
allowed in such logic, so every copy of a signal is made explicitly by a Feynman (CNOT) gate, and
every gate output that is not needed stays as a "garbage" line instead of being erased.

Three circuits are built as programmed reversible PROMs:

| circuit | PROM | programming (minterms, first input bit most significant) |
|---|---|---|
| half adder / half subtracter | 4x3 | Sum/Diff = m(1,2), Carry = m(3), Borrow = m(1) |
| full adder / full subtracter | 8x3 | Sum/Diff = m(1,2,4,7), Carry = m(3,5,6,7), Borrow = m(1,2,3,7) |
| five Boolean functions | 16x5 | F1 = m(0,1,10,11), F2 = m(9,11,12,13), F3 = m(0,2,14,15), F4 = m(3,5,6,7), F5 = m(5,6,8,10) |

An adder and a subtracter share one PROM because sum and difference are the same XOR. Only
carry and borrow differ, and each is simply one more output column.

All logic is combinational; there is no clock and no reset.

## Reversible gate library

| module | lines | function |
|---|---|---|
| `not_gate` | 1 | P = A' |
| `feynman_gate` | 2 | P = A, Q = A ^ B (B = 0 copies A) |
| `fredkin_gate` | 3 | P = A; B and C swap when A = 1 (Q = A'B ^ AC, R = A'C ^ AB) |
| `peres_gate` | 3 | P = A, Q = A ^ B, R = AB ^ C |
| `tr_gate` | 3 | P = A, Q = A ^ B, R = AB' ^ C |

A Fredkin gate with its middle input tied to 0 acts as a switch. Fredkin(E, 0, X) gives
Q = E & X and R = ~E & X. Both the fuse and the decoder are built on that.

## The reversible fuse (`rev_mux`, `rev_fuse`)

`rev_mux` is a single Fredkin gate, Fredkin(E, 0, X). `rev_fuse` puts a Feynman gate in front of
it. The Feynman gate copies the row signal A, and the copy X goes into the mux:

```
A ──[Feynman, 0]──┬── P (row continues to the next fuse)
                  └── X ──[Fredkin E,0,X]── Q = A & E   (to the output column)
                                            e_out = E, g1 = A & ~E (garbage)
```

The enable E is the fuse. E = 1 means "connected" and E = 0 means "open", and the fuse can be
reprogrammed at any time. Its cost is 1 + 5 = 6 with two garbage lines.

## The decoder tree (`rev_dec2to4`, `rev_dec_stage`, `rev_dec3to8`, `rev_dec4to16`)

This is the subtle part of the design.

**2:4 decoder.** Input A = i[1] and B = i[0]. The decoder is built from one Peres, one TR, one NOT
and two CNOT gates, wired so that no line fans out and no garbage is left:

```
Peres(A, B, 0)   -> A,   A^B, AB      AB = out[3]
TR(A^B, A, 0)    -> A^B, B,   A'B     since (A^B)&~A = A'B
CNOT(A'B -> A^B) -> AB'               A'B passes on as out[1]; AB' = out[2]
NOT(B)           -> B'
CNOT(AB' -> B')  -> B' ^ AB' = A'B'   out[0]
```

Four lines go in (A, B and two constant 0s) and four decoded lines come out.

**Doubling stage.** `rev_dec_stage #(M)` turns an M-line one-hot decoder output into 2M lines
using one more input bit c. Each line k goes through Fredkin(c, 0, line_k). The gate's Q output
(c & line_k) becomes out[2k+1] and its R output (~c & line_k) becomes out[2k]. The control c is
not fanned out: it passes from gate to gate, through each gate's P output. It leaves the last gate
as one garbage line.

- `rev_dec3to8` is a 2:4 decoder on i[2:1] plus a 4-gate stage on i[0].
- `rev_dec4to16` is a 3:8 decoder on i[3:1] plus an 8-gate stage on i[0].

In every decoder, out[m] = 1 exactly when i = m.

## OR columns (`rev_or2`, `rev_or`)

- **`rev_or2`.** A Peres gate with its third input at 0 gives A ^ B and AB. A CNOT then adds them:
  A ^ B ^ AB = A | B. The cost is 4 + 1 = 5, with two garbage lines.
- **`rev_or #(N)`.** Chains N-1 of these. The default is N = 8; the PROM sets N = 2**N_IN.

An open fuse drives 0 into its OR input, which leaves the OR result unchanged.

## The generic PROM (`rev_prom`)

`rev_prom #(N_IN, N_OUT)` combines:

- the decoder for N_IN = 2, 3 or 4;
- a full N_OUT x 2**N_IN array of `rev_fuse`;
- one `rev_or` per output.

Each decoder line runs along its row through the Feynman copy of every fuse. The lines that come
out of the end of each row are brought out as `row_out`; they equal the decoder's one-hot output.
The program is the input `fuse_en[k][m]`, which connects minterm m to output k. As a result:

    out[k] = fuse_en[k][in]

The programmed circuits `rev_half_addsub`, `rev_full_addsub` and `rev_bool_prom` tie `fuse_en` to
the fuse maps in `rev_pkg`. Bit m of each map is 1 when minterm m belongs to that output.
`rev_prom_top` places the three circuits side by side:

| port | width | meaning |
|---|---|---|
| `ha_in` | 2 | A = ha_in[1], B = ha_in[0] |
| `ha_sumdiff`, `ha_carry`, `ha_borrow` | 1 each | A^B, AB, A'B |
| `fa_in` | 3 | A = fa_in[2], B = fa_in[1], carry/borrow in = fa_in[0] |
| `fa_sumdiff`, `fa_carry`, `fa_borrow` | 1 each | sum or difference, carry of A+B+Cin, borrow of A-B-Bin |
| `bf_in` | 4 | bf_in[3] is the most significant minterm bit |
| `bf_f` | 5 | bf_f[0] = F1 ... bf_f[4] = F5 |

To program a different function:

- write a new mask into the `fuse_en` input of a `rev_prom` instance, or
- instantiate `rev_prom` directly and drive `fuse_en` at run time.

## Where this design departs from the circuits it follows

- **Full fuse array.** The published circuits draw a fuse only at the crossings they use, plus a
  few spares; for example, 14 fuses with 12 used in the full adder/subtracter. Here every crossing
  has a fuse and the unused ones are disabled, so any program can be loaded. Every OR column also
  has 2**N_IN inputs. As a result, the quantum cost is higher than the published figures. Counting
  Peres/TR 4, Fredkin 5, CNOT 1 and NOT 0, the costs are:

  | circuit | this design | published |
  |---|---|---|
  | half adder/subtracter | 127 | 50 |
  | full adder/subtracter | 279 | 72 |
  | 16x5 PROM | 925 | 278 |

- **2:4 decoder wiring.** The gate types match the published decoder. The wiring is this design's
  own: it uses two CNOTs instead of three, two constant inputs instead of three, and leaves no
  garbage lines. The published decoder is stated to have quantum cost 11 and 3 garbage outputs;
  this one has cost 10, which makes the 3:8 decoder 30 and the 4:16 decoder 70 (published: 31
  and 71).
- **Decoder control lines.** In the Fredkin stages the control bit is chained from gate to gate.
  The published simulations show one copy of it per gate instead.
- **Structure of the OR gate.** The published OR gate is given only by its function, with cost 5
  and 2 garbage lines. The Peres + CNOT structure used here is chosen to match those numbers.
- **Garbage lines.** The garbage lines inside `rev_prom` are left unconnected. Lint tools report
  them as unused signals; this is expected.
- **Timing results.** Published FPGA delays (about 5.3 to 5.5 ns) and slice counts come from a
  vendor flow and are not modelled.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.

- **Gates.** All input patterns are checked against an independent description of each gate, and
  the mapping is checked to be one-to-one.
- **Decoders.** Every input is checked to raise only its own line.
- **`rev_prom`.** The PROM is run at all three decoder sizes with random, all-open and all-closed
  fuse maps, over every address.
- **Adders/subtracters.** Every input is checked against integer addition and subtraction, and
  against the published truth tables.
- **Boolean PROM.** Every input is checked against the minterm lists and the published table rows.
- **`tb_rev_prom_top`.** Runs all 512 combinations of the three circuits' inputs at the default
  configuration. It counts carries, borrows, each asserted function and rows blocked by an open
  fuse, and fails if any of these never happens.

To run a testbench with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv -y rtl \
        tb/tb_rev_prom_top.sv --top-module tb_rev_prom_top -Mdir obj
    ./obj/Vtb_rev_prom_top

The same command works for any other testbench: replace the file and top-module name.
