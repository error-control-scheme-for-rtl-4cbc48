# RSPC error control for DVD with inner erasure decoding

A DVD sector block is protected by a Reed-Solomon product code (RSPC). Every row of
the block is an RS(182,172) codeword and every column an RS(208,192) codeword. A
conventional decoder corrects at most 5 unknown byte errors per row, and hands rows it
cannot correct to the column decoder as erasures. This design also uses what the
EFMPlus demodulator already knows. A 16-bit channel word that is not in the
demodulator's code table is certainly wrong, so the demodulator flags the byte. The row
decoder treats flagged bytes as erasures, and a row with up to 10 flagged bytes becomes
correctable instead of 5. For the whole block:

| | rows only errors | rows with flagged bytes |
|---|---|---|
| longest correctable burst | 182·16 + 5·2 = 2922 bytes | 182·16 + 10·2 = 2932 bytes |
| most correctable bytes | 182·16 + 5·192 = 3872 bytes | 182·16 + 10·192 = 4832 bytes (+25 %) |

The design is written in SystemVerilog (IEEE 1800-2017). It contains the RSPC encoder,
the RSPC decoder and, as the core of both code directions, a three-stage pipelined
errors-and-erasures RS decoder. That RS decoder uses a symbol-serial, inverse-free
Berlekamp-Massey solver built on three field multipliers.

## Field and codes

- All arithmetic is in GF(2^8) with primitive polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1
  (0x11D), primitive element α = 0x02 (`rtl/gf_pkg.sv`).
- The generator polynomial of both codes is g(x) = ∏_{i=0}^{n-k-1} (x + α^i), so the
  first root is α^0. This choice comes from the DVD format; the RTL computes every
  constant from it at elaboration.
- Encoding order: 16 PO (outer parity) bytes are appended to each of the 172 columns of
  the 192 × 172 data field. Then 10 PI (inner parity) bytes are appended to each of the
  208 rows. The block is recorded, and therefore read back, row by row. Within a
  codeword the first byte is the coefficient of x^(n-1).

```
          172 bytes         10
      +-------------------+----+
 192  |      data         | PI |   each row:    RS(182,172), d = 11
      +-------------------+----+
  16  |       PO          | PI |   each column: RS(208,192), d = 17
      +-------------------+----+
```

## RSPC decoder (`rspc_decoder`)

The decoder works on one block at a time and runs through three phases:

1. **Rows.** The 37 856 bytes enter row by row with their demodulator flags and pass
   through an RS(182,172) decoder (`rs_decoder #(182,172)`). A row is corrected when
   ρ + 2ν ≤ 10, where ρ is the number of flagged bytes and ν the number of unflagged
   bad bytes. A row with more than 10 flags is not decoded at all. The 172 data/PO bytes
   of each row are stored in a 208 × 172 block buffer, and each row gets a "failed" bit
   if decoding was impossible.
2. **Columns.** Each column is read from the buffer and passes through an
   RS(208,192) decoder (`rs_decoder #(208,192)`), with the failed-row bits as erasures
   (ρ + 2ν ≤ 16). The 192 corrected data bytes are written back into the buffer.
3. **Output.** The 192 × 172 data bytes leave row by row. `out_erasure` marks bytes
   whose column could not be corrected.

`inner_fail_rows` and `outer_fail_cols` report, per block, how many rows and columns
failed. The phases do not overlap, so one block takes about
208·(182+1) + 172·(208+1) + 33 024 ≈ 108 000 cycles with few erasures. Overlapping
blocks would need a second buffer; this design leaves it out.

## RS decoder pipeline (`rs_decoder`)

```
 in_data ─┬──────────────── rs_fifo (3N symbols) ─────────────────────┐
          │                                                            ▼
 in_era ──┴─► rs_syndrome ──S,Γ,ρ──► rs_keyeq_bm ──Ψ,Ω,L──► rs_chien_forney ─► out_data
              stage 1                 stage 2                stage 3          out_fail
```

Each stage holds a different codeword. All three are sized to finish in about
N + (N−K) cycles, so no stage limits the others:

| stage | work | cycles, RS(208,192) |
|---|---|---|
| 1 `rs_syndrome` | Horner syndromes while the N symbols stream in, then Γ(x) = ∏(1+β_j x) one erasure per cycle on the same N−K multipliers | N + ρ + 1 ≤ 225 |
| 2 `rs_keyeq_bm` | initial discrepancy, BM iterations, Ω(x) | ≤ 221 (at ρ = 0) |
| 3 `rs_chien_forney` | Chien search, Forney values, correction | N + 2 = 210 |

A new codeword can be taken every N + ρ + 1 cycles. At 100 MHz that is
8 bit · 208/225 · 100 MHz ≈ 740 Mbit/s in the worst case (16 erasures), and ≈ 796 Mbit/s
without erasures. `in_ready` drops while stage 1 expands Γ or waits for stage 2. The
output cannot be stalled: once stage 3 starts, it delivers N symbols on N consecutive
cycles. `out_fail`, valid with `out_last`, is set when:

- there are more than N−K erasures (stage 1), or
- ρ + 2ν = 2L − ρ exceeds N−K (stage 2), or
- the number of roots found in the N positions differs from L, meaning a root lies
  outside the shortened code (stage 3).

Stage 3 streams its output, so the third case is only known after the codeword has left.
The row decoder's corrections are then useless but harmless, because the row is also
flagged as an erasure for the columns. A column that fails this way may have been
written back with wrong corrections. Its bytes are flagged by `out_erasure` either way.

### Stage 1: syndromes and erasure locator

Syndrome S_i = R(α^i) for i = 0..N−K−1 is accumulated as S_i ← S_i·α^i + r. In
parallel, a register steps through α^(N−1), α^(N−2), … with each symbol. When a symbol
is flagged, that value (its locator β) is stored in a small buffer of N−K entries.
After the last symbol, the N−K multipliers switch from "syndrome · α^i" to
"Γ_{m−1} · β": Γ_m ← Γ_m + β·Γ_{m−1}, one erasure per cycle.

### Stage 2: symbol-serial inverse-free Berlekamp-Massey

This stage is the hardest part to follow. It solves S(x)·Ψ(x) ≡ Ω(x) mod x^(N−K) for the
errata locator Ψ (errors and erasures together) without a field inverter, handling one
polynomial coefficient per cycle with three multipliers.

Start: Ψ = B = Γ, register length L = ρ, γ = 1. Then:

1. **Δ_ρ = Σ_j Γ_j S_{ρ−j}**, one product per cycle, ρ+1 cycles.
2. **Iterations q = ρ … N−K−1**, each q+3 cycles (the degree of Ψ is at most q+1).
   The swap decision `swap = Δ_q ≠ 0 and 2L ≤ q + ρ` is known when the iteration
   starts. In cycle j:
   - multiplier 1 and 2: Ψ_j ← γ·Ψ_j + Δ_q·B_{j−1}
   - B_j ← swap ? old Ψ_j : old B_{j−1}
   - multiplier 3, one cycle later from a register holding the new Ψ_j:
     Δ_{q+1} += Ψ_j·S_{q+1−j}

   The discrepancy of the next iteration is therefore ready when the current one ends,
   with no separate pass. On a swap, γ ← Δ_q and L ← q + 1 + ρ − L.
3. **Ω_i = Σ_{j≤i} Ψ_j S_{i−j}**, i = 0 … N−K−1, with all three multipliers, three
   terms per cycle (51 cycles at N−K = 16).

Because γ replaces division, Ψ and Ω come out multiplied by the same nonzero constant.
The constant cancels in the Forney ratio. Because the new Ψ_j is registered before it
is multiplied again, no path crosses more than one multiplier; the cost is one extra
cycle per iteration. Total time after acceptance:
(ρ+1) + Σ_{q=ρ}^{N−K−1}(q+3) + Σ_i ⌈(i+1)/3⌉ + 1, at most 221 cycles for
RS(208,192) and 99 for RS(182,172).

### Stage 3: Chien search and Forney

For each coefficient k, a register holds Ψ_k·α^(−k·p) for the current position p. It
starts at p = N−1 and is multiplied by the constant α^k each cycle; Ω is handled the
same way. Position p holds an errata when Ψ(α^−p) = 0. With first root α^0, the value
is

  e_p = α^p·Ω(α^−p) / Ψ'(α^−p) = Ω(α^−p) / Ψ_odd(α^−p)

where Ψ_odd is the sum of the odd-degree terms, which the Chien search produces anyway.
The sums, the zero test and the buffered symbol are registered. The next cycle looks up
1/Ψ_odd in a 256-entry ROM (`gf_inv_rom`, contents computed as a^254), multiplies it
by Ω, gates the result with the zero test and adds it to the symbol.

## RSPC encoder (`rspc_encoder`) and top (`rspc_codec`)

`rspc_encoder` loads the 192 × 172 data field. It then runs every column through an
LFSR `rs_encoder #(208,192)` and writes the 16 PO bytes under the column. Finally it
sends every row through `rs_encoder #(182,172)`, which appends PI: 37 856 bytes, row by
row, with no back-pressure. A block takes 33 024 + 172·209 + 208·182 cycles.

`rspc_codec` is the top. It holds the encoder (write path, `enc_*` ports) and the
decoder (read path, `dec_*` ports) side by side. The EFMPlus modulator, the disc and
the demodulator sit between the two and are not part of this RTL.

## Module interfaces

All modules share `clk` and an asynchronous active-low `rst_n`. Streams use valid/ready.

| module | parameters (default) | stream in | stream out |
|---|---|---|---|
| `rspc_codec` | none | `enc_in_*`, `dec_in_*` (+`dec_in_erasure`) | `enc_out_*`, `dec_out_*` (+`dec_out_erasure`) |
| `rspc_decoder` | N_OUT 208, K_OUT 192, N_IN 182, K_IN 172 | 208×182 bytes + flag | 192×172 bytes + flag, `out_ready` |
| `rspc_encoder` | same | 192×172 bytes | 208×182 bytes, no back-pressure |
| `rs_decoder` | N 208, K 192 | symbol + erasure flag | symbol, `out_last`, `out_fail` |
| `rs_syndrome`, `rs_keyeq_bm`, `rs_chien_forney` | N, K | polynomial bundles held until taken | |
| `rs_encoder` | N 208, K 192 | K symbols | N symbols |
| `rs_fifo` | W 8, DEPTH 624 | push | pop, first word fall-through |
| `gf_mult`, `gf_inv_rom` | none | combinational | |

## What is not here

- **EFMPlus modulator and demodulator.** The error flag comes from a word missing in the
  demodulator's code table. Those tables are part of the DVD standard and are not
  reproduced here, so the decoder takes the flag as an input.
- **Sync, scrambler and EDC/ID units** of a DVD data path. They are not part of this RTL.
- **The field multiplier cell** is a plain shift-and-add array, not a specific
  published FFM structure.

## Choices this RTL makes

- Generator roots α^0…α^(n−k−1) and α = 0x02, as in the DVD format.
- Stage timing. The architecture this follows gives budgets of 224 / 198 / 211 cycles
  for the three stages of the RS(208,192) decoder. This schedule takes 225 (one cycle to
  hand over), at most 221, and 210. Stage 2 is slower because it registers Ψ_j between
  multipliers and computes Ω after the iterations. It still fits inside the stage-1
  period, so the pipeline rate is unchanged.
- No shortcut for an all-zero syndrome. A clean codeword runs through stages 2 and 3 like
  any other and comes out unchanged. The stages are balanced, so skipping work would not
  raise the rate.
- The rule "a row with more than 10 flags is not decoded" is implemented as ρ > N−K in
  stage 1. BM iterations run whenever ρ < N−K, and any resulting over-capacity shows up
  as 2L − ρ > N−K.
- The buffer inside `rs_decoder` is 3N symbols deep, enough for the three codewords in
  flight.
- The RSPC decoder uses a single block buffer and runs its phases one after another.

Synthesis with a generic flow gives about 4 700 word-level cells, 3 000 flip-flop bits
and 586 kbit of memory (the two 35 776-byte block buffers and the FIFOs) for the whole
codec. No timing closure was done, so 100 MHz is not demonstrated.

## Simulating

Every testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=N failures=M`. They share `tb/rs_tb_pkg.sv`, an independent
log/antilog GF(2^8) model with a long-division RS encoder. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gf_pkg.sv tb/rs_tb_pkg.sv \
          tb/tb_rspc_codec.sv --top-module tb_rspc_codec -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_rspc_codec` | full-size end-to-end run at the top's defaults: encoder → corruption with flags → decoder. A mixed block, the 2932-byte burst and an uncorrectable 17-row loss; counts every mechanism (inner error decoding, inner erasure decoding, inner failure, outer erasure decoding, outer failure, input stall) |
| `tb_rspc_decoder` | four full blocks, including the 4832-byte maximum-error pattern |
| `tb_rspc_encoder` | bit-exact block against the reference; all column syndromes zero |
| `tb_rs_decoder` | 60 RS(208,192) codewords up to ρ + 2ν = 16 and beyond; codeword spacing ≤ N + N−K + 2 cycles |
| `tb_rs_syndrome` | syndromes, Γ(x), erasure count; latency exactly N + ρ + 1 |
| `tb_rs_keyeq_bm` | Ψ roots, degree L = ρ + ν, Forney values recovered from Ω; ≤ N + N−K cycles |
| `tb_rs_chien_forney` | correction, output timing, root outside the code flagged |
| `tb_rs_encoder`, `tb_gf_mult`, `tb_gf_inv_rom`, `tb_rs_fifo` | unit checks (the multiplier exhaustively) |

The full-size runs take about a second each. To change the block geometry, override
the `N_*`/`K_*` parameters of `rspc_decoder`/`rspc_encoder`. `rs_decoder` is written
for any N ≤ 255, but only the two DVD code sizes have been simulated.
