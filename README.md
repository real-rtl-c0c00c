# REAL: retention-error-aware LDPC decoding for MLC NAND flash

In MLC NAND flash, retention errors are the most common errors. A cell slowly loses charge, so its
threshold voltage drifts down. The drift also has a direction. With the two bits of a cell written
lower-page bit first, the usual transitions are `00→01`, `01→10`, `01→11` and `10→11`. This means
one bit of a cell says something about the other. This RTL puts both bits of a cell into the **same**
LDPC codeword. While decoding, each bit node then gets an extra input `E_j`, computed from its
partner bit in the same cell. The decoder is a shuffled normalized min-sum decoder with `E_j` added
to every bit-node update. The extra information makes decoding converge in fewer iterations. Fewer
iterations mean a shorter read, since decoding is the largest part of a flash read.

The repository holds the LDPC part of a flash controller's data path, in synthesizable
SystemVerilog:

```
write: host bytes → io_buffer → ldpc_encoder → cw_layout → flash page pair (program port)
read : flash page pair (soft read) → cw_layout → real_decoder → io_buffer → host bytes
```

The flash array is not part of the RTL. It is reached through ports of `real_top`, and the
testbenches model it behaviourally.

## Codeword layout (`cw_layout`)

A lower page and an upper page of `N` cells together hold two codewords, `a` and `b`. Each codeword
is cut in half:

| cells `0 … N/2-1` | cells `N/2 … N-1` |
|---|---|
| lower page: `a[0 … N/2-1]` | lower page: `b[0 … N/2-1]` |
| upper page: `a[N/2 … N-1]` | upper page: `b[N/2 … N-1]` |

Bit `j` of a codeword and bit `j ± N/2` are therefore the two bits of one cell. Every bit has a
partner, and the decoder knows where it is. The conventional layout would put codeword `a` entirely
in the lower page and `b` in the upper page, which gives the decoder no partner to use.

## The extra term `E_j` (`ej_unit`)

Take bit `v_j` and its partner `v_c` in the same cell. `P_c` is the partner's channel LLR (positive
means 0). `HD_c` is the partner's current hard decision. `E_j` is chosen from six cases:

| `v_j` page | partner: `P_c` vs `HD_c` | `E_j` | reasoning (retention drift) |
|---|---|---|---|
| upper | disagree | −1 | a lower bit read near a threshold means the upper bit is probably 1 |
| lower | disagree | +3 | an upper bit read near a threshold means the lower bit is probably 0 (`00→01` dominates) |
| lower | both say 0 | +3 | upper bit read as 0 means the lower bit is probably 0 |
| lower | both say 1 | 0.75·`P_j` | upper bit read as 1 means the lower bit as read is probably right |
| upper | both say 0 | +3 | lower bit 0 means the upper bit is probably 0 |
| upper | both say 1 | −1 | lower bit 1 means the upper bit is probably 1 |

`P` "says 0" when `P > 0`. `HD_c` is the partner's hard decision as last updated, so `E_j`
changes from one iteration to the next as the partner's decision changes. The values −1 and +3 are
in LLR units. With the default fixed point of one LSB per LLR unit they are used exactly as given.
They are the parameters `E_NEG` and `E_POS`.

Two cases in the original description name the wrong page in one of their sentences. The table
follows the reading that makes the six cases cover every page/sign combination exactly once.

## The decoder (`real_decoder`, `cnu`)

### Algorithm

1. Every bit-to-check message starts at the channel LLR: `V[i][j] = P_j`.
2. Bit nodes are visited one at a time. Odd iterations go in ascending order (`0 … N-1`), even
   iterations in descending order. For bit `j`, each of its check rows `i` forms
   `C[i][j] = 0.75 · Π sign(V[i][k]) · min |V[i][k]|` over the other members `k` of the row
   (`cnu`).
3. `total = P_j + E_j + Σ_i C[i][j]`. Each message is replaced by `V[i][j] = total − C[i][j]`,
   saturated.
4. The hard decision is 1 when `total ≤ 0`.
5. After each full pass: stop with success if `H·v = 0`. Stop with failure after `NMAX`
   iterations.

The messages are updated in place. So when bit `j` is processed, its neighbours that were already
visited in this iteration supply new messages, and the rest supply old ones. This is a shuffled
schedule, and it is why the visiting order alternates. Check-to-bit messages are never stored: they
are recomputed from the row's current bit-to-check messages each time they are needed.

### Architecture

* **Message memory** `vmem[M][NB]`: one word per check row. The word holds the `NB` messages of
  that row, one field per block column of the quasi-cyclic `H`. A single read gives the whole row
  to the `cnu`. A bit is in block column `c`, so its message is always field `c` of its rows.
* **Channel memory** `pmem[N]`: holds the LLRs, for `P_j` and for the partner's `P_c`.
* **Hard decisions** `hd[N]` and **syndrome** `syn[M]`: `syn` is kept equal to `H·hd` at all times.
  When a hard decision changes, the syndrome bits of that bit's checks are toggled. The stopping
  test is then just `syn == 0`, with no separate syndrome pass.
* **Addressing**: no table of `H` is stored. Bit `j = c·Z + u` meets row `b·Z + ((u − s(b,c)) mod Z)`
  in block row `b`. The shift `s(b,c)` is computed from `b` and `c` (see below).

### Timing

| phase | cycles |
|---|---|
| load `N` LLRs (`in_valid`/`in_ready`) | `N` |
| one iteration: per bit `MB` row reads + 1 update, then 1 stop test | `N·(MB+1) + 1` |
| total, first LLR accepted → `done` | `N + iters·(N·(MB+1) + 1)` |

At the default size, `N = 18432` and `MB = 4`, so one iteration takes 92,161 cycles. Decoding
latency is therefore proportional to the number of iterations. That number is exactly what `E_j`
reduces.

## The code (`real_pkg`)

`H` is an `MB × NB` array of `Z × Z` blocks. Each block is either all zero or an identity matrix
shifted cyclically by `s`: block `(b,c)` has a one at `(t, (t+s) mod Z)`. `Z` must be a power of two.
Two codes are built in:

* `CODE_ARRAY` (the default): every block is present, with `s(b,c) = b·c mod Z`. With `MB = 4`,
  `NB = 36` and `Z = 512` this is the regular code of the main configuration: column weight 4, row
  weight 36, rate 8/9, 2 KB of information (`K = 16384`, `N = 18432`, `M = 2048`). It has no
  4-cycles, because `|(b1−b2)(c1−c2)| ≤ 105 < 512`. The original shift values were not published;
  these are a replacement with the same size, weights and girth ≥ 6.
* `CODE_DUALDIAG`: the information blocks have `s = b·(c+1) mod Z`. The last `MB` block columns are
  a dual diagonal of identities, so the check bits follow by back-substitution. The tests use it
  wherever real data must be encoded.

Why two codes: in an array in which every block is a permutation, each block row sums to the
all-ones vector. `H` is therefore rank deficient, and no exact systematic form `[P | I]` exists for
`CODE_ARRAY`. The encoder below needs that form. The decoder works with either code.

## Encoder (`ldpc_encoder`)

This is a systematic encoder: check bits `C = I · P^T`, where `[P | I]` is `H` after Gaussian
elimination. The elimination is done offline. `P` is loaded row by row through `p_we`/`p_addr`/
`p_row`, where row `i` is what information bit `i` contributes to the check bits. Information bits
stream in one per cycle and pass straight out as codeword bits `0 … K-1`. Each 1 XORs its `P` row
into the check register. Then the `M` check bits follow, one per cycle, so a codeword takes `K + M`
cycles. At the default size the `P` memory is 32 Mbit. In silicon it would be SRAM, or a
quasi-cyclic encoder would replace it.

## Top level (`real_top`) and I/O buffers (`io_buffer`)

`io_buffer` is a byte-wide synchronous FIFO, one 2 KB page deep, with valid/ready on both sides.

* **Write:** `K/8` host bytes go into the write buffer. They are serialized LSB first into the
  encoder. The codeword bits leave on `prog_valid/prog_upper/prog_col/prog_bit`, placed by
  `cw_layout` for the slot `wr_cw_sel` (a or b).
* **Read:** pulse `rd_start` with `rd_cw_sel`. For `N` cycles `flash_req` is high, and
  `flash_upper/flash_col` name the cell bit wanted. The flash model must answer `flash_llr` in the
  same cycle. After `dec_done` (with `dec_success` and `dec_iters`), the `K/8` information bytes
  come out of the read buffer on `out_valid/out_ready/out_data`. They are delivered even when
  decoding fails, and `dec_success` tells the host which case it is.
* `ej_valid/ej_case/dec_descending` expose which `E_j` case is used and the visiting order, for
  observation.

## Fixed point and other choices

| item | choice |
|---|---|
| channel LLR | 6 bits signed (`WC`), one LSB = one LLR unit |
| messages | 8 bits signed (`W`), saturated to ±127 |
| check-node factor α | 0.75, computed as `(3·min) >> 2` |
| `E_j` case 4 | `(3·P_j) >>> 2` |
| sign of zero | positive in the check node; `total = 0` decides 1 |
| `NMAX` | 100 |
| reset | asynchronous, active low, control only; memories are written before being read |

The memories are register arrays with asynchronous read. A production implementation would map
`vmem`, `pmem` and the encoder's `P` to SRAM and would likely process a whole circulant column
(`Z` bits) in parallel instead of one bit at a time. The serial form keeps the algorithm easy to
see.

## How far it can be trusted

* `real_decoder` is checked bit for bit against an independent reference model in its testbench.
  The model is written over the explicit `H` matrix and covers the decided word, the success flag,
  the iteration count and the cycle count, over 40 frames from clean to hopeless.
* The end-to-end test writes real codewords, checks them against `H`, ages cells with the drift
  transitions above, reads them back and compares the bytes. It also checks that early stops,
  `NMAX` give-ups, descending passes and all six `E_j` cases happen.
* The full-size test runs one 2 KB page through write and read at the default parameters. Because
  `CODE_ARRAY` cannot be encoded in systematic form, that page is all zeros. About 1 % of the cells
  suffer `00→01`, and the page decodes in 2 iterations (≈203k cycles).
* `tb_real_snp_sweep` runs the default-size decoder over SP/SNP 3.5–4.4 dB (the range of the
  published results) and at 5.0, 5.5 and 6.0 dB. The channel is a simple MLC cell model: four
  nominal levels, a retention drift that grows with stored charge, and Gaussian noise. Every decoded
  word is checked, and so is the cycle count.

## Measured decoding behaviour, and where it departs from the published results

The published results are average iteration counts of 5–67 for this scheme over 3.5–4.4 dB, from
floating-point simulations of an unpublished matrix. This fixed-point RTL does not reproduce them:

| channel (2 frames per point, default code) | 3.5–4.4 dB | 5.0 dB | 5.5 dB | 6.0 dB |
|---|---|---|---|---|
| MLC cell model with retention drift, raw BER 1.6–3.5 % | no frame decodes in 100 iterations | 1 of 2 (3 iterations) | 2 of 2 (avg. 16) | 2 of 2 (avg. 2.5) |

* With a symmetric per-bit Gaussian channel at 3.8, 4.1 and 4.4 dB (raw BER 1.5–2 %), the decoder as
  built did not converge. The same decoder with `E_j` removed, i.e. plain shuffled min-sum,
  converged in about 62, 10 and 4 iterations. The fixed `E_j` values of +3/−1 push about half of
  all bits towards a guess, and at LLR magnitudes of about 8 that bias is large. `E_j` can only pay
  off when errors really follow the retention pattern. How large `E_j` should be relative to the
  LLR scale was never specified, and `E_POS`/`E_NEG` are parameters for that reason.
* Finer LLR scaling (4 LSB per unit, with `E_j` scaled alike) and rounding instead of truncation in
  the α scaling did not change this outcome at 3.8–4.4 dB.
* The decoder is therefore verified to implement the specified rule exactly, not to reach the
  published gain. Anyone tuning it should start with the ratio of `E_POS`/`E_NEG` to the channel
  LLR scale.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=… failures=…` and has a watchdog.
Example:

```
verilator --binary -Wno-fatal -Irtl rtl/real_pkg.sv tb/tb_real_top.sv --top-module tb_real_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_cnu` | check-node message against a direct computation (random rows, masks) |
| `tb_ej_unit` | all page/LLR/decision combinations against the six-case table |
| `tb_cw_layout` | layout of both codewords, one use per cell bit, partners share a cell |
| `tb_ldpc_encoder` | random `P`, 20 words, bit-exact output and `K+M`-cycle timing |
| `tb_io_buffer` | random traffic against a queue, full and empty |
| `tb_real_decoder` | reference-model comparison and cycle count (`Z=16`, `N=192`) |
| `tb_real_top` | write → age → read, reduced size (`Z=16`, `N=192`) |
| `tb_real_top_full` | one page at the default size |
| `tb_real_snp_sweep` | default-size decoder over 3.5–6.0 dB (about 2 minutes) |

To change the size or code, override `CODE`, `MB`, `NB`, `Z`, `NMAX`, `WC` and `W` on `real_top`
or `real_decoder`. `N = NB·Z` must be even. `K = N − MB·Z` must be a multiple of 8 for the byte
buffers.
