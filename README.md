# Low-latency 2-bit SC polar decoder with a constant-delay partial-sum network

A successive cancellation (SC) polar decoder alternates two kinds of work. It
does arithmetic on log-likelihood ratios (LLRs): the f and g functions of the
decoding tree. It also does bookkeeping on the bits decided so far: the
*partial sums* that tell each g function whether to add or subtract. The
g functions cannot start until their partial sums exist, so the partial-sum
network (PSN) sits on the critical path. In the usual feed-forward PSN its
delay grows with the code length.

This design is a tree-based SC decoder that keeps that path short:

* **2-bit decisions.** The last stage of the tree is a *p node*. It decides
  two bits at once from two LLRs, using two sign bits, one magnitude compare
  and the two frozen flags.
* **Pre-computation.** Every processing element is a *merged PE*. It computes
  f and *both* possible g results (d + c and d − c) in the same cycle. The
  partial sum only selects one of the two g results later, when the value is
  used.
* **High speed PSN.** The partial sums are the running encoding
  `v = û(0:i) · G_N` of the decided bits, held in only N/2 registers. Each
  register is updated with one AND gate and one XOR gate, whatever the code
  length.

Together these decode an N-bit codeword in **3N/4 − 1 clock cycles**: 5 cycles
for the default (8,4) code. The RTL is parameterised in N (a power of two, at
least 8). An encoder for the same code is included, so the codec can be run
end to end.

## Data formats

* **LLRs** are q-bit sign-magnitude words (`polar_pkg::llr_t`: `sign`, `mag`).
  A sign bit of 1 means negative, and zero always has sign 0. The default
  q = 6 (`LLR_W` in `polar_pkg`) is a choice made for this design. Change it
  in that one place.
* **Bit vectors** are indexed from 0: `u[0]` is u₁ and `x[0]` is x₁. Written
  as a Verilog literal, u₈ is therefore the leftmost bit. The (8,4) example
  in the testbenches uses frozen mask `8'b0001_0111`, which freezes u₁, u₂,
  u₃ and u₅. Message 1111 then gives u = `8'b1110_1000` and
  x = `8'b1001_0110`.
* **Code:** `x = u · G_N`, where `G_N` is the log₂N-fold Kronecker power of
  F = [1 0; 1 1]. There is no bit-reversal permutation. G(i,j) = 1 exactly
  when j is a bitwise subset of i.

## The decoding tree and its schedule

Let M = log₂N. Stage 1 is a row of N/2 merged PEs on the channel LLRs, with
LLR k paired with LLR k+N/2. Each later stage s has N/2ˢ PEs, down to stage
M−1, which has two PEs and feeds the p node. That makes N−2 PEs in total
(6 for N = 8), and every PE in a stage works in the same cycle.

What each stage does with its results:

* **Stages 1 … M−2** store their f outputs and both g candidates in
  registers. The input of stage s is either the f register of stage s−1
  (left child) or the g candidates of stage s−1 (right child). For a right
  child, each candidate is picked by one partial-sum bit on its way in.
* **Stage M−1** works in the same cycle as the p node. A leaf visit covers
  4 bits and takes two cycles:
  * phase 0: the f values go to the p node, which decides bits blk and
    blk+1. The g candidates are registered.
  * phase 1: the registered g candidates, picked by the two partial sums
    just produced, go to the p node, which decides bits blk+2 and blk+3.

Cycle count: stages 1…M−2 run N/4 − 1 times in total, and the leaves take
N/2 cycles, giving 3N/4 − 1. For N = 8 (default schedule, `SCHED_PRECOMP`):

| cycle | work |
|---|---|
| 1 | stage 1: f and g candidates of LLR pairs (1,5) (2,6) (3,7) (4,8) |
| 2 | stage 2 on the f values → p node → û₁ û₂ |
| 3 | stage-2 g picked by û₁⊕û₂ and û₂ → p node → û₃ û₄ |
| 4 | stage-1 g picked by û₁⊕û₂⊕û₃⊕û₄, û₃⊕û₄, û₂⊕û₄, û₄ → stage 2 → p node → û₅ û₆ |
| 5 | stage-2 g picked by û₅⊕û₆ and û₆ → p node → û₇ û₈ |

`sc_controller` produces this order with three counters:

* a stage counter;
* a leaf-phase bit;
* a block counter, which steps by 4.

After a leaf, the next stage to run is `M + 1 − tz(blk)`, where tz is the
number of trailing zero bits of the new block index. That stage is the one
whose right child starts at that block.

The critical path of a cycle is therefore one of two chains:

* a g-candidate mux, then one merged PE, then the p node (leaf cycles);
* a g-candidate mux, then one merged PE, into registers (inner stages).

The fixed schedule, and which stage shares a cycle with the p node, are this
design's reading of the 3N/4 − 1 latency. Other schedules with the same count
are possible.

### Slower schedules on the same tree

The `SCHED` parameter of `sc_decoder` (and of `polar_codec_top`) selects two
slower schedules. Both use the same p node and PSN. Neither is needed for the
main design, but they show what each technique saves:

| `SCHED` | per cycle | latency | N = 8 |
|---|---|---|---|
| `SCHED_2BIT` | one f row, one g row or the p node | 1.5N − 2 | 10 |
| `SCHED_OVERLAP` | like `SCHED_2BIT`, but each g row runs in the same cycle as the p node before it | N − 1 | 7 |
| `SCHED_PRECOMP` (default) | as described above | 3N/4 − 1 | 5 |

Differences in the hardware:

* **PEs.** The two slower schedules use the unified PE (`pe`): a merged PE
  followed by a u_sum multiplexer and an f/g multiplexer. Each PE has one
  output register.
* **Input register.** They keep the channel LLRs in an input register,
  because stage 1 runs a second time, for its g nodes.
* **Partial sums in the overlapped schedule.** A g row that runs in the p
  node's cycle needs the two bits the p node is deciding in that same cycle.
  It takes them from the PSN's combinational `psum_next` output. This puts
  the p node, one PSN update and one PE in series.

## The partial-sum network (`psn`)

Two facts about G_N make the PSN small.

1. **Register sharing.** Decided bits u_i with i < N/2 only affect the
   partial sums v(0:N/2−1) that the remaining g nodes still need. Bits with
   i ≥ N/2 only affect v(N/2:N−1). The value v(j+N/2) is first needed after
   v(j) has been used for the last time. So v(j) and v(j+N/2) share register
   r_j, and there are N/2 registers in all. Every g selection reads
   `r[(position) mod N/2]`.
2. **Rows of G_N without a ROM.** Row i of G_N is Pascal's triangle mod 2:
   G(i,j) = G(i−1,j) ⊕ G(i−1,j−1), and G(i,0) = 1. An N/2-bit row register
   with one row of XOR gates produces the next row. For i ≥ N/2 the row
   needed is again row i − N/2, so the generator restarts.

The update is `r_j ← r_j ⊕ (u_i ∧ G_N(i,j))`.

This decoder decides two bits per cycle, so one PSN update applies two rows:
row i comes from the register, and row i+1 from one XOR row. The
partial-sum path is therefore two AND/XOR levels rather than one, and it is
still independent of N. The update for the pair starting at index 0 or N/2
starts from zero and from row 0. That is how the registers are cleared for a
new codeword and for the second half.

## The p node

The p node receives c and d, the two LLRs that reach the last stage. With
comp = (|c| ≥ |d|):

```
u_{2i-1} = ~frozen1 & (sign(c) ^ sign(d))
u_{2i}   = ~frozen2 & ( ~comp & sign(d) | ~frozen1 & sign(d) | frozen1 & comp & sign(c) )
```

* If u_{2i−1} is free, the second bit is simply sign(d). The result of
  d ± c takes the sign of d whenever SC would pick it.
* If u_{2i−1} is frozen, the second bit is the sign of c + d, read from the
  operand with the larger magnitude.

Ties (c + d = 0) follow c. If f is exactly 0, the first bit is still the XOR
of the two signs.

## Merged PE arithmetic

* **f** = sign(c) ⊕ sign(d), with magnitude min(|c|, |d|). It is computed
  directly on sign and magnitude, and a zero result gets sign 0.
* **gp** = d + c and **gm** = d − c. Both operands are converted to two's
  complement (`s2c`). The result is added or subtracted at q+1 bits, then
  converted back and clipped to ±(2^(q−1) − 1) (`c2s`).

The operand order follows g(a,b) = a·(−1)^û + b, with a the upper LLR. Clipping
is a choice made for this design.

## Modules

| file | what it is |
|---|---|
| `rtl/polar_pkg.sv` | LLR width, the `llr_t` struct and the `sched_e` schedule enum |
| `rtl/polar_codec_top.sv` | top: encoder and decoder side by side, sharing the frozen mask |
| `rtl/polar_encoder.sv` | puts message bits into the free positions, then x = u·G_N with log₂N XOR columns (combinational) |
| `rtl/sc_decoder.sv` | the decoder: stage rows of merged PEs, stage registers, g selection, p node, PSN |
| `rtl/sc_controller.sv` | schedule counters |
| `rtl/merged_pe.sv` | f and both g candidates |
| `rtl/pe.sv` | unified f/g PE (slower schedules only) |
| `rtl/s2c.sv`, `rtl/c2s.sv` | sign-magnitude ↔ two's complement (C2S clips) |
| `rtl/p_node.sv` | 2-bit last-stage decision |
| `rtl/psn.sv` | high speed partial-sum network |

**Decoder interface.** Pulse `start` for one cycle while the decoder is idle.
The decoder samples `llr_in` and `frozen` in that cycle. The LLRs need not be
held afterwards, and the mask is stored. `busy` is high for the working cycles
(3N/4 − 1 in the default schedule). `done` pulses once after them, and `u_hat` then holds the
result until the next start. A start pulse during a codeword is ignored.
Reset is asynchronous and active low.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. The reference model (`tb/polar_ref_pkg.sv`) is an integer SC decoder.
It recomputes every LLR from the channel values for each bit pair, and it
gets partial sums by re-encoding the decided bits, so it shares no structure
with the RTL.

| testbench | what it checks |
|---|---|
| `tb_merged_pe` | all 4096 input pairs, including negative zero |
| `tb_pe` | all input pairs × all f/g and u_sum settings |
| `tb_p_node` | all LLR pairs × the four frozen combinations |
| `tb_psn` | 200 random codewords each at N = 8 and N = 16 against u·G_N after every update |
| `tb_sc_controller` | the default schedule at N = 8 and 16 against a depth-first tree walk; length 3N/4 − 1; ignored starts. The slower schedules: their lengths, N/2 p-node cycles in bit order, N − 2 PE activations |
| `tb_polar_encoder` | the (8,4) worked example; random messages and masks at N = 8 and 16 |
| `tb_sc_decoder` | N = 16, all three schedules side by side; 2000 codewords (random LLRs and noisy codewords), bit-exact against the reference; latencies 22, 15 and 11 cycles |
| `tb_table1_latency` | the (8,4) worked example under each schedule: decodes to 11101000 in 10, 7 and 5 cycles; the three agree on 500 noisy codewords |
| `tb_polar_codec_top` | default parameters, end to end: the worked example decodes to 11101000 in 5 cycles; 4000 codewords through encoder, a BPSK channel with uniform noise and the decoder, bit-exact against the reference; error-free at zero noise |

`tb_polar_codec_top` also counts the events it exercises and fails if any
never occurs:

* all four frozen combinations at the p node;
* g candidates picked by a partial sum of 1;
* clipped g results;
* decoding errors under heavy noise;
* ignored start pulses.

To run one testbench with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_polar_codec_top.sv \
  --top-module tb_polar_codec_top -o sim && obj_dir/sim
```

Replace the testbench name to run another. To try another code length, set
`N` on `polar_codec_top` or `sc_decoder` (a power of two, at least 8). The
testbenches' reference model handles N up to 64.

## Departures and limits

* **Two bits per PSN update.** The architecture updates its registers once per
  decided bit, with one AND and one XOR. Here two bits arrive per cycle, so
  the two updates are chained in one cycle.
* **Fixed point.** The datapath is q-bit sign-magnitude fixed point. Channel
  LLRs must be quantised before they enter; there is no floating-point input
  path.
* **Older partial-sum networks not built.** The feed-forward and
  parallel-update partial-sum networks, which the high speed PSN replaces,
  are not included. Neither is a conventional 1-bit SC decoder.
* **No silicon figures.** Clock frequency, gate count, area and power depend
  on the technology and are not characterised here.
* **Encoder message order.** If the frozen mask leaves more than K free
  positions, the encoder fills the extra ones with 0.
