# A combinational (32,16) polar encoder and SC decoder

This design encodes a 16-bit message with a polar code of length 32. It then
passes the codeword through an ideal BPSK channel that yields one 9-bit
log-likelihood ratio (LLR) per code bit. Finally, a successive-cancellation
(SC) decoder recovers the 16 bits. The whole chain is pure combinational
logic, with no clock, registers or memories. A message presented at the input
comes back at the output after the propagation delay of the decoder's serial
path (see below).

It follows a published FPGA design of a "high-speed polar encoder and
decoder for 5G" (Virtex-5, Xilinx ISE). That design gives the sizes (16 → 32 →
288 → 16 bits), the BPSK LLR format, the SC algorithm and two worked examples,
and reports a flip-flop-free implementation. It does not print the frozen
set, the encoder structure or the decoder arithmetic. Those are filled in
here as described below.

```
 msg_i[15:0] ─► polar_encoder ─► code[31:0] ─► polar_channel ─► llr[287:0] ─► polar_sc_decoder ─► msg_o[15:0]
                (frozen-bit insertion,          (0 → +1, 1 → −1,              (bit-reversal, 80 f + 80 g units,
                 5-stage XOR butterfly,          9-bit two's complement)       partial sums, info-bit gather)
                 bit-reversed read-out)
```

## The code: frozen set and bit order

The code is an (N = 32, K = 16) polar code, `x = u · F^⊗5` with
`F = [1 0; 1 1]`.

- **Information set.** The information set is
  `{12, 13, 14, 15, 20, 21, …, 31}`: the indices whose top three bits hold at
  least two ones. This is `INFO_MASK = 32'hFFF0_F000` in `polar_pkg`. The
  other 16 positions of `u` are frozen to 0.
- **Message placement.** Message bit `k` goes to the `k`-th information
  position, counting upwards from index 0.
- **Output order.** The codeword is `x` in bit-reversed order:
  `code[j] = x[bitrev5(j)]`. This is Arikan's `G_N = B_N F^⊗n`.
- **Bit numbering.** Bit 0 of every bus is its least significant bit.

This is the construction that reproduces the source design's worked example:
message `16'hAAAA` encodes to `32'h9600_9600`. The frozen set is not the one
in the 5G standard (TS 38.212 reliability sequence:
`{7, 11, 13–15, 19, 21–23, 25–31}`), which does not give that example. To use
another code, change `INFO_MASK` and keep `K` equal to its number of ones
(elaboration stops with an error otherwise). Encoder and decoder take the
mask as a parameter, so they stay matched if they are given the same one.

## Encoder (`polar_encoder`)

The encoder works in three steps:

1. **Frozen-bit insertion.** A loop over the mask builds `u` from the
   message.
2. **Butterfly network.** A 5-stage XOR network forms `x`. In the stage of
   span `s`, every position `i` with bit `s` clear becomes `x[i] ^ x[i+s]`.
   That is N/2 = 16 XORs per stage and 80 in all, before synthesis shares
   them.
3. **Read-out.** The output wires are permuted into bit-reversed order. This
   costs no logic.

## Channel (`polar_channel`)

Each code bit becomes a signed 9-bit LLR. A 0 becomes `+1` (`9'h001`) and a
1 becomes `−1` (`9'h1FF`). Code bit `j` occupies `llr[9j +: 9]`. For the
example codeword, the 288-bit decoder input is
`ff80403ff00ffffe01008040201008040201ff80403ff00ffffe01008040201008040201`.
No noise is added. Its purpose is to give the decoder its real input format
in a loop-back.

## SC decoder (`polar_sc_decoder`, `polar_sc_tree`, `polar_f_pe`, `polar_g_pe`)

This is the part that needs the most care.

SC decoding decides `u[0]`, `u[1]`, … in order. Each decision feeds the LLRs
used for later bits. In software this is a loop or a recursion. Here it is
unrolled into a tree of logic, so the sequential order becomes a chain of
data dependences.

**Input permutation.** `polar_sc_decoder` first undoes the bit reversal of
the channel LLRs, putting them in natural order: the LLR of `x[i]` is the
channel LLR of code bit `bitrev5(i)`. It then hands them to `polar_sc_tree`.

**The tree.** `polar_sc_tree` is a binary tree with 6 depths. Depth `d` has
`2^d` nodes, each covering `S = 32 >> d` positions. Node `(d, t)` holds two
signals, each in its own generate scope `g_d[d].g_t[t]`:

- `alpha`: the `S` LLRs of its sub-code;
- `beta`: the `S` re-encoded *partial sums* of its decisions.

With `a` the parent's `alpha`, the nodes are wired as follows:

1. **Root.** Its `alpha` is the decoder input.
2. **Left child** (`t` even). `alpha[i] = f(a[i], a[i+S])`, through `S`
   f units.
3. **Right child** (`t` odd). `alpha[i] = g(a[i], a[i+S], beta_left[i])`,
   through `S` g units. `beta_left` is the partial sums of its left
   sibling. So the right half waits for every decision of the left half.
   This is where the order of SC decoding lives.
4. **Leaf** (`d = 5`). An information position decides 1 when its LLR is
   negative. A frozen leaf outputs 0 whatever its LLR. The leaf's `beta` is
   its decision.
5. **Inner node.** `beta = {beta_right, beta_left ^ beta_right}`, the same
   butterfly as the encoder, applied to the decisions made so far.

The depths 1 to 5 each hold 16 f and 16 g units: 80 f and 80 g units in
total. The source design's synthesis report has the same number of
comparators (80), one per f node. Synthesis removes the units that feed only
frozen leaves.

**Critical path.** The right child cannot start until the whole left subtree
has decided. So the path from the input to the last message bit runs through
every leaf in turn. That serial path is what the source design's reported
combinational delay (about 140 ns on Virtex-5) measures.

**Arithmetic.** All LLRs inside the decoder stay 9 bits wide. Both units are
this design's own choices; the source design lists only 8- and 9-bit adders.

- **f unit (`polar_f_pe`).** Min-sum: `f(a,b) = sign(a)·sign(b)·min(|a|,|b|)`.
  The magnitude is limited to 255, so an input of −256 cannot overflow.
- **g unit (`polar_g_pe`).** `g(a,b,s) = b + a` if `s = 0`, and `b − a` if
  `s = 1`. It is computed in 10 bits and saturated to [−255, 255].

**Tie rule.** An LLR of exactly 0 decides 0.

**Outputs.** `msg_o` gathers the information bits of `u_hat` in ascending
position order, the inverse of the encoder's placement. `u_o` gives all 32
decisions, with the frozen ones always 0.

## Interfaces and timing

| module | parameters (default) | inputs | outputs |
|---|---|---|---|
| `polar_top` | `N`=32, `K`=16, `LLR_W`=9 | `msg_i[K-1:0]` | `msg_o[K-1:0]`, `code_o[N-1:0]`, `llr_o[N*LLR_W-1:0]` |
| `polar_encoder` | `N`, `K`, `INFO_MASK` | `msg_i` | `code_o` |
| `polar_channel` | `N`, `LLR_W` | `code_i` | `llr_o` |
| `polar_sc_decoder` | `N`, `K`, `LLR_W`, `INFO_MASK` | `llr_i` | `msg_o`, `u_o` |
| `polar_sc_tree` | `N`, `W`, `INFO` | `llr_i` | `u_o` |
| `polar_f_pe`, `polar_g_pe` | `W` | `a_i`, `b_i` (`s_i`) | `f_o` / `g_o` |

Every module is combinational and has no clock or reset.

`code_o` and `llr_o` on `polar_top` are for observation only. The source
design's top has just the 16-bit input and the 16-bit output. A user who
wants a clocked version can put registers around `polar_top`, or cut the
decoder tree at a level boundary. The partial-sum feedback makes a pipeline
cut non-trivial, since a right child depends on its left sibling.

After coarse synthesis with yosys, the whole chain comes to about 1450
word-level cells, with no flip-flops and no memory.

## Verification

Each module has a self-checking testbench in `tb/`. All of them use the
reference models in `tb/polar_ref_pkg.sv`, which do not share structure with
the RTL:

- **Information set.** Recomputed from its rule rather than from the mask.
- **Encoder model.** Built from the generator matrix: row `i` of `F^⊗5` has
  ones at the columns `m` with `i & m == m`.
- **Decoder model.** A leaf-by-leaf iterative SC decoder over flat per-depth
  arrays, with integer min-sum and saturation.

| testbench | what it checks |
|---|---|
| `polar_encoder_tb` | all 65,536 messages; the example `AAAA → 9600_9600` |
| `polar_channel_tb` | the example 288-bit vector; 2,000 random codewords, field by field |
| `polar_f_pe_tb` | all 512 × 512 operand pairs |
| `polar_g_pe_tb` | all 512 × 512 × 2 cases, with both saturation limits hit |
| `polar_sc_decoder_tb` | the example vector decodes to `AAAA`; noise-free LLRs of random amplitude; 20,000 noisy frames compared bit for bit with the reference decoder |
| `polar_top_tb` | end to end, at the default sizes, for all 65,536 messages; both worked examples (`AAAA`, `CCCC`) |

The noisy frames in `polar_sc_decoder_tb` include inputs of −256. The test
fails unless some of those frames decode correctly and some do not.

Each testbench prints `TB_RESULT checks=… failures=…` and has a cycle
watchdog. To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/polar_top_tb.sv --top-module polar_top_tb
./obj_dir/Vpolar_top_tb
```

Replace `polar_top_tb` with any other testbench name to run that one. Each
testbench takes well under a second of simulation time.

## Departures from the source design and open points

- **Not reproduced exactly.** The frozen set, the butterfly encoder, the
  min-sum f, the saturating 9-bit g and the recursive tree structure are this
  design's choices. They reproduce both worked examples exactly. The source
  design's internal arithmetic may still differ, so outputs on *noisy* LLRs
  may not match it.
- **Rate matching.** The source work mentions rate matching to TS 38.212 but
  does not describe it. None is built: the chain always uses the full 32-bit
  codeword.
- **Encoder architecture.** The source overview also describes pipelined
  radix-2 and radix-4 polar encoders, built from processing engines and
  FIFOs of 2^(n−1) bits per stage. They are not part of the flip-flop-free
  design reported, and are not built.
- **Not carried over.** The LDPC and turbo throughput formulas, the list,
  belief-propagation and ML decoders, and the CRC discussion are background
  and are not part of this RTL.
- **Timing not checked.** The reported FPGA figures (1384 LUTs, 139.6 ns
  combinational delay) are not checked here. No timing analysis was done.
