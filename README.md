# Rate 1/2, K = 9 convolutional encoder and Viterbi decoder

This is a forward-error-correction pair for a rate 1/2 convolutional code with
constraint length K = 9. The encoder turns each information bit into two code
bits. The decoder finds the most likely transmitted bit sequence with the
Viterbi algorithm. It tracks all 2^(K-1) = 256 encoder states in parallel, one
trellis step per clock, and recovers the bits by trace back. Convolutional codes
with Viterbi decoding suit channels whose main impairment is additive white
Gaussian noise. K = 9 is about the largest constraint length for which a fully
parallel decoder is still practical, because the number of states doubles with
each added stage.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every module has a
self-checking testbench.

## The code

- Rate 1/2. Each information bit `u` gives the code symbol `{c0, c1}`.
- K = 9. The encoder register is `{u, s[7:0]}`. The state `s` holds the last
  eight input bits, newest in `s[7]`.
- Generators are G0 = 561 and G1 = 753 (octal), with the MSB tapping `u`.
  This is the common K = 9 pair used in IS-95 and 3GPP. It is a choice of this
  design and can be changed with the `G0`/`G1` parameters.
- Frames are terminated: after the last information bit the encoder appends
  K-1 = 8 zero bits, so every frame ends in state 0.

## Decoder structure

```
 in_r0,in_r1 ──► BMU ──► ACS array (256 cells + metric registers) ──► decision word (256 b)
                                │                                         │
                                ▼                                         ▼
                        best_state_finder                 survivor_memory (64 x 256, dual port)
                                │                                         │
                                └──────────► SMU (traceback, reorder) ◄───┘ ──► out_bit
```

- **Branch metric unit** (`branch_metric_unit`). It measures the distance of
  the received pair from each of the four code symbols as a sum of absolute
  differences. With the default 1-bit (hard-decision) inputs this is the
  Hamming distance, 0 to 2. `SOFT_BITS` > 1 accepts quantized soft values,
  where 0 means a sure 0 and all-ones a sure 1.
- **ACS array** (`acs_array`, made of 256 `acs_unit`s). New state `j` has two
  predecessors, `{j[6:0],0}` and `{j[6:0],1}`. The branch from predecessor
  bit `d` carries the code symbol of encoder register `{j, d}`. Each cell adds
  the branch metrics to the two predecessor metrics. It compares the two sums
  by the sign bit of their difference and keeps the smaller one. It also emits
  one decision bit: 1 means predecessor 1 survived, and ties keep
  predecessor 0.
- **Metric normalization.** Metrics only grow. When every stored metric has its
  MSB set, 2^(PM_W-1) is subtracted from all new metrics. The metrics never
  spread by more than about (K-1) × max branch metric, plus the start offset
  of 64. So with `PM_W` = 8 no metric overflows and no comparison changes. At
  reset and at each frame start, state 0 gets metric 0 and all other states
  get 64.
- **Survivor memory** (`survivor_memory`). It holds 64 words of 256 decision
  bits, twice the traceback length of 32. Writes are synchronous and the read
  is asynchronous, so the traceback reads one word per clock while the ACS
  writes another.
- **Survivor metric unit** (`survivor_metric_unit`, the SMU). It walks back
  from a start state, one step per clock. At each step it reads the decision
  bit `d` of the current state `s` and moves to `{s[6:0], d}`. The decoded bit
  of a step is the state's MSB. The bits are found newest first, so a 64-bit
  reorder buffer sends them out oldest first.

## Traceback schedule (the part to understand before changing anything)

`viterbi_decoder` runs a sliding-window traceback that stalls its input.

1. **Accept.** `in_ready` is high. Each symbol advances the trellis and writes
   one memory word.
2. **Window traceback.** When 64 undecoded words are stored, the input stops.
   The SMU starts from the state with the smallest metric at the newest word
   and traces all 64 steps. It discards the first 32 steps, which serve as the
   merge length. It outputs the bits of the 32 oldest steps, and those words
   are then free. Each window stalls the input for exactly 2 × 32 + 1 = 65
   cycles. After the first window (64 symbols), a window follows every 32
   symbols. While the next symbols arrive, the window's 32 bits leave one per
   clock.
3. **End of frame.** The symbol with `in_last` triggers a final traceback over
   everything still stored. Because the frame is terminated, this traceback
   starts from state 0 and drops the 8 tail bits. The state metrics are then
   reset for the next frame, which can follow at once.

As a result, the decoder takes one symbol per clock between stalls. Its average
rate is 32 symbols per 97 cycles. A 256-bit frame (264 symbols) goes from its
first input bit to its last decoded bit in about 817 cycles. `out_last` marks
the frame's last information bit. The output has no back-pressure.

With `TERMINATED = 0` the end-of-frame traceback starts from the best state
and keeps every bit instead. The encoder's matching setting is
`TERMINATE = 0`.

## Top level: `viterbi_system`

The top wires `conv_encoder` into `viterbi_decoder` through a channel stage.
The channel XORs each code symbol with the `err_mask` input, which lets a test
flip any code bit. The decoder's stalls reach the user through `in_ready`.
`code_sym`/`code_valid` show each symbol as the decoder takes it.

| port | dir | width | meaning |
|---|---|---|---|
| `in_bit`, `in_valid`, `in_last`, `in_ready` | in/out | 1 | information bits, `in_last` on the final bit of a frame |
| `err_mask` | in | 2 | code bits to flip in the symbol now entering the decoder |
| `code_sym`, `code_valid` | out | 2, 1 | symbol after the mask, and its acceptance |
| `dec_bit`, `dec_valid`, `dec_last` | out | 1 | decoded bits in order |

Reset `rst_n` is asynchronous and active low.

Parameters (all modules take the same names): `K` = 9, `G0` = 9'o561,
`G1` = 9'o753, `SOFT_BITS` = 1, `PM_W` = `SOFT_BITS` + 7 (8), `TB_LEN` = 32 (memory depth
2 × `TB_LEN`), `TERMINATE`/`TERMINATED` = 1. `TB_LEN` must be a power of two.
`K` may be from 3 to 9; for a smaller K, put the generator taps in the low K
bits of `G0`/`G1`. If you set `PM_W` yourself, keep
`INIT_METRIC + K × max_branch_metric < 2^(PM_W-1)` so that normalization
stays exact. Here `max_branch_metric` is 2 × (2^`SOFT_BITS` − 1).

## What is defined here rather than given

The design is built from a description that fixes these points:

- the code rate and K;
- the four-unit decoder (BMU, ACS, survivor memory, SMU);
- the sign-of-difference compare;
- the need for normalization;
- a dual-port survivor memory with synchronous write and asynchronous read;
- a memory depth of twice a trellis length of 32;
- taking the state MSB as the output bit.

These points are this design's own choices:

- the generator polynomials;
- frame termination with tail bits;
- the normalization scheme and the metric width;
- the tie rule;
- starting each window from the best state;
- the window schedule and its stall;
- the handshakes.

The memory width follows K = 9, so a word holds 256 decision bits.

The encoder feeds the decoder directly, one symbol per clock. No frame store
sits between them. Another common arrangement encodes and buffers a whole
frame first and decodes it afterwards. This design does not do that; such a
buffer would only add latency, because the decoder already handles frames of
any length.

The analog front end (quantizer), the frame and symbol synchronizer, and the
noisy channel are not modelled. The decoder expects aligned, already quantized
symbol pairs, and the top's error mask stands in for the channel.

Timing closure and power were not evaluated. Synthesis gives about 2700
word-level cells, 2200 flip-flops and a 16 kbit memory.

## Verification

Each testbench in `tb/` compares its block with values computed independently
inside the testbench. Each one stops itself with a watchdog and prints
`TB_RESULT checks=N failures=M`.

- `tb_conv_encoder`: a bit-level reference encoder, with random gaps and
  back-pressure, tail symbols, `out_last` and one symbol per clock.
- `tb_branch_metric_unit`: exhaustive, for hard and 3-bit soft inputs.
- `tb_acs_unit`: random and corner cases, ties included.
- `tb_acs_array`: 1500 trellis steps against a reference that never
  normalizes. Decision words must match exactly, and all metrics must be
  offset by the same multiple of 128. Normalization must happen, and `init` is
  checked too.
- `tb_best_state_finder`, `tb_survivor_memory`: random trials, including
  asynchronous read timing.
- `tb_survivor_metric_unit`: random tracebacks over a model memory, checking
  the bits, their order, `out_last` and a trace time of exactly `n_steps`
  cycles.
- `tb_viterbi_decoder`: frames of 1 to 600 bits, with isolated code-bit
  errors and input gaps. It checks bit-exact decoding and the 65-cycle window
  stall.
- `tb_viterbi_decoder_soft`: the decoder with 3-bit soft inputs. Levels 0 and
  7 carry Gaussian noise (σ = 1.5 levels), which puts about 1 % of the code
  bits on the wrong side of the threshold. Eight 256-bit frames must decode
  without error.
- `tb_viterbi_system`: end to end at the default parameters. It runs 256-bit
  frames, with and without errors, plus longer and shorter frames, and checks
  the frame latency. It also sends one 3000-bit frame through a channel that
  flips half the code bits, which drives the metrics into normalization; the
  clean frame after it must decode again. The test counts and requires tail
  symbols, windows, end-of-frame tracebacks, normalizations, corrected errors
  and input stalls.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vit_pkg.sv tb/tb_viterbi_system.sv --top-module tb_viterbi_system
./obj_dir/Vtb_viterbi_system
```

All testbenches run in well under a second.
