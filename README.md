# Single-chip convolutional coder and Viterbi decoder (K = 7, polynomials 133/171)

This is synthesizable SystemVerilog for a coder and a high-speed soft-decision Viterbi
decoder for the constraint-length-7, rate-1/2 convolutional code with generator
polynomials 133 and 171 (octal). This is the code used on INTELSAT, EUTELSAT and CCSDS
satellite and telemetry links. The same hardware also handles three derived codes:

| rate | how it is derived | symbols per data bit | usual truncation length |
|------|-------------------|----------------------|-------------------------|
| 1/2  | the base code | 2 | 32 |
| 3/4  | puncturing with deletion patterns 110 (P) and 101 (Q) | 4/3 | 64 |
| 1/4  | the (P, Q) pair sent twice | 4 | 32 |
| 1/8  | the (P, Q) pair sent four times, 2-bit soft decisions | 8 | 32 |

The decoder takes 3-bit soft symbols. It extends all 64 trellis states in a single clock
with 32 parallel add-compare-select (ACS) units, so it decodes one bit per clock. Survivors
are kept in a three-block path memory and read by the traceback method. A synchronisation
detector watches how fast the smallest path metric grows.

## Code and trellis conventions

The coder state is its six-bit shift register, with the newest bit in bit 0. If the state
is `s` and the input bit is `b`, the next state is `(2s + b) mod 64`. This gives the
butterfly the whole decoder is built on. States `i` and `i+32` both lead to states `2i`
and `2i+1`, for `0 <= i <= 31`:

```
M(2i,  n+1) = min( M(i,n) + d0 , M(i+32,n) + d1 )
M(2i+1,n+1) = min( M(i,n) + d1 , M(i+32,n) + d0 )
```

In a polynomial, the most significant octal digit taps the current input bit:

- 133 → P = u[n] ^ u[n-2] ^ u[n-3] ^ u[n-5] ^ u[n-6]
- 171 → Q = u[n] ^ u[n-1] ^ u[n-2] ^ u[n-3] ^ u[n-6]

Both polynomials tap both the newest and the oldest bit. So the branches `i→2i+1` and
`i+32→2i` send the complement of the codeword of `i→2i`, and `i+32→2i+1` sends the same
codeword as `i→2i`. An ACS unit therefore needs only two branch metrics: `d0` for the
codeword of `i→2i` and `d1` for its complement. Which of the four codeword metrics feeds
`d0` is fixed when the design is elaborated (`path_metric_unit`).

Soft symbols are offset binary: 0 is a certain '0' and 7 is a certain '1'. A symbol of
value v is at distance v from a '0' and 7 − v from a '1'. At rate 1/8 only the two upper
bits are used (distances 0..3). An erased symbol contributes nothing.

## Coder (`conv_coder`)

Each accepted bit goes through `conv_encoder`, the shift register with its XOR taps:

- **Rate 1/2:** the (P, Q) pair goes out one clock later.
- **Rates 1/4 and 1/8:** the pair is held for 2 or 4 clocks. `in_ready` stays low for
  those clocks.
- **Rate 3/4:** the pairs go to `puncturer`. There, P is written into one small FIFO under
  the pattern 110 and Q into another under 101. A pair (R, S) leaves whenever both FIFOs
  hold a symbol. The output streams are R = (P0, P1, P3, P4, …) and S = (Q0, Q2, Q3, Q5, …).
  Three bits give two pairs.

## Decoder (`viterbi_decoder`)

```
soft (R,S) ─► depuncturer ─► branch_metric ─► path_metric_unit ─► path_storage ─► bits
                  │               ▲                 │  (32 × acs)     (path_ram,
                  └──── timer ────┘                 │                  reverse_buffer)
                                                    └─► sync_detector ─► sync_order, speed
```

- **`depuncturer`**: at rate 3/4, rebuilds three rate-1/2 branches from every two received
  pairs:
  - (P, Q) from the first pair.
  - (P, erased) from the second pair.
  - (erased, Q) from the S symbol of the second pair, held back.

  While it emits the third branch, `in_ready` is low. At the other rates, pairs pass
  through unchanged.
- **`timer`**: counts the pairs of a codeword (1, 2 or 4) for the branch metric unit. It
  also counts trellis steps inside a block (`step_idx`), the block being written (`wblk`),
  and whether three blocks have been written (`warm`).
- **`branch_metric`**: adds up the symbol distances over a codeword for the four codewords
  00, 01, 10 and 11. The largest metric is 14, 28 or 24. The output register also
  produces the trellis step strobe.
- **`path_metric_unit`**: holds 64 one-byte metrics and the 32 `acs` instances. It
  produces the 64-bit decision word, where bit s is 1 when the survivor of state s came
  from the upper state (i+32). Ties go to state i.

### Metric framing

The metrics only grow, and they are stored in 8 bits. Whenever every metric is ≥ 32, the
ACS units subtract 32 (add 224 modulo 256) as they extend the paths.

On a trellis this connected, the gap between the largest and smallest metric never exceeds
6 times the largest branch metric. With framing, the smallest metric stays at most
31 + (largest branch metric), so the largest is at most:

- 129 at rate 1/2
- 227 at rate 1/4
- 199 at rate 1/8

Sums saturate at 255 as a safety net, but a correct stream never reaches it.

### Path memory and traceback (`path_storage`)

This is the least obvious part of the design. `path_ram` holds three blocks of `lt` words
of 64 bits (the truncation length, programmable 1..64). Block b sits at addresses
`b·lt … b·lt+lt−1`. The RAM has one write port and two asynchronous read ports, so a
write and two reads finish in one clock.

During a block period of `lt` steps:

1. The decision word of each step is written into the current block (`wblk`).
2. In the same steps, the traceback reads **two words per step**, walking backwards from
   the word just before the current block (address `wblk·lt − 1`, modulo `3·lt`). Over
   the period it covers `2·lt` words: first the previous block, then the one before it.
3. The walk starts in state 0, an arbitrary choice. By the end of the previous block all
   survivors have merged, so the bits read in the older block are the decoded ones.

At each word with current state `s`:

- `s[0]` is the data bit that led into `s`.
- The stored decision `d` of `s` gives the previous state `{d, s[5:1]}`. Seen backwards,
  `d` is the bit shifted back into the coder register.

The two reads of a step are chained in one combinational stage.

The decoded bits come out last-first. They are written at their offset within the block
into `reverse_buffer`, which has two banks of 64 bits. During the next period the buffer
is read in offset order, one bit per step.

Latency: the bit of trellis step n leaves at step n + 3·lt. In clocks, at rate 1/2 with a
pair every clock, bit k appears three clocks after the pair of bit k + 3·lt was accepted.
Nothing is output until `warm`, which rises after the first three blocks are written.

### Synchronisation (`sync_detector`)

When the decoder is aligned with the stream, the survivors match the received symbols and
the smallest metric grows slowly. How slowly depends only on the channel noise. When it
is misaligned (a symbol slip, a wrong puncturing phase), every path disagrees and the
smallest metric grows fast.

The detector adds up that growth over a window of 128 steps. It adds back the 32 removed
by each framing. At the end of each window it:

- publishes the sum on `speed`, which can also serve as a link-quality (Eb/N0) estimate;
- pulses `sync_order` if the sum is above `sync_threshold`.

What to do on an order (slip a symbol, change the puncturing phase) is left to the
receiver. The threshold comes from simulation. For example, with the small noise of the
end-to-end testbench, rate 1/2 measures about 160–175 per window in sync and about 300
after a one-symbol slip, so 250 separates them. The testbench uses 200, 500 and 200 at
rates 3/4, 1/4 and 1/8.

## Top level (`codec_top`)

The coder and the decoder stand side by side. They share the clock and the asynchronous
active-low reset and have separate ports and rate selections (`rate_t` in `vit_pkg`:
0 = 1/2, 1 = 3/4, 2 = 1/4, 3 = 1/8).

- **Coder:** `cod_in_valid/cod_in_bit/cod_in_ready` in, `cod_out_valid/cod_out_r/cod_out_s`
  out.
- **Decoder:**
  - inputs: `dec_in_valid/dec_in_r/dec_in_s` (3-bit soft), answered by `dec_in_ready`;
    `dec_lt`; `sync_threshold`.
  - outputs: `dec_out_valid/dec_out_bit`, `sync_order`, `link_speed/link_speed_valid`.

Change the rates and `dec_lt` only while reset is held.

The decoder runs one trellis step per clock. A 34 Mbit/s stream therefore needs a 34 MHz
clock at rates 1/2 and 3/4, and two or four times that at 1/4 and 1/8, where one codeword
takes 2 or 4 input clocks. After synthesis the top holds about 670 flip-flops and a
12 288-bit path RAM. The 32 ACS units and the metric registers make up most of the logic.

## Where this RTL makes its own choices

The structure follows the original description. These points are this design's own:

- **Derived rates:** rates 1/4 and 1/8 repeat the (P, Q) pair. This keeps four possible
  codewords per branch, and the metric bounds 28 and 24 agree with it.
- **Interfaces:**
  - the valid/ready handshakes;
  - the offset-binary soft format;
  - erasure by zero distance;
  - separate coder and decoder rates.
- **Reset behaviour:** reset clears the coder register, sets all path metrics to 0 and
  starts the puncturing phases.
- **Traceback details:**
  - the traceback starts from state 0;
  - the output buffer has two banks;
  - the path RAM is a register array with asynchronous reads. On silicon it would be a
    three-port RAM macro.
- **Framing rule:** framing fires at "all metrics ≥ 32". This is the reading under which
  the smallest metric lands exactly on 0.
- **Synchronisation detector:** the window length (128 steps), the 16-bit speed and the
  programmable threshold.
- **Not covered:** process, supply and power figures (CMOS 1.5 µm, 5 V, < 3 W, about
  65 000 gates) are silicon properties and are not modelled.

## Files

- `rtl/vit_pkg.sv`: constants, `rate_t`, the soft-pair struct and the codeword function.
- `rtl/`: one module per file. `codec_top` is the top. `sync_fifo` is a helper for the
  puncturer.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints
  `TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the reference parity taps and
  the soft-symbol channel model.
- `tb/tb_codec_top.sv`: the end-to-end test, with the coder looped to the decoder through
  a noisy channel. It runs every rate at truncation lengths 64 and 32, and counts every
  mechanism: puncturing, repetition, erasures, input stalls, framing, and the
  synchronisation order raised by a slipped stream and cleared after realignment.
  It also checks that the link speed rises with the channel noise (about 0, 124 and
  245 per window at rate 1/2 for noise of 0, 1 and 2 levels).
- `tb/tb_viterbi_decoder.sv`: checks the decoder alone. It covers bit-exact decoding with
  hard errors and the one-bit-per-clock latency of 3·lt + 3 clocks.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --top-module tb_codec_top -y rtl -y tb +libext+.sv \
    rtl/vit_pkg.sv tb/tb_ref_pkg.sv tb/tb_codec_top.sv
./obj_dir/Vtb_codec_top
```

Every testbench finishes in seconds.
