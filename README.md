# Aggregated CDMA (ACDMA) crossbar

A CDMA crossbar lets N senders use one shared medium at the same time: each
sender multiplies its data by its own orthogonal spreading code, the spread
signals are simply added, and each receiver recovers one sender's data by
correlating the sum with that sender's code. On-chip CDMA interconnects have
usually copied the wireless scheme bit for bit: a W-bit word travels on W
separate one-bit CDMA channels, each with its own encoder, adder tree and
decoder, and every adder tree carries its own carry bits.

The aggregated scheme sends the whole W-bit word over a single CDMA channel.
Each sender multiplies its word (not each bit) by the chip, one adder tree sums
the words, and one accumulator per receiver recovers the word. The carry bits
that grow through the adder tree are then paid once per word rather than once
per bit: at stage i of the tree a wire bundle is W + log2(N) - i bits wide
instead of W * (1 + log2(N) - i).

This repository holds synthesizable SystemVerilog for:

- `acdma_crossbar`: an N-port crossbar (default N = 8 ports, W = 7-bit words).
- `cdma_link`: a one-sender, one-receiver link built from the same encoder and
  decoder. It is the small configuration one would put on an FPGA to watch a
  word pass through.
- `acdma_system`: the top level, with both side by side.

## How a word crosses the crossbar

Spreading codes are the rows of the N x N Sylvester-Hadamard (Walsh) matrix.
Chip i of row k is +1 if popcount(k & i) is even and -1 if it is odd. TX port k
always uses row k. A symbol lasts N clock cycles, one chip per cycle.

1. **Encoder** (`acdma_encoder`, one per TX port). Multiplying an unsigned word
   d by -1 in two's complement is `~d + 1`. The encoder computes only the
   `~d` part, with W XOR gates: it XORs the word with the chip bit, where
   chip bit 1 means -1. It passes the chip bit along. If you read
   `{chip, d ^ chip}` as a signed (W+1)-bit number, it equals d for chip +1
   and -d-1 for chip -1.
2. **Channel adder** (`acdma_channel_adder`). This is a binary tree of log2(N)
   pipelined stages. The stage-1 adders add two leaves plus both leaves' chip
   bits as carries. That supplies the missing `+1` of every negation without
   any extra adder. Each stage is one bit wider than its inputs, so the root
   sum S_i is W+1+log2(N) bits wide and signed. It can never overflow: |S_i| is
   at most N(2^W - 1).
3. **Decoder** (`acdma_decoder`, one per RX port). This is an up/down
   accumulator. It adds S_i when its despreading chip is +1 and subtracts S_i
   when the chip is -1. The Walsh rows are orthogonal, so after N chips the
   accumulator holds exactly N * d_k, where k is the TX port whose code the
   decoder uses. N is a power of two, so d_k is the accumulator shifted right
   by log2(N).
4. **Controller** (`acdma_controller`). It runs the chip counter and generates
   every port's spreading chip. It also generates the despreading chips, which
   run 1 + log2(N) cycles later to match the pipeline. It marks the first and
   last chip of each decoding window.

### The accumulator is narrower than a partial correlation

The decoder accumulator is only W+1+log2(N) bits wide, the same as the
channel. A partial correlation halfway through a window can exceed that range.
The design still works because two's complement addition is exact modulo
2^width: when the final value N*d_k fits in the width, the wrapped
intermediate values do not matter. N*d_k is below 2^(W+log2 N), so it always
fits. The same argument is why the decoder needs no more flip-flops than the
channel has wires.

### Why the chip carries matter only for some receivers

If the stage-1 carries are left out, every -1 chip contributes -d-1 instead of
-d, on every TX port, including idle ones. Correlated with Walsh row k != 0,
that error adds up to +N/2, and the final shift by log2(N) throws it away. Only
a receiver of row 0 (the all +1 code) sees a large error, -(N^2 - N)/2, and
decodes wrong words. A test that never listens to TX port 0 would therefore
miss a missing carry. The end-to-end test draws `rx_sel` at random, so row 0
is always covered. The carries are still needed for an exact channel sum S_i.

## Interfaces and timing

### `acdma_crossbar #(N = 8, W = 7)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous, active-high reset |
| `tx_data` | in | N x W | word of each TX port, sampled at the end of a `tx_ready` cycle |
| `tx_ready` | out | 1 | high for one cycle every N cycles, starting in the first cycle after reset |
| `rx_sel` | in | N x log2 N | which TX port each RX port receives from |
| `rx_data` | out | N x W | decoded words, held until the next symbol |
| `rx_valid` | out | N | one-cycle pulse when `rx_data` is updated |

- **Rate.** Every TX port can send one word every N cycles. All ports send at
  once.
- **Idle ports.** A port with nothing to send drives 0, which adds nothing to
  the channel.
- **Latency.** A word sampled at the end of the `tx_ready` cycle appears with
  `rx_valid` N + log2(N) + 1 cycles later (12 at the defaults):
  - 1 cycle in the encoder register,
  - log2(N) cycles in the adder tree,
  - N chips of accumulation,
  - 1 cycle in the output register.
- **Receiver selection.** `rx_sel` is sampled once per decoding window. The
  value present log2(N) cycles after a `tx_ready` cycle applies to the words
  sampled in that `tx_ready` cycle. Changing it in the `tx_ready` cycle itself
  is always early enough. Several RX ports may select the
  same TX port (multicast). After reset, RX r listens to TX r.
- **Constraints.** N must be a power of two, at least 2. `rx_valid` stays low
  until the pipeline holds the first real symbol.

### `cdma_link #(W = 7, N = 8, CODE = 1)`

Ports: `Clock`, `Reset`, `DataIn[W-1:0]`, `DataOut[W-1:0]`, `Valid`.

- `DataIn` is sampled every N cycles, starting in the first cycle after
  `Reset` falls.
- The word appears on `DataOut` N + 1 cycles later, with a one-cycle `Valid`.
- The channel between encoder `EN` and decoder `DE` is the encoder's (W+1)-bit
  `{chip, enc}`. The chip carry is added in front of the decoder, which is all
  a channel adder does when there is one sender.
- `CODE` picks the Walsh row. Do not use row 0: it is all +1 and does not
  spread.

### `acdma_system #(N = 8, W = 7)`

The crossbar's ports, plus `link_in`, `link_out` and `link_valid` for the
link. Both share `clk` and `rst`.

## Files

- **RTL (`rtl/`)**:
  - `acdma_pkg.sv`: default sizes and the Walsh chip function.
  - `acdma_encoder.sv`, `acdma_channel_adder.sv`, `acdma_decoder.sv`,
    `acdma_controller.sv`: the four building blocks.
  - `acdma_crossbar.sv`, `cdma_link.sv`, `acdma_system.sv`: the assemblies.
- **Testbenches (`tb/`)**, one per module:
  - `tb_acdma_encoder`, `tb_acdma_channel_adder`, `tb_acdma_decoder`,
    `tb_acdma_controller`: each compares its block with an independent
    integer model. The reference codes are built by the recursive Sylvester
    construction, not by the popcount rule used in the RTL.
  - `tb_acdma_crossbar`: runs a 16-port, 10-bit crossbar with random words
    and random receiver selections. It checks every decoded word, the exact
    latency and the symbol rate.
  - `tb_cdma_link`: checks two links with different codes, including the word
    1010110 and an all-ones word.
  - `tb_acdma_system`: the end-to-end test, at the default parameters. It
    counts how often each mechanism happens and fails if one never does. The
    mechanisms are:
    - all ports sending at once,
    - multicast,
    - an RX port switching code,
    - full-scale words on every port (largest channel sum),
    - idle ports,
    - link transfers.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`acdma_channel_adder` also asserts, in simulation, that every channel sum lies
within +-N(2^W - 1).

## Simulating

With Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_acdma_system rtl/acdma_pkg.sv tb/tb_acdma_system.sv
./obj_dir/Vtb_acdma_system
```

For another testbench, replace `tb_acdma_system` with its name. Each run takes
a few seconds. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/acdma_pkg.sv rtl/<module>.sv`.

To change the size, set `N` and `W` on `acdma_crossbar` or `acdma_system`. The
channel width, the accumulator width and the pipeline latency follow from
them.

## What is specified and what is chosen here

These parts follow the scheme as described:

- the three-part structure: encoders, one channel adder, one decoder per port;
- the W-XOR encoder;
- the chip carries folded into the first adder stage;
- the tree adder with one pipeline register per stage and a root width of
  W+1+log2(N);
- the up/down accumulator decoder with the final shift by log2(N);
- 7-bit words and the 8-bit encoder-to-decoder channel of the single link;
- the link's module and instance names (`CDMA`/`cdma_link`, `EN`, `DE`,
  `DataIn`, `DataOut`, `Clock`, `Reset`);
- synchronous reset on the decoder output register.

These parts are choices of this implementation:

- The number of ports is 8. The scheme only requires a power of two.
- Data words are unsigned. Chip bit 1 means -1.
- TX port k always uses Walsh row k. Receivers choose their sender with
  `rx_sel`. No request/grant protocol for assigning codes is modelled.
- The encoder has an output register and holds the word for the whole symbol.
  The decoder has an output register with a valid pulse.
- The decoder's counter-controlled multiplexer is read as the restart of the
  accumulation at the first chip of a window. Its input is zero at that chip
  and the register at the other chips.
- The controller's internals, its latency alignment and the `tx_ready`/`rx_valid`
  protocol are this design's own.
- The link uses code length 8 and Walsh row 1.

### Differences to keep in mind

- **Stage widths.** The block diagram labels show stage 1 as W+1 bits wide
  and the root as W+log2(N). Those widths cannot hold a signed sum of N
  words, so the RTL uses W+1+s bits after stage s, as the width derivation
  says.
- **Link size.** The published FPGA link used 19 flip-flops. This link has
  more:
  - it holds the input word for a whole symbol,
  - its accumulator is full width,
  - its controller is shared with the N-port crossbar.

  The internals of that FPGA build are not described, so no attempt was made
  to match its size.
- **No baseline.** The conventional bit-per-channel CDMA crossbar, which
  ACDMA is compared against, is not included. Neither are area or power
  figures.
- **Processing elements.** The processing elements attached to the ports are
  outside the design.
