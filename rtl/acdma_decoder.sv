// acdma_decoder -- ACDMA despreading decoder for one RX port.
//
// The decoder correlates the channel sum with its despreading code using one
// adder/subtractor and one accumulator register: for each chip it adds the
// channel sum S_i to the accumulator when the despreading chip is +1 and
// subtracts it when the chip is -1. Because the Walsh codes are orthogonal,
// after the N chips of a symbol the accumulator holds N*d_k, where d_k is the
// word sent with the chosen code; since N is a power of two the word is the
// accumulator shifted right by log2(N). That structure follows the document.
//
// This design's own choices: a counter-driven multiplexer feeds zero instead
// of the register at the first chip of a symbol (`first`), which restarts the
// accumulation; the accumulator is W+1+log2(N) bits wide and wraps modulo its
// width, which is exact because the final value N*d_k fits in it even if a
// partial correlation would not; and the decoded word is held in an output
// register with a one-cycle `valid` pulse.
//
// Interface and timing: `sum` is the channel sum (SW bits, signed, sign-
// extended to the accumulator width). `first`/`last` mark the first and last
// chip of a symbol as seen at this decoder, `chip` is the despreading chip
// (1 = -1). The word appears on `data`, with `valid` high for one cycle, the
// cycle after `last`. Reset is synchronous and active high.
module acdma_decoder #(
  parameter int unsigned N  = acdma_pkg::DEFAULT_N,
  parameter int unsigned W  = acdma_pkg::DEFAULT_W,
  parameter int unsigned SW = W + 1 + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [SW-1:0] sum,
  input  logic                 chip,    // despreading chip, 1 = -1
  input  logic                 first,   // first chip of a symbol
  input  logic                 last,    // last chip of a symbol
  output logic [W-1:0]         data,
  output logic                 valid
);

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned AW = W + 1 + L;

  logic signed [AW-1:0] acc_q, acc_in, acc_d, sum_x;

  always_comb begin
    sum_x  = AW'(sum);
    acc_in = first ? '0 : acc_q;
    acc_d  = chip ? acc_in - sum_x : acc_in + sum_x;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      acc_q <= acc_d;
      valid <= last;
      if (last) data <= acc_d[L +: W];
    end
  end

  // The channel sum must not be wider than the accumulator.
  initial assert (SW <= AW) else $error("acdma_decoder: SW wider than accumulator");

endmodule
