// acdma_crossbar -- N-port Aggregated CDMA (ACDMA) crossbar.
//
// The crossbar connects N TX ports to N RX ports over a single shared CDMA
// channel that carries whole W-bit words rather than one channel per bit.
// Every TX port k spreads its word with Walsh code k (acdma_encoder, W XOR
// gates), a pipelined adder tree adds all spread words and the code chips
// into one channel sum of W+1+log2(N) bits (acdma_channel_adder), and every
// RX port despreads that sum with the code of the TX port it listens to
// (acdma_decoder, an up/down accumulator). The controller supplies the chip
// counter and the codes (acdma_controller). This structure follows the
// document; the port protocol below is this design's own.
//
// Interface and timing: one symbol lasts N clock cycles. `tx_ready` is high
// in the cycle whose clock edge samples all `tx_data` words; a TX port with
// nothing to send drives zero. `rx_sel[r]` picks the TX port that RX port r
// receives from (several RX ports may pick the same TX port); it is sampled
// once per decoding window. A word sampled at the end of the `tx_ready`
// cycle appears on `rx_data` with `rx_valid` high for one cycle N+log2(N)+1
// cycles later; a new word can be sent on every TX port every N cycles.
// Reset is synchronous and active high.
module acdma_crossbar #(
  parameter int unsigned N = acdma_pkg::DEFAULT_N,
  parameter int unsigned W = acdma_pkg::DEFAULT_W,
  localparam int unsigned L = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][W-1:0] tx_data,
  output logic                tx_ready,
  input  logic [N-1:0][L-1:0] rx_sel,
  output logic [N-1:0][W-1:0] rx_data,
  output logic [N-1:0]        rx_valid
);

  localparam int unsigned SW  = W + 1 + L;
  localparam int unsigned LAT = 1 + L;   // encoder register + adder stages

  logic                 load, rx_first, rx_last;
  logic [N-1:0]         tx_chip, rx_chip, enc_chip;
  logic [N-1:0][W-1:0]  enc;
  logic signed [SW-1:0] sum;

  acdma_controller #(.N(N), .LAT(LAT)) u_ctrl (
    .clk, .rst, .rx_sel,
    .tx_load(load), .tx_chip, .rx_chip, .rx_first, .rx_last
  );

  assign tx_ready = load;

  for (genvar k = 0; k < N; k++) begin : g_enc
    acdma_encoder #(.W(W)) u_enc (
      .clk, .rst, .load,
      .tx_data(tx_data[k]), .chip(tx_chip[k]),
      .enc(enc[k]), .enc_chip(enc_chip[k])
    );
  end

  acdma_channel_adder #(.N(N), .W(W)) u_adder (
    .clk, .rst, .enc, .enc_chip, .sum
  );

  for (genvar r = 0; r < N; r++) begin : g_dec
    acdma_decoder #(.N(N), .W(W), .SW(SW)) u_dec (
      .clk, .rst, .sum, .chip(rx_chip[r]),
      .first(rx_first), .last(rx_last),
      .data(rx_data[r]), .valid(rx_valid[r])
    );
  end

endmodule
