// acdma_controller -- chip counter and Walsh code generator of the crossbar.
//
// A free-running counter steps through the N chips of a symbol. From it the
// controller derives, for every TX port k, chip cnt of Walsh code k, and for
// the encoders a `tx_load` strobe on chip 0, when the TX words are taken.
// Encoded chips reach the decoders LAT cycles later (encoder register plus
// adder-tree pipeline), so the decoder side runs on a delayed chip index
// dcnt = cnt - LAT (mod N). Each RX port r despreads with Walsh code
// rx_sel[r], i.e. it receives from TX port rx_sel[r]; the selection is
// sampled at the end of each decoding window so that a window never mixes
// two codes. `rx_first`/`rx_last` mark the first and last chip of a decoding
// window; `rx_last` is held off until the first full window after reset.
// The document gives this block's function (spreading codes and counters for
// encoders and decoders); the code assignment, the per-port selection and
// the timing are this design's own.
//
// Reset is synchronous and active high; after reset every RX port r listens
// to TX port r. N must be a power of two and at least 2.
module acdma_controller #(
  parameter int unsigned N   = acdma_pkg::DEFAULT_N,
  parameter int unsigned LAT = 1 + $clog2(N),
  localparam int unsigned L  = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][L-1:0] rx_sel,    // code (= TX port) per RX port
  output logic                tx_load,   // chip 0 of the TX side
  output logic [N-1:0]        tx_chip,   // spreading chip of TX port k
  output logic [N-1:0]        rx_chip,   // despreading chip of RX port r
  output logic                rx_first,
  output logic                rx_last
);

  import acdma_pkg::walsh_chip;

  logic [L-1:0]        cnt_q, dcnt;
  logic [N-1:0][L-1:0] sel_q;
  logic                started_q;
  localparam int unsigned WW = $clog2(LAT + 1);
  logic [WW-1:0]       warm_q;   // cycles since reset, saturating at LAT

  always_comb begin
    dcnt     = cnt_q - L'(LAT % N);
    tx_load  = (cnt_q == '0);
    rx_first = (dcnt == '0);
    rx_last  = (dcnt == L'(N - 1)) && started_q;
    for (int k = 0; k < N; k++) begin
      tx_chip[k] = walsh_chip(32'(k), 32'(cnt_q));
      rx_chip[k] = walsh_chip(32'(sel_q[k]), 32'(dcnt));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= '0;
      started_q <= 1'b0;
      warm_q    <= '0;
      for (int k = 0; k < N; k++) sel_q[k] <= L'(k);
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (warm_q != WW'(LAT)) warm_q <= warm_q + 1'b1;
      else                    started_q <= 1'b1;
      if (dcnt == L'(N - 1)) sel_q <= rx_sel;
    end
  end

endmodule
