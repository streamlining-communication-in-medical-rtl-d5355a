// cdma_link -- single transmitter-to-receiver CDMA link (FPGA demonstrator).
//
// One ACDMA encoder spreads the W-bit input word with one Walsh code and
// one ACDMA decoder despreads it again, so DataOut repeats DataIn after the
// link latency. The encoder's (W+1)-bit output {chip, enc} is the channel;
// with a single transmitter the channel adder reduces to adding the chip bit
// as a carry, which the link does in front of the decoder. The module and
// port names, the 7-bit data width and the 8-bit channel between encoder and
// decoder follow the document's implementation; the code length N, the code
// row CODE and the decoder feed are this design's own choices.
//
// Timing: DataIn is sampled every N cycles (first sample in the first cycle
// after Reset is released); the decoded word appears on DataOut N+1 cycles
// after it was sampled and is held until the next one. Reset is synchronous
// and active high.
module cdma_link #(
  parameter int unsigned W    = acdma_pkg::DEFAULT_W,
  parameter int unsigned N    = acdma_pkg::DEFAULT_N,
  parameter int unsigned CODE = 1,
  localparam int unsigned L   = $clog2(N)
) (
  input  logic         Clock,
  input  logic         Reset,
  input  logic [W-1:0] DataIn,
  output logic [W-1:0] DataOut,
  output logic         Valid      // DataOut updated this cycle
);

  logic [N-1:0]        tx_chip, rx_chip;
  logic [N-1:0][L-1:0] rx_sel;
  logic                load, rx_first, rx_last;
  logic [W-1:0]        enc;
  logic                enc_chip;
  logic signed [W:0]   chan;       // encoder DataOut: {chip, enc}
  logic signed [W:0]   sum;        // chan + chip = DataIn * chip

  always_comb for (int k = 0; k < N; k++) rx_sel[k] = L'(CODE);

  acdma_controller #(.N(N), .LAT(1)) u_ctrl (
    .clk(Clock), .rst(Reset), .rx_sel,
    .tx_load(load), .tx_chip, .rx_chip, .rx_first, .rx_last
  );

  acdma_encoder #(.W(W)) EN (
    .clk(Clock), .rst(Reset), .load,
    .tx_data(DataIn), .chip(tx_chip[CODE]),
    .enc, .enc_chip
  );

  always_comb begin
    chan = {enc_chip, enc};
    sum  = chan + (W+1)'({1'b0, enc_chip});
  end

  acdma_decoder #(.N(N), .W(W), .SW(W + 1)) DE (
    .clk(Clock), .rst(Reset), .sum, .chip(rx_chip[CODE]),
    .first(rx_first), .last(rx_last),
    .data(DataOut), .valid(Valid)
  );

endmodule
