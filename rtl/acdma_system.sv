// acdma_system -- top level: the N-port ACDMA crossbar and the single-link
// FPGA demonstrator side by side, each with its own ports.
//
// The crossbar (acdma_crossbar) is the main design: N TX ports share one
// CDMA channel carrying whole W-bit words. The link (cdma_link) is the
// one-transmitter, one-receiver configuration built from the same encoder
// and decoder. Both run from the same clock and synchronous active-high
// reset; see those modules for protocol and timing.
module acdma_system #(
  parameter int unsigned N = acdma_pkg::DEFAULT_N,
  parameter int unsigned W = acdma_pkg::DEFAULT_W,
  localparam int unsigned L = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst,
  // crossbar
  input  logic [N-1:0][W-1:0] tx_data,
  output logic                tx_ready,
  input  logic [N-1:0][L-1:0] rx_sel,
  output logic [N-1:0][W-1:0] rx_data,
  output logic [N-1:0]        rx_valid,
  // single link
  input  logic [W-1:0]        link_in,
  output logic [W-1:0]        link_out,
  output logic                link_valid
);

  acdma_crossbar #(.N(N), .W(W)) u_xbar (
    .clk, .rst, .tx_data, .tx_ready, .rx_sel, .rx_data, .rx_valid
  );

  cdma_link #(.W(W), .N(N)) u_link (
    .Clock(clk), .Reset(rst), .DataIn(link_in), .DataOut(link_out), .Valid(link_valid)
  );

endmodule
