// acdma_encoder -- ACDMA spreading encoder for one TX port.
//
// The encoder multiplies the port's W-bit unsigned word by the current
// spreading chip (+1 or -1). It does this with W XOR gates only: the word is
// XOR-ed with the chip bit, giving the word itself for a +1 chip and its
// one's complement for a -1 chip. The +1 that would turn the one's complement
// into the two's complement negation is not added here; the chip bit is
// passed on so that the channel adder can add it as a carry. Read as a signed
// (W+1)-bit number whose sign bit is the chip bit, {chip, enc} + chip equals
// data * chip. This split between encoder and adder follows the document;
// the chip bit encoding (0 = +1, 1 = -1) is this design's own.
//
// Interface and timing: `load` marks the first chip cycle of a symbol; in that
// cycle `tx_data` is used directly and stored, and the stored word is used for
// the remaining chips of the symbol. `enc` and `enc_chip` are registered, so
// they show the chip presented one cycle earlier. The output register and the
// word holding register are this design's choices. Reset is synchronous and
// active high.
module acdma_encoder #(
  parameter int unsigned W = acdma_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,      // first chip of a symbol: take tx_data
  input  logic [W-1:0] tx_data,   // word from the TX port
  input  logic         chip,      // spreading chip, 1 = -1
  output logic [W-1:0] enc,       // XOR-encoded word
  output logic         enc_chip   // chip belonging to enc, used as carry-in
);

  logic [W-1:0] hold_q;
  logic [W-1:0] word;

  always_comb word = load ? tx_data : hold_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_q   <= '0;
      enc      <= '0;
      enc_chip <= 1'b0;
    end else begin
      hold_q   <= word;
      enc      <= word ^ {W{chip}};
      enc_chip <= chip;
    end
  end

endmodule
