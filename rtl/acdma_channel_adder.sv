// acdma_channel_adder -- pipelined tree adder forming the ACDMA channel sum.
//
// The N encoder outputs are the leaves of a binary adder tree of log2(N)
// stages; the root is the channel sum S. Each leaf is read as the signed
// (W+1)-bit number {chip, enc}. The first-stage adders also add the two
// chip bits of their leaves as carries, which completes the two's complement
// negation the encoders leave out, so every stage-1 adder delivers
// d_a*c_a + d_b*c_b. Each stage widens its result by one bit, so stage s
// produces W+1+s bits and the root W+1+log2(N) bits; no stage can overflow.
// A pipeline register follows every stage. All of this follows the document;
// the stage widths follow its formula W+1+log2(N) for the root.
//
// Interface and timing: `enc`/`enc_chip` are the registered encoder outputs;
// `sum` is registered and appears log2(N) cycles after its leaves. N must be
// a power of two and at least 2. Reset (synchronous, active high) clears the
// pipeline registers.
module acdma_channel_adder #(
  parameter int unsigned N = acdma_pkg::DEFAULT_N,
  parameter int unsigned W = acdma_pkg::DEFAULT_W,
  localparam int unsigned L = $clog2(N),
  localparam int unsigned SW = W + 1 + L
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][W-1:0]  enc,
  input  logic [N-1:0]         enc_chip,
  output logic signed [SW-1:0] sum
);

  for (genvar s = 1; s <= L; s++) begin : g_stage
    localparam int unsigned OW = W + 1 + s;   // output width of this stage
    localparam int unsigned NA = N >> s;      // adders in this stage
    logic [NA-1:0][OW-1:0] q;    // pipeline register of this stage

    for (genvar a = 0; a < NA; a++) begin : g_add
      logic signed [OW-1:0] d;
      if (s == 1) begin : g_leaf
        logic signed [W:0] va, vb;
        always_comb begin
          va = {enc_chip[2*a],   enc[2*a]};
          vb = {enc_chip[2*a+1], enc[2*a+1]};
          d  = OW'(va) + OW'(vb)
             + OW'({1'b0, enc_chip[2*a]}) + OW'({1'b0, enc_chip[2*a+1]});
        end
      end else begin : g_node
        always_comb d = OW'(signed'(g_stage[s-1].q[2*a])) + OW'(signed'(g_stage[s-1].q[2*a+1]));
      end

      always_ff @(posedge clk) begin
        if (rst) q[a] <= '0;
        else     q[a] <= d;
      end
    end
  end

  assign sum = signed'(g_stage[L].q[0]);

  // The channel sum of N words of W bits lies within +-N*(2^W - 1), which the
  // W+1+log2(N)-bit root holds without overflow.
  localparam longint SMAX = longint'(N) * ((longint'(1) << W) - 1);
  a_sum_range: assert property (@(posedge clk) disable iff (rst)
    longint'(sum) <= SMAX && longint'(sum) >= -SMAX);

endmodule
