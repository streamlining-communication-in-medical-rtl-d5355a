// tb_acdma_channel_adder -- self-checking testbench for acdma_channel_adder.
//
// Each cycle every leaf gets a random word d and chip c, presented as the
// encoder would present them (d XOR c, c). The expected channel sum is the
// integer sum of d*(+1/-1) over all leaves; it must appear on `sum` exactly
// log2(N) cycles later. Full-scale words with all chips +1 and all chips -1
// are included to hit both ends of the output range.
module tb_acdma_channel_adder;
  localparam int N = 8, W = 7, L = $clog2(N), SW = W + 1 + L;
  localparam int CYC = 3000;
  logic clk = 0, rst = 1;
  logic [N-1:0][W-1:0] enc;
  logic [N-1:0] enc_chip;
  logic signed [SW-1:0] sum;
  int checks = 0, failures = 0;
  int expq [CYC + 8];

  acdma_channel_adder #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, e;
    enc = '0; enc_chip = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < CYC; t++) begin
      @(negedge clk);
      e = 0;
      for (int j = 0; j < N; j++) begin
        d = (t % 50 < 2) ? (1 << W) - 1 : int'($urandom_range(0, (1 << W) - 1));
        enc_chip[j] = (t % 50 == 0) ? 1'b0 : (t % 50 == 1) ? 1'b1 : 1'($urandom);
        enc[j] = W'(d) ^ {W{enc_chip[j]}};
        e += enc_chip[j] ? -d : d;
      end
      expq[t] = e;
      if (t >= L) begin
        checks++;
        if (int'(sum) != expq[t - L]) begin
          failures++;
          $display("FAIL t=%0d sum=%0d expected %0d", t, sum, expq[t - L]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
