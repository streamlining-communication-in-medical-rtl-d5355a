// tb_acdma_decoder -- self-checking testbench for acdma_decoder.
//
// The testbench builds channel sums itself: for each symbol it picks N random
// words (some symbols full scale), forms S_i = sum_j d_j * H[j][i] with H the
// Sylvester-Hadamard matrix built recursively, and feeds the N sums with the
// despreading chips of a randomly chosen code k. The decoded word must equal
// d_k and must appear, with `valid`, in the cycle after the last chip.
module tb_acdma_decoder;
  localparam int N = 8, W = 7, L = $clog2(N), SW = W + 1 + L;
  localparam int SYMS = 400;
  logic clk = 0, rst = 1;
  logic signed [SW-1:0] sum;
  logic chip, first, last;
  logic [W-1:0] data;
  logic valid;
  int checks = 0, failures = 0;
  int h [N][N];

  acdma_decoder #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (SYMS * (N + 2) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d [N];
    int k, s, want;
    h[0][0] = 1;
    for (int m = 1; m < N; m *= 2)
      for (int r = 0; r < m; r++)
        for (int c = 0; c < m; c++) begin
          h[r][c + m] = h[r][c]; h[r + m][c] = h[r][c]; h[r + m][c + m] = -h[r][c];
        end
    sum = '0; chip = 0; first = 0; last = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int y = 0; y < SYMS; y++) begin
      for (int j = 0; j < N; j++)
        d[j] = (y % 10 == 3) ? (1 << W) - 1 : int'($urandom_range(0, (1 << W) - 1));
      k = $urandom_range(0, N - 1);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        s = 0;
        for (int j = 0; j < N; j++) s += d[j] * h[j][i];
        sum = SW'(s); chip = (h[k][i] < 0); first = (i == 0); last = (i == N - 1);
        // valid must be low while the symbol is accumulating (except the
        // pulse of the previous symbol in its first chip)
        if (i > 0) begin
          checks++;
          if (valid) begin failures++; $display("FAIL stray valid y=%0d i=%0d", y, i); end
        end
      end
      @(negedge clk);
      first = 0; last = 0; sum = SW'($urandom); chip = 1'($urandom);
      checks++;
      want = d[k];
      if (!valid || int'(data) != want) begin
        failures++;
        $display("FAIL y=%0d k=%0d data=%0d valid=%0b expected %0d", y, k, data, valid, want);
      end
      // Idle cycles between symbols on some runs, garbage on the bus.
      if (y % 3 == 0) begin
        @(negedge clk);
        checks++;
        if (valid || int'(data) != want) begin failures++; $display("FAIL hold y=%0d", y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
