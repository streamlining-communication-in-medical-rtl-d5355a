// tb_acdma_controller -- self-checking testbench for acdma_controller.
//
// Checks against a Sylvester-Hadamard matrix built recursively in the
// testbench: tx_load on every N-th cycle starting right after reset, TX chip k
// equal to row k at the current chip, the decoder side running LAT cycles
// behind with first/last markers, rx_last suppressed before the first full
// window, and RX code selections taking effect only at window boundaries.
module tb_acdma_controller;
  localparam int N = 8, L = $clog2(N), LAT = 1 + L;
  localparam int CYC = 2000;
  logic clk = 0, rst = 1;
  logic [N-1:0][L-1:0] rx_sel;
  logic tx_load, rx_first, rx_last;
  logic [N-1:0] tx_chip, rx_chip;
  int checks = 0, failures = 0;
  int h [N][N];

  acdma_controller #(.N(N), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int t);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d %s", t, what); end
  endtask

  initial begin
    int sel_cur [N];
    int ci, di;
    h[0][0] = 1;
    for (int m = 1; m < N; m *= 2)
      for (int r = 0; r < m; r++)
        for (int c = 0; c < m; c++) begin
          h[r][c + m] = h[r][c]; h[r + m][c] = h[r][c]; h[r + m][c + m] = -h[r][c];
        end
    for (int r = 0; r < N; r++) begin rx_sel[r] = L'(r); sel_cur[r] = r; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < CYC; t++) begin
      // inputs settle mid-cycle; check the cycle-t outputs
      #1;
      ci = t % N;
      di = ((t - LAT) % N + N) % N;
      chk(tx_load == (ci == 0), "tx_load", t);
      for (int k = 0; k < N; k++) chk(tx_chip[k] == (h[k][ci] < 0), "tx_chip", t);
      chk(rx_first == (di == 0), "rx_first", t);
      chk(rx_last == (di == N - 1 && t >= LAT), "rx_last", t);
      for (int r = 0; r < N; r++) chk(rx_chip[r] == (h[sel_cur[r]][di] < 0), "rx_chip", t);
      // change the requested selection at random times
      if ($urandom_range(0, 4) == 0)
        for (int r = 0; r < N; r++) rx_sel[r] = L'($urandom);
      @(posedge clk);
      if (di == N - 1) for (int r = 0; r < N; r++) sel_cur[r] = int'(rx_sel[r]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
