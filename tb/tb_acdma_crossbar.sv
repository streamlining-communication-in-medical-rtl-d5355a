// tb_acdma_crossbar -- self-checking testbench for acdma_crossbar.
//
// Runs a 16-port, 10-bit crossbar (parameters overridden to check that the
// design scales). Every symbol all TX ports send random words (some full
// scale, some zero) and every RX port picks a random TX port. A decoded word
// must equal the word its chosen TX port sent, and `rx_valid` must rise
// exactly N+log2(N)+1 cycles after the sampling cycle, once per N cycles.
module tb_acdma_crossbar;
  localparam int N = 16, W = 10, L = $clog2(N), LATENCY = N + L + 1;
  localparam int SYMS = 300, CYC = SYMS * N + LATENCY + 4;
  logic clk = 0, rst = 1;
  logic [N-1:0][W-1:0] tx_data;
  logic tx_ready;
  logic [N-1:0][L-1:0] rx_sel;
  logic [N-1:0][W-1:0] rx_data;
  logic [N-1:0] rx_valid;
  int checks = 0, failures = 0;
  // expected RX words per sampling cycle
  logic [N-1:0][W-1:0] exp_word [CYC];
  bit exp_valid [CYC];

  acdma_crossbar #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mode;
    tx_data = '0;
    for (int r = 0; r < N; r++) rx_sel[r] = L'(r);
    for (int t = 0; t < CYC; t++) exp_valid[t] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < CYC; t++) begin
      // cycle t: check outputs, then set up the words sampled in this cycle
      checks++;
      if (t >= LATENCY && exp_valid[t - LATENCY]) begin
        if (rx_valid != '1) begin failures++; $display("FAIL t=%0d rx_valid=%h", t, rx_valid); end
        for (int r = 0; r < N; r++) begin
          checks++;
          if (rx_data[r] != exp_word[t - LATENCY][r]) begin
            failures++;
            $display("FAIL t=%0d rx %0d got %0d expected %0d", t, r, rx_data[r],
                     exp_word[t - LATENCY][r]);
          end
        end
      end else if (rx_valid != '0) begin
        failures++; $display("FAIL t=%0d unexpected rx_valid=%h", t, rx_valid);
      end
      checks++;
      if (tx_ready != (t % N == 0)) begin failures++; $display("FAIL t=%0d tx_ready", t); end
      if (tx_ready && t + LATENCY < CYC) begin
        mode = $urandom_range(0, 9);
        for (int k = 0; k < N; k++)
          tx_data[k] = (mode == 0) ? '1 : (mode == 1 && k % 2 == 0) ? '0 : W'($urandom);
        for (int r = 0; r < N; r++) rx_sel[r] = L'($urandom);
        exp_valid[t] = 1;
        for (int r = 0; r < N; r++) exp_word[t][r] = tx_data[rx_sel[r]];
      end
      @(posedge clk);
      @(negedge clk);
      // words only need to be valid in the sampling cycle
      tx_data = {N{W'($urandom)}};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
