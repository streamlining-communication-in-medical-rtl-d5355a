// tb_acdma_system -- end-to-end testbench for acdma_system at its default
// parameters (8 ports, 7-bit words).
//
// Every symbol all TX ports of the crossbar send a word and every RX port
// picks a TX port; the decoded words, their latency (N+log2(N)+1 cycles) and
// the one-symbol-per-N-cycles rate are checked, as in the crossbar test. The
// single link carries its own stream alongside. The test counts how often
// each mechanism of the design was exercised and fails if one never was:
// all ports sending at once, several RX ports receiving the same TX port
// (multicast), an RX port switching to another code between symbols,
// full-scale words on every port (largest channel sum), idle TX ports
// sending zero, and words carried by the single link.
module tb_acdma_system;
  localparam int N = acdma_pkg::DEFAULT_N, W = acdma_pkg::DEFAULT_W, L = $clog2(N);
  localparam int LATENCY = N + L + 1, LINK_LAT = N + 1;
  localparam int SYMS = 200, CYC = SYMS * N + LATENCY + 4;
  logic clk = 0, rst = 1;
  logic [N-1:0][W-1:0] tx_data;
  logic tx_ready;
  logic [N-1:0][L-1:0] rx_sel, prev_sel;
  logic [N-1:0][W-1:0] rx_data;
  logic [N-1:0] rx_valid;
  logic [W-1:0] link_in, link_out;
  logic link_valid;
  int checks = 0, failures = 0;
  logic [N-1:0][W-1:0] exp_word [CYC];
  bit exp_valid [CYC];
  logic [W-1:0] link_sent [CYC];
  int n_all_ports = 0, n_multicast = 0, n_switch = 0, n_fullscale = 0, n_idle = 0, n_link = 0;

  acdma_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input int count, input string what);
    checks++;
    $display("mechanism %-28s exercised %0d times", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
  endtask

  initial begin
    int mode, zeros;
    bit seen [N];
    bit multi;
    tx_data = '0; link_in = '0;
    for (int r = 0; r < N; r++) rx_sel[r] = L'(r);
    prev_sel = rx_sel;
    for (int t = 0; t < CYC; t++) exp_valid[t] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < CYC; t++) begin
      // crossbar outputs of cycle t
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
        n_all_ports++;
      end else if (rx_valid != '0) begin
        failures++; $display("FAIL t=%0d unexpected rx_valid=%h", t, rx_valid);
      end
      // link output of cycle t
      checks++;
      if (t >= LINK_LAT && (t - LINK_LAT) % N == 0) begin
        if (!link_valid || link_out != link_sent[t - LINK_LAT]) begin
          failures++;
          $display("FAIL t=%0d link_out=%0d expected %0d", t, link_out, link_sent[t - LINK_LAT]);
        end else n_link++;
      end else if (link_valid) begin
        failures++; $display("FAIL t=%0d stray link_valid", t);
      end
      checks++;
      if (tx_ready != (t % N == 0)) begin failures++; $display("FAIL t=%0d tx_ready", t); end
      // stimulus for the words sampled at the end of cycle t
      link_in = W'($urandom);
      link_sent[t] = link_in;
      if (tx_ready && t + LATENCY < CYC) begin
        mode = $urandom_range(0, 7);
        zeros = 0;
        for (int k = 0; k < N; k++) begin
          tx_data[k] = (mode == 0) ? '1 : (mode == 1 && k % 3 == 0) ? '0 : W'($urandom);
          if (tx_data[k] == '0) zeros++;
        end
        if (mode == 0) n_fullscale++;
        if (zeros > 0) n_idle++;
        prev_sel = rx_sel;
        if ($urandom_range(0, 2) != 0)
          for (int r = 0; r < N; r++) rx_sel[r] = L'($urandom);
        if (rx_sel != prev_sel) n_switch++;
        multi = 0;
        for (int k = 0; k < N; k++) seen[k] = 0;
        for (int r = 0; r < N; r++) begin
          if (seen[rx_sel[r]]) multi = 1;
          seen[rx_sel[r]] = 1;
        end
        if (multi) n_multicast++;
        exp_valid[t] = 1;
        for (int r = 0; r < N; r++) exp_word[t][r] = tx_data[rx_sel[r]];
      end
      @(posedge clk);
      @(negedge clk);
      tx_data = {N{W'($urandom)}};
    end
    need(n_all_ports, "all ports sending at once");
    need(n_multicast, "multicast");
    need(n_switch,    "RX code switch");
    need(n_fullscale, "full-scale words");
    need(n_idle,      "idle TX port");
    need(n_link,      "single-link transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
