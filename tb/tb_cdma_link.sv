// tb_cdma_link -- self-checking testbench for cdma_link.
//
// Feeds a changing 7-bit word to the link every cycle; the link samples it
// every N cycles starting with the first cycle after reset, and the word
// 1010110 is among those sent. Each sampled word
// must appear on DataOut, with Valid, exactly N+1 cycles later and stay there
// until the next one. Also runs the link with a second code row.
module tb_cdma_link;
  localparam int W = 7, N = 8, LATENCY = N + 1, CYC = 2000;
  logic Clock = 0, Reset = 1;
  logic [W-1:0] DataIn, DataOut, DataIn2, DataOut2;
  logic Valid, Valid2;
  int checks = 0, failures = 0;
  logic [W-1:0] sampled [CYC];
  logic [W-1:0] sampled2 [CYC];
  logic [W-1:0] last_out;

  cdma_link dut (.*);
  cdma_link #(.W(W), .N(N), .CODE(6)) dut2 (.Clock, .Reset, .DataIn(DataIn2),
                                           .DataOut(DataOut2), .Valid(Valid2));

  always #5 Clock = ~Clock;

  initial begin
    repeat (CYC + 100) @(posedge Clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    DataIn = '0; DataIn2 = '0; last_out = '0;
    repeat (3) @(posedge Clock);
    @(negedge Clock) Reset = 0;
    for (int t = 0; t < CYC; t++) begin
      DataIn  = (t % 80 == 0) ? '1 : (t % 80 == 40) ? 7'b1010110 : W'($urandom);
      DataIn2 = W'($urandom);
      sampled[t] = DataIn; sampled2[t] = DataIn2;
      #1;
      checks++;
      if (t >= LATENCY && (t - LATENCY) % N == 0) begin
        if (!Valid || DataOut != sampled[t - LATENCY] || !Valid2 || DataOut2 != sampled2[t - LATENCY]) begin
          failures++;
          $display("FAIL t=%0d out=%0d/%0d valid=%0b expected %0d/%0d", t, DataOut, DataOut2,
                   Valid, sampled[t - LATENCY], sampled2[t - LATENCY]);
        end
        last_out = sampled[t - LATENCY];
      end else if (Valid || Valid2 || DataOut != last_out) begin
        failures++;
        $display("FAIL t=%0d stray valid or changed output", t);
      end
      @(negedge Clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
