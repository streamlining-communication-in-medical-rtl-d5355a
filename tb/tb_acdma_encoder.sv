// tb_acdma_encoder -- self-checking testbench for acdma_encoder.
//
// Drives random words, chips and load strobes. A reference model keeps the
// word of the current symbol and checks, one cycle later, that the encoder
// output is the word with every bit inverted for a -1 chip, that the chip is
// passed on, and that {chip, enc} + chip read as a signed number equals the
// word times +1 or -1.
module tb_acdma_encoder;
  localparam int W = 7;
  logic clk = 0, rst = 1;
  logic load, chip;
  logic [W-1:0] tx_data, enc;
  logic enc_chip;
  int checks = 0, failures = 0;

  acdma_encoder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held, word, expv, got;
    logic c;
    load = 0; chip = 0; tx_data = 0; held = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load    = (n % 4 == 0) || ($urandom_range(0, 7) == 0);
      chip    = 1'($urandom);
      tx_data = W'($urandom);
      word    = load ? int'(tx_data) : held;
      if (load) held = int'(tx_data);
      c = chip;
      @(posedge clk); #1;
      checks++;
      if (enc !== (c ? W'(~word) : W'(word)) || enc_chip !== c) begin
        failures++;
        $display("FAIL n=%0d word=%0d chip=%0b enc=%0h enc_chip=%0b", n, word, c, enc, enc_chip);
      end
      got  = int'($signed({enc_chip, enc})) + int'(enc_chip);
      expv = c ? -word : word;
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL n=%0d signed value %0d expected %0d", n, got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
