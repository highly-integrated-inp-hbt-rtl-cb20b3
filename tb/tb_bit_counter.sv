// tb_bit_counter: checks that word_load comes every 10 bit clocks, that a bit_slip pulse
// stretches the word in progress to 11 clocks, and that word_clk is high for the first
// five clocks of every word and low for the rest.
module tb_bit_counter;
  logic clk = 1'b0, rst_n = 1'b1, bit_slip = 1'b0, word_load, word_clk;
  int checks = 0, failures = 0;
  int k, slips = 0, words = 0;
  logic long_word;

  bit_counter dut (.clk, .rst_n, .bit_slip, .word_load, .word_clk);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int slip_at;
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    k = 1;                 // the edge at 15 already counted one clock
    long_word = 1'b0;
    slip_at = -1;
    while (words < 500) begin
      @(negedge clk);
      bit_slip = (k == slip_at);
      if (bit_slip) begin long_word = 1'b1; slips++; end
      checks++;
      if (word_load !== (k == (long_word ? 10 : 9))) begin
        failures++;
        $display("word %0d k %0d: word_load %b", words, k, word_load);
      end
      checks++;
      if (word_clk !== (k < 5)) begin
        failures++;
        $display("word %0d k %0d: word_clk %b", words, k, word_clk);
      end
      if (k == (long_word ? 10 : 9)) begin
        k = 0;
        long_word = 1'b0;
        words++;
        slip_at = (words % 5 == 2) ? int'($urandom_range(0, 8)) : -1;
      end else k++;
    end
    checks++;
    if (slips < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
