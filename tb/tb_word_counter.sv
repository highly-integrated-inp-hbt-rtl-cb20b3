// tb_word_counter: feeds word strobes with random gaps and occasional sync pulses, for
// both slot lengths, and checks that carry comes on every 56th (or 53rd) word after a
// sync word and never together with sync.
module tb_word_counter;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, sync = 1'b0, len_sel = 1'b1;
  logic [5:0] count;
  logic carry;
  int checks = 0, failures = 0;
  int idx, carries, syncs;

  word_counter dut (.clk, .rst_n, .en, .sync, .len_sel, .count, .carry);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic want;
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    carries = 0; syncs = 0;
    for (int pass = 0; pass < 2; pass++) begin
      len_sel = (pass == 0);
      n = len_sel ? 56 : 53;
      // start from a sync word
      @(negedge clk); en = 1'b1; sync = 1'b1; idx = 0;
      @(negedge clk); en = 1'b0; sync = 1'b0;
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        en = ($urandom_range(0, 2) != 0);
        sync = en && ($urandom_range(0, 999) == 0);
        #1;
        if (en) begin
          if (sync) begin idx = 0; syncs++; end
          else idx++;
        end
        want = en && !sync && (idx % n == 0);
        checks++;
        if (carry !== want) begin
          failures++;
          $display("len %0d idx %0d: carry %b", n, idx, carry);
        end
        if (want) carries++;
      end
    end
    checks++;
    if (carries < 40) failures++;
    $display("carries %0d syncs %0d", carries, syncs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
