// tb_demux_1to10: shifts in random bits, pulses word_load every 10 clocks at a moving
// phase, and checks each output word against the last ten bits the testbench sent
// (dout[9] earliest) and that dout_valid follows each load by one clock.
module tb_demux_1to10;
  logic clk = 1'b0, rst_n = 1'b1, din = 1'b0, word_load = 1'b0;
  logic [9:0] dout;
  logic dout_valid;
  logic [9:0] hist = '0;
  logic [9:0] want;
  int checks = 0, failures = 0;

  demux_1to10 dut (.clk, .rst_n, .din, .word_load, .dout, .dout_valid);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      gap = (w % 7 == 3) ? 11 : 10;
      for (int b = 0; b < gap; b++) begin
        @(negedge clk);
        word_load = (b == gap - 1);
        din = 1'($urandom);
        @(posedge clk);
        if (word_load) want = hist;        // ten bits shifted in before this edge
        hist = {hist[8:0], din};
        #1;
        checks++;
        if (dout_valid !== word_load) failures++;
        if (word_load) begin
          checks++;
          if (w > 0 && dout !== want) begin
            failures++;
            $display("word %0d: got %b want %b", w, dout, want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
