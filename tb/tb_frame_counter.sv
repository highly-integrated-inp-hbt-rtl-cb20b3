// tb_frame_counter: for every framect value 0..15, feeds frame-end strobes and checks that
// bit_slip comes on every (framect+1)-th strobe after a sync or after the previous slip,
// and that a sync pulse restarts the count.
module tb_frame_counter;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, sync = 1'b0;
  logic [3:0] framect = '0, count;
  logic bit_slip;
  int checks = 0, failures = 0;
  int idx, slips;

  frame_counter dut (.clk, .rst_n, .en, .sync, .framect, .count, .bit_slip);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    slips = 0;
    for (int f = 0; f < 16; f++) begin
      framect = 4'(f);
      @(negedge clk); sync = 1'b1; en = 1'b0; idx = 0;
      @(negedge clk); sync = 1'b0;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        en = ($urandom_range(0, 1) != 0);
        sync = (i == 77);
        #1;
        if (sync) idx = 0;
        else if (en) idx++;
        want = en && !sync && (idx % (f + 1) == 0);
        checks++;
        if (bit_slip !== want) begin
          failures++;
          $display("framect %0d idx %0d: bit_slip %b", f, idx, bit_slip);
        end
        if (want) slips++;
      end
    end
    checks++;
    if (slips < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
