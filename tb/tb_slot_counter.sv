// tb_slot_counter: feeds slot strobes with random gaps and occasional sync pulses and
// checks that carry comes on every 32nd slot start after a sync and never with sync.
module tb_slot_counter;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, sync = 1'b0;
  logic [4:0] count;
  logic carry;
  int checks = 0, failures = 0;
  int idx, carries;

  slot_counter dut (.clk, .rst_n, .en, .sync, .count, .carry);

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
    carries = 0;
    @(negedge clk); sync = 1'b1; idx = 0;
    @(negedge clk); sync = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      sync = ($urandom_range(0, 699) == 0);
      en = ($urandom_range(0, 1) != 0);
      #1;
      if (sync) idx = 0;
      else if (en) idx++;
      want = en && !sync && (idx % 32 == 0);
      checks++;
      if (carry !== want) begin
        failures++;
        $display("idx %0d: carry %b", idx, carry);
      end
      if (want) carries++;
    end
    // directed: a sync arriving together with the frame-end strobe wins over the carry
    @(negedge clk); en = 1'b0; sync = 1'b1;
    @(negedge clk); sync = 1'b0; en = 1'b1;
    repeat (31) @(negedge clk);
    sync = 1'b1;
    #1;
    checks++;
    if (carry !== 1'b0) begin failures++; $display("carry together with sync"); end
    @(negedge clk); sync = 1'b0; en = 1'b0;
    checks++;
    if (count !== 5'd0) failures++;
    checks++;
    if (carries < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
