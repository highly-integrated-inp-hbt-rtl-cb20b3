// tb_bb_phase_detector: places data edges at chosen points of a 20-unit clock period and
// checks that ff0 (rising data edges) and ff1 (falling data edges) hold the clock level
// seen at that edge: 1 when the edge falls in the clock's high half, 0 in the low half.
module tb_bb_phase_detector;
  logic clk_in = 1'b0, rst_n = 1'b1, data_in = 1'b0, ff0, ff1;
  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0;

  bb_phase_detector dut (.data_in, .clk_in, .rst_n, .ff0, .ff1);

  always #10 clk_in = ~clk_in;   // period 20: high for 10 units after each rising edge

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int offs;
    logic lvl;
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #3 rst_n = 1'b1;
    checks++; if (ff0 !== 1'b0 || ff1 !== 1'b0) failures++;
    for (int i = 0; i < 400; i++) begin
      // wait for a rising clock edge, then move the data at a random offset within the period
      @(posedge clk_in);
      offs = 1 + int'($urandom_range(0, 17));
      if (offs == 10) offs = 11;                  // keep away from the falling clock edge
      #(offs);
      lvl = (offs < 10);                          // clock high during the first half
      data_in = ~data_in;
      #1;
      checks++;
      if (data_in) begin
        if (ff0 !== lvl) begin failures++; $display("ff0 %b want %b at offs %0d", ff0, lvl, offs); end
      end else begin
        if (ff1 !== lvl) begin failures++; $display("ff1 %b want %b at offs %0d", ff1, lvl, offs); end
      end
      if (lvl) n_late++; else n_early++;
    end
    checks++;
    if (n_late == 0 || n_early == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
