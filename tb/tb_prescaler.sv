// tb_prescaler: for each ratio setting counts output rising edges over 256 input clocks
// and checks the count is 256/ratio, and checks that the output has a 50% duty cycle
// for the divided settings.
module tb_prescaler;
  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  logic [1:0] ratio_sel = 2'd0;
  int checks = 0, failures = 0;
  int out_edges, high_time;

  prescaler dut (.clk_in, .rst_n, .ratio_sel, .clk_out);

  always #5 clk_in = ~clk_in;
  always @(posedge clk_out) out_edges++;
  always #1 if (clk_out) high_time++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      rst_n = 1'b0;
      ratio_sel = 2'(s);
      #13 rst_n = 1'b1;
      @(negedge clk_in);
      out_edges = 0;
      high_time = 0;
      repeat (256) @(negedge clk_in);
      checks++;
      if (out_edges != (256 >> s)) begin
        failures++;
        $display("ratio_sel %0d: %0d output edges, want %0d", s, out_edges, 256 >> s);
      end
      checks++;
      if (high_time < 1270 || high_time > 1290) begin
        failures++;
        $display("ratio_sel %0d: high time %0d of 2560", s, high_time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
