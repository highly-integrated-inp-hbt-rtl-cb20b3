// tb_decision_circuit: drives a random bit during each low clock phase and its opposite
// during the high phase, and checks that the output is the bit present at the rising edge.
module tb_decision_circuit;
  logic clk = 1'b0, rst_n = 1'b1, data_in = 1'b0, data_out;
  int checks = 0, failures = 0;
  logic expected;

  decision_circuit dut (.clk, .rst_n, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    checks++; if (data_out !== 1'b0) failures++;     // reset value
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); #2;
      data_in = 1'($urandom);
      expected = data_in;
      @(posedge clk); #1;
      data_in = ~expected;      // the opposite value while the clock is high
      checks++;
      if (data_out !== expected) begin
        failures++;
        $display("mismatch at %0t: got %b want %b", $time, data_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
