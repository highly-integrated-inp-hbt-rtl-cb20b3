// tb_demux_1to8_tree: sends random bits, counting clocks from reset, and checks every
// output group: dout[i] must be the bit sent at clock 8g+i, the group must appear two
// clocks after its last bit with dout_valid, and clk_out must divide the clock by 8.
module tb_demux_1to8_tree;
  logic clk = 1'b0, rst_n = 1'b1, din = 1'b0;
  logic [7:0] dout;
  logic dout_valid, clk_out;
  logic [7:0] sent [0:1023];
  int checks = 0, failures = 0;
  int groups = 0, cout_edges = 0;

  demux_1to8_tree dut (.clk, .rst_n, .din, .dout, .dout_valid, .clk_out);

  always #5 clk = ~clk;
  always @(posedge clk_out) cout_edges++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;    // index of the bit sampled at the next rising edge
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    t = 1;    // the edge at 15 was the first one out of reset (bit 0)
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      din = 1'($urandom);
      sent[(t / 8) % 1024][t % 8] = din;
      @(posedge clk); #1;
      // a group g is visible after the edge of bit 8g+9
      checks++;
      if (dout_valid !== (t % 8 == 1)) begin   // t = 1 carries the group cleared by reset
        failures++;
        $display("t %0d: dout_valid %b", t, dout_valid);
      end
      if (t % 8 == 1 && t >= 9) begin
        checks++;
        groups++;
        if (dout !== sent[((t - 9) / 8) % 1024]) begin
          failures++;
          $display("group %0d: got %b want %b", (t - 9) / 8, dout, sent[((t - 9) / 8) % 1024]);
        end
      end
      t++;
    end
    checks++;
    if (cout_edges < 495 || cout_edges > 501) begin failures++; $display("clk_out edges %0d", cout_edges); end
    checks++;
    if (groups < 490) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
