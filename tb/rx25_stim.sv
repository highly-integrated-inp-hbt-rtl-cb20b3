// rx25_stim: stimulus and checker for the 2.5-Gb/s receiver logic, shared by the core and
// top-level testbenches. It plays the VCO (period 10) and sends random bits, each driven
// 1 unit before or after the falling clock edge. Checked against its own record: the
// retimed bit, every 8-bit output group (output i = i-th bit of the group, groups counted
// from reset, appearing three clocks after their last bit with data_valid), the output clock
// at one eighth of the bit rate, and the phase detector outputs.
module rx25_stim #(
  parameter int unsigned NBITS = 8000
) (
  output logic       vco_clk,
  output logic       rst_n,
  output logic       data_in,
  input  logic       pd_ff0,
  input  logic       pd_ff1,
  input  logic       rec_data,
  input  logic [7:0] data_out,
  input  logic       data_valid,
  input  logic       clk_out,
  output int         checks,
  output int         failures,
  output logic       done
);
  logic       hist [0:255];             // bits sent, by edge index
  int n_groups, n_clk_out, n_late, n_early;

  initial vco_clk = 1'b0;
  always #5 vco_clk = ~vco_clk;
  always @(posedge clk_out) n_clk_out++;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("rx25 FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    int t;
    logic late, want0, want1, b, prev_bit;
    checks = 0; failures = 0; done = 1'b0;
    n_groups = 0; n_clk_out = 0; n_late = 0; n_early = 0;
    rst_n = 1'b1; data_in = 1'b0;
    want0 = 1'b0; want1 = 1'b0; prev_bit = 1'b0;
    #2 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    #10 rst_n = 1'b1;
    @(posedge vco_clk); #1;
    t = 1;                                   // the edge at 15 samples bit 0
    for (int i = 0; i < 256; i++) hist[i] = 1'b0;
    for (int c = 0; c < NBITS; c++) begin
      // drive bit t around the falling edge before its sampling edge
      late = 1'($urandom);
      #(late ? 5 : 3);                         // falling edge is 4 units ahead
      b = 1'($urandom);
      if (b != data_in) begin
        if (b) want0 = !late; else want1 = !late;
        if (late) n_early++; else n_late++;
      end
      data_in = b;
      hist[t % 256] = b;
      #1;
      expect_true(pd_ff0 == want0 && pd_ff1 == want1, "phase detector");
      @(posedge vco_clk); #1;
      expect_true(rec_data == b, "decision");
      expect_true(data_valid == (t % 8 == 1), "data_valid");
      // the decision flip-flop adds one clock: output i now holds bit t-10+i
      if (t % 8 == 1 && t >= 17) begin
        logic [7:0] want;
        for (int i = 0; i < 8; i++) want[i] = hist[(t - 10 + i) % 256];
        expect_true(data_out == want, "output group");
        n_groups++;
      end
      prev_bit = b;
      t++;
    end
    expect_true(n_clk_out >= NBITS / 8 - 2 && n_clk_out <= NBITS / 8 + 2, "output clock rate");
    expect_true(n_groups >= NBITS / 8 - 3, "groups seen");
    expect_true(n_late > 0 && n_early > 0, "phase detector both ways");
    $display("rx25: groups %0d clock edges %0d pd late %0d early %0d", n_groups, n_clk_out, n_late, n_early);
    done = 1'b1;
  end
endmodule
