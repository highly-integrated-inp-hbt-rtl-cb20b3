// tb_cdr_lock: closes the clock and data recovery loop of both receivers with behavioural
// models of the analog loop filter and VCO, and checks that the digital phase detector and
// decision flip-flop recover the data. The time unit stands for 1 ps. Both transmitters
// send a 2^7-1 pseudorandom bit sequence (x^7 + x^6 + 1), the test pattern of the
// original measurements, at the measured rates:
//   2.5-Gb/s receiver at 2.1 Gb/s (bit period 476.2); its VCO runs free at 0.5% below.
//   7.5-Gb/s receiver at 7.6 Gb/s (bit period 131.6), prescaler /1; its VCO runs free at
//   7.5 GHz and is brought to 0.5% below the data rate by the coarse tuning input.
// Phase 1, loop open: the clocks drift through the data, so bits are slipped; this must be
// seen on both receivers. Phase 2, loop closed: after a settling time, no slip, no
// decision error and every sampling edge in the middle 60% of its bit, over 6000 bits.
// The coarse frequency offset stays within the loop's pull-in range: the receivers have
// no frequency detector, and the original relies on external coarse tuning for this.
module tb_cdr_lock;
  localparam real T25 = 1000.0 / 2.1;
  localparam real T75 = 1000.0 / 7.6;

  logic rst_n = 1'b1;
  logic loop_on = 1'b0;
  logic armed = 1'b0;
  logic d25 = 1'b0, d75 = 1'b0;
  logic bits25 [0:1023];
  logic bits75 [0:1023];
  real  v25, v75;
  real  v_tune25 = 0.0;
  real  v_tune75 = 7.6 / 7.5 * 0.995 - 1.0;       // coarse tuning
  logic vco25, vco75;
  int   checks = 0, failures = 0;

  // 2.5-Gb/s receiver
  logic       pd25_0, pd25_1, rec25, valid25, clkout25;
  logic [7:0] out25;
  rx25_core u_rx25 (.vco_clk(vco25), .rst_n, .data_in(d25), .pd_ff0(pd25_0), .pd_ff1(pd25_1),
                    .rec_data(rec25), .data_out(out25), .data_valid(valid25), .clk_out(clkout25));
  loop_filter_model u_lf25 (.ff0(pd25_0), .ff1(pd25_1), .enable(loop_on), .v_ctl(v25));
  vco_model #(.F0(2.1 / 1000.0 * 0.995)) u_vco25 (.v_tune(v_tune25), .v_ctl(v25), .clk(vco25));

  // 7.5-Gb/s receiver
  logic       pd75_0, pd75_1, rc75, rec75, wv75, wc75, sync75, slip75;
  logic [9:0] wd75;
  rx75_core u_rx75 (.vco_clk(vco75), .rst_n, .rate_sel(2'd0), .data_in(d75), .word_len_sel(1'b1),
                    .framect(4'd0), .pd_ff0(pd75_0), .pd_ff1(pd75_1), .rec_clk(rc75),
                    .rec_data(rec75), .word_data(wd75), .word_valid(wv75), .word_clk(wc75),
                    .sync(sync75), .bit_slip(slip75));
  loop_filter_model u_lf75 (.ff0(pd75_0), .ff1(pd75_1), .enable(loop_on), .v_ctl(v75));
  vco_model #(.F0(7.5 / 1000.0)) u_vco75 (.v_tune(v_tune75), .v_ctl(v75), .clk(vco75));

  int e25, s25, o25, r25, e75, s75, o75, r75;
  cdr_lock_checker #(.T(T25)) u_chk25 (.clk(vco25), .rec_data(rec25), .armed, .bits(bits25),
    .n_edges(e25), .n_slips(s25), .n_off_center(o25), .n_errors(r25));
  cdr_lock_checker #(.T(T75)) u_chk75 (.clk(rc75), .rec_data(rec75), .armed, .bits(bits75),
    .n_edges(e75), .n_slips(s75), .n_off_center(o75), .n_errors(r75));

  // transmitters: bit n on the line from n*T to (n+1)*T
  function automatic logic [6:0] prbs7_next(logic [6:0] s);
    return {s[5:0], s[6] ^ s[5]};
  endfunction

  logic [6:0] prbs25 = 7'h7F, prbs75 = 7'h35;

  initial begin
    for (longint n = 0; ; n++) begin
      prbs25 = prbs7_next(prbs25);
      bits25[n % 1024] = prbs25[0];
      d25 = bits25[n % 1024];
      #(real'(n + 1) * T25 - $realtime);
    end
  end
  initial begin
    for (longint n = 0; ; n++) begin
      prbs75 = prbs7_next(prbs75);
      bits75[n % 1024] = prbs75[0];
      d75 = bits75[n % 1024];
      #(real'(n + 1) * T75 - $realtime);
    end
  end

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(10_000_000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int s25_open, s75_open;
  initial begin
    #3 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    // phase 1: open loop
    armed = 1'b1;
    #(3000.0 * T25);
    armed = 1'b0;
    s25_open = s25; s75_open = s75;
    $display("open loop: slips 2.5G %0d, 7.5G %0d", s25_open, s75_open);
    expect_true(s25_open > 0, "open loop drifts (2.5G)");
    expect_true(s75_open > 0, "open loop drifts (7.5G)");
    // phase 2: closed loop
    loop_on = 1'b1;
    #(3000.0 * T25);
    u_chk25.n_edges = 0; u_chk25.n_slips = 0; u_chk25.n_off_center = 0; u_chk25.n_errors = 0;
    u_chk75.n_edges = 0; u_chk75.n_slips = 0; u_chk75.n_off_center = 0; u_chk75.n_errors = 0;
    armed = 1'b1;
    #(6000.0 * T25);
    armed = 1'b0;
    $display("closed loop 2.5G: edges %0d slips %0d off-center %0d errors %0d v_ctl %f", e25, s25, o25, r25, v25);
    $display("closed loop 7.5G: edges %0d slips %0d off-center %0d errors %0d v_ctl %f", e75, s75, o75, r75, v75);
    expect_true(e25 > 5900, "2.5G edges counted");
    expect_true(s25 == 0, "2.5G no slip when locked");
    expect_true(o25 == 0, "2.5G sampling mid-bit");
    expect_true(r25 == 0, "2.5G decisions");
    expect_true(e75 > 21000, "7.5G edges counted");
    expect_true(s75 == 0, "7.5G no slip when locked");
    expect_true(o75 == 0, "7.5G sampling mid-bit");
    expect_true(r75 == 0, "7.5G decisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
