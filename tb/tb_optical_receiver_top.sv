// tb_optical_receiver_top: end-to-end test of both receivers through the top level, with
// every parameter at its default. rx75_stim takes the 7.5-Gb/s receiver through frame
// acquisition by bit slipping, lock, loss and reacquisition of sync, both slot lengths and
// all four rates; rx25_stim runs random data through the 2.5-Gb/s receiver's 1:8 tree.
// Each mechanism is counted inside the stimulus modules and fails the test if it never
// occurs. Both run at once, each with its own clock and reset.
module tb_optical_receiver_top;
  // 7.5-Gb/s side
  logic       a_vco_clk, a_rst_n, a_data_in, a_word_len_sel;
  logic [1:0] a_rate_sel;
  logic [3:0] a_framect;
  logic       a_pd_ff0, a_pd_ff1, a_rec_clk, a_rec_data, a_word_valid, a_word_clk, a_sync, a_bit_slip;
  logic [9:0] a_word_data;
  int         a_checks, a_failures;
  logic       a_done;
  // 2.5-Gb/s side
  logic       b_vco_clk, b_rst_n, b_data_in, b_pd_ff0, b_pd_ff1, b_rec_data, b_data_valid, b_clk_out;
  logic [7:0] b_data_out;
  int         b_checks, b_failures;
  logic       b_done;

  optical_receiver_top dut (
    .rx75_vco_clk(a_vco_clk), .rx75_rst_n(a_rst_n), .rx75_rate_sel(a_rate_sel),
    .rx75_data_in(a_data_in), .rx75_word_len_sel(a_word_len_sel), .rx75_framect(a_framect),
    .rx75_pd_ff0(a_pd_ff0), .rx75_pd_ff1(a_pd_ff1), .rx75_rec_clk(a_rec_clk),
    .rx75_rec_data(a_rec_data), .rx75_word_data(a_word_data), .rx75_word_valid(a_word_valid),
    .rx75_word_clk(a_word_clk), .rx75_sync(a_sync), .rx75_bit_slip(a_bit_slip),
    .rx25_vco_clk(b_vco_clk), .rx25_rst_n(b_rst_n), .rx25_data_in(b_data_in),
    .rx25_pd_ff0(b_pd_ff0), .rx25_pd_ff1(b_pd_ff1), .rx25_rec_data(b_rec_data),
    .rx25_data_out(b_data_out), .rx25_data_valid(b_data_valid), .rx25_clk_out(b_clk_out));

  rx75_stim stim75 (
    .vco_clk(a_vco_clk), .rst_n(a_rst_n), .rate_sel(a_rate_sel), .data_in(a_data_in),
    .word_len_sel(a_word_len_sel), .framect(a_framect), .pd_ff0(a_pd_ff0), .pd_ff1(a_pd_ff1),
    .rec_clk(a_rec_clk), .word_data(a_word_data), .word_valid(a_word_valid),
    .word_clk(a_word_clk), .sync(a_sync), .bit_slip(a_bit_slip),
    .checks(a_checks), .failures(a_failures), .done(a_done));

  rx25_stim stim25 (
    .vco_clk(b_vco_clk), .rst_n(b_rst_n), .data_in(b_data_in), .pd_ff0(b_pd_ff0),
    .pd_ff1(b_pd_ff1), .rec_data(b_rec_data), .data_out(b_data_out),
    .data_valid(b_data_valid), .clk_out(b_clk_out),
    .checks(b_checks), .failures(b_failures), .done(b_done));

  initial begin
    #200_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures + 1);
    $finish;
  end

  initial begin
    #1;   // let the stimulus clear done first
    wait (a_done === 1'b1 && b_done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures);
    $finish;
  end
endmodule
