// optical_receiver_top: the digital logic of both receivers, side by side.
// rx75_* ports belong to the 7.5-Gb/s multirate receiver with word synchronization
// (rx75_core), rx25_* ports to the 2.5-Gb/s receiver with its 1:8 demultiplexer
// (rx25_core). The two were separate chips and share no signal here. In each, the VCO
// clock is an input and the phase detector outputs are outputs, because the loop filter
// and VCO between them are analog.
module optical_receiver_top
  import rx_pkg::*;
(
  // 7.5-Gb/s receiver
  input  logic                 rx75_vco_clk,
  input  logic                 rx75_rst_n,
  input  logic [1:0]           rx75_rate_sel,
  input  logic                 rx75_data_in,
  input  logic                 rx75_word_len_sel,
  input  logic [3:0]           rx75_framect,
  output logic                 rx75_pd_ff0,
  output logic                 rx75_pd_ff1,
  output logic                 rx75_rec_clk,
  output logic                 rx75_rec_data,
  output logic [WORD_BITS-1:0] rx75_word_data,
  output logic                 rx75_word_valid,
  output logic                 rx75_word_clk,
  output logic                 rx75_sync,
  output logic                 rx75_bit_slip,
  // 2.5-Gb/s receiver
  input  logic                 rx25_vco_clk,
  input  logic                 rx25_rst_n,
  input  logic                 rx25_data_in,
  output logic                 rx25_pd_ff0,
  output logic                 rx25_pd_ff1,
  output logic                 rx25_rec_data,
  output logic [7:0]           rx25_data_out,
  output logic                 rx25_data_valid,
  output logic                 rx25_clk_out
);
  rx75_core u_rx75 (
    .vco_clk(rx75_vco_clk), .rst_n(rx75_rst_n), .rate_sel(rx75_rate_sel),
    .data_in(rx75_data_in), .word_len_sel(rx75_word_len_sel), .framect(rx75_framect),
    .pd_ff0(rx75_pd_ff0), .pd_ff1(rx75_pd_ff1), .rec_clk(rx75_rec_clk),
    .rec_data(rx75_rec_data), .word_data(rx75_word_data), .word_valid(rx75_word_valid),
    .word_clk(rx75_word_clk), .sync(rx75_sync), .bit_slip(rx75_bit_slip));

  rx25_core u_rx25 (
    .vco_clk(rx25_vco_clk), .rst_n(rx25_rst_n), .data_in(rx25_data_in),
    .pd_ff0(rx25_pd_ff0), .pd_ff1(rx25_pd_ff1), .rec_data(rx25_rec_data),
    .data_out(rx25_data_out), .data_valid(rx25_data_valid), .clk_out(rx25_clk_out));
endmodule
