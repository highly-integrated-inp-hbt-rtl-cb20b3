// tb_rx75_core: end-to-end test of the 7.5-Gb/s receiver logic at its default sizes,
// driven and checked by rx75_stim (frames, sync search, bit slips, all four rates).
module tb_rx75_core;
  logic       vco_clk, rst_n, data_in, word_len_sel;
  logic [1:0] rate_sel;
  logic [3:0] framect;
  logic       pd_ff0, pd_ff1, rec_clk, rec_data, word_valid, word_clk, sync, bit_slip;
  logic [9:0] word_data;
  int         checks, failures;
  logic       done;

  rx75_core dut (.vco_clk, .rst_n, .rate_sel, .data_in, .word_len_sel, .framect,
                 .pd_ff0, .pd_ff1, .rec_clk, .rec_data, .word_data, .word_valid,
                 .word_clk, .sync, .bit_slip);

  rx75_stim stim (.vco_clk, .rst_n, .rate_sel, .data_in, .word_len_sel, .framect,
                  .pd_ff0, .pd_ff1, .rec_clk, .word_data, .word_valid, .word_clk,
                  .sync, .bit_slip, .checks, .failures, .done);

  initial begin
    #200_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;   // let the stimulus clear done first
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
