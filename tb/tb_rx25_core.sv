// tb_rx25_core: end-to-end test of the 2.5-Gb/s receiver logic, driven and checked by
// rx25_stim (random bits, 1:8 output groups, output clock, phase detector).
module tb_rx25_core;
  logic       vco_clk, rst_n, data_in;
  logic       pd_ff0, pd_ff1, rec_data, data_valid, clk_out;
  logic [7:0] data_out;
  int         checks, failures;
  logic       done;

  rx25_core dut (.vco_clk, .rst_n, .data_in, .pd_ff0, .pd_ff1, .rec_data, .data_out,
                 .data_valid, .clk_out);

  rx25_stim stim (.vco_clk, .rst_n, .data_in, .pd_ff0, .pd_ff1, .rec_data, .data_out,
                  .data_valid, .clk_out, .checks, .failures, .done);

  initial begin
    #10_000_000;
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
