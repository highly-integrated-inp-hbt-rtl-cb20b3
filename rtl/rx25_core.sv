// rx25_core: digital logic of the 2.5-Gb/s receiver.
// The VCO clock is the recovered clock. The decision flip-flop retimes the data from the
// AGC amplifier, the bang-bang phase detector produces the two signals for the analog
// loop filter, and a 1:8 tree demultiplexer turns the retimed bits into eight outputs
// plus an output clock at one eighth of the bit rate (the nine CMOS-level outputs of the
// original chip). The AGC amplifier, loop filter, VCO and output buffers are analog and
// outside this RTL; their signals are this module's ports.
module rx25_core (
  input  logic       vco_clk,
  input  logic       rst_n,
  input  logic       data_in,
  output logic       pd_ff0,
  output logic       pd_ff1,
  output logic       rec_data,
  output logic [7:0] data_out,
  output logic       data_valid,
  output logic       clk_out
);
  bb_phase_detector u_pd (.data_in, .clk_in(vco_clk), .rst_n, .ff0(pd_ff0), .ff1(pd_ff1));

  decision_circuit u_decision (.clk(vco_clk), .rst_n, .data_in, .data_out(rec_data));

  demux_1to8_tree u_demux (.clk(vco_clk), .rst_n, .din(rec_data), .dout(data_out),
                           .dout_valid(data_valid), .clk_out);
endmodule
