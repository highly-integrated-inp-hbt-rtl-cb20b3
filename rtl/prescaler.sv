// prescaler: multirate clock divider placed after the VCO buffer of the 7.5-Gb/s receiver.
// Three toggle stages in a ripple chain divide the VCO clock by 2, 4 and 8; a clock
// multiplexer picks the VCO clock itself or one of them, so the recovered clock and the
// loop run at 7.5, 3.75, 1.875 or 0.94 GHz for one VCO frequency. The original only says
// that two control inputs choose divide by one, two, four or eight; the encoding
// (ratio = 2**ratio_sel) and the ripple structure are this design's. ratio_sel is meant
// to be static: changing it while the clock runs can produce a short output pulse.
module prescaler (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic [1:0] ratio_sel,
  output logic       clk_out
);
  logic div2, div4, div8;

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n) div2 <= 1'b0;
    else        div2 <= ~div2;

  always_ff @(posedge div2 or negedge rst_n)
    if (!rst_n) div4 <= 1'b0;
    else        div4 <= ~div4;

  always_ff @(posedge div4 or negedge rst_n)
    if (!rst_n) div8 <= 1'b0;
    else        div8 <= ~div8;

  always_comb
    unique case (ratio_sel)
      2'd0: clk_out = clk_in;
      2'd1: clk_out = div2;
      2'd2: clk_out = div4;
      2'd3: clk_out = div8;
    endcase
endmodule
