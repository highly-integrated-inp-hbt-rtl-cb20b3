// bb_phase_detector: "bang-bang" phase detector of the clock and data recovery loop.
// Two flip-flops are clocked by the data instead of the clock: ff0 samples the recovered
// clock at every rising data edge, ff1 at every falling data edge. With the decision
// flip-flop sampling on the rising clock edge, lock puts the data transitions at the
// falling clock edge: a sampled 1 means the clock is late (still high when the data
// moved), a sampled 0 that it is early. The two outputs drive the analog loop filter,
// which is not part of this RTL. The two-flip-flop structure is the original's; which
// flop is called ff0 and the asynchronous reset are choices of this design.
module bb_phase_detector (
  input  logic data_in,
  input  logic clk_in,
  input  logic rst_n,
  output logic ff0,
  output logic ff1
);
  always_ff @(posedge data_in or negedge rst_n)
    if (!rst_n) ff0 <= 1'b0;
    else        ff0 <= clk_in;

  always_ff @(negedge data_in or negedge rst_n)
    if (!rst_n) ff1 <= 1'b0;
    else        ff1 <= clk_in;
endmodule
