// decision_circuit: the data decision flip-flop of the clock and data recovery circuit.
// The incoming (amplified, limited) data is sampled by a single flip-flop on the rising
// edge of the recovered clock; when the loop is locked that edge sits in the middle of
// the bit. One flip-flop, as in the original; the rising-edge choice is this design's.
// Timing: data_out is valid one clock after the edge that sampled it.
module decision_circuit (
  input  logic clk,
  input  logic rst_n,
  input  logic data_in,
  output logic data_out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) data_out <= 1'b0;
    else        data_out <= data_in;
endmodule
