// toggle_ff: toggle flip-flop with synchronous clear, the common building block of the
// word, slot and frame counters. On a rising clock edge q is cleared when clr is high,
// otherwise inverted when t is high and held when t is low. rst_n clears it
// asynchronously. The synchronous clear input is this design's way of resetting the
// counters on a sync word.
module toggle_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic t,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   q <= 1'b0;
    else if (clr) q <= 1'b0;
    else if (t)   q <= ~q;
endmodule
