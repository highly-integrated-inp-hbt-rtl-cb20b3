// toggle_counter: synchronous up-counter of W toggle flip-flops, shared by the word, slot
// and frame counters. Stage i toggles when en is high and all lower stages are 1, which is
// a binary count. clr (synchronous) returns every stage to 0 and wins over en.
module toggle_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  output logic [W-1:0] q
);
  logic [W-1:0] t;

  for (genvar i = 0; i < W; i++) begin : g_stage
    if (i == 0) begin : g_first
      assign t[i] = en;
    end else begin : g_next
      assign t[i] = t[i-1] && q[i-1];
    end
    toggle_ff u_tff (.clk, .rst_n, .clr, .t(t[i]), .q(q[i]));
  end
endmodule
