// frame_counter: loss-of-sync timer that drives the bit slip.
// en is the slot counter's carry: a full master frame passed with no sync word. The
// counter compares its state with the 4-bit input framect; a frame end that finds the
// count equal to framect raises bit_slip for one clock and restarts the count at 0, so
// bit_slip comes after framect+1 frames (1 to 16) without sync. sync resets the count.
// The programmable 1..16 range, the four toggle flip-flop stages, the compare with
// FRAMECT and the SKIP output are the original's; reading the compare as "count equals
// framect" and the restart after a slip are this design's.
module frame_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sync,
  input  logic [W-1:0] framect,
  output logic [W-1:0] count,
  output logic         bit_slip
);
  logic match;

  // stage-by-stage equality of the count with framect, as in the original's compare
  assign match    = ~|(count ^ framect);
  assign bit_slip = en && !sync && match;

  toggle_counter #(.W(W)) u_count (.clk, .rst_n, .en, .clr(sync || bit_slip), .q(count));
endmodule
