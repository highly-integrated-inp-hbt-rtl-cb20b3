// word_counter: counts 10-bit words within one slot of the SFODB frame.
// en is high for one clock per received word. A slot is WORDS_LONG words (3 frame
// overhead bytes plus a 53-byte ATM cell) or, with len_sel low, WORDS_SHORT words.
// sync (the sync word was just received) loads 0: the sync word is word 0 of a slot.
// carry is high when a word arrives while the count is at the slot's last value, i.e.
// together with the first word of the next slot; sync takes priority and suppresses it,
// so a frame whose sync word arrives on time never reaches the frame counter.
// The two lengths and the single select input are the original's; the select polarity
// and the carry timing are this design's. Like the original, the count is
// held in toggle flip-flops (toggle_counter).
module word_counter #(
  parameter int unsigned WORDS_LONG  = 56,
  parameter int unsigned WORDS_SHORT = 53,
  parameter int unsigned W           = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sync,
  input  logic         len_sel,
  output logic [W-1:0] count,
  output logic         carry
);
  logic [W-1:0] last;
  logic         wrap;

  assign last  = len_sel ? W'(WORDS_LONG - 1) : W'(WORDS_SHORT - 1);
  assign wrap  = en && (count >= last);
  assign carry = wrap && !sync;

  toggle_counter #(.W(W)) u_count (.clk, .rst_n, .en, .clr(sync || wrap), .q(count));
endmodule
