// slot_counter: counts slots within one SFODB master frame of SLOTS slots.
// en is the word counter's carry (start of a new slot). sync loads 0. carry is high when
// a slot starts while the count is at SLOTS-1, i.e. a whole frame has passed without a
// sync word; sync has priority and suppresses it. The slot count of 32 is the
// original's, as is building the count from toggle flip-flops (toggle_counter); the
// carry timing is this design's.
module slot_counter #(
  parameter int unsigned SLOTS = 32,
  parameter int unsigned W     = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sync,
  output logic [W-1:0] count,
  output logic         carry
);
  localparam logic [W-1:0] LAST = W'(SLOTS - 1);
  logic wrap;

  assign wrap  = en && (count == LAST);
  assign carry = wrap && !sync;

  toggle_counter #(.W(W)) u_count (.clk, .rst_n, .en, .clr(sync || wrap), .q(count));
endmodule
