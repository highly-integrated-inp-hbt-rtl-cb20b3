// rx75_core: digital logic of the 7.5-Gb/s multirate optical receiver.
// Data from the limiting amplifier (data_in) is retimed by the decision flip-flop on the
// recovered clock, which is the VCO clock (vco_clk) divided by 1, 2, 4 or 8 in the
// prescaler for the 7.5, 3.75, 1.875 and 0.94 Gb/s rates. The bang-bang phase detector
// compares data edges with that clock; its two outputs go to the analog loop filter and
// VCO outside this RTL, closing the PLL. The retimed bits are shifted into the 1:10
// demultiplexer, whose word boundary is set by the bit counter. Word synchronization:
// the sync compare looks for K28.5/K28.7 (either polarity) in every word and resets the
// word (56 or 53), slot (32) and frame (framect+1) counters. If a whole number of frames
// passes without a sync word, the frame counter asks the bit counter to slip one bit,
// and the search repeats at the next bit position until the sync word is found.
// Block structure and connections follow the original block diagram; everything runs in
// the recovered-clock domain with enables, a choice of this design.
// Timing: a word appears on word_data with word_valid one bit clock after its load, and
// sync is high in that same cycle when it is a sync word.
module rx75_core
  import rx_pkg::*;
#(
  parameter int unsigned WORDS_LONG  = WORDS_PER_SLOT,
  parameter int unsigned WORDS_SHORT = ATM_CELL_WORDS,
  parameter int unsigned SLOTS       = SLOTS_PER_FRAME
) (
  input  logic                 vco_clk,
  input  logic                 rst_n,
  input  logic [1:0]           rate_sel,
  input  logic                 data_in,
  input  logic                 word_len_sel,
  input  logic [3:0]           framect,
  output logic                 pd_ff0,
  output logic                 pd_ff1,
  output logic                 rec_clk,
  output logic                 rec_data,
  output logic [WORD_BITS-1:0] word_data,
  output logic                 word_valid,
  output logic                 word_clk,
  output logic                 sync,
  output logic                 bit_slip
);
  logic       word_load;
  logic       word_carry, slot_carry;
  logic       comma_k28_7;
  logic [5:0] word_count;
  logic [4:0] slot_count;
  logic [3:0] frame_count;

  prescaler u_prescaler (.clk_in(vco_clk), .rst_n, .ratio_sel(rate_sel), .clk_out(rec_clk));

  bb_phase_detector u_pd (.data_in, .clk_in(rec_clk), .rst_n, .ff0(pd_ff0), .ff1(pd_ff1));

  decision_circuit u_decision (.clk(rec_clk), .rst_n, .data_in, .data_out(rec_data));

  bit_counter #(.WORD_BITS(WORD_BITS)) u_bit_counter (
    .clk(rec_clk), .rst_n, .bit_slip, .word_load, .word_clk);

  demux_1to10 #(.WORD_BITS(WORD_BITS)) u_demux (
    .clk(rec_clk), .rst_n, .din(rec_data), .word_load, .dout(word_data), .dout_valid(word_valid));

  sync_compare u_sync (.word(word_data), .word_valid, .sync, .comma_k28_7);

  word_counter #(.WORDS_LONG(WORDS_LONG), .WORDS_SHORT(WORDS_SHORT), .W(6)) u_word_counter (
    .clk(rec_clk), .rst_n, .en(word_valid), .sync, .len_sel(word_len_sel),
    .count(word_count), .carry(word_carry));

  slot_counter #(.SLOTS(SLOTS), .W(5)) u_slot_counter (
    .clk(rec_clk), .rst_n, .en(word_carry), .sync, .count(slot_count), .carry(slot_carry));

  frame_counter #(.W(4)) u_frame_counter (
    .clk(rec_clk), .rst_n, .en(slot_carry), .sync, .framect, .count(frame_count), .bit_slip);

  // rules of the word-synchronization chain
  a_sync_on_word: assert property (@(posedge rec_clk) disable iff (!rst_n) sync |-> word_valid);
  a_no_slip_on_sync: assert property (@(posedge rec_clk) disable iff (!rst_n) !(sync && bit_slip));
  a_slip_on_word: assert property (@(posedge rec_clk) disable iff (!rst_n) bit_slip |-> word_valid);
endmodule
