// bit_counter: word timing for the 1:10 demultiplexer of the 7.5-Gb/s receiver.
// A counter runs on the recovered bit clock and wraps every WORD_BITS clocks. On the last
// count it raises word_load for one bit clock: this is the "narrow" word clock that loads
// the demultiplexer's output register (one bit-clock pulse in ten, i.e. 5% duty when the
// pulse width is half a bit clock period). word_clk is the 50% word clock sent off chip:
// high for the first half of each word. A bit_slip pulse, from the frame counter when no
// sync word has been seen, makes one word last WORD_BITS+1 clocks, so every later word
// boundary moves by one bit; repeated slips walk the boundary until the sync word lines up.
// The divide-by-ten and the 11-count slip mode are the original's; the binary counter
// (in place of the original four-flip-flop network), the slip being applied to the word in
// progress and the position of the word_clk high phase are this design's.
module bit_counter #(
  parameter int unsigned WORD_BITS = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_slip,
  output logic word_load,
  output logic word_clk
);
  localparam int unsigned CW = $clog2(WORD_BITS + 1);
  localparam int unsigned HALF = WORD_BITS / 2;

  logic [CW-1:0] cnt, cnt_next;
  logic          long_word;
  logic [CW-1:0] last;

  assign last      = long_word ? CW'(WORD_BITS) : CW'(WORD_BITS - 1);
  assign word_load = (cnt == last);
  assign cnt_next  = word_load ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt       <= '0;
      long_word <= 1'b0;
      word_clk  <= 1'b1;
    end else begin
      cnt      <= cnt_next;
      word_clk <= (cnt_next < CW'(HALF));
      if (bit_slip)       long_word <= 1'b1;
      else if (word_load) long_word <= 1'b0;
    end
endmodule
