// sync_compare: frame sync word detector of the 7.5-Gb/s receiver.
// Each new 10-bit word from the demultiplexer is compared with the two frame sync words
// of the SFODB data bus, K28.5 and K28.7, in both running-disparity forms (which are
// each other's complement). A match raises sync for the cycle in which word_valid is
// high; sync resets the word, slot and frame counters. comma_k28_7 tells which of the
// two characters matched. Detecting these four patterns is the original's; the bit
// codes come from the 8B/10B code itself. Purely combinational.
module sync_compare
  import rx_pkg::*;
(
  input  logic [WORD_BITS-1:0] word,
  input  logic                 word_valid,
  output logic                 sync,
  output logic                 comma_k28_7
);
  logic hit5, hit7;

  assign hit5        = (word == K28_5) || (word == ~K28_5);
  assign hit7        = (word == K28_7) || (word == ~K28_7);
  assign sync        = word_valid && (hit5 || hit7);
  assign comma_k28_7 = hit7;
endmodule
