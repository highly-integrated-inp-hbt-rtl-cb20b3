// rx_pkg: constants shared by the 7.5-Gb/s receiver's word-synchronization logic.
// The frame sync words are the 8B/10B control characters K28.5 and K28.7. The receiver
// accepts each in both running-disparity forms, which are bitwise complements of each
// other. Codes are written abcdei_fghj with bit 'a' (transmitted first) in bit 9, the
// position it reaches in the 1:10 demultiplexer. The frame sizes follow the SFODB frame:
// a slot is 3 overhead bytes plus a 53-byte ATM cell (56 words), 32 slots form a frame.
package rx_pkg;
  localparam int unsigned WORD_BITS = 10;
  localparam logic [WORD_BITS-1:0] K28_5 = 10'b001111_1010;
  localparam logic [WORD_BITS-1:0] K28_7 = 10'b001111_1000;
  localparam int unsigned WORDS_PER_SLOT = 56;
  localparam int unsigned ATM_CELL_WORDS = 53;
  localparam int unsigned SLOTS_PER_FRAME = 32;
endpackage
