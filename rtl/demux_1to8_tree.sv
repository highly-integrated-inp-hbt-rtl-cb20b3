// demux_1to8_tree: 1:8 demultiplexer of the 2.5-Gb/s receiver, built as a binary tree.
// Level 1 (one demux_1to2 cell) splits the bit stream into even and odd bits at half the
// bit rate; level 2 (two cells) splits each of those again at a quarter; level 3 (four
// cells) gives eight streams at an eighth of the bit rate. Power scales with the clock
// rate of each level, which is the reason for the tree. A free-running 3-bit divider
// gives each level its half-rate timing as an enable: level 1 works every clock, level 2
// every second clock, level 3 every fourth. The divider's top bit is the output clock
// (bit clock / 8, 50% duty), the ninth output of the receiver.
// The tree and the rate halving are the original's; the enables in place of divided
// clocks, the pin order (dout[i] = i-th bit of the group) and alignment by reset are
// this design's. Timing: the group of bits that entered at divider counts 0..7 appears
// on dout two clocks after its last bit, with dout_valid high for that cycle.
module demux_1to8_tree (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din,
  output logic [7:0] dout,
  output logic       dout_valid,
  output logic       clk_out
);
  logic [2:0] cnt;
  logic       l1_a, l1_b;              // even / odd bits
  logic       l2_aa, l2_ab, l2_ba, l2_bb;
  logic       en2, en3, out3;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  assign en2  = (cnt[0] == 1'b0);
  assign en3  = (cnt[1:0] == 2'd1);
  assign out3 = en3 && !cnt[2];
  assign clk_out = cnt[2];

  // level 1: full-rate input, outputs change every 2 clocks
  demux_1to2 u_l1 (.clk, .rst_n, .en(1'b1), .out_phase(cnt[0]), .d(din),
                   .q_first(l1_a), .q_second(l1_b));

  // level 2: inputs change every 2 clocks, outputs every 4
  demux_1to2 u_l2a (.clk, .rst_n, .en(en2), .out_phase(!cnt[1]), .d(l1_a),
                    .q_first(l2_aa), .q_second(l2_ab));
  demux_1to2 u_l2b (.clk, .rst_n, .en(en2), .out_phase(!cnt[1]), .d(l1_b),
                    .q_first(l2_ba), .q_second(l2_bb));

  // level 3: inputs change every 4 clocks, outputs every 8
  demux_1to2 u_l3aa (.clk, .rst_n, .en(en3), .out_phase(!cnt[2]), .d(l2_aa),
                     .q_first(dout[0]), .q_second(dout[4]));
  demux_1to2 u_l3ab (.clk, .rst_n, .en(en3), .out_phase(!cnt[2]), .d(l2_ab),
                     .q_first(dout[2]), .q_second(dout[6]));
  demux_1to2 u_l3ba (.clk, .rst_n, .en(en3), .out_phase(!cnt[2]), .d(l2_ba),
                     .q_first(dout[1]), .q_second(dout[5]));
  demux_1to2 u_l3bb (.clk, .rst_n, .en(en3), .out_phase(!cnt[2]), .d(l2_bb),
                     .q_first(dout[3]), .q_second(dout[7]));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= out3;
endmodule
