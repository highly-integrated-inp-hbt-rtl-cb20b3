// rx75_stim: stimulus and checker for the 7.5-Gb/s receiver logic, shared by the core and
// top-level testbenches. It plays the VCO (vco_clk, 10 time units per period) and the
// transmitter: it sends SFODB frames of 32 slots x 56 (or 53) ten-bit words, word 0 of
// each frame a K28.5 or K28.7 sync word of either polarity, the rest random words chosen
// so that no sync pattern appears at any other bit position. Bits go out 'a' first. Each
// bit is driven 1 unit before or after the falling edge of the recovered clock, so the
// phase detector sees the clock both early and late.
// Scenarios (each starts from reset, the stream shifted by a different number of bits):
//   A  rate /1, 56 words, 1 frame to slip; one sync word removed after lock: exactly 10
//      slips must follow (once round all ten bit positions) before sync returns
//   B  rate /2, 53 words, 2 frames to slip; one sync removed: no slip may follow
//   C  rate /4, 56 words, 3 frames to slip
//   D  rate /8, 56 words, 1 frame to slip
// Checked against the testbench's own record of the bits sent: every word_valid shows
// the ten bits that entered two clocks before, sync comes exactly for sync patterns,
// once locked every word lies on a sent word boundary, consecutive slips are exactly
// (frames x 32 x words x 10 + 1) bit clocks apart, lock comes within the bound, the
// recovered clock period matches the rate, and pd_ff0/pd_ff1 hold the clock level at
// the last rising/falling data edge. Each mechanism is counted and must occur.
module rx75_stim (
  output logic       vco_clk,
  output logic       rst_n,
  output logic [1:0] rate_sel,
  output logic       data_in,
  output logic       word_len_sel,
  output logic [3:0] framect,
  input  logic       pd_ff0,
  input  logic       pd_ff1,
  input  logic       rec_clk,
  input  logic [9:0] word_data,
  input  logic       word_valid,
  input  logic       word_clk,
  input  logic       sync,
  input  logic       bit_slip,
  output int         checks,
  output int         failures,
  output logic       done
);
  localparam logic [9:0] K5 = 10'h0FA, K7 = 10'h0F8;

  // mechanism counters
  int n_sync, n_slip, n_long_word, n_pd_late, n_pd_early, n_drop_tolerated, n_relock, n_rate[4], n_short;

  logic bits [0:63];
  logic word_end [0:63];
  logic sync_end [0:63];
  longint L;                 // index of the last rising edge of rec_clk

  function automatic logic is_comma(logic [9:0] w);
    return (w == K5) || (w == ~K5) || (w == K7) || (w == ~K7);
  endfunction

  // true if a sync pattern appears at offsets 1..9 of the 20 bits {a, b}
  function automatic logic false_comma(logic [9:0] a, logic [9:0] b);
    logic [19:0] s;
    s = {a, b};
    for (int o = 1; o < 10; o++)
      if (is_comma(s[19-o -: 10])) return 1'b1;
    return 1'b0;
  endfunction

  initial vco_clk = 1'b0;
  always #5 vco_clk = ~vco_clk;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("rx75 FAIL %s at bit %0d (t=%0t)", what, L, $time);
    end
  endtask

  int  half;
  logic drive_late;
  logic pd_want0, pd_want1;

  // one bit: wait for the edge, check outputs, then drive the next bit
  task automatic send_bit(input logic b, input logic is_word_end, input logic is_sync_end);
    @(posedge rec_clk);
    L++;
    #2;
    // data_in was sampled at this edge as bit L
    on_edge();
    #(half - 2 + (drive_late ? 1 : -1));
    if (b != data_in) begin
      if (b) pd_want0 = !drive_late;  // rising edge: clock still high when driven early
      else   pd_want1 = !drive_late;
    end
    data_in = b;
    bits[(L + 1) % 64]     = b;
    word_end[(L + 1) % 64] = is_word_end;
    sync_end[(L + 1) % 64] = is_sync_end;
    #1;
    expect_true(pd_ff0 == pd_want0 && pd_ff1 == pd_want1, "phase detector");
    if (b != bits[L % 64]) begin
      if (drive_late) n_pd_early++; else n_pd_late++;
    end
    drive_late = 1'($urandom);
  endtask

  // scenario state
  logic   locked, ever_sync;
  longint last_slip, last_word_valid, slip_gap, last_sync_L;
  int     slips_since_drop;
  logic   after_drop, expect_relock;

  task automatic on_edge();
    logic [9:0] shown;
    if (word_valid) begin
      for (int i = 0; i < 10; i++) shown[9 - i] = bits[(L - 11 + i) % 64];
      expect_true(word_data == shown, "word data");
      expect_true(sync == is_comma(shown), "sync compare");
      if (last_word_valid >= 0 && L - last_word_valid == 11) n_long_word++;
      last_word_valid = L;
      if (locked) expect_true(word_end[(L - 2) % 64], "word boundary");
      if (sync) begin
        expect_true(sync_end[(L - 2) % 64], "sync position");
        n_sync++;
        if (after_drop && expect_relock) begin
          expect_true(slips_since_drop == 10, "ten slips to relock");
          n_relock++;
          after_drop = 1'b0;
        end
        locked = 1'b1;
        ever_sync = 1'b1;
        last_sync_L = L;
      end
    end else begin
      expect_true(sync == 1'b0, "sync only with word_valid");
    end
    if (bit_slip) begin
      n_slip++;
      if (after_drop) slips_since_drop++;
      if (locked && !(after_drop && expect_relock)) expect_true(1'b0, "slip while locked");
      if (last_slip >= 0 && last_sync_L < last_slip)
        expect_true(L - last_slip == slip_gap, "slip interval");
      last_slip = L;
      locked = 1'b0;
    end
  endtask

  task automatic run_scenario(input int rate, input int nw, input int fct, input int lead,
                              input int nframes, input int drop_frame, input logic relock);
    logic [9:0] prev, w, next_sync;
    logic       next_drop;
    int         lock_bound;
    realtime    t0;

    rst_n = 1'b1;
    #1 rst_n = 1'b0;    // a falling edge, so every flip-flop resets
    rate_sel = 2'(rate);
    word_len_sel = (nw == 56);
    framect = 4'(fct);
    data_in = 1'b0;
    half = 5 << rate;
    slip_gap = longint'(fct + 1) * 32 * nw * 10 + 1;
    locked = 1'b0; ever_sync = 1'b0; after_drop = 1'b0; expect_relock = relock;
    last_slip = -1; last_word_valid = -1; last_sync_L = -1; slips_since_drop = 0;
    pd_want0 = 1'b0; pd_want1 = 1'b0; drive_late = 1'b0;
    for (int i = 0; i < 64; i++) begin bits[i] = 1'b0; word_end[i] = 1'b0; sync_end[i] = 1'b0; end
    L = 0;
    #37 rst_n = 1'b1;

    // recovered clock period
    @(posedge rec_clk); t0 = $realtime;
    @(posedge rec_clk);
    expect_true($realtime - t0 == realtime'(10 << rate), "recovered clock period");
    n_rate[rate]++;
    if (nw == 53) n_short++;
    // from here the edge count L restarts; bits before the stream are zeros
    L = 0;

    // leading bits shift the stream against the receiver's word boundary
    for (int i = 0; i < lead; i++) send_bit(1'(i % 2), 1'b0, 1'b0);
    prev = 10'b1010101010;
    next_sync = $urandom_range(0, 1) ? K5 : K7;
    if ($urandom_range(0, 1)) next_sync = ~next_sync;
    next_drop = 1'b0;
    lock_bound = (fct + 1) * 10 + 2;
    for (int f = 0; f < nframes; f++) begin
      for (int k = 0; k < 32 * nw; k++) begin
        if (k == 0 && !next_drop) w = next_sync;
        else begin
          do w = 10'($urandom);
          while (is_comma(w) || false_comma(prev, w) ||
                 (k == 32 * nw - 1 && false_comma(w, next_sync)));
        end
        if (k == 0) begin
          if (next_drop) begin
            after_drop = 1'b1;
            if (!relock) n_drop_tolerated++;
          end
          next_drop = (f + 1 == drop_frame);
          next_sync = $urandom_range(0, 1) ? K5 : K7;
          if ($urandom_range(0, 1)) next_sync = ~next_sync;
        end
        for (int i = 9; i >= 0; i--)
          send_bit(w[i], i == 0, i == 0 && k == 0 && is_comma(w));
        prev = w;
      end
      if (f == lock_bound) expect_true(ever_sync, "lock within bound");
    end
    expect_true(locked, "locked at end of scenario");
    expect_true(L - last_sync_L <= longint'(32 * nw * 10 + 20), "sync in last frame");
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    n_sync = 0; n_slip = 0; n_long_word = 0; n_pd_late = 0; n_pd_early = 0;
    n_drop_tolerated = 0; n_relock = 0; n_short = 0;
    for (int i = 0; i < 4; i++) n_rate[i] = 0;
    rst_n = 1'b1; rate_sel = '0; data_in = 1'b0; word_len_sel = 1'b1; framect = '0;

    run_scenario(0, 56, 0, 3, 25, 13, 1'b1);
    run_scenario(1, 53, 1, 7, 25, 23, 1'b0);
    run_scenario(2, 56, 2, 5, 32, 0, 1'b0);
    run_scenario(3, 56, 0, 1, 12, 0, 1'b0);

    $display("rx75: syncs %0d slips %0d long words %0d pd late %0d early %0d drop tolerated %0d relock %0d 53-word runs %0d rates %0d/%0d/%0d/%0d",
             n_sync, n_slip, n_long_word, n_pd_late, n_pd_early, n_drop_tolerated, n_relock, n_short,
             n_rate[0], n_rate[1], n_rate[2], n_rate[3]);
    expect_true(n_sync > 0, "sync happened");
    expect_true(n_slip > 0, "bit slip happened");
    expect_true(n_long_word > 0, "11-bit word happened");
    expect_true(n_pd_late > 0 && n_pd_early > 0, "phase detector both ways");
    expect_true(n_drop_tolerated > 0, "missing sync tolerated");
    expect_true(n_relock > 0, "relock after loss");
    expect_true(n_short > 0, "53-word slots");
    expect_true(n_rate[0] > 0 && n_rate[1] > 0 && n_rate[2] > 0 && n_rate[3] > 0, "all four rates");
    done = 1'b1;
  end
endmodule
