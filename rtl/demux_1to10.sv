// demux_1to10: 1:10 serial-to-parallel converter for 8B/10B coded data.
// A ten-stage shift register (serial in, parallel out) takes one bit per bit clock.
// Once per word the narrow word clock copies all ten stages into a ten-bit output
// register (parallel in, parallel out), so the word stays stable while the next one
// shifts in. A shift register is used instead of a tree because ten is not a power of
// two. dout[0] (D0) is the stage next to the input, i.e. the latest bit; dout[9] (D9)
// is the earliest, which is 8B/10B bit 'a'. Here the narrow word clock is a one-cycle
// load enable (word_load) in the bit-clock domain rather than a second clock.
// Timing: with word_load high at a rising edge, dout takes the ten bits that entered at
// the ten preceding edges, and dout_valid is high for the following cycle.
module demux_1to10 #(
  parameter int unsigned WORD_BITS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 din,
  input  logic                 word_load,
  output logic [WORD_BITS-1:0] dout,
  output logic                 dout_valid
);
  logic [WORD_BITS-1:0] sipo;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sipo <= '0;
    else        sipo <= {sipo[WORD_BITS-2:0], din};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= word_load;
      if (word_load) dout <= sipo;
    end
endmodule
