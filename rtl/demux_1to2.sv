// demux_1to2: one cell of the 1:8 tree demultiplexer.
// The cell sees its input stream at its own rate: en marks the clock edges at which the
// input carries a new bit. On an enabled edge with out_phase low the bit is held; on the
// next enabled edge (out_phase high) the held bit goes to q_first and the current bit to
// q_second. The two outputs therefore change at half the input rate, which is what lets
// each tree level run at half the clock rate of the one before it. Here the half-rate
// clock is expressed as the enable pattern given by the parent.
module demux_1to2 (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic out_phase,
  input  logic d,
  output logic q_first,
  output logic q_second
);
  logic hold;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hold     <= 1'b0;
      q_first  <= 1'b0;
      q_second <= 1'b0;
    end else if (en) begin
      if (!out_phase) hold <= d;
      else begin
        q_first  <= hold;
        q_second <= d;
      end
    end
endmodule
