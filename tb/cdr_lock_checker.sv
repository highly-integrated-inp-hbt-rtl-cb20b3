// cdr_lock_checker: watches one recovered clock against a transmitted bit stream of known
// bit period T (bit n is on the line from n*T to (n+1)*T, values in bits[]) and counts,
// from the moment armed rises: sampling edges, cycle slips (two edges in one bit or none
// in a bit), edges placed outside the middle 60% of a bit, and decision errors
// (rec_data after an edge differs from the bit that was on the line at that edge).
module cdr_lock_checker #(
  parameter real T = 400.0
) (
  input  logic clk,
  input  logic rec_data,
  input  logic armed,
  input  logic bits [0:1023],
  output int   n_edges,
  output int   n_slips,
  output int   n_off_center,
  output int   n_errors
);
  longint n_prev = -1;

  initial begin
    n_edges = 0; n_slips = 0; n_off_center = 0; n_errors = 0;
  end

  always @(posedge clk) begin
    real    pos;
    longint n;
    pos = $realtime / T;
    n = longint'($floor(pos));
    if (armed) begin
      n_edges++;
      if (n_prev >= 0 && n != n_prev + 1) n_slips++;
      if (pos - real'(n) < 0.2 || pos - real'(n) > 0.8) n_off_center++;
      #1;
      if (rec_data != bits[n % 1024]) n_errors++;
    end
    n_prev = n;
  end
endmodule
