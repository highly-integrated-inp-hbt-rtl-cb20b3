// loop_filter_model: behavioural model (not synthesizable) of the analog loop filter of
// the clock and data recovery PLL, for closed-loop simulation only.
// The filter's input stage sums the two phase detector outputs; here their sum minus one
// gives e = +1 (both flip-flops saw the clock high: clock late), -1 (clock early) or 0.
// Every STEP time units the model integrates e (the capacitor) and adds a proportional
// term (the series resistor): v_ctl = KI * sum(e) + KP * e. enable = 0 opens the loop
// (v_ctl held at 0). The gains are free model parameters, not values of the real circuit,
// which is specified by its pole and zero frequencies rather than by these numbers.
module loop_filter_model #(
  parameter real STEP = 20.0,
  parameter real KP   = 0.01,
  parameter real KI   = 0.00002
) (
  input  logic ff0,
  input  logic ff1,
  input  logic enable,
  output real  v_ctl
);
  real integ;
  real e;

  initial begin
    integ = 0.0;
    v_ctl = 0.0;
    forever begin
      #(STEP);
      e = real'(int'(ff0) + int'(ff1) - 1);
      if (enable) begin
        integ = integ + KI * e;
        v_ctl = integ + KP * e;
      end else begin
        integ = 0.0;
        v_ctl = 0.0;
      end
    end
  end
endmodule
