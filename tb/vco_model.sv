// vco_model: behavioural model (not synthesizable) of the multivibrator VCO, for
// closed-loop simulation only. Its frequency is F0 * (1 + v_tune + v_ctl): v_tune stands
// for the external dc coarse tuning, v_ctl for the loop filter output. The clock toggles
// every half period; the half period is recomputed at every toggle so control changes
// act within half a cycle. F0 is in cycles per time unit.
module vco_model #(
  parameter real F0 = 0.0025
) (
  input  real  v_tune,
  input  real  v_ctl,
  output logic clk
);
  real half;

  initial begin
    clk = 1'b0;
    forever begin
      half = 0.5 / (F0 * (1.0 + v_tune + v_ctl));
      #(half);
      clk = ~clk;
    end
  end
endmodule
