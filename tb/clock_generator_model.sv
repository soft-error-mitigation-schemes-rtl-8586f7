// clock_generator_model: simulation model of the clock generator.
//
// Produces three clocks of the same period T with 50 % duty cycle, CLK2
// rising PHI1_PS after CLK1 and CLK3 rising PHI2_PS after CLK2. The period
// is taken from `step` at the start of every cycle:
//   T = TMAX_PS - step * (TMAX_PS - TMIN_PS) / STEPS   (integer ps)
// so the clock controlling logic can move the frequency cycle by cycle.
// PHI1_PS + PHI2_PS must stay below T/2. A real part would be a PLL/DLL
// with phase taps; this model only reproduces its outputs.
module clock_generator_model #(
  parameter int unsigned TMAX_PS = 9000,
  parameter int unsigned TMIN_PS = 7000,
  parameter int unsigned STEPS   = 32,
  parameter int unsigned PHI1_PS = 2000,
  parameter int unsigned PHI2_PS = 1000
) (
  input  logic [$clog2(STEPS+1)-1:0] step,
  output logic                       clk1,
  output logic                       clk2,
  output logic                       clk3,
  output int unsigned                period_ps   // period of the current cycle
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned half;

  initial begin
    clk1 = 1'b0;
    clk2 = 1'b0;
    clk3 = 1'b0;
    period_ps = TMAX_PS;
    #(TMAX_PS);
    forever begin
      // a step beyond STEPS (e.g. before the controller is reset) is
      // treated as STEPS
      period_ps = TMAX_PS - ((int'(step) > int'(STEPS) ? int'(STEPS) : int'(step)) *
                             (TMAX_PS - TMIN_PS)) / STEPS;
      half = period_ps / 2;
      clk1 = 1'b1; #(PHI1_PS);
      clk2 = 1'b1; #(PHI2_PS);
      clk3 = 1'b1; #(half - PHI1_PS - PHI2_PS);
      clk1 = 1'b0; #(PHI1_PS);
      clk2 = 1'b0; #(PHI2_PS);
      clk3 = 1'b0; #(period_ps - half - PHI1_PS - PHI2_PS);
    end
  end

endmodule
