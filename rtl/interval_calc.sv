// interval_calc: converts the two counts into the measured START-to-STOP
// interval, in picoseconds, by Equation (1):
//     T = T1 * (n1 - 2) - T2 * (n2 - 2)
// with T1 and T2 the slow and fast oscillator periods. The result is signed
// and exceeds the true interval by between 0 and one resolution step
// (T1 - T2). Purely combinational: it is valid as soon as both counts are
// final. The periods are parameters, since on silicon they must be measured
// and are not set by the logic. That the equation is evaluated in logic at
// all, and the result width, are this design's choices.
module interval_calc #(
  parameter int unsigned CNT_W  = tdc_pkg::CNT_W,
  parameter int unsigned TIME_W = tdc_pkg::TIME_W,
  parameter int unsigned T1_PS  = tdc_pkg::T1_PS,
  parameter int unsigned T2_PS  = tdc_pkg::T2_PS
) (
  input  logic [CNT_W-1:0]         n1,          // slow edges counted
  input  logic [CNT_W-1:0]         n2,          // fast edges counted
  output logic signed [TIME_W-1:0] interval_ps  // measured interval
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic signed [TIME_W-1:0] T1 = TIME_W'(T1_PS);
  localparam logic signed [TIME_W-1:0] T2 = TIME_W'(T2_PS);
  localparam logic signed [TIME_W-1:0] OFS = TIME_W'(tdc_pkg::COUNT_OFFSET);

  logic signed [TIME_W-1:0] k1, k2;

  always_comb begin
    k1 = $signed(TIME_W'(n1)) - OFS;
    k2 = $signed(TIME_W'(n2)) - OFS;
    interval_ps = T1 * k1 - T2 * k2;
  end
endmodule
