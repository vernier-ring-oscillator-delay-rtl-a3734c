// phase_detector: detects the moment the fast clock's rising edge catches up
// with the slow clock's rising edge.
//
// Three flip-flops, connected as in the phase detector circuit:
//   ff1: D = slow clock, clocked by the fast clock. It records whether the
//        slow clock was high at each fast rising edge.
//   ff2: D = ff1's Q, clocked by the fast clock: ff1 one fast cycle later.
//   ff3: D tied high, clocked by ff2's inverted output, drives PD.
// After STOP the fast edge trails a slow edge by a phase that shrinks by
// T1 - T2 every fast cycle, so ff1 samples the slow clock high. The first
// fast edge that arrives just before (no later than) a slow rising edge
// samples it low: ff1 falls, ff2 falls one fast edge later, and the rising
// edge of ff2's inverted output sets PD. Because ff2 must first have been
// high, a stop that lands in the low half of the slow clock is not taken for
// a coincidence. PD stays high until `clear`.
//
// Timing: PD rises on the second fast rising edge after the coincidence.
// The asynchronous, active-high clear of all three flip-flops is this
// design's choice; the circuit drawing shows no reset.
module phase_detector (
  input  logic slow_clk,  // slow oscillator (period T1)
  input  logic fast_clk,  // fast oscillator (period T2 < T1)
  input  logic clear,     // asynchronous clear, active high
  output logic pd         // high once the coincidence has been seen
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q1, q2;
  logic q2_n;

  always_ff @(posedge fast_clk or posedge clear) begin
    if (clear) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= slow_clk;
      q2 <= q1;
    end
  end

  // Inverted output of the second flip-flop clocks the third.
  assign q2_n = ~q2;

  always_ff @(posedge q2_n or posedge clear) begin
    if (clear) pd <= 1'b0;
    else       pd <= 1'b1;
  end
endmodule
