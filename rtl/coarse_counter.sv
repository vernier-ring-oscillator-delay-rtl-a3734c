// coarse_counter: counts rising edges of the slow oscillator (n1).
//
// The slow oscillator starts at START, so the count runs from START. The
// counter stops once the phase detector has reported the coincidence: PD is
// made in the fast clock's domain and is sampled here on slow rising edges,
// and the edge at which PD is first seen high is still counted. That edge is
// the first slow edge after PD, one slow period after the coincident edge,
// and it is why Equation (1) subtracts 2 from n1. `stopped` goes high with
// that last count and marks n1, and with it the whole measurement, as final.
//
// The source names the counter and gives Equation (1) but not its insides;
// the one-edge stop is this design's reading of the equation. The count
// wraps at 2**CNT_W. The clear is asynchronous and active high.
module coarse_counter #(
  parameter int unsigned CNT_W = tdc_pkg::CNT_W
) (
  input  logic             slow_clk,  // slow oscillator
  input  logic             clear,     // asynchronous clear, active high
  input  logic             pd,        // phase detector output
  output logic [CNT_W-1:0] n1,        // slow edges counted
  output logic             stopped    // n1 is final
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge slow_clk or posedge clear) begin
    if (clear) begin
      n1      <= '0;
      stopped <= 1'b0;
    end else if (!stopped) begin
      n1      <= n1 + 1'b1;
      stopped <= pd;
    end
  end
endmodule
