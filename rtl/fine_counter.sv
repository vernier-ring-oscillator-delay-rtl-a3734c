// fine_counter: counts rising edges of the fast oscillator (n2).
//
// The fast oscillator starts at STOP, so the count runs from STOP. PD is
// set on a fast rising edge (through the phase detector's flip-flops), so it
// is synchronous to this counter: the edge that sets PD is still counted,
// and every later one is not. That edge is the second fast edge after the
// coincident one, which is why Equation (1) subtracts 2 from n2.
//
// The source names the counter and gives Equation (1) but not its insides.
// The count wraps at 2**CNT_W. The clear is asynchronous and active high.
module fine_counter #(
  parameter int unsigned CNT_W = tdc_pkg::CNT_W
) (
  input  logic             fast_clk,  // fast oscillator
  input  logic             clear,     // asynchronous clear, active high
  input  logic             pd,        // phase detector output
  output logic [CNT_W-1:0] n2         // fast edges counted
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge fast_clk or posedge clear) begin
    if (clear)    n2 <= '0;
    else if (!pd) n2 <= n2 + 1'b1;
  end
endmodule
