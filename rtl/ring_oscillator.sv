// ring_oscillator: behavioural model of a gated ring oscillator. Not
// synthesizable: its period comes from gate and routing delays, which are
// modelled here with delay statements.
//
// The circuit is a loop of a two-input AND gate, a buffer, an inverting
// feedback gate (an and-or-invert gate in the slow oscillator, a NOR gate in
// the fast one, each with its spare inputs tied to ground so that it acts as
// an inverter) and a second buffer back into the AND gate. The other AND
// input is the enable from the edge detector. While `en` is low the output
// is held low and the loop's inverter output is high; when `en` rises the
// output rises at once and then toggles every half period. `HIGH_PS` and
// `LOW_PS` are the loop delays seen by a rising and by a falling output, so
// the period is their sum. The defaults give the slow oscillator's 7.82 ns;
// the fast one is the same model with 3408 + 3409 ps = 6.817 ns.
//
// The split of a period into high and low time, and the zero delay from `en`
// to the first rising edge, are this model's choices; the source gives only
// the periods. Equal start-up delays in both oscillators cancel in the
// measurement, so a zero delay loses nothing.
module ring_oscillator #(
  parameter int unsigned HIGH_PS = 3910,  // time the output stays high
  parameter int unsigned LOW_PS  = 3910   // time the output stays low
) (
  input  logic en,    // oscillator on while high (edge detector output)
  output logic clk    // oscillator output
);
  timeunit 1ps;
  timeprecision 1ps;

  // Output of the feedback path (inverter after the buffers), high at rest.
  logic fb;
  initial fb = 1'b1;

  // AND gate that switches the oscillator on and off.
  assign clk = en & fb;

  // Loop delay: the inverted output returns to the AND gate half a period
  // later. Transport delays, so a pending change is never lost.
  always @(posedge clk) fb <= #(HIGH_PS) 1'b0;
  always @(negedge clk) fb <= #(LOW_PS) 1'b1;
endmodule
