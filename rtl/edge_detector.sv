// edge_detector: turns the rising edge of START (or STOP) into a level that
// switches a ring oscillator on.
//
// It is a single flip-flop whose D input is tied high and whose clock is the
// measured pulse, as in the CDFF2 cell of the oscillator circuit: the first
// rising edge of `pulse` sets `q`, and `q` stays high whatever the pulse does
// afterwards, until `clear` resets it. The clear is asynchronous and active
// high, as the flip-flop's Clr pin; its polarity is this design's choice.
//
// Timing: q rises on the rising edge of pulse (clock-to-output delay only).
module edge_detector (
  input  logic pulse,   // START or STOP pulse, used as the clock
  input  logic clear,   // asynchronous clear, active high
  output logic q        // high from the first rising edge of pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge pulse or posedge clear) begin
    if (clear) q <= 1'b0;
    else       q <= 1'b1;
  end
endmodule
