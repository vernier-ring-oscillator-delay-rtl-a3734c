// tdc_pkg: constants and types shared by the vernier ring-oscillator TDC.
//
// The two oscillator periods are the values measured on the implemented
// FPGA delay line (slow clock 7.82 ns, fast clock 6.817 ns), so the
// resolution T1 - T2 is 1.003 ns. The counter width and the width of the
// computed interval are choices of this design: the source sets no range.
// An 8-bit count covers intervals up to about 1.9 us.
package tdc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Oscillator periods in picoseconds.
  localparam int unsigned T1_PS = 7820;   // slow oscillator period
  localparam int unsigned T2_PS = 6817;   // fast oscillator period

  // Width of the coarse and fine counters.
  localparam int unsigned CNT_W = 8;

  // Width of the signed interval result in picoseconds.
  localparam int unsigned TIME_W = 32;

  // Equation offset: the detection path adds two clock edges to each count.
  localparam int unsigned COUNT_OFFSET = 2;
endpackage
