// vernier_tdc: time-to-digital converter that measures the interval from
// the rising edge of START to the rising edge of STOP with two ring
// oscillators whose periods differ slightly (vernier principle).
//
// START switches on the slow oscillator (period T1) and STOP the fast one
// (period T2 < T1), each through an edge detector. Every fast cycle the fast
// clock's rising edge gains T1 - T2 on the slow clock's, so after some
// cycles the two edges coincide; the phase detector notices this and stops
// both counters. The coarse counter holds n1 (slow edges since START), the
// fine counter n2 (fast edges since STOP), and the interval is
//     T = T1 * (n1 - 2) - T2 * (n2 - 2),
// with a resolution of T1 - T2 (1.003 ns with the default periods).
//
// Interface: pulse START, then STOP (STOP must not come first). `done` rises
// on the slow edge that makes n1 final; n1, n2 and interval_ps then hold
// until `clear`, an asynchronous active-high clear that also switches both
// oscillators off. Raise `clear` for at least one slow period before the
// next measurement so both oscillators settle at rest.
//
// The oscillators are behavioural models (their period is a matter of
// placement and routing delay), so this top simulates but does not
// synthesize as a whole; every other block is synthesizable logic. The
// oscillator circuit, the phase detector and Equation (1) follow the source;
// the clear wiring, the counter stop rule, the `done` flag and the
// in-logic evaluation of Equation (1) are this design's choices.
module vernier_tdc #(
  parameter int unsigned T1_PS  = tdc_pkg::T1_PS,
  parameter int unsigned T2_PS  = tdc_pkg::T2_PS,
  parameter int unsigned CNT_W  = tdc_pkg::CNT_W,
  parameter int unsigned TIME_W = tdc_pkg::TIME_W
) (
  input  logic                     start,        // START pulse
  input  logic                     stop,         // STOP pulse
  input  logic                     clear,        // asynchronous clear, active high
  output logic                     slow_clk,     // slow oscillator, for observation
  output logic                     fast_clk,     // fast oscillator, for observation
  output logic                     pd,           // phase coincidence detected
  output logic                     done,         // n1, n2 and interval_ps are final
  output logic [CNT_W-1:0]         n1,           // coarse count (slow edges)
  output logic [CNT_W-1:0]         n2,           // fine count (fast edges)
  output logic signed [TIME_W-1:0] interval_ps   // Equation (1), picoseconds
);
  timeunit 1ps;
  timeprecision 1ps;

  logic slow_en, fast_en;

  edge_detector u_start_edge (.pulse(start), .clear(clear), .q(slow_en));
  edge_detector u_stop_edge  (.pulse(stop),  .clear(clear), .q(fast_en));

  ring_oscillator #(.HIGH_PS(T1_PS / 2), .LOW_PS(T1_PS - T1_PS / 2))
    u_slow_osc (.en(slow_en), .clk(slow_clk));
  ring_oscillator #(.HIGH_PS(T2_PS / 2), .LOW_PS(T2_PS - T2_PS / 2))
    u_fast_osc (.en(fast_en), .clk(fast_clk));

  phase_detector u_pd (
    .slow_clk(slow_clk), .fast_clk(fast_clk), .clear(clear), .pd(pd)
  );

  coarse_counter #(.CNT_W(CNT_W)) u_coarse (
    .slow_clk(slow_clk), .clear(clear), .pd(pd), .n1(n1), .stopped(done)
  );

  fine_counter #(.CNT_W(CNT_W)) u_fine (
    .fast_clk(fast_clk), .clear(clear), .pd(pd), .n2(n2)
  );

  interval_calc #(
    .CNT_W(CNT_W), .TIME_W(TIME_W), .T1_PS(T1_PS), .T2_PS(T2_PS)
  ) u_calc (.n1(n1), .n2(n2), .interval_ps(interval_ps));
endmodule
