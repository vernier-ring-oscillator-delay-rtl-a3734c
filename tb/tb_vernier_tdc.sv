// tb_vernier_tdc: end-to-end test of the vernier TDC at its default
// parameters (slow period 7.82 ns, fast period 6.817 ns, 8-bit counters).
//
// Each trial clears the converter, pulses START, pulses STOP a chosen delay
// later and waits for `done`. The expected counts come from edge arithmetic
// done here, independently of the design: slow edge k sits at (k-1)*T1 after
// START and fast edge j at delay + (j-1)*T2; the phase detector fires on the
// fast edge j at which the slow clock was sampled high at edge j-2 and low
// at edge j-1; n2 = j, and n1 counts the slow edges up to that moment plus
// one. Every trial also checks that the interval from Equation (1) exceeds
// the true delay by more than 0 and at most T1 - T2, and that the results
// hold after `done`. A final sweep of the delay from 1 ns to 30 ns checks
// that the result is a staircase with steps of at most T1 - T2.
//
// Mechanisms counted, each of which must occur at least once:
//   coincidence      the phase detector fired and both counters stopped
//   low_phase_start  STOP fell in the slow clock's low half, so the detector
//                    had to skip the first sample
//   late_coincidence the first fast edge already fell within one resolution
//                    step before a slow edge; having no earlier high sample,
//                    the detector skipped it and fired one vernier beat later
//   restart          a measurement after a clear of a previous one
//   figure_case      the 8.5 ns interval that gives n1 = 4, n2 = 3
module tb_vernier_tdc;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint T1 = tdc_pkg::T1_PS, H1 = T1 / 2;
  localparam longint T2 = tdc_pkg::T2_PS;
  localparam longint RES = T1 - T2;

  logic start = 1'b0, stop = 1'b0, clear = 1'b0;   // the clear acts on its rising edge
  logic slow_clk, fast_clk, pd, done;
  logic [7:0] n1, n2;
  logic signed [31:0] interval_ps;

  int checks = 0;
  int failures = 0;
  int n_steps = 0;
  int n_coincidence = 0, n_low_phase_start = 0, n_late = 0, n_restart = 0, n_figure = 0;

  vernier_tdc dut (
    .start(start), .stop(stop), .clear(clear),
    .slow_clk(slow_clk), .fast_clk(fast_clk), .pd(pd), .done(done),
    .n1(n1), .n2(n2), .interval_ps(interval_ps)
  );

  function automatic bit sample(input longint delay, input longint j);
    return ((delay + (j - 1) * T2) % T1) < H1;
  endfunction

  function automatic bit has_tie(input longint delay);
    for (longint j = 1; j < 400; j++) begin
      longint r = (delay + (j - 1) * T2) % T1;
      if (r == 0 || r == H1) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic longint expected_edge(input longint delay);
    for (longint j = 3; j < 400; j++)
      if (sample(delay, j - 2) && !sample(delay, j - 1)) return j;
    return -1;
  endfunction

  task automatic check_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic measure(input longint delay, input bit figure);
    longint j_pd, t_pd, exp_n1, exp_n2, err;
    int unsigned wait_cycles;
    j_pd = expected_edge(delay);
    t_pd = delay + (j_pd - 1) * T2;              // PD time after START
    exp_n2 = j_pd;
    exp_n1 = t_pd / T1 + 1 + 1;                  // edges up to PD, plus one
    clear = 1'b1;
    #(3 * T1);
    check_eq(done, 0, "done cleared");
    check_eq(n1, 0, "n1 cleared");
    check_eq(n2, 0, "n2 cleared");
    check_eq(pd, 0, "pd cleared");
    clear = 1'b0;
    #(1000);
    start = 1'b1;
    fork
      begin #(2000); start = 1'b0; end
      begin #(delay); stop = 1'b1; #(2000); stop = 1'b0; end
    join
    wait_cycles = 0;
    while (!done && wait_cycles < 5000) begin
      #(T2);
      wait_cycles++;
    end
    check_eq(done, 1, "done reached");
    check_eq(n1, exp_n1, "n1");
    check_eq(n2, exp_n2, "n2");
    err = longint'(interval_ps) - delay;
    checks++;
    if (err <= 0 || err > RES) begin
      failures++;
      $display("FAIL interval: delay %0d ps measured %0d ps (n1=%0d n2=%0d)", delay, interval_ps, n1, n2);
    end
    // Results must hold while the oscillators keep running.
    #(10 * T1);
    check_eq(n1, exp_n1, "n1 held");
    check_eq(n2, exp_n2, "n2 held");
    check_eq(done, 1, "done held");
    if (done) n_coincidence++;
    if (!sample(delay, 1)) n_low_phase_start++;
    if (delay % T1 >= T1 - RES) begin
      check_eq(j_pd > 3, 1, "skipped first coincidence");
      n_late++;
    end
    if (figure) begin
      check_eq(n1, 4, "figure case n1");
      check_eq(n2, 3, "figure case n2");
      check_eq(interval_ps, 8823, "figure case interval");
      n_figure++;
    end
    n_restart++;
  endtask

  initial begin
    longint d, last;
    #(1000);
    measure(8500, 1'b1);
    measure(2 * 7820 - 500, 1'b0);
    for (int trial = 0; trial < 200; trial++) begin
      do begin
        case (trial % 4)
          0: d = longint'($urandom_range(1, 4 * 7820));
          1: d = longint'($urandom_range(1, 100_000));
          2: d = longint'($urandom_range(1, 1_500_000));
          default: d = 7820 * longint'($urandom_range(1, 20)) + longint'($urandom_range(0, 1003));
        endcase
      end while (has_tie(d));
      measure(d, 1'b0);
    end
    // Transfer-curve sweep: 1..30 ns in 37 ps steps. The measured interval
    // must never decrease as the delay grows and never jump by more than
    // one resolution step. Within one slow period the steps are exactly
    // T1 - T2; where the delay crosses a multiple of T1 one step is shorter,
    // since T1 is not a whole multiple of T1 - T2.
    last = -1;
    for (longint dl = 1; dl <= 30_000; dl += 37) begin
      if (has_tie(dl)) continue;
      measure(dl, 1'b0);
      if (last >= 0) begin
        checks++;
        if (interval_ps < last || interval_ps > last + RES) begin
          failures++;
          $display("FAIL sweep: delay %0d ps gave %0d ps after %0d ps", dl, interval_ps, last);
        end
        if (interval_ps != last) n_steps++;
      end
      last = interval_ps;
    end
    n_restart--;   // the first measurement followed no other
    $display("mechanisms: coincidence=%0d low_phase_start=%0d late_coincidence=%0d restart=%0d figure_case=%0d",
             n_coincidence, n_low_phase_start, n_late, n_restart, n_figure);
    check_eq(n_coincidence > 0, 1, "coincidence seen");
    check_eq(n_low_phase_start > 0, 1, "low-phase start seen");
    check_eq(n_late > 0, 1, "late coincidence seen");
    check_eq(n_restart > 0, 1, "restart seen");
    check_eq(n_figure > 0, 1, "figure case seen");
    check_eq(n_steps >= 29, 1, "resolution steps over the sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
