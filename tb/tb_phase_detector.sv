// tb_phase_detector: runs a slow clock (7.82 ns) and a fast clock
// (6.817 ns) that starts a random delay later, and checks that PD rises at
// exactly the predicted fast edge and not before. The prediction is worked
// out from edge arithmetic: at the j-th fast edge the slow clock is high
// when (delay + (j-1)*T2) mod T1 is below the slow high time; PD rises on
// the fast edge j at which the samples of edges j-2 and j-1 were high then
// low. Delays that would put a fast edge exactly on a slow transition are
// redrawn, since the outcome of such a tie is not defined.
module tb_phase_detector;
  timeunit 1ps;
  timeprecision 1ps;

  localparam longint T1 = 7820, H1 = T1 / 2, L1 = T1 - H1;
  localparam longint T2 = 6817, H2 = T2 / 2, L2 = T2 - H2;

  logic slow_clk = 1'b0, fast_clk = 1'b0;
  logic clear = 1'b0;   // raised at 10 ps: the clear acts on its rising edge
  logic pd;
  bit   s_run = 1'b0, f_run = 1'b0;
  longint t_pd;
  int checks = 0;
  int failures = 0;
  int low_start_trials = 0;

  phase_detector dut (.slow_clk(slow_clk), .fast_clk(fast_clk), .clear(clear), .pd(pd));

  always begin
    wait (s_run);
    slow_clk = 1'b1; #(H1);
    slow_clk = 1'b0; #(L1);
  end
  always begin
    wait (f_run);
    fast_clk = 1'b1; #(H2);
    fast_clk = 1'b0; #(L2);
  end
  always @(posedge pd) t_pd = $time;

  function automatic bit sample(input longint delay, input int j);
    return ((delay + (j - 1) * T2) % T1) < H1;
  endfunction

  function automatic bit has_tie(input longint delay);
    for (int j = 1; j < 200; j++) begin
      longint r = (delay + (j - 1) * T2) % T1;
      if (r == 0 || r == H1) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Fast edge number on which PD is expected to rise.
  function automatic int expected_edge(input longint delay);
    bit s_prev2 = 1'b0, s_prev1;
    s_prev1 = sample(delay, 1);
    for (int j = 3; j < 200; j++) begin
      s_prev2 = (j == 3) ? sample(delay, 1) : s_prev1;
      s_prev1 = sample(delay, j - 1);
      if (s_prev2 && !s_prev1) return j;
    end
    return -1;
  endfunction

  task automatic check_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10;
    for (int trial = 0; trial < 60; trial++) begin
      longint delay, t0;
      int j_pd;
      do begin
        delay = (trial < 20) ? longint'($urandom_range(1, 7819))
                             : longint'($urandom_range(1, 200_000));
      end while (has_tie(delay));
      j_pd = expected_edge(delay);
      if (!sample(delay, 1)) low_start_trials++;
      clear = 1'b1;
      #(3 * T1);
      check_eq(pd, 0, "cleared");
      clear = 1'b0;
      t_pd = -1;
      #100;
      t0 = $time;
      s_run = 1'b1;
      #(delay);
      f_run = 1'b1;
      #(j_pd * T2 + 3 * T2);
      check_eq(j_pd > 0, 1, "coincidence predicted");
      check_eq(t_pd - t0, delay + (j_pd - 1) * T2, "PD rise time");
      check_eq(pd, 1, "PD held");
      s_run = 1'b0;
      f_run = 1'b0;
    end
    check_eq(low_start_trials > 0, 1, "some STOPs in slow low phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
