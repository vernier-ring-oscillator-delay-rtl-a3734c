// tb_ring_oscillator: checks the gated ring oscillator model with the slow
// (7.82 ns) and fast (6.817 ns) settings: output low while disabled, first
// rising edge when enabled, exact period and high time on every cycle, and
// output forced low as soon as the enable drops.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T1 = 7820;
  localparam int unsigned T2 = 6817;

  logic en_s = 1'b0, en_f = 1'b0;
  logic clk_s, clk_f;
  int checks = 0;
  int failures = 0;

  ring_oscillator #(.HIGH_PS(T1 / 2), .LOW_PS(T1 - T1 / 2)) u_slow (.en(en_s), .clk(clk_s));
  ring_oscillator #(.HIGH_PS(T2 / 2), .LOW_PS(T2 - T2 / 2)) u_fast (.en(en_f), .clk(clk_f));

  task automatic check_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Enable one oscillator and time its first CYCLES rising and falling edges.
  task automatic run(input bit slow, input int unsigned period, input int unsigned cycles);
    longint t_en, t_rise, t_prev, t_fall;
    if (slow) en_s = 1'b1; else en_f = 1'b1;
    t_en = $time;
    #0;
    check_eq(slow ? clk_s : clk_f, 1, "rises with enable");
    t_prev = t_en;
    for (int k = 1; k <= cycles; k++) begin
      if (slow) @(negedge clk_s); else @(negedge clk_f);
      t_fall = $time;
      check_eq(t_fall - t_prev, period / 2, "high time");
      if (slow) @(posedge clk_s); else @(posedge clk_f);
      t_rise = $time;
      check_eq(t_rise - t_prev, period, "period");
      check_eq(t_rise - t_en, longint'(k) * period, "edge position");
      t_prev = t_rise;
    end
    #(period / 4);
    if (slow) en_s = 1'b0; else en_f = 1'b0;
    #0;
    check_eq(slow ? clk_s : clk_f, 0, "gated off");
    #(4 * period);
    check_eq(slow ? clk_s : clk_f, 0, "stays off");
  endtask

  initial begin
    #1000;
    check_eq(clk_s, 0, "slow off at rest");
    check_eq(clk_f, 0, "fast off at rest");
    run(1'b1, T1, 30);
    run(1'b0, T2, 30);
    run(1'b1, T1, 5);   // restart after a stop
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
