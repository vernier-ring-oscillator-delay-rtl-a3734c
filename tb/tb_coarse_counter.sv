// tb_coarse_counter: drives the slow clock and raises PD at a random moment
// between two slow edges. The counter must count every slow edge before PD
// and exactly one edge after it, then hold n1 with `stopped` high until
// clear, which must also restart it from zero.
module tb_coarse_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T1 = 7820;
  localparam int unsigned CNT_W = 8;

  logic slow_clk = 1'b0;
  logic clear = 1'b0;   // raised at 10 ps: the clear acts on its rising edge
  logic pd = 1'b0;
  logic [CNT_W-1:0] n1;
  logic stopped;
  int checks = 0;
  int failures = 0;

  coarse_counter dut (.slow_clk(slow_clk), .clear(clear), .pd(pd), .n1(n1), .stopped(stopped));

  task automatic check_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10;
    for (int trial = 0; trial < 40; trial++) begin
      int unsigned m = $urandom_range(1, 60);   // edges before PD
      int unsigned frac = $urandom_range(100, T1 - 100);
      clear = 1'b1;
      pd = 1'b0;
      #100;
      check_eq(n1, 0, "cleared count");
      check_eq(stopped, 0, "cleared stopped");
      clear = 1'b0;
      #100;
      for (int k = 1; k <= m; k++) begin
        slow_clk = 1'b1; #(T1 / 2);
        slow_clk = 1'b0; #(T1 - T1 / 2);
        check_eq(n1, k, "counting");
        check_eq(stopped, 0, "running");
      end
      // PD arrives part-way through the next slow cycle.
      slow_clk = 1'b1;
      if (frac < T1 / 2) begin #(frac); pd = 1'b1; #(T1 / 2 - frac); end
      else               begin #(T1 / 2); slow_clk = 1'b0; #(frac - T1 / 2); pd = 1'b1; #(T1 - frac); end
      slow_clk = 1'b0;
      if (frac < T1 / 2) #(T1 - T1 / 2);
      check_eq(n1, m + 1, "edge before PD counted");
      check_eq(stopped, 0, "not stopped before PD seen");
      // The first edge that sees PD is counted, then the counter stops.
      for (int k = 0; k < 5; k++) begin
        slow_clk = 1'b1; #(T1 / 2);
        slow_clk = 1'b0; #(T1 - T1 / 2);
        check_eq(n1, m + 2, "held after stop");
        check_eq(stopped, 1, "stopped");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
