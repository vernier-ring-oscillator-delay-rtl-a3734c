// tb_fine_counter: drives the fast clock and raises PD either just after a
// fast edge in the same time step (as the phase detector does) or part-way
// through a cycle. The edge that raises PD, and every earlier one, must be
// counted; no later edge may be, and clear must restart the count.
module tb_fine_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T2 = 6817;
  localparam int unsigned CNT_W = 8;

  logic fast_clk = 1'b0;
  logic clear = 1'b0;   // raised at 10 ps: the clear acts on its rising edge
  logic pd = 1'b0;
  logic [CNT_W-1:0] n2;
  int checks = 0;
  int failures = 0;
  bit same_step;

  fine_counter dut (.fast_clk(fast_clk), .clear(clear), .pd(pd), .n2(n2));

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
      int unsigned m = $urandom_range(1, 60);   // edges counted
      same_step = trial[0];
      clear = 1'b1;
      pd = 1'b0;
      #100;
      check_eq(n2, 0, "cleared count");
      clear = 1'b0;
      #100;
      for (int k = 1; k <= m; k++) begin
        fast_clk = 1'b1;
        if (k == m && same_step) pd <= 1'b1;   // after the edge, same time step
        #(T2 / 2);
        if (k == m && !same_step) pd = 1'b1;   // mid-cycle
        fast_clk = 1'b0; #(T2 - T2 / 2);
        check_eq(n2, k, "counting");
      end
      for (int k = 0; k < 5; k++) begin
        fast_clk = 1'b1; #(T2 / 2);
        fast_clk = 1'b0; #(T2 - T2 / 2);
        check_eq(n2, m, "held after PD");
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
