// tb_interval_calc: compares the interval computed from n1 and n2 with
// T1*(n1-2) - T2*(n2-2) evaluated in 64-bit integers, over fixed corner
// cases and random counts.
module tb_interval_calc;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CNT_W = 8;
  logic [CNT_W-1:0] n1, n2;
  logic signed [31:0] t;
  int checks = 0;
  int failures = 0;

  interval_calc dut (.n1(n1), .n2(n2), .interval_ps(t));

  task automatic apply(input int unsigned a, input int unsigned b);
    longint exp;
    n1 = CNT_W'(a);
    n2 = CNT_W'(b);
    #1;
    exp = 64'sd7820 * (longint'(a) - 2) - 64'sd6817 * (longint'(b) - 2);
    checks++;
    if (longint'(t) != exp) begin
      failures++;
      $display("FAIL n1=%0d n2=%0d: got %0d expected %0d", a, b, t, exp);
    end
  endtask

  initial begin
    apply(4, 3);      // 2*7820 - 6817 = 8823
    apply(2, 2);
    apply(3, 3);      // one resolution step
    apply(0, 0);
    apply(255, 2);
    apply(2, 255);
    apply(255, 255);
    for (int i = 0; i < 500; i++) apply($urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
