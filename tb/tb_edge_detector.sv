// tb_edge_detector: checks that the edge detector goes high on the first
// rising edge of its pulse, ignores the pulse's later edges, and returns low
// only on clear (asynchronously, without a pulse edge).
module tb_edge_detector;
  timeunit 1ps;
  timeprecision 1ps;

  logic pulse = 1'b0;
  logic clear = 1'b0;   // raised at 10 ps: the clear acts on its rising edge
  logic q;
  int checks = 0;
  int failures = 0;

  edge_detector dut (.pulse(pulse), .clear(clear), .q(q));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10 clear = 1'b1;
    #90 check(q, 1'b0, "cleared");
    clear = 1'b0;
    #100 check(q, 1'b0, "idle after clear");
    for (int trial = 0; trial < 20; trial++) begin
      int unsigned w = 50 + $urandom_range(0, 500);
      #(w) pulse = 1'b1;
      #1 check(q, 1'b1, "set by rising edge");
      #(w) pulse = 1'b0;
      #1 check(q, 1'b1, "held after falling edge");
      #(w) pulse = 1'b1;
      #(w) pulse = 1'b0;
      #1 check(q, 1'b1, "held after second pulse");
      #(w) clear = 1'b1;
      #1 check(q, 1'b0, "asynchronous clear");
      pulse = 1'b1;
      #1 check(q, 1'b0, "clear dominates pulse");
      pulse = 1'b0;
      #10 clear = 1'b0;
      #10 check(q, 1'b0, "stays low after clear");
    end
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
