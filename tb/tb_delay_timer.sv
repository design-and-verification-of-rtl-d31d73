// tb_delay_timer: self-checking test of the behavioural timer: a rises
// DELAY_NS after r rises and falls after r falls; an aborted request leaves
// a low.
`timescale 1ns/1ps
module tb_delay_timer;
  localparam int unsigned D = 30;
  logic r, a;
  int checks = 0, failures = 0;
  realtime t0;

  delay_timer #(.DELAY_NS(D)) dut (.r(r), .a(a));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 0;
    #10 check(a == 0, "idle");
    repeat (5) begin
      r = 1; t0 = $realtime;
      #(D - 1) check(a == 0, "not before delay");
      wait (a);
      check($realtime - t0 == D, "delay exact");
      #7 r = 0;
      #2 check(a == 0, "falls after request");
      #5;
    end
    r = 1; #(D / 2) r = 0;
    #(D) check(a == 0, "aborted request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
