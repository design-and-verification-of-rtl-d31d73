// tb_wait_element: self-checking test of the WAIT element. Checks that san
// waits for sig while ctrl is high, holds once seen even if sig drops, falls
// with ctrl, and answers at once when sig is already high.
`timescale 1ns/1ps
module tb_wait_element;
  logic nrst, sig, ctrl, san;
  int checks = 0, failures = 0;

  wait_element dut (.nrst(nrst), .sig(sig), .ctrl(ctrl), .san(san));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
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
    nrst = 0; sig = 0; ctrl = 0;
    #10 nrst = 1;
    #5  check(san, 0, "idle");
    ctrl = 1;
    #5  check(san, 0, "waiting, sig low");
    sig = 1;
    #1  check(san, 1, "sig seen");
    sig = 0;
    #5  check(san, 1, "held after sig drops");
    ctrl = 0;
    #1  check(san, 0, "released with ctrl");
    // short pulse while waiting
    ctrl = 1;
    #5  check(san, 0, "waiting again");
    sig = 1; #1 sig = 0;
    #2  check(san, 1, "short pulse caught");
    ctrl = 0;
    #2  check(san, 0, "released");
    // sig already high when asked
    sig = 1;
    #3  check(san, 0, "not asked");
    ctrl = 1;
    #1  check(san, 1, "immediate when sig high");
    ctrl = 0; sig = 0;
    #2  check(san, 0, "released at end");
    // random sequence against a reference
    for (int i = 0; i < 200; i++) begin
      logic exp_san;
      exp_san = 0;
      ctrl = 1;
      repeat ($urandom_range(1, 6)) begin
        sig = 1'($urandom_range(0, 1));
        #1;
        if (sig) exp_san = 1;
        check(san, exp_san, "random");
      end
      ctrl = 0;
      #1 check(san, 0, "random release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
