// tb_min_control: self-checking test of the PMIN/NMIN control with its
// timer. The test acts as the OC handler (ri) and the gate driver (ao follows
// ro after a driver delay) and checks that the gate follows the request and
// that ai rises no earlier than MIN_NS after ri+, and at once when the gate
// acknowledgement is the later event.
`timescale 1ns/1ps
module tb_min_control;
  localparam int unsigned MIN_NS = 20;
  logic nrst, ri, ai, ro, ao, rd, ad;
  int checks = 0, failures = 0;
  int unsigned drv_ns = 2;
  realtime t0;

  min_control dut (.nrst(nrst), .ri(ri), .ai(ai), .ro(ro), .ao(ao), .rd(rd), .ad(ad));
  delay_timer #(.DELAY_NS(MIN_NS)) u_timer (.r(rd), .a(ad));

  always @(ro) ao <= #(drv_ns) ro;

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
    nrst = 0; ri = 0; ao = 0;
    #10 nrst = 1;
    #5 check(ai == 0 && ro == 0, "idle");
    for (int i = 0; i < 6; i++) begin
      drv_ns = (i % 2) ? 35 : 2;     // driver slower or faster than MIN_NS
      ri = 1;
      t0 = $realtime;
      #1 check(ro == 1 && rd == 1, "gate and timer requested");
      wait (ai);
      check($realtime - t0 >= MIN_NS, "ai not before minimum time");
      check($realtime - t0 >= drv_ns, "ai not before gate acknowledge");
      check($realtime - t0 <= ((drv_ns > MIN_NS) ? drv_ns : MIN_NS) + 1, "ai latency");
      #3 ri = 0;
      #1 check(ro == 0, "gate released");
      check(ai == 1, "ai held until acknowledgements fall");
      wait (!ai);
      check(ao == 0 && ad == 0, "ai- after both fell");
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
