// tb_uv_handler: self-checking test of UV_HANDLER. The test plays the
// activation side (ri), UV_WAIT (uv answers wuv) and the ZC handler (ao), and
// checks wuv, ro and ai after each event.
`timescale 1ns/1ps
module tb_uv_handler;
  logic nrst, ri, ai, wuv, uv, ro, ao;
  int checks = 0, failures = 0;

  uv_handler dut (.nrst(nrst), .ri(ri), .ai(ai), .wuv(wuv), .uv(uv), .ro(ro), .ao(ao));

  task automatic expect3(input logic e_wuv, input logic e_ro, input logic e_ai, input string what);
    #2;
    checks++;
    if (wuv !== e_wuv || ro !== e_ro || ai !== e_ai) begin
      failures++;
      $display("FAIL %s: wuv=%0b ro=%0b ai=%0b expected %0b %0b %0b at %0t",
               what, wuv, ro, ai, e_wuv, e_ro, e_ai, $time);
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
    nrst = 0; ri = 0; uv = 0; ao = 0;
    #10 nrst = 1;
    expect3(0, 0, 0, "idle");
    repeat (4) begin
      ri = 1;  expect3(1, 0, 0, "ri+ -> wuv+");
      #20;     expect3(1, 0, 0, "no under-voltage yet");
      uv = 1;  expect3(1, 1, 0, "uv+ -> ro+");
      ao = 1;  expect3(0, 1, 0, "ao+ -> wuv-");
      uv = 0;  expect3(0, 1, 1, "uv- -> ai+");
      ri = 0;  expect3(0, 0, 1, "ri- -> ro-");
      ao = 0;  expect3(0, 0, 0, "ao- -> ai-");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
