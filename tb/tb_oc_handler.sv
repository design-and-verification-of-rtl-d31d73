// tb_oc_handler: self-checking test of OC_HANDLER. The test plays the ZC
// handler (ri), the over-current comparator (oc) and the two min-controls
// (ap answers rp, an answers rn) and checks rp, rn and ai after each event,
// including an over-current that comes before the PMOS acknowledge (PMIN
// not yet over), and that rp and rn are never high together.
`timescale 1ns/1ps
module tb_oc_handler;
  logic nrst, ri, ai, oc, rp, ap, rn, an;
  int checks = 0, failures = 0;

  oc_handler dut (.nrst(nrst), .ri(ri), .ai(ai), .oc(oc), .rp(rp), .ap(ap), .rn(rn), .an(an));

  task automatic expect3(input logic e_rp, input logic e_rn, input logic e_ai, input string what);
    #2;
    checks++;
    if (rp !== e_rp || rn !== e_rn || ai !== e_ai) begin
      failures++;
      $display("FAIL %s: rp=%0b rn=%0b ai=%0b expected %0b %0b %0b at %0t",
               what, rp, rn, ai, e_rp, e_rn, e_ai, $time);
    end
  endtask

  always @(rp or rn) begin
    #0;
    if (rp && rn) begin
      failures++;
      $display("FAIL rp and rn high together at %0t", $time);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nrst = 0; ri = 0; oc = 0; ap = 0; an = 0;
    #10 nrst = 1;
    expect3(0, 0, 0, "idle");
    // first cycle from reset: NMOS already off
    ri = 1;  expect3(0, 0, 1, "ri+ -> ai+ (NMOS off)");
    repeat (3) begin
      ri = 0;  expect3(1, 0, 1, "ri- -> rp+ (PMOS on)");
      oc = 1;  expect3(1, 0, 1, "oc before PMIN: PMOS stays on");
      ap = 1;  expect3(0, 0, 1, "ap+ with oc -> rp-");
      oc = 0;  expect3(0, 0, 1, "oc falls");
      ap = 0;  expect3(0, 1, 0, "ap- -> rn+ (NMOS on), ai-");
      an = 1;  expect3(0, 1, 0, "an+ (NMIN over)");
      ri = 1;  expect3(0, 0, 0, "ri+ -> rn- (NMOS off)");
      an = 0;  expect3(0, 0, 1, "an- -> ai+");
      // over-current after PMIN
      ri = 0;  expect3(1, 0, 1, "ri- -> rp+");
      ap = 1;  expect3(1, 0, 1, "PMIN over, no oc: PMOS stays on");
      oc = 1;  expect3(0, 0, 1, "oc -> rp-");
      ap = 0;  expect3(0, 1, 0, "ap- -> rn+, ai-");
      oc = 0;  expect3(0, 1, 0, "oc falls");
      ri = 1;  expect3(0, 1, 0, "ri+ before NMIN: NMOS stays on");
      an = 1;  expect3(0, 0, 0, "an+ -> rn- (NMOS off)");
      an = 0;  expect3(0, 0, 1, "an- -> ai+");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
