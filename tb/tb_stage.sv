// tb_stage: self-checking test of one ring stage (ACTIVATION + CHARGING).
// The test plays the ring (get), the gate drivers and the comparators: a
// token must give exactly one charge cycle at the next under-voltage, after
// which the token is passed; an under-voltage without token or high load
// must not switch the phase; high load switches it without token.
`timescale 1ns/1ps
module tb_stage;
  localparam int unsigned PMIN = 20, NMIN = 20, TOK = 30;
  logic nrst, get, pass, hl, uv, zc, oc, gp, gp_ack, gn, gn_ack;
  int checks = 0, failures = 0;
  int pcount = 0;

  stage #(.PMIN_NS(PMIN), .NMIN_NS(NMIN), .TOKEN_NS(TOK)) dut (
    .nrst(nrst), .get(get), .pass(pass), .hl(hl), .uv(uv), .zc(zc), .oc(oc),
    .gp(gp), .gp_ack(gp_ack), .gn(gn), .gn_ack(gn_ack));

  always @(gp) gp_ack <= #2 gp;
  always @(gn) gn_ack <= #2 gn;
  // over-current 25 ns after the PMOS is switched on
  always @(posedge gp) begin pcount++; #25 oc = 1; #3 oc = 0; end

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
    nrst = 0; get = 0; hl = 0; uv = 0; zc = 0; oc = 0; gp_ack = 0; gn_ack = 0;
    #10 nrst = 1;
    uv = 1; #5 uv = 0;
    #50 check(pcount == 0 && !pass, "no switching without token");
    for (int i = 0; i < 3; i++) begin
      get = 1;
      #50 check(pcount == i && !pass, "token waits for under-voltage");
      uv = 1; #5 uv = 0;
      wait (pass);
      check(pcount == i + 1, "one charge per token");
      check(gn, "NMOS on after the charge");
      #100 check(pcount == i + 1, "no second charge for the same token");
      get = 0;
      wait (!pass);
    end
    hl = 1;
    repeat (3) begin #60 uv = 1; #5 uv = 0; end
    #60 check(pcount >= 6, "high load charges without token");
    hl = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
