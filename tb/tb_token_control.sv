// tb_token_control: self-checking test of TOKEN_CONTROL. The test plays the
// token ring (get), the merge (ao answers ro after a delay) and the token
// timer (ad answers rd), and checks that one charge is asked per token, and
// that the token is passed only after both the charge handshake and the timer.
`timescale 1ns/1ps
module tb_token_control;
  logic nrst, ri, ai, ro, ao, rd, ad;
  int checks = 0, failures = 0;
  int charges = 0;

  token_control dut (.nrst(nrst), .ri(ri), .ai(ai), .ro(ro), .ao(ao), .rd(rd), .ad(ad));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge ro) charges++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nrst = 0; ri = 0; ao = 0; ad = 0;
    #10 nrst = 1;
    #2 check(!ai && !ro && !rd, "idle");
    for (int i = 0; i < 4; i++) begin
      ri = 1;
      #2 check(ro && rd, "token -> charge request and timer");
      if (i % 2) begin
        // timer first, charge later
        ad = 1;
        #5 check(!ai, "timer alone does not pass the token");
        ao = 1;
        #2 check(!ro && !ai, "ack -> ro-, token kept until ao-");
        ao = 0;
        #2 check(ai, "token passed");
      end else begin
        // charge first, timer later
        ao = 1;
        #2 check(!ro, "ack -> ro-");
        ao = 0;
        #5 check(!ai && !ro, "no pass before timer, no second request");
        ad = 1;
        #2 check(ai, "timer -> token passed");
      end
      ri = 0;
      #2 check(!rd && ai, "get- -> rd-, pass held until ad-");
      ad = 0;
      #2 check(!ai && !ro, "ad- -> pass-, no request on falling wave");
    end
    check(charges == 4, "one charge per token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
