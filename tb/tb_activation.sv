// tb_activation: self-checking test of ACTIVATION. The test plays the token
// ring (get) and CHARGING (ao answers ro after CHG ns), and checks: one
// charge request per token, the token passed no earlier than the token timer
// and the charge acknowledgement, no request on the falling wave, repeated
// requests under high load, and a token request pending together with a
// high-load request served by one charge cycle. A random part then drives
// the ring, hl and the charge acknowledgement with random delays, and checks
// on every token that it is passed only while get is high, no earlier than
// the token timer and after at least one complete charge handshake that was
// acknowledged after get rose; that a charge is requested only for
// the token or after high load; and that no token waits forever.
`timescale 1ns/1ps
module tb_activation;
  localparam int unsigned TOK = 30;
  logic nrst, get, pass, hl, ro, ao;
  int checks = 0, failures = 0;
  int charges = 0;
  int unsigned chg = 10;
  realtime t0;

  activation #(.TOKEN_NS(TOK)) dut (.nrst(nrst), .get(get), .pass(pass), .hl(hl), .ro(ro), .ao(ao));

  always @(ro) ao <= #(chg) ro;
  always @(posedge ro) charges++;

  // random part
  bit rnd = 0, hl_seen = 0;
  int acks_since_get = 0, done_since_get = 0, tokens = 0;
  bit ack_after_get = 0;
  realtime t_get;
  always @(posedge get) begin t_get = $realtime; acks_since_get = 0; done_since_get = 0; end
  always @(posedge ao) begin acks_since_get++; ack_after_get = 1; end
  always @(negedge ao) begin if (ack_after_get && acks_since_get > 0) done_since_get++; ack_after_get = 0; end
  always @(posedge hl) hl_seen = 1;
  always @(posedge dut.whl) hl_seen = hl;
  always @(posedge pass) if (rnd) begin
    check(get, "pass rises only with get high");
    check($realtime - t_get >= TOK, "token held for the token timer");
    check(done_since_get >= 1, "token passed after a complete charge handshake");
  end
  always @(posedge ro) if (rnd) check((get && !pass) || hl_seen, "charge requested only for the token or high load");

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nrst = 0; get = 0; hl = 0; ao = 0;
    #10 nrst = 1;
    #20 check(!ro && !pass && charges == 0, "idle");
    for (int i = 0; i < 4; i++) begin
      chg = (i % 2) ? 50 : 5;   // charge shorter or longer than the token timer
      charges = 0;
      get = 1; t0 = $realtime;
      #1 check(ro, "token -> charge request");
      wait (pass);
      check($realtime - t0 >= TOK, "token held for the token timer");
      check($realtime - t0 >= 2 * chg, "token held until charge handshake done");
      check(charges == 1, "one charge per token");
      get = 0;
      wait (!pass);
      #20 check(charges == 1 && !ro, "no charge on the falling wave");
    end
    // high load: requests without token
    charges = 0; chg = 10;
    hl = 1;
    #200 check(charges >= 8, "repeated charges under high load");
    hl = 0;
    #50 charges = 0;
    #100 check(charges == 0, "no charges after high load");
    // token and high load together: the token request rides on a pending
    // high-load request
    chg = 20;
    hl = 1; #1 hl = 0;
    #2 check(ro, "high-load request pending");
    charges = 0;
    get = 1;
    wait (pass);
    check(charges == 0, "token served by the pending high-load cycle");
    get = 0; wait (!pass);

    rnd = 1;
    #100;
    fork
      // ring: get edges at half-ns times so they never coincide with ao edges
      repeat (500) begin
        bit ok = 0;
        #($urandom_range(0, 60) + 0.5) get = 1;
        fork
          begin wait (pass); ok = 1; end
          #5000;
        join_any
        disable fork;
        check(ok, "token passed");
        #($urandom_range(0, 30) + 0.5) get = 0;
        wait (!pass);
        tokens++;
      end
      forever begin #($urandom_range(1, 15)) chg = $urandom_range(1, 60); end
      forever begin
        #($urandom_range(50, 800)) hl = 1;
        #($urandom_range(1, 200)) hl = 0;
      end
    join_any
    disable fork;
    hl = 0;
    check(tokens == 500, "all tokens passed");
    $display("random: %0d tokens passed", tokens);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
