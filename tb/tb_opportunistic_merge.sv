// tb_opportunistic_merge: self-checking test of OPPORTUNISTIC_MERGE. Checks
// that a single request gets its own output handshake, that two requests
// pending together share one output handshake (both acknowledged), and that
// a request arriving after the acknowledgement gets a new one. A random part
// then runs two requesters and the output acknowledger with random delays
// and checks the handshake rules on every edge, that every output handshake
// serves at least one request, that every request is served, and that some
// output handshakes were shared.
`timescale 1ns/1ps
module tb_opportunistic_merge;
  logic nrst, ri1, ai1, ri2, ai2, ro, ao;
  int checks = 0, failures = 0;
  int outs = 0;

  opportunistic_merge dut (.nrst(nrst), .ri1(ri1), .ai1(ai1), .ri2(ri2), .ai2(ai2), .ro(ro), .ao(ao));

  int unsigned adly = 10;
  always @(ro) ao <= #(adly) ro;
  always @(posedge ro) outs++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // random part
  bit rnd = 0;
  int served = 0, shared = 0, reqs[2] = '{0, 0}, acks[2] = '{0, 0};
  always @(posedge ro) if (rnd) begin
    check(!ao, "ro rises only with ao low");
    // the previous output handshake must have served a request
    if (outs > 1) check(served >= 1, "every output handshake serves a request");
    served = 0;
  end
  always @(posedge ai1) if (rnd) begin
    check(ri1 && ao, "ai1 rises only with ri1 and ao high");
    served++; acks[0]++;
    if (served == 2) shared++;
  end
  always @(posedge ai2) if (rnd) begin
    check(ri2 && ao, "ai2 rises only with ri2 and ao high");
    served++; acks[1]++;
    if (served == 2) shared++;
  end
  always @(negedge ai1) if (rnd) check(!ri1 && !ao, "ai1 falls only with ri1 and ao low");
  always @(negedge ai2) if (rnd) check(!ri2 && !ao, "ai2 falls only with ri2 and ao low");

  task automatic requester(input int k, input int n);
    repeat (n) begin
      #($urandom_range(0, 40));
      if (k == 0) begin ri1 = 1; reqs[0]++; wait (ai1); #($urandom_range(0, 15)); ri1 = 0; wait (!ai1); end
      else        begin ri2 = 1; reqs[1]++; wait (ai2); #($urandom_range(0, 15)); ri2 = 0; wait (!ai2); end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nrst = 0; ri1 = 0; ri2 = 0; ao = 0;
    #10 nrst = 1;
    #2 check(!ro && !ai1 && !ai2, "idle");
    // single requests on each side
    ri1 = 1; wait (ai1); check(!ai2 && outs == 1, "ri1 alone");
    ri1 = 0; wait (!ai1);
    wait (!ao); #1;
    ri2 = 1; wait (ai2); check(!ai1 && outs == 2, "ri2 alone");
    ri2 = 0; wait (!ai2);
    wait (!ao); #1;
    // both pending: one output handshake serves both
    ri1 = 1; #3 ri2 = 1;
    wait (ai1 && ai2); check(outs == 3, "both served by one handshake");
    ri1 = 0; ri2 = 0; wait (!ai1 && !ai2);
    wait (!ao); #1;
    // second arrives after the acknowledgement: new handshake
    ri1 = 1; wait (ao); #1 ri2 = 1;
    wait (ai1); check(!ai2, "late request not served by old handshake");
    ri1 = 0;
    wait (ai2); check(outs == 5, "late request gets its own handshake");
    ri2 = 0; wait (!ai2);
    #30 check(!ro && !ao, "quiet at end");
    rnd = 1;
    outs = 0;
    fork
      requester(0, 300);
      requester(1, 300);
      forever begin #7 adly = $urandom_range(1, 20); end
    join_any
    wait (!ai1 && !ai2 && !ro && !ao);
    disable fork;
    #50;
    check(served >= 1, "last output handshake served a request");
    check(acks[0] == reqs[0] && acks[1] == reqs[1], "every request served once");
    check(shared > 0, "some output handshakes shared");
    check(outs < reqs[0] + reqs[1], "fewer output handshakes than requests");
    $display("random: requests=%0d+%0d output handshakes=%0d shared=%0d", reqs[0], reqs[1], outs, shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
