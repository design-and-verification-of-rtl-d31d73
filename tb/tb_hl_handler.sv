// tb_hl_handler: self-checking test of HL_HANDLER together with an HL_WAIT
// element: while hl is high, charge requests follow one another; when hl is
// low none is issued. A random part then toggles hl with random pulse
// widths (down to 1 ns) and acknowledges after random delays, and checks that
// a request is issued only if hl was high since the handler last started
// waiting, that requests keep coming while hl stays high, and the four-phase
// rules on the ro/ao channel.
`timescale 1ns/1ps
module tb_hl_handler;
  logic nrst, hl, whl, hl_s, ro, ao;
  int checks = 0, failures = 0;
  int reqs = 0;

  wait_element u_wait (.nrst(nrst), .sig(hl), .ctrl(whl), .san(hl_s));
  hl_handler dut (.nrst(nrst), .whl(whl), .hl(hl_s), .ro(ro), .ao(ao));

  // environment: charging acknowledges 10 ns after the request
  int unsigned adly = 10;
  always @(ro) ao <= #(adly) ro;

  // random part
  bit rnd = 0, hl_seen = 0;
  always @(posedge hl) hl_seen = 1;
  always @(posedge whl) hl_seen = hl;
  always @(posedge ro) if (rnd) begin
    check(hl_seen, "request only after hl was high");
    check(!ao, "ro rises only with ao low");
  end
  always @(negedge ro) if (rnd) check(ao, "ro falls only with ao high");
  always @(posedge ro) reqs++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nrst = 0; hl = 0; ao = 0;
    #10 nrst = 1;
    #2 check(whl && !ro, "waiting for high load");
    #100 check(reqs == 0, "no request without hl");
    hl = 1;
    #1 check(ro, "hl -> request");
    #200;
    // each handshake takes 20 ns (ao delay both ways)
    check(reqs >= 9 && reqs <= 11, "requests back to back under hl");
    hl = 0;
    #50;
    reqs = 0;
    #200 check(reqs == 0 && !ro && whl, "requests stop when hl falls");
    // a short hl pulse gives exactly one request
    hl = 1; #1 hl = 0;
    #60 check(reqs == 1, "short pulse -> one request");
    rnd = 1;
    repeat (400) begin
      int unsigned w;
      adly = $urandom_range(1, 15);
      w = $urandom_range(0, 3) == 0 ? $urandom_range(100, 300) : $urandom_range(1, 30);
      reqs = 0;
      hl = 1;
      #(w);
      // held long enough for at least three handshakes of up to 30 ns
      if (w >= 100) check(reqs >= 3, "requests keep coming while hl is high");
      hl = 0;
      #($urandom_range(1, 60));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
