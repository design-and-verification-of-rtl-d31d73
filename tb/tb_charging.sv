// tb_charging: self-checking test of CHARGING (one phase). The test plays the
// activation side (ri/ai), the gate drivers (acknowledge 2 ns after the gate
// request) and the comparators uv, oc and zc, and walks through the cases of
// the converter's informal specification: no ZC (NMOS on until the next
// under-voltage), late ZC (a zero crossing after the under-voltage is
// ignored), early ZC (a zero crossing switches the NMOS off before the
// under-voltage), an over-current before PMIN (PMOS held on) and a zero
// crossing before NMIN (NMOS held on). Monitors check break-before-make and
// the minimum on-times on every switching event. A random part then runs
// 1000 charge requests against comparators that fire at random times:
// under-voltage pulses of random width and spacing, an over-current a random
// time after the PMOS is on, and zero-crossing pulses a random time after the
// NMOS is on (some long enough to reach into the next PMOS interval). It
// checks that each request ends after exactly one PMOS interval with the
// NMOS on, that the PMOS switches on only for a pending request and off only
// after an over-current, that the NMOS switches off only after an
// under-voltage or a zero crossing, and that no request waits forever.
`timescale 1ns/1ps
module tb_charging;
  localparam int unsigned PMIN = 20, NMIN = 20, DRV = 2;
  logic nrst, ri, ai, uv, zc, oc, gp, gp_ack, gn, gn_ack;
  int checks = 0, failures = 0;
  realtime t_gp_on, t_gn_on;

  charging #(.PMIN_NS(PMIN), .NMIN_NS(NMIN)) dut (
    .nrst(nrst), .ri(ri), .ai(ai), .uv(uv), .zc(zc), .oc(oc),
    .gp(gp), .gp_ack(gp_ack), .gn(gn), .gn_ack(gn_ack));

  always @(gp) gp_ack <= #(DRV) gp;
  always @(gn) gn_ack <= #(DRV) gn;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // break-before-make and minimum on-times
  always @(posedge gp) begin check(!gn && !gn_ack, "PMOS on only after NMOS off"); t_gp_on = $realtime; end
  always @(posedge gn) begin check(!gp && !gp_ack, "NMOS on only after PMOS off"); t_gn_on = $realtime; end
  always @(negedge gp) if (nrst) check($realtime - t_gp_on >= PMIN, "PMOS on for at least PMIN");
  always @(negedge gn) if (nrst) check($realtime - t_gn_on >= NMIN, "NMOS on for at least NMIN");

  // random part: what each switching event was caused by
  bit rnd = 0, uvf = 0, zcf = 0, ocf = 0;
  int gp_pulses = 0, done_reqs = 0, n_nozc = 0, n_early = 0, n_late = 0;
  always @(posedge uv) uvf = 1;
  always @(posedge zc) zcf = 1;
  always @(posedge oc) ocf = 1;
  always @(posedge gp) begin
    gp_pulses++;
    ocf = oc;
    if (rnd) check(ri && !ai, "PMOS on only for a pending request");
  end
  always @(negedge gp) if (rnd) check(ocf, "PMOS off only after over-current");
  always @(posedge gn) begin uvf = uv; zcf = zc; end
  always @(negedge gn) if (rnd) begin
    check(uvf || zcf, "NMOS off only after under-voltage or zero crossing");
    if (zcf) n_early++; else n_nozc++;
  end
  always @(posedge zc) if (rnd && gp) n_late++;
  always @(posedge gp) if (rnd && zc) n_late++;

  task automatic random_requests(input int n);
    repeat (n) begin
      int g0;
      bit ok;
      #($urandom_range(0, 80));
      g0 = gp_pulses;
      ri = 1;
      ok = 0;
      fork
        begin wait (ai); ok = 1; end
        #3000;
      join_any
      disable fork;
      check(ok, "request acknowledged");
      if (!ok) return;
      check(gp_pulses == g0 + 1 && gn && !gp, "one PMOS interval per request, NMOS on after it");
      done_reqs++;
      #($urandom_range(0, 10));
      ri = 0;
      wait (!ai);
    end
  endtask

  // one charge request from the activation side
  task automatic request();
    ri = 1;
  endtask
  task automatic finish_request();
    wait (ai);
    #1 ri = 0;
    wait (!ai);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nrst = 0; ri = 0; uv = 0; zc = 0; oc = 0; gp_ack = 0; gn_ack = 0;
    #10 nrst = 1;
    #5 check(!gp && !gn, "both off after reset");

    // 1: first cycle, over-current before PMIN -> PMOS held for PMIN
    request();
    #30 check(!gp, "no charge without under-voltage");
    uv = 1;
    #1 check(gp, "under-voltage -> PMOS on");
    #3 uv = 0;
    #2 oc = 1;
    #5 check(gp, "over-current before PMIN ignored");
    wait (!gp); check($realtime - t_gp_on >= PMIN && $realtime - t_gp_on <= PMIN + 1, "PMOS off at PMIN");
    #1 oc = 0;
    wait (gn); check(1, "NMOS on after PMOS");
    finish_request();
    check(gn, "NMOS stays on after the cycle");

    // 2: no ZC: NMOS on until the next under-voltage
    #100 check(gn, "NMOS still on without zero crossing");
    request();
    #10 check(gn && !gp, "waiting for under-voltage");
    uv = 1;
    #1 check(!gn, "under-voltage -> NMOS off");
    wait (gp); check(!gn_ack, "PMOS after NMOS acknowledged off");
    uv = 0;
    #40 check(gp, "PMOS on until over-current");
    oc = 1;
    #1 check(!gp, "over-current after PMIN -> PMOS off at once");
    oc = 0;
    wait (gn);
    finish_request();

    // 3: early ZC after NMIN: NMOS off before the under-voltage
    #40 zc = 1;
    #1 check(!gn, "zero crossing -> NMOS off");
    #5 zc = 0;
    #20 check(!gn && !gp, "both off until under-voltage");
    request();
    #10 uv = 1;
    #1 check(gp, "under-voltage -> PMOS on");
    uv = 0;
    #30 oc = 1;
    #1 oc = 0;
    wait (gn);
    finish_request();

    // 4: zero crossing inside NMIN: NMOS held until NMIN is over
    #2 zc = 1;
    #3 check(gn, "zero crossing during NMIN: NMOS held");
    wait (!gn); check($realtime - t_gn_on >= NMIN && $realtime - t_gn_on <= NMIN + 1, "NMOS off at NMIN");
    #3 zc = 0;
    request();
    #5 uv = 1;
    #1 check(gp, "PMOS on");
    uv = 0;

    // 5: late ZC: a zero-crossing pulse while the PMOS is on is ignored
    #5 zc = 1;
    #3 zc = 0;
    #1 check(gp && !gn, "late zero crossing ignored");
    #30 oc = 1;
    #1 oc = 0;
    wait (gn);
    finish_request();
    #50 check(gn, "NMOS on after late ZC cycle");

    // 6: late ZC still high when the cycle ends: ai- waits for zc-
    request();
    uv = 1; #1 uv = 0;
    #5 zc = 1;
    #30 oc = 1; #1 oc = 0;
    wait (ai); #1 ri = 0;
    #5 check(ai, "ai held while zc high");
    zc = 0;
    #1 check(!ai, "ai released after zc-");

    rnd = 1;
    fork
      random_requests(1000);
      // under-voltage comparator: random pulses
      forever begin #($urandom_range(5, 150)) uv = 1; #($urandom_range(1, 20)) uv = 0; end
      // over-current: the current reaches I_max a random time into the PMOS interval
      forever begin
        wait (gp_ack);
        #($urandom_range(5, 60));
        if (gp_ack) begin oc = 1; wait (!gp); #($urandom_range(1, 4)); oc = 0; end
      end
      // zero crossing: a random time into the NMOS interval, random width;
      // now and then it comes late, after the NMOS is already off, as a
      // slow comparator would report it
      forever begin
        wait (gn_ack);
        #($urandom_range(0, 150));
        if (gn_ack || $urandom_range(0, 3) == 0) begin zc = 1; #($urandom_range(1, 40)); zc = 0; end
        else #1;
      end
    join_any
    disable fork;
    $display("random: %0d requests completed, NMOS off by uv %0d, by zc %0d, zc while PMOS on %0d",
             done_reqs, n_nozc, n_early, n_late);
    check(n_nozc > 0 && n_early > 0 && n_late > 0, "no-ZC, early-ZC and late-ZC cases all seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
