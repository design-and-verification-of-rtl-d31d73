// tb_zc_handler: self-checking test of ZC_HANDLER. Plays the three cases of
// the zero-crossing specification (no ZC, late ZC, early ZC) with the test
// acting as both the UV handler (ri) and the OC handler (ao), and checks ro
// and ai after every input event. A second, random part lets the
// environment fire any input event the specification allows at that point
// (chosen at random) and compares ro/ai against a reference after each one;
// it also fails if the handler stops with no input event allowed.
`timescale 1ns/1ps
module tb_zc_handler;
  logic nrst, ri, ai, zc, ro, ao;
  int checks = 0, failures = 0;

  zc_handler dut (.nrst(nrst), .ri(ri), .ai(ai), .zc(zc), .ro(ro), .ao(ao));

  task automatic expect2(input logic exp_ro, input logic exp_ai, input string what);
    #2;
    checks++;
    if (ro !== exp_ro || ai !== exp_ai) begin
      failures++;
      $display("FAIL %s: ro=%0b ai=%0b expected ro=%0b ai=%0b at %0t",
               what, ro, ai, exp_ro, exp_ai, $time);
    end
  endtask

  // random part: state of the current cycle and reference outputs
  logic rup, aup, adown, rdown, zup, zdown;
  function automatic logic ref_ro();
    return (rup || zup) && !(rup && aup);
  endfunction
  function automatic logic ref_ai();
    return adown && (ri || zc);
  endfunction

  task automatic random_cycles(input int n);
    int cycles = 0, steps = 0;
    rup = 0; aup = 0; adown = 0; rdown = 0; zup = 0; zdown = 0;
    while (cycles < n) begin
      logic [5:0] en;
      int pick;
      // enabled input events: ri+, ao+, ao-, ri-, zc+, zc-
      en[0] = !rup;
      en[1] = ro && !aup;
      en[2] = aup && !ro && !adown;
      en[3] = rup && ai && !rdown;
      en[4] = !zup && (!rup || !adown);
      en[5] = zup && !zdown;
      if (en == '0) begin
        checks++; failures++;
        $display("FAIL random: no input event allowed, ro=%0b ai=%0b at %0t", ro, ai, $time);
        return;
      end
      do pick = $urandom_range(0, 5); while (!en[pick]);
      case (pick)
        0: begin ri = 1; rup = 1; end
        1: begin ao = 1; aup = 1; end
        2: begin ao = 0; adown = 1; end
        3: begin ri = 0; rdown = 1; end
        4: begin zc = 1; zup = 1; end
        5: begin zc = 0; zdown = 1; end
      endcase
      #($urandom_range(1, 6));
      checks++;
      if (ro !== ref_ro() || ai !== ref_ai()) begin
        failures++;
        $display("FAIL random step %0d (event %0d): ro=%0b ai=%0b expected ro=%0b ai=%0b at %0t",
                 steps, pick, ro, ai, ref_ro(), ref_ai(), $time);
      end
      steps++;
      // cycle complete: every handshake back to zero and zc low
      if (rdown && !ai && !zc) begin
        cycles++;
        rup = 0; aup = 0; adown = 0; rdown = 0; zup = 0; zdown = 0;
      end
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
    nrst = 0; ri = 0; zc = 0; ao = 0;
    #10 nrst = 1;
    expect2(0, 0, "idle");
    repeat (3) begin
      // no ZC
      ri = 1;  expect2(1, 0, "noZC ri+ -> ro+");
      ao = 1;  expect2(0, 0, "noZC ao+ -> ro-");
      ao = 0;  expect2(0, 1, "noZC ao- -> ai+");
      ri = 0;  expect2(0, 0, "noZC ri- -> ai-");
      // late ZC: zc pulse after ri+, still high at ri-
      ri = 1;  expect2(1, 0, "late ri+ -> ro+");
      zc = 1;  expect2(1, 0, "late zc+ ignored");
      ao = 1;  expect2(0, 0, "late ao+ -> ro-");
      ao = 0;  expect2(0, 1, "late ao- -> ai+");
      ri = 0;  expect2(0, 1, "late ri-, ai waits for zc-");
      zc = 0;  expect2(0, 0, "late zc- -> ai-");
      // late ZC: whole pulse inside the request
      ri = 1;  expect2(1, 0, "late2 ri+");
      zc = 1;  expect2(1, 0, "late2 zc+");
      zc = 0;  expect2(1, 0, "late2 zc-");
      ao = 1;  expect2(0, 0, "late2 ao+");
      ao = 0;  expect2(0, 1, "late2 ao-");
      ri = 0;  expect2(0, 0, "late2 ri-");
      // early ZC: zc+ before ri+
      zc = 1;  expect2(1, 0, "early zc+ -> ro+");
      ao = 1;  expect2(1, 0, "early ao+, ro held until ri+");
      zc = 0;  expect2(1, 0, "early zc-");
      ri = 1;  expect2(0, 0, "early ri+ -> ro-");
      ao = 0;  expect2(0, 1, "early ao- -> ai+");
      ri = 0;  expect2(0, 0, "early ri- -> ai-");
      // early ZC, ri+ before ao+
      zc = 1;  expect2(1, 0, "early2 zc+");
      ri = 1;  expect2(1, 0, "early2 ri+, ro waits for ao+");
      ao = 1;  expect2(0, 0, "early2 ao+ -> ro-");
      zc = 0;  expect2(0, 0, "early2 zc-");
      ao = 0;  expect2(0, 1, "early2 ao-");
      ri = 0;  expect2(0, 0, "early2 ri-");
    end
    random_cycles(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
