// tb_buck_stress: randomised end-to-end stress test of the controller with
// three phases (one stage fewer than the default), closing the loop around
// the same behavioural buck power stage as tb_buck_controller. Every gate
// driver edge and every zero-crossing comparator edge gets a random delay,
// and the load jumps to a random value every 5 us, so the handshakes meet
// many different interleavings.
// Power-stage model (1 ns Euler steps): per phase, an inductor L between the
// switching node and a shared output capacitor C with a resistive load;
// PMOS on: di/dt = (VIN - v)/L; NMOS on: di/dt = -v/L (current may reverse);
// both off: the body diode carries a positive current down to zero.
// Comparators: oc_k = i_k > IMAX; zc_k = NMOS on and i_k <= 0, seen ZC_DLY ns
// late; uv = v < VREF; hl = v < VMIN. Gate drivers acknowledge 3 ns after
// the gate request. The load steps between light, medium and heavy; in a
// last interval the zero-crossing reference is raised above the peak current
// so that zc trips while the NMOS is still within NMIN.
// Checked: no phase ever has PMOS and NMOS on together; minimum on-times;
// the output is regulated in each load interval; the token keeps moving;
// and every mechanism happens at least once (no ZC, late ZC, early ZC, PMOS
// held for PMIN, NMOS held for NMIN, high-load mode, overlapping phases,
// token passing, a merged token and high-load request).
`timescale 1ns/1ps
module tb_buck_stress;
  import buck_pkg::*;
  localparam int unsigned N = 3;
  localparam real VIN = 3.3, VREF = 1.0, VMIN = 0.9, IMAX = 1.0;
  localparam real L = 200e-9, C = 10e-6, DT = 1e-9, VDIODE = 0.7;
  localparam int unsigned DRV = 3, ZC_DLY = 12;
  localparam int unsigned T_END = 90_000;

  logic nrst, uv, hl;
  logic [N-1:0] oc, zc, zc_raw, gp, gp_ack, gn, gn_ack;
  real i_l [N];
  real v, r_load, i_tot;
  real izc;   // current at which the zc comparator trips (set by V_0)
  int checks = 0, failures = 0;

  // mechanism counters
  int no_zc = 0, late_zc = 0, early_zc = 0, pmin_hold = 0, nmin_hold = 0;
  int hl_cycles = 0, overlaps = 0, passes = 0, merged = 0, charges = 0;
  realtime t_gp_on [N], t_gn_on [N], t_oc [N];
  logic [N-1:0] oc_in_pmin;

  buck_controller #(.PHASES(N)) dut (
    .nrst(nrst), .uv(uv), .hl(hl), .oc(oc), .zc(zc),
    .gp(gp), .gp_ack(gp_ack), .gn(gn), .gn_ack(gn_ack));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // gate drivers and delayed zero-crossing comparators
  for (genvar k = 0; k < N; k++) begin : g_env
    always @(gp[k]) gp_ack[k] <= #($urandom_range(1, 8)) gp[k];
    always @(gn[k]) gn_ack[k] <= #($urandom_range(1, 8)) gn[k];
    always @(zc_raw[k]) zc[k] <= #($urandom_range(0, 25)) zc_raw[k];

    always @(posedge gp[k]) if (nrst) begin
      charges++;
      t_gp_on[k] = $realtime;
      oc_in_pmin[k] = 1'b0;
      check(!gn[k] && !gn_ack[k], "PMOS switched on only with NMOS off");
      if ((gp & ~(N'(1) << k)) != '0) overlaps++;
      if (hl) hl_cycles++;
    end
    always @(negedge gp[k]) if (nrst) begin
      check($realtime - t_gp_on[k] >= PMIN_NS_DEFAULT, "PMOS on for at least PMIN");
      if (oc_in_pmin[k]) pmin_hold++;
    end
    always @(posedge oc[k]) begin
      if (gp[k] && $realtime - t_gp_on[k] < PMIN_NS_DEFAULT) oc_in_pmin[k] = 1'b1;
    end
    always @(posedge gn[k]) if (nrst) begin
      t_gn_on[k] = $realtime;
      check(!gp[k] && !gp_ack[k], "NMOS switched on only with PMOS off");
    end
    always @(negedge gn[k]) if (nrst) begin
      check($realtime - t_gn_on[k] >= NMIN_NS_DEFAULT, "NMOS on for at least NMIN");
      if (zc[k]) early_zc++; else no_zc++;
    end
    always @(posedge zc[k]) begin
      if (gp[k]) late_zc++;
      if (gn[k] && $realtime - t_gn_on[k] < NMIN_NS_DEFAULT) nmin_hold++;
    end
    always @(posedge dut.g_stage[k].u_stage.pass) passes++;
    always @(posedge (dut.g_stage[k].u_stage.u_activation.u_merge.ai1 &&
                      dut.g_stage[k].u_stage.u_activation.u_merge.ai2)) merged++;
  end

  // power stage, 1 ns steps
  initial begin
    v = 0.0;
    for (int k = 0; k < N; k++) i_l[k] = 0.0;
    r_load = 2.0;
    izc = 0.0;
    forever begin
      #1;
      i_tot = 0.0;
      for (int k = 0; k < N; k++) begin
        check(!(gp_ack[k] && gn_ack[k]), "no shoot-through");
        if (gp_ack[k])      i_l[k] += (VIN - v) / L * DT;
        else if (gn_ack[k]) i_l[k] += (0.0 - v) / L * DT;
        else if (i_l[k] > 0.0) begin
          i_l[k] += (0.0 - v - VDIODE) / L * DT;
          if (i_l[k] < 0.0) i_l[k] = 0.0;
        end else i_l[k] = 0.0;
        i_tot += i_l[k];
        oc[k] = (i_l[k] > IMAX);
        zc_raw[k] = gn_ack[k] && (i_l[k] <= izc);
      end
      v += (i_tot - v / r_load) / C * DT;
      if (v < 0.0) v = 0.0;
      uv = (v < VREF);
      hl = (v < VMIN);
    end
  end

  // regulation checks per load interval
  real vmin_seen, vmax_seen;
  task automatic window(input real r, input int unsigned len, input real lo, input real hi, input string what);
    r_load = r;
    #(real'(len) / 2.0);
    vmin_seen = 10.0; vmax_seen = 0.0;
    repeat (len / 2) begin
      #1;
      if (v < vmin_seen) vmin_seen = v;
      if (v > vmax_seen) vmax_seen = v;
    end
    $display("%s: R=%0.2f ohm, v in [%0.3f, %0.3f] V", what, r, vmin_seen, vmax_seen);
    check(vmin_seen > lo && vmax_seen < hi, what);
  endtask

  initial begin
    #(T_END * 3);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0;
    nrst = 0; gp_ack = '0; gn_ack = '0; zc = '0; zc_raw = '0; oc = '0; uv = 0; hl = 0;
    #20 nrst = 1;
    window(2.0, 20_000, 0.90, 1.10, "start-up");
    // random load steps; each window must keep regulating and keep the
    // token moving
    for (int w = 0; w < 16; w++) begin
      real loads[4] = '{10.0, 5.0, 2.0, 1.0};
      p0 = passes;
      window(loads[$urandom_range(0, 3)], 5_000, 0.85, 1.15, $sformatf("random step %0d", w));
      check(passes > p0, "token still moving");
    end
    $display("charges=%0d passes=%0d no_zc=%0d late_zc=%0d early_zc=%0d pmin_hold=%0d nmin_hold=%0d hl_cycles=%0d overlaps=%0d merged=%0d",
             charges, passes, no_zc, late_zc, early_zc, pmin_hold, nmin_hold, hl_cycles, overlaps, merged);
    check(no_zc > 0,     "no-ZC case seen");
    check(early_zc > 0,  "early-ZC case seen");
    check(overlaps > 0,  "overlapping phases seen");
    check(passes > 0,    "token passing seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
