// charging: CHARGING, performs the charge cycles of one phase.
// Chain (as in the original charging diagram):
//   ri/ai -> UV_HANDLER (+UV_WAIT) -> ZC_HANDLER -> OC_HANDLER
//   OC_HANDLER -> PMIN_CONTROL (+PMIN_TIMER) -> gp/gp_ack
//   OC_HANDLER -> NMIN_CONTROL (+NMIN_TIMER) -> gn/gn_ack
// One request ri+ gives one charge cycle: wait for under-voltage, switch the
// NMOS off and the PMOS on, keep the PMOS on until over-current and at least
// PMIN, then switch the NMOS on for at least NMIN and acknowledge (ai+). The
// NMOS is left on until the next under-voltage (no ZC / late ZC) or until a
// zero crossing after NMIN (early ZC), whichever comes first.
// Interface: ri/ai four-phase charge request; uv, zc, oc asynchronous
// comparator levels; gp/gp_ack and gn/gn_ack four-phase gate handshakes
// (gp high = PMOS on); nrst active low.
// Lint tools report combinational loops through this module: they are the
// request/acknowledge cycles between its sub-blocks, which is how a clockless
// handshake circuit works, and they settle after every input event.
`timescale 1ns/1ps
module charging
  import buck_pkg::*;
#(
  parameter int unsigned PMIN_NS = PMIN_NS_DEFAULT,
  parameter int unsigned NMIN_NS = NMIN_NS_DEFAULT
) (
  input  logic nrst,
  input  logic ri,
  output logic ai,
  input  logic uv,
  input  logic zc,
  input  logic oc,
  output logic gp,
  input  logic gp_ack,
  output logic gn,
  input  logic gn_ack
);
  logic wuv, uv_s;              // UV_WAIT handshake
  logic u_ro, u_ao;             // UV_HANDLER -> ZC_HANDLER
  logic z_ro, z_ao;             // ZC_HANDLER -> OC_HANDLER
  logic rp, ap, rn, an;         // OC_HANDLER -> PMIN/NMIN_CONTROL
  logic p_rd, p_ad, n_rd, n_ad; // timers

  wait_element u_uv_wait (
    .nrst (nrst),
    .sig  (uv),
    .ctrl (wuv),
    .san  (uv_s)
  );

  uv_handler u_uv_handler (
    .nrst (nrst),
    .ri   (ri),
    .ai   (ai),
    .wuv  (wuv),
    .uv   (uv_s),
    .ro   (u_ro),
    .ao   (u_ao)
  );

  zc_handler u_zc_handler (
    .nrst (nrst),
    .ri   (u_ro),
    .ai   (u_ao),
    .zc   (zc),
    .ro   (z_ro),
    .ao   (z_ao)
  );

  oc_handler u_oc_handler (
    .nrst (nrst),
    .ri   (z_ro),
    .ai   (z_ao),
    .oc   (oc),
    .rp   (rp),
    .ap   (ap),
    .rn   (rn),
    .an   (an)
  );

  min_control u_pmin_control (
    .nrst (nrst),
    .ri   (rp),
    .ai   (ap),
    .ro   (gp),
    .ao   (gp_ack),
    .rd   (p_rd),
    .ad   (p_ad)
  );

  delay_timer #(.DELAY_NS(PMIN_NS)) u_pmin_timer (
    .r (p_rd),
    .a (p_ad)
  );

  min_control u_nmin_control (
    .nrst (nrst),
    .ri   (rn),
    .ai   (an),
    .ro   (gn),
    .ao   (gn_ack),
    .rd   (n_rd),
    .ad   (n_ad)
  );

  delay_timer #(.DELAY_NS(NMIN_NS)) u_nmin_timer (
    .r (n_rd),
    .a (n_ad)
  );
endmodule
