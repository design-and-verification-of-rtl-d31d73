// stage: one stage of the token ring, controlling one phase of the buck.
// ACTIVATION decides when the phase charges (token or high load) and asks
// CHARGING for one charge cycle at a time over the ro/ao channel. Structure
// as in the original stage diagram.
// Interface: get/pass four-phase token handshake; hl, uv, zc, oc
// asynchronous comparator levels; gp/gp_ack, gn/gn_ack four-phase gate
// handshakes (gp high = PMOS on); nrst active low.
// Lint tools report combinational loops through this module: they are the
// request/acknowledge cycles between its sub-blocks, which is how a clockless
// handshake circuit works, and they settle after every input event.
`timescale 1ns/1ps
module stage
  import buck_pkg::*;
#(
  parameter int unsigned PMIN_NS  = PMIN_NS_DEFAULT,
  parameter int unsigned NMIN_NS  = NMIN_NS_DEFAULT,
  parameter int unsigned TOKEN_NS = TOKEN_NS_DEFAULT
) (
  input  logic nrst,
  input  logic get,
  output logic pass,
  input  logic hl,
  input  logic uv,
  input  logic zc,
  input  logic oc,
  output logic gp,
  input  logic gp_ack,
  output logic gn,
  input  logic gn_ack
);
  logic ro, ao;   // ACTIVATION -> CHARGING

  activation #(.TOKEN_NS(TOKEN_NS)) u_activation (
    .nrst (nrst),
    .get  (get),
    .pass (pass),
    .hl   (hl),
    .ro   (ro),
    .ao   (ao)
  );

  charging #(.PMIN_NS(PMIN_NS), .NMIN_NS(NMIN_NS)) u_charging (
    .nrst   (nrst),
    .ri     (ro),
    .ai     (ao),
    .uv     (uv),
    .zc     (zc),
    .oc     (oc),
    .gp     (gp),
    .gp_ack (gp_ack),
    .gn     (gn),
    .gn_ack (gn_ack)
  );
endmodule
