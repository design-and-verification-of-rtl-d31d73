// activation: ACTIVATION, decides when its phase is asked to charge.
// Two sources of requests are merged by OPPORTUNISTIC_MERGE into the single
// ro/ao channel towards CHARGING:
//  * TOKEN_CONTROL, with TOKEN_TIMER: normal mode, one charge request per
//    visit of the token (get/pass from the token ring);
//  * HL_HANDLER, with HL_WAIT: high-load mode, charge requests back to back
//    while hl is high.
// Structure and names follow the original activation diagram; what each
// sub-block does inside is this design's own (see their files).
// Interface: get/pass four-phase token handshake; hl asynchronous level;
// ro/ao four-phase charge request; nrst active low.
// Lint tools report combinational loops through this module: they are the
// request/acknowledge cycles between its sub-blocks, which is how a clockless
// handshake circuit works, and they settle after every input event.
`timescale 1ns/1ps
module activation
  import buck_pkg::*;
#(
  parameter int unsigned TOKEN_NS = TOKEN_NS_DEFAULT
) (
  input  logic nrst,
  input  logic get,
  output logic pass,
  input  logic hl,
  output logic ro,
  input  logic ao
);
  logic whl, hl_s;          // HL_WAIT handshake
  logic h_ro, h_ao;         // HL_HANDLER -> merge
  logic t_ro, t_ao;         // TOKEN_CONTROL -> merge
  logic t_rd, t_ad;         // TOKEN_CONTROL -> TOKEN_TIMER

  wait_element u_hl_wait (
    .nrst (nrst),
    .sig  (hl),
    .ctrl (whl),
    .san  (hl_s)
  );

  hl_handler u_hl_handler (
    .nrst (nrst),
    .whl  (whl),
    .hl   (hl_s),
    .ro   (h_ro),
    .ao   (h_ao)
  );

  token_control u_token_control (
    .nrst (nrst),
    .ri   (get),
    .ai   (pass),
    .ro   (t_ro),
    .ao   (t_ao),
    .rd   (t_rd),
    .ad   (t_ad)
  );

  delay_timer #(.DELAY_NS(TOKEN_NS)) u_token_timer (
    .r (t_rd),
    .a (t_ad)
  );

  opportunistic_merge u_merge (
    .nrst (nrst),
    .ri1  (h_ro),
    .ai1  (h_ao),
    .ri2  (t_ro),
    .ai2  (t_ao),
    .ro   (ro),
    .ao   (ao)
  );
endmodule
