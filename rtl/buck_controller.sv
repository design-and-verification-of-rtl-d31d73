// buck_controller: speed-independent controller of an N-phase buck
// converter. The N stages form a token ring: the get input of stage 1 is
// high while nrst is high and the pass output of stage N is low (the init
// gate), and pass of stage k is get of stage k+1. Releasing nrst launches a
// rising wave round the ring; when it returns, a falling wave follows, and
// so on. On the rising wave each stage asks its phase for one charge cycle
// and holds the token until that cycle has been acknowledged and its token
// timer has expired, so in normal mode phases charge one after another and
// may overlap. While hl is high every stage also asks for charge cycles on
// its own, so all phases charge together (high-load mode).
// There is no clock: every event is a four-phase handshake or a comparator
// level. Interface: nrst active low; uv, hl shared comparator levels;
// oc, zc per phase comparator levels; gp/gp_ack, gn/gn_ack per phase gate
// handshakes (gp high = PMOS on, gn high = NMOS on).
// Ring structure and port names follow the original description; the number of phases
// and the timer values are this design's own defaults (buck_pkg).
// Lint tools report combinational loops through this module: they are the
// request/acknowledge cycles between its sub-blocks, which is how a clockless
// handshake circuit works, and they settle after every input event.
`timescale 1ns/1ps
module buck_controller
  import buck_pkg::*;
#(
  parameter int unsigned PHASES   = PHASES_DEFAULT,
  parameter int unsigned PMIN_NS  = PMIN_NS_DEFAULT,
  parameter int unsigned NMIN_NS  = NMIN_NS_DEFAULT,
  parameter int unsigned TOKEN_NS = TOKEN_NS_DEFAULT
) (
  input  logic              nrst,
  input  logic              uv,
  input  logic              hl,
  input  logic [PHASES-1:0] oc,
  input  logic [PHASES-1:0] zc,
  output logic [PHASES-1:0] gp,
  input  logic [PHASES-1:0] gp_ack,
  output logic [PHASES-1:0] gn,
  input  logic [PHASES-1:0] gn_ack
);
  logic [PHASES-1:0] get, pass;

  assign get[0] = nrst & ~pass[PHASES-1];

  for (genvar k = 0; k < PHASES; k++) begin : g_stage
    if (k > 0) begin : g_link
      assign get[k] = pass[k-1];
    end

    stage #(
      .PMIN_NS  (PMIN_NS),
      .NMIN_NS  (NMIN_NS),
      .TOKEN_NS (TOKEN_NS)
    ) u_stage (
      .nrst   (nrst),
      .get    (get[k]),
      .pass   (pass[k]),
      .hl     (hl),
      .uv     (uv),
      .zc     (zc[k]),
      .oc     (oc[k]),
      .gp     (gp[k]),
      .gp_ack (gp_ack[k]),
      .gn     (gn[k]),
      .gn_ack (gn_ack[k])
    );
  end
endmodule
