// oc_handler: OC_HANDLER, runs the switching of one phase.
// Handshakes (four-phase, active high):
//   ri/ai  from ZC_HANDLER
//   rp/ap  to PMIN_CONTROL: rp high = PMOS on; ap high = PMOS on for PMIN
//   rn/an  to NMIN_CONTROL: rn high = NMOS on; an high = NMOS on for NMIN
//   oc     over-current comparator
// Sequence:
//   ri+ : NMOS off (rn-), and once its acknowledge has fallen (an-), ai+.
//   ri- : PMOS on (rp+); after PMIN (ap+) and over-current (oc) PMOS off
//         (rp-); once the PMOS is off (ap-), NMOS on (rn+) and ai-.
// So the NMOS stays on from the end of one charge until the next ri+, which
// the ZC handler raises at a zero crossing or at the next under-voltage; it
// is switched off only once NMIN has passed (an+). Acknowledging as soon as
// the NMOS is requested, not after NMIN, returns the ZC handler to its
// choice state at once, so that a zero crossing during NMIN is taken as an
// early ZC and not swallowed as a late one.
// The PMOS and NMOS are never requested together: rp needs an- (through ai)
// and rn needs ap-. The original description gives the behaviour (its informal
// specification) but not this block's insides; the logic is this design's:
//   s  = latch(set ap & oc, reset ri)       over-current seen
//   rp = ~ri & ai & ~s
//   rn = latch(set s & ~ap & ~ri, reset ri & an)
//   ai = latch(set ri & ~rn & ~an, reset ~ri & rn)
// The level-sensitive latches in this file are intended: a clockless
// speed-independent circuit holds its state in latches, not flip-flops.
`timescale 1ns/1ps
module oc_handler (
  input  logic nrst,
  input  logic ri,
  output logic ai,
  input  logic oc,
  output logic rp,
  input  logic ap,
  output logic rn,
  input  logic an
);
  logic s;

  always_latch begin
    if (!nrst)          s = 1'b0;
    else if (ri)        s = 1'b0;
    else if (ap && oc)  s = 1'b1;
  end

  always_latch begin
    if (!nrst)                 rn = 1'b0;
    else if (ri && an)         rn = 1'b0;
    else if (!ri && s && !ap)  rn = 1'b1;
  end

  always_latch begin
    if (!nrst)                   ai = 1'b0;
    else if (ri && !rn && !an)   ai = 1'b1;
    else if (!ri && rn)          ai = 1'b0;
  end

  assign rp = ~ri & ai & ~s;

  // No short circuit: PMOS and NMOS are never requested at the same time.
  always_comb assert final (!(rp && rn)) else $error("oc_handler: rp and rn both high");
endmodule
