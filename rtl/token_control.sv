// token_control: TOKEN_CONTROL. On arrival of the token (get, ri+) it asks
// for one charge cycle of its phase (ro+) and starts the token timer (rd+).
// The token is passed on (pass, ai+) once the charge cycle has been
// acknowledged and its handshake has returned to zero, and the timer has
// expired; so phases are activated one after another, but the next phase
// may start while this one is still in its NMOS interval.
// Handshakes (four-phase, active high): ri/ai = get/pass of the token ring,
// ro/ao to OPPORTUNISTIC_MERGE, rd/ad to TOKEN_TIMER.
//   done = latch(set ao, reset ~ri)     charge acknowledged for this token
//   ro   = ri & ~done
//   rd   = ri
//   ai   = latch(set ad & done & ~ao, reset ~ri & ~ad & ~ao)
// On the falling wave of the ring (ri-) no charge is asked for; the token
// passes as soon as the timer has been cleared. The original description gives the name
// and connections of this block; the logic is this design's own.
// The level-sensitive latches in this file are intended: a clockless
// speed-independent circuit holds its state in latches, not flip-flops.
// A lint tool may fail to see the latch on ai and call it combinational;
// it is a set/reset latch (ai holds when neither condition is true).
`timescale 1ns/1ps
module token_control (
  input  logic nrst,
  input  logic ri,
  output logic ai,
  output logic ro,
  input  logic ao,
  output logic rd,
  input  logic ad
);
  logic done;

  always_latch begin
    if (!nrst)     done = 1'b0;
    else if (ao)   done = 1'b1;
    else if (!ri)  done = 1'b0;
  end

  always_latch begin
    if (!nrst)                   ai = 1'b0;
    else if (ad && done && !ao)  ai = 1'b1;
    else if (!ri && !ad && !ao)  ai = 1'b0;
  end

  assign ro = ri & ~done;
  assign rd = ri;
endmodule
