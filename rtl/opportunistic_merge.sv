// opportunistic_merge: OPPORTUNISTIC_MERGE. Merges two request channels
// (ri1/ai1 and ri2/ai2) into one output channel (ro/ao). Every request that
// is pending when the output is acknowledged is acknowledged by that same
// output handshake: two requests that coincide cost one charge cycle, not
// two. A request that arrives after the acknowledgement waits for the next
// output handshake.
// Handshakes: four-phase, active high, on all three channels.
//   aik = latch(set ro & ao & rik, reset ~rik & ~ao)    k = 1, 2
// An input acknowledgement falls only once the output handshake it rode on
// has returned to zero, so a requester never starts a new request while the
// charge cycle that served it is still being acknowledged.
//   ro  = latch(set ~ao & pend, reset ao & ~pend),
//         pend = ri1 & ~ai1 | ri2 & ~ai2   (a request not yet acknowledged)
// The original description names the block and calls it a potential standard component;
// the behaviour above is read from its name and the logic is this design's.
// The level-sensitive latches in this file are intended: a clockless
// speed-independent circuit holds its state in latches, not flip-flops.
// The loop ro -> aik -> pend -> ro that lint tools report is the feedback of
// these latches through each other; it settles after every input event.
`timescale 1ns/1ps
module opportunistic_merge (
  input  logic nrst,
  input  logic ri1,
  output logic ai1,
  input  logic ri2,
  output logic ai2,
  output logic ro,
  input  logic ao
);
  logic pend;

  assign pend = (ri1 & ~ai1) | (ri2 & ~ai2);

  always_latch begin
    if (!nrst)                 ai1 = 1'b0;
    else if (!ri1 && !ao)      ai1 = 1'b0;
    else if (ri1 && ro && ao)  ai1 = 1'b1;
  end

  always_latch begin
    if (!nrst)                 ai2 = 1'b0;
    else if (!ri2 && !ao)      ai2 = 1'b0;
    else if (ri2 && ro && ao)  ai2 = 1'b1;
  end

  always_latch begin
    if (!nrst)                   ro = 1'b0;
    else if (ao && !pend)        ro = 1'b0;
    else if (!ao && pend)        ro = 1'b1;
  end
endmodule
