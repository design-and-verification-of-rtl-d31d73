// hl_handler: HL_HANDLER. While high load is signalled it issues charge
// requests back to back, independently of the token, so that in high-load
// mode all phases charge at once.
// Handshakes (four-phase, active high): whl/hl to HL_WAIT (whl+ asks to wait
// for hl, hl+ is the sanitised level), ro/ao to OPPORTUNISTIC_MERGE.
// Sequence: whl+ -> hl+ -> ro+ -> whl- -> hl- ; ao+ -> ro- -> ao- -> whl+.
//   whl = ~ro & ~ao
//   ro  = latch(set hl & ~ao, reset ao & ~hl)
// The original description gives this block's name and connections; the logic is this
// design's own.
// The level-sensitive latches in this file are intended: a clockless
// speed-independent circuit holds its state in latches, not flip-flops.
`timescale 1ns/1ps
module hl_handler (
  input  logic nrst,
  output logic whl,
  input  logic hl,
  output logic ro,
  input  logic ao
);
  always_latch begin
    if (!nrst)            ro = 1'b0;
    else if (hl && !ao)   ro = 1'b1;
    else if (ao && !hl)   ro = 1'b0;
  end

  assign whl = ~ro & ~ao;
endmodule
