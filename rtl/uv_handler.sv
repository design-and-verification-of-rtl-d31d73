// uv_handler: UV_HANDLER, starts a charge cycle of its phase at the first
// under-voltage after the phase has been activated.
// Handshakes (four-phase, active high):
//   ri/ai   from ACTIVATION: ri+ asks for one charge cycle, ai+ reports it done
//   wuv/uv  to UV_WAIT:      wuv+ asks to wait for uv, uv+ (sanitised) = seen
//   ro/ao   to ZC_HANDLER
// Sequence: ri+ -> wuv+ -> uv+ -> ro+ -> ao+ -> wuv- -> uv- -> ai+ ;
//           ri- -> ro- -> ao- -> ai-.
// The original description gives only this block's name and connections; the sequence
// and the logic below are this design's own:
//   wuv = ri & ~ao,  ro = latch(set uv, reset ~ri),  ai = ao & ~uv.
// The level-sensitive latches in this file are intended: a clockless
// speed-independent circuit holds its state in latches, not flip-flops.
`timescale 1ns/1ps
module uv_handler (
  input  logic nrst,
  input  logic ri,
  output logic ai,
  output logic wuv,
  input  logic uv,
  output logic ro,
  input  logic ao
);
  assign wuv = ri & ~ao;
  assign ai  = ao & ~uv;

  always_latch begin
    if (!nrst)     ro = 1'b0;
    else if (uv)   ro = 1'b1;
    else if (!ri)  ro = 1'b0;
  end
endmodule
