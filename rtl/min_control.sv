// min_control: PMIN_CONTROL / NMIN_CONTROL. Switches one transistor and
// keeps the acknowledgement back until the transistor has been on for at
// least the minimum time.
// Handshakes (four-phase, active high):
//   ri/ai  from OC_HANDLER (rp/ap or rn/an)
//   ro/ao  to the gate driver (gp/gp_ack or gn/gn_ack); ao is the gate
//          threshold comparator, high when the gate is driven on
//   rd/ad  to the PMIN or NMIN timer
// ri+ switches the gate on and starts the timer at once; ai+ once the gate
// is on and the timer has expired; ri- switches the gate off and clears the
// timer; ai- once both have fallen. ai is a C-element of ao and ad. The
// document gives the block's name, ports and the PMIN/NMIN rule; the logic
// is this design's own.
`timescale 1ns/1ps
module min_control (
  input  logic nrst,
  input  logic ri,
  output logic ai,
  output logic ro,
  input  logic ao,
  output logic rd,
  input  logic ad
);
  assign ro = ri;
  assign rd = ri;

  c_element u_join (
    .nrst (nrst),
    .a    (ao),
    .b    (ad),
    .q    (ai)
  );
endmodule
