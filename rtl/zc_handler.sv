// zc_handler: ZC_HANDLER, orders the zero-crossing event zc against the
// charge request ri coming from the UV handler, and drives the OC handler
// through ro/ao. Two cases, as in the original signal transition graph:
//  * late or no ZC: ri+ -> ro+ -> ao+ -> ro- -> ao- -> ai+ -> ri- -> ai-.
//    A zc pulse in this window is ignored; ai- waits until zc has fallen.
//  * early ZC: zc+ -> ro+ before ri+ (the NMOS is switched off at once,
//    ahead of the next under-voltage); ro- then waits for both ri+ and ao+.
// Insides: the speed-independent netlist the original description gives for this module,
// gate for gate:
//   n1   = NOR3(ri, zc, ro)
//   n2   = INV(ao)
//   ro   = OAI22(n1, csc0, n2, ri)     (reset to 0)
//   csc0 = SR-latch, set by ao, reset by n1 (set wins)
//   ai   = AND2(csc0, n2)
// The loop ro -> n1 -> ro is part of that netlist (it holds ro high through
// the early-ZC join) and is the reason for the combinational-loop warning;
// csc0 is an intended latch. nrst (active low) is the "reset(ro)" pin, also
// applied to csc0.
`timescale 1ns/1ps
module zc_handler (
  input  logic nrst,
  input  logic ri,   // charge request from the UV handler
  output logic ai,   // charge cycle complete
  input  logic zc,   // zero-crossing comparator
  output logic ro,   // request to the OC handler
  input  logic ao    // acknowledge from the OC handler
);
  logic n1, n2, csc0;

  assign n1 = ~(ri | zc | ro);
  assign n2 = ~ao;
  assign ro = nrst & ~((n1 | csc0) & (n2 | ri));
  assign ai = csc0 & n2;

  always_latch begin
    if (!nrst)     csc0 = 1'b0;
    else if (ao)   csc0 = 1'b1;
    else if (n1)   csc0 = 1'b0;
  end
endmodule
