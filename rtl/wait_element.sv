// wait_element: the WAIT component. It waits, while asked to by ctrl, for the
// non-persistent input sig to be high, and reports it on san. Protocol, as in
// the element's signal transition graph: ctrl+ -> (sig high) -> san+ ; ctrl-
// -> san-. Once san is high it stays high until ctrl falls, even if sig drops
// again, so a short pulse on sig is never half-seen.
// Insides follow the original ME-based solution: a mutual-exclusion element
// arbitrates between "sig is low" (r1, the inverted sig) and the request ctrl
// (r2); its grant g2 is san. While sig is low r1 owns the ME and ctrl waits;
// when sig rises r1 drops and ctrl is granted.
// Instances: UV_WAIT (sig = uv) and HL_WAIT (sig = hl). nrst is this design's
// own addition (active low, clears the ME).
`timescale 1ns/1ps
module wait_element (
  input  logic nrst,
  input  logic sig,   // asynchronous level to wait for
  input  logic ctrl,  // request to wait
  output logic san    // sig seen high (sanitised)
);
  logic sig_n;
  logic g_low;        // grant held by "sig is low"

  assign sig_n = ~sig;

  mutex u_me (
    .nrst (nrst),
    .r1   (sig_n),
    .r2   (ctrl),
    .g1   (g_low),
    .g2   (san)
  );

  // sig is never reported as seen while "sig is low" owns the element
  always_comb assert final (!(g_low && san)) else $error("wait_element: san with sig low grant");
endmodule
