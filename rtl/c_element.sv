// c_element: two-input Muller C-element, the basic join of speed-independent
// circuits. The output rises when both inputs are high, falls when both are
// low and otherwise holds. nrst low forces the output low.
// Written as a level-sensitive latch: the state holding is intended.
`timescale 1ns/1ps
module c_element (
  input  logic nrst,
  input  logic a,
  input  logic b,
  output logic q
);
  always_latch begin
    if (!nrst)          q = 1'b0;
    else if (a && b)    q = 1'b1;
    else if (!a && !b)  q = 1'b0;
  end
endmodule
