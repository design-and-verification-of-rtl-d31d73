// mutex: two-way mutual-exclusion element (ME). Grants g1 to r1 or g2 to r2,
// never both; a grant is held until its request falls. When both requests are
// high and neither is granted, r1 wins (a real ME resolves the tie through a
// metastability filter; a two-state zero-delay simulation needs a fixed rule).
// Interface: four-phase, active high. nrst low forces both grants low.
// It is written as a level-sensitive latch process, because an asynchronous
// arbiter has no clock. The latch on g1/g2 is intended.
`timescale 1ns/1ps
module mutex (
  input  logic nrst,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  always_latch begin
    if (!nrst) begin
      g1 = 1'b0;
      g2 = 1'b0;
    end else begin
      if (!r1) g1 = 1'b0;
      if (!r2) g2 = 1'b0;
      if (r1 && !g2) g1 = 1'b1;
      if (r2 && !g1) g2 = 1'b1;
    end
  end

  // The two grants are mutually exclusive once the latch has settled.
  always_comb assert final (!(g1 && g2)) else $error("mutex: both grants high");
endmodule
