// delay_timer: behavioural model (not synthesizable) of the PMIN_TIMER,
// NMIN_TIMER and TOKEN_TIMER. In silicon these are analogue delay elements
// whose construction the original description does not give.
// Handshake (four-phase, active high): r+ -> DELAY_NS later a+ ; r- -> a-
// (after 1 ns). The request must stay high until a+, as the four-phase
// protocol guarantees; if it falls early the timer aborts and a stays low.
`timescale 1ns/1ps
module delay_timer #(
  parameter int unsigned DELAY_NS = 20
) (
  input  logic r,
  output logic a
);
  initial a = 1'b0;

  always begin
    wait (r);
    #(DELAY_NS);
    if (r) begin
      a = 1'b1;
      wait (!r);
      #1;
    end
    a = 1'b0;
  end
endmodule
