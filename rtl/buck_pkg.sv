// buck_pkg: constants shared by the speed-independent multiphase buck
// controller: the default phase count and the delays of the three kinds of
// timer. The architecture has minimum PMOS and NMOS on-times (PMIN, NMIN)
// and a token timer, but the original description gives no values for them
// and no phase count; the numbers below are this design's own choices, in
// nanoseconds, picked to suit a converter with ~100-300 ns switching
// periods. Timers are behavioural (delay_timer), so these values only set
// simulation delays.
`timescale 1ns/1ps
package buck_pkg;
  parameter int unsigned PHASES_DEFAULT = 4;   // number of phases (N)
  parameter int unsigned PMIN_NS_DEFAULT = 20; // minimum PMOS on-time
  parameter int unsigned NMIN_NS_DEFAULT = 20; // minimum NMOS on-time
  parameter int unsigned TOKEN_NS_DEFAULT = 25; // minimum token hold time per stage
endpackage
