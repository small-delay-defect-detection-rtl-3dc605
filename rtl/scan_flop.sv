// scan_flop: mux-D scan flip-flop, used as the launch-flop of the reference
// path test structure.
//
// On each rising clk edge q takes si when se is high (shift) and d when se
// is low (capture). A transition is launched from it either by the last
// shift of a pattern (launch-on-shift) or by a capture cycle
// (launch-on-capture), the two delay-test styles the structure must support.
// There is no reset: as for any scan cell, its state is loaded by shifting.
module scan_flop (
  input  logic clk,
  input  logic se,
  input  logic d,
  input  logic si,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk) q <= se ? si : d;
endmodule
