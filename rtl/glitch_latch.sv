// glitch_latch: the set/reset memory of a glitch detector (two cross-coupled
// NOR gates in the original circuit).
//
// While glitch_en is high the latch is held cleared (glitch_q = 0). Once
// glitch_en is low, the first high level on set_pulse (the rectifier output)
// sets glitch_q to 1, where it stays until glitch_en rises again. Clear wins
// when both are high, as in a NOR latch whose reset input is high. The
// inference of a level-sensitive latch here is intended: it is the storage
// element of the detector. set_pulse is asynchronous; the latch is the only
// element that sees the hazard, no clock is involved. A lint remark that no
// latch was inferred, seen when the cell is elaborated inside a larger
// design, does not change this: the storage is required.
module glitch_latch (
  input  logic glitch_en,
  input  logic set_pulse,
  output logic glitch_q
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (glitch_en)      glitch_q = 1'b0;
    else if (set_pulse) glitch_q = 1'b1;
  end
endmodule
