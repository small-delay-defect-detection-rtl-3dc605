// glitch_detector: a scan cell that records whether its data input made any
// transition during a test, placed at an endpoint of the logic under test.
//
// Structure: rectifier (two inverters and XOR A) -> NOR latch -> XOR B into
// the scan input of the capture-flop. Use:
//   1. shift the pattern in with glitch_en = 1 (latch cleared, normal shift);
//   2. drop glitch_en, then launch the transitions; a static hazard (or any
//      transition) on d sets the latch asynchronously;
//   3. give one shift clock with glitch_en still low: the bit entering q is
//      inverted if the latch is set;
//   4. raise glitch_en and scan out.
// No capture clock is needed. glitch_q is brought out only for observation.
// The cell follows the published circuit; only the gate delay of the
// rectifier model (RECT_DELAY_PS) is this implementation's value.
module glitch_detector #(
  parameter int unsigned RECT_DELAY_PS = sdd_pkg::RECT_DELAY_PS
) (
  input  logic clk,
  input  logic se,
  input  logic glitch_en,
  input  logic d,
  input  logic si,
  output logic q,
  output logic glitch_q
);
  timeunit 1ps; timeprecision 1ps;

  logic pulse;

  glitch_rectifier #(.INV_DELAY_PS(RECT_DELAY_PS)) u_rect (
    .din  (d),
    .pulse(pulse)
  );

  glitch_latch u_latch (
    .glitch_en(glitch_en),
    .set_pulse(pulse),
    .glitch_q (glitch_q)
  );

  glitch_scan_capture u_cap (
    .clk      (clk),
    .se       (se),
    .d        (d),
    .si       (si),
    .glitch_en(glitch_en),
    .glitch_q (glitch_q),
    .q        (q)
  );
endmodule
