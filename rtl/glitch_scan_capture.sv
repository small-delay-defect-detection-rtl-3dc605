// glitch_scan_capture: capture-flop with scan plus the result-insertion
// logic of a glitch detector.
//
// The scan input seen by the flop is chosen by glitch_en: when high, the
// bit from the previous scan flop (si) passes unchanged, so the chain shifts
// normally; when low, it passes through an XOR with the latch result
// glitch_q, so a one-bit shift (se = 1) flips the bit moving into this flop
// if a glitch was recorded and leaves it as is otherwise. With se low the
// flop captures d, the functional capture-flop input. One rising clk edge per
// shift or capture; q is both the functional output and the scan output.
// This follows the published detector; the flop has no reset.
module glitch_scan_capture (
  input  logic clk,
  input  logic se,
  input  logic d,
  input  logic si,
  input  logic glitch_en,
  input  logic glitch_q,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  logic si_ins;

  // XOR B and the scan-in multiplexer.
  always_comb si_ins = glitch_en ? si : (si ^ glitch_q);

  always_ff @(posedge clk) q <= se ? si_ins : d;
endmodule
