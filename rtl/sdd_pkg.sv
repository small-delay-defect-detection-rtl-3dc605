// sdd_pkg: default sizes shared by the small-delay-defect test structures.
//
// The race-based test needs only a handful of numbers: how long the
// reference-path test structure (RPTS) delay chain is, how many core paths
// its path-select multiplexer can reach, how far its ring-oscillator output
// is divided before it leaves the chip, and how many endpoints carry a
// glitch-detecting scan cell. The method itself fixes none of them; the
// values below are this implementation's choice and every module takes them
// as overridable parameters. Gate delays are in picoseconds and only matter
// to the behavioural models of the delay elements.
package sdd_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Inverters in the RPTS delay chain after the launch tri-state inverter.
  // Even, so that selecting the whole chain closes an odd (oscillating) ring.
  localparam int unsigned CHAIN_INV    = 16;
  // Chain taps: the chain input node plus every inverter output.
  localparam int unsigned N_TAPS       = CHAIN_INV + 1;
  localparam int unsigned DSEL_W       = $clog2(N_TAPS);
  // Core endpoints reachable by the path-select multiplexer; input 0 of the
  // multiplexer is the calibration connection from the chain input.
  localparam int unsigned N_CORE_PATHS = 7;
  localparam int unsigned PSEL_W       = $clog2(N_CORE_PATHS + 1);
  // Ring-oscillator output is divided by 2**DIV_BITS.
  localparam int unsigned DIV_BITS     = 8;
  // Glitch-detecting scan cells at core endpoints.
  localparam int unsigned N_ENDPOINTS  = 8;
  // Behavioural gate delays (ps).
  localparam int unsigned INV_DELAY_PS  = 20;
  localparam int unsigned TRI_DELAY_PS  = 20;
  localparam int unsigned RECT_DELAY_PS = 10;
endpackage
