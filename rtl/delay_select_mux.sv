// delay_select_mux: picks one tap of the delay chain.
//
// The selected tap sets the delay from the launch-flop to the convergence
// gate, i.e. the reference delay the structure emulates, and in ring
// oscillator mode it closes the ring. Purely combinational: tap_out =
// taps[sel]. Codes beyond the last tap select the last tap (the whole
// chain); that choice is this implementation's. The select code comes from
// the configuration scan register. In the reference path test structure
// this multiplexer is part of the intended ring-oscillator loop.
module delay_select_mux #(
  parameter int unsigned N_TAPS = sdd_pkg::N_TAPS,
  parameter int unsigned SEL_W  = $clog2(N_TAPS)
) (
  input  logic [N_TAPS-1:0] taps,
  input  logic [SEL_W-1:0]  sel,
  output logic              tap_out
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    tap_out = taps[N_TAPS-1];
    for (int unsigned i = 0; i < N_TAPS; i++)
      if (sel == SEL_W'(i)) tap_out = taps[i];
  end
endmodule
