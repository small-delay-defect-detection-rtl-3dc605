// path_select_mux: chooses the signal that races the delay chain at the
// convergence gate (NAND A) of the reference path test structure.
//
// Code 0 selects cal_in, the calibration connection taken from the input of
// the delay chain, so the chain can be raced against its own start to
// account for the multiplexer delays; codes 1..N_CORE_PATHS select the core
// endpoints paths[0..N_CORE_PATHS-1] that need a faster-than-at-speed
// validation. Unused codes give 0, NAND A's dominant value, which keeps the
// structure quiet. Combinational. The code assignment is this
// implementation's choice.
module path_select_mux #(
  parameter int unsigned N_CORE_PATHS = sdd_pkg::N_CORE_PATHS,
  parameter int unsigned SEL_W        = $clog2(N_CORE_PATHS + 1)
) (
  input  logic                    cal_in,
  input  logic [N_CORE_PATHS-1:0] paths,
  input  logic [SEL_W-1:0]        sel,
  output logic                    path_out
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    path_out = 1'b0;
    if (sel == '0) path_out = cal_in;
    for (int unsigned i = 0; i < N_CORE_PATHS; i++)
      if (sel == SEL_W'(i + 1)) path_out = paths[i];
  end
endmodule
