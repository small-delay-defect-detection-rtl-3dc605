// delay_chain: behavioural model (not synthesizable) of the reference path
// test structure's inverter delay chain with its two tri-stateable input
// inverters.
//
// Node taps[0] is driven by one of two tri-state inverters: with ro_en low
// by the inverter from the launch-flop output (launch_q), with ro_en high by
// the feedback inverter from the delay-select multiplexer output
// (ro_feedback). Exactly one of them is enabled at any time, so the node is
// modelled as an inverting multiplexer. taps[k] is the output of the k-th of
// CHAIN_INV series inverters, taps[k] = ~taps[k-1] after INV_DELAY_PS.
// Selecting tap k while ro_en is high closes a ring of k+1 inversions; it
// oscillates for even k, and with the default even CHAIN_INV the full chain
// does, with period 2*(TRI_DELAY_PS + k*INV_DELAY_PS).
// The topology is the published one; the chain length and the delays are
// this implementation's values. Gate delays are inertial.
// Together with the delay-select multiplexer this model forms a
// combinational loop when ro_en is high; that loop is the ring oscillator.
module delay_chain #(
  parameter int unsigned CHAIN_INV    = sdd_pkg::CHAIN_INV,
  parameter int unsigned INV_DELAY_PS = sdd_pkg::INV_DELAY_PS,
  parameter int unsigned TRI_DELAY_PS = sdd_pkg::TRI_DELAY_PS
) (
  input  logic                 launch_q,
  input  logic                 ro_en,
  input  logic                 ro_feedback,
  output logic [CHAIN_INV:0]   taps
);
  timeunit 1ps; timeprecision 1ps;

  logic drive_src;
  logic node [CHAIN_INV+1];

  // Which tri-state inverter is enabled.
  assign drive_src = ro_en ? ro_feedback : launch_q;

  always begin
    node[0] <= #(TRI_DELAY_PS) ~drive_src;
    @(drive_src);
  end

  for (genvar k = 1; k <= CHAIN_INV; k++) begin : g_inv
    always begin
      node[k] <= #(INV_DELAY_PS) ~node[k-1];
      @(node[k-1]);
    end
  end

  for (genvar k = 0; k <= CHAIN_INV; k++) begin : g_tap
    assign taps[k] = node[k];
  end
endmodule
