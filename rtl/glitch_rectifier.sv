// glitch_rectifier: behavioural model (not synthesizable) of the XOR glitch
// rectifier at the front of a glitch detector.
//
// The watched capture-flop input feeds one XOR input directly and the other
// through two inverters in series. Every transition of din therefore shows
// up on pulse as a positive pulse about two inverter delays wide, so a
// negative- or positive-going static hazard becomes a pair of rising edges
// that can set the following latch. This structure is the one the method
// prescribes; it is a timing circuit, so it is written as a model with
// inertial gate delays: pulses narrower than an inverter delay are absorbed
// by the inverters, in which case pulse simply repeats the narrow glitch.
// INV_DELAY_PS is this implementation's assumed value. The XOR itself is
// taken as delay-free.
module glitch_rectifier #(
  parameter int unsigned INV_DELAY_PS = sdd_pkg::RECT_DELAY_PS
) (
  input  logic din,
  output logic pulse
);
  timeunit 1ps; timeprecision 1ps;

  logic inv1, inv2;

  always begin
    inv1 <= #(INV_DELAY_PS) ~din;
    @(din);
  end

  always begin
    inv2 <= #(INV_DELAY_PS) ~inv1;
    @(inv1);
  end

  // XOR A: equal inputs in steady state, unequal for two inverter delays
  // after each input transition.
  assign pulse = din ^ inv2;
endmodule
