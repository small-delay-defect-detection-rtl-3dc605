// core_race_model: behavioural stand-in for a piece of logic under test.
// A reference segment (launch point ref_lp, delay REF_PS) and a test
// segment (launch point test_lp, delay TEST_PS) converge on a NAND gate,
// the convergence gate, whose output gc drives an endpoint. Segment delays
// are inertial. With the reference input rising and the test input falling,
// gc stays high when the test segment is faster and pulses low for
// TEST_PS - REF_PS when it is slower (a small delay defect). With the
// transitions reversed (reference falling, test rising) a slower reference
// gives the pulse instead. The NAND has an inertial delay GC_PS: a pulse
// shorter than that is absorbed and never reaches the endpoint.
module core_race_model #(
  parameter int unsigned REF_PS  = 300,
  parameter int unsigned TEST_PS = 200,
  parameter int unsigned GC_PS   = 0
) (
  input  logic ref_lp,
  input  logic test_lp,
  output logic gc
);
  timeunit 1ps; timeprecision 1ps;

  logic sr, st;

  always begin
    sr <= #(REF_PS) ref_lp;
    @(ref_lp);
  end

  always begin
    st <= #(TEST_PS) test_lp;
    @(test_lp);
  end

  always begin
    gc <= #(GC_PS) ~(sr & st);
    @(sr or st);
  end
endmodule
