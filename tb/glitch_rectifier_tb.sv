// glitch_rectifier_tb: checks that a steady input gives no pulse, that a
// single edge gives one pulse two inverter delays wide, and that a static
// hazard (both polarities) gives two rising edges on the output.
module glitch_rectifier_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned D = 10;

  logic din = 1'b0, pulse;
  int   checks = 0, failures = 0;
  int   rises = 0;
  time  t_rise = 0, width = 0;

  glitch_rectifier #(.INV_DELAY_PS(D)) dut (.din(din), .pulse(pulse));

  always @(posedge pulse) begin rises++; t_rise = $time; end
  always @(negedge pulse) width = $time - t_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    rises = 0;
    #500;
    check(rises == 0 && pulse == 1'b0, "steady input gives no pulse");

    // Single rising edge.
    din = 1'b1; #1;
    check(pulse == 1'b1, "pulse follows the edge at once");
    #200;
    check(rises == 1, "one pulse per edge");
    check(width == 2 * D, "pulse width is two inverter delays");

    // Negative-going static hazard of 50 ps.
    rises = 0;
    din = 1'b0; #50; din = 1'b1; #300;
    check(rises == 2, "negative glitch gives two rising edges");

    // Positive-going static hazard of 30 ps.
    din = 1'b0; #300; rises = 0;
    din = 1'b1; #30; din = 1'b0; #300;
    check(rises == 2, "positive glitch gives two rising edges");

    // A glitch narrower than one inverter delay still reaches the output.
    rises = 0;
    din = 1'b1; #4; din = 1'b0; #300;
    check(rises >= 1, "narrow glitch still produces a rising edge");
    check(pulse == 1'b0, "output returns low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
