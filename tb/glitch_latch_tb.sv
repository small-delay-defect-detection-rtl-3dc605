// glitch_latch_tb: clear while glitch_en is high, set by a short pulse once
// glitch_en is low, held after the pulse, clear dominant.
module glitch_latch_tb;
  timeunit 1ps; timeprecision 1ps;

  logic glitch_en = 1'b1, set_pulse = 1'b0, q;
  int   checks = 0, failures = 0;

  glitch_latch dut (.glitch_en(glitch_en), .set_pulse(set_pulse), .glitch_q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%b)", what, q); end
  endtask

  task automatic pulse_it(input int w);
    set_pulse = 1'b1; #(w); set_pulse = 1'b0; #10;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    check(q == 1'b0, "cleared while glitch_en high");
    pulse_it(20);
    check(q == 1'b0, "pulse ignored while glitch_en high");
    glitch_en = 1'b0; #10;
    check(q == 1'b0, "stays clear when glitch_en falls");
    pulse_it(5);
    check(q == 1'b1, "short pulse sets the latch");
    #100;
    check(q == 1'b1, "set state is held");
    pulse_it(20);
    check(q == 1'b1, "second pulse keeps it set");
    glitch_en = 1'b1; #5;
    check(q == 1'b0, "glitch_en clears it");
    set_pulse = 1'b1; #5;
    check(q == 1'b0, "clear dominates a simultaneous set");
    glitch_en = 1'b0; #5;
    check(q == 1'b1, "set level after clear is released sets it");
    set_pulse = 1'b0; glitch_en = 1'b1; #5;
    check(q == 1'b0, "cleared again");
    for (int i = 0; i < 20; i++) begin
      bit p;
      glitch_en = 1'b1; #5; glitch_en = 1'b0; #5;
      p = 1'($urandom);
      if (p) pulse_it(1 + ($urandom % 30)); else #20;
      check(q == p, "random pulse / no pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
