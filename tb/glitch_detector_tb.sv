// glitch_detector_tb: runs the full test protocol on one detector cell:
// shift in with glitch_en high, drop glitch_en, apply activity on d (none,
// a static hazard of either polarity, a narrow hazard, a plain transition),
// insert the result with one shift, and check that the bit entering q is
// inverted exactly when d moved. Also checks a normal capture and that
// raising glitch_en clears the recorded result.
module glitch_detector_tb;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, se = 1'b1, glitch_en = 1'b1, d = 1'b1, si = 1'b0;
  logic q, glitch_q;
  int   checks = 0, failures = 0;
  int   n_detect = 0, n_quiet = 0;

  glitch_detector dut (.clk(clk), .se(se), .glitch_en(glitch_en), .d(d),
                       .si(si), .q(q), .glitch_q(glitch_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick();
    #1000 clk = 1'b1; #1000 clk = 1'b0;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 none, 1 negative hazard, 2 positive hazard, 3 narrow hazard,
  // 4 single transition
  task automatic trial(input int kind);
    logic v0, v1, moved;
    v0 = 1'($urandom); v1 = 1'($urandom);
    glitch_en = 1'b1; se = 1'b1; si = v0; tick();
    check(q == v0, "normal shift with glitch_en high");
    glitch_en = 1'b0; #200;
    case (kind)
      1: begin d = 1'b1; #300; d = 1'b0; #40; d = 1'b1; end
      2: begin d = 1'b0; #300; d = 1'b1; #25; d = 1'b0; end
      3: begin d = 1'b1; #300; d = 1'b0; #3;  d = 1'b1; end
      4: d = ~d;
      default: ;
    endcase
    moved = (kind != 0);
    #300;
    check(glitch_q == moved, $sformatf("latch records activity kind %0d", kind));
    si = v1; tick();
    check(q == (v1 ^ moved), $sformatf("result inserted into scan bit, kind %0d", kind));
    if (moved) n_detect++; else n_quiet++;
    glitch_en = 1'b1; #10;
    check(glitch_q == 1'b0, "glitch_en clears the result");
  endtask

  initial begin
    // Put d at a settled level before the first trial.
    d = 1'b1; #500;
    for (int i = 0; i < 40; i++) begin
      int k;
      k = (i < 5) ? i : int'($urandom % 5);
      // A trial with no activity must start from a settled d.
      trial(k);
      #500;
    end
    // Capture mode: q takes d.
    glitch_en = 1'b1; se = 1'b0; d = 1'b0; #300; tick();
    check(q == 1'b0, "capture of d = 0");
    d = 1'b1; #300; tick();
    check(q == 1'b1, "capture of d = 1");
    checks++;
    if (n_detect == 0 || n_quiet == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
