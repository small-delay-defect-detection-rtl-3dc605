// delay_select_mux_tb: every select code with random tap values, including
// codes beyond the last tap, against an independent reference.
module delay_select_mux_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_TAPS = 17;
  localparam int unsigned SEL_W  = 5;

  logic [N_TAPS-1:0] taps;
  logic [SEL_W-1:0]  sel;
  logic              tap_out;
  int                checks = 0, failures = 0;

  delay_select_mux #(.N_TAPS(N_TAPS), .SEL_W(SEL_W)) dut (.taps(taps), .sel(sel), .tap_out(tap_out));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < (1 << SEL_W); s++) begin
        taps = N_TAPS'($urandom);
        sel  = SEL_W'(s);
        #10;
        exp = (s < N_TAPS) ? ((taps >> s) & 1) : taps[N_TAPS-1];
        checks++;
        if (tap_out !== exp) begin
          failures++;
          $display("FAIL sel=%0d taps=%h out=%b", s, taps, tap_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
