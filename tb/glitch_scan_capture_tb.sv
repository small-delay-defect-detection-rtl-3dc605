// glitch_scan_capture_tb: random traffic on all inputs; each edge is
// checked against q = se ? (glitch_en ? si : si ^ glitch_q) : d.
module glitch_scan_capture_tb;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, se = 1'b0, d = 1'b0, si = 1'b0, glitch_en = 1'b1, glitch_q = 1'b0, q;
  int   checks = 0, failures = 0;
  int   n_insert_flip = 0, n_insert_keep = 0, n_shift = 0, n_cap = 0;

  glitch_scan_capture dut (.clk(clk), .se(se), .d(d), .si(si),
                           .glitch_en(glitch_en), .glitch_q(glitch_q), .q(q));

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      se = 1'($urandom); d = 1'($urandom); si = 1'($urandom);
      glitch_en = 1'($urandom); glitch_q = 1'($urandom);
      if (!se)            begin exp = d; n_cap++; end
      else if (glitch_en) begin exp = si; n_shift++; end
      else if (glitch_q)  begin exp = ~si; n_insert_flip++; end
      else                begin exp = si; n_insert_keep++; end
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL %0d se=%b d=%b si=%b ge=%b gq=%b q=%b", i, se, d, si, glitch_en, glitch_q, q);
      end
    end
    checks++;
    if (n_insert_flip == 0 || n_insert_keep == 0 || n_shift == 0 || n_cap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
