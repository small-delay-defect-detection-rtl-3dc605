// scan_flop_tb: random shift/capture traffic into one scan flop; each
// rising edge is checked against q = se ? si : d sampled before the edge.
module scan_flop_tb;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, se = 1'b0, d = 1'b0, si = 1'b0, q;
  int   checks = 0, failures = 0;
  int   n_shift = 0, n_cap = 0;

  scan_flop dut (.clk(clk), .se(se), .d(d), .si(si), .q(q));

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      se = 1'($urandom);
      d  = 1'($urandom);
      si = 1'($urandom);
      exp = se ? si : d;
      if (se) n_shift++; else n_cap++;
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL cycle %0d se=%b d=%b si=%b q=%b", i, se, d, si, q);
      end
    end
    checks++;
    if (n_shift == 0 || n_cap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
