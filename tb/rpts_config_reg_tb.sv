// rpts_config_reg_tb: shifts random configuration words in LSB first,
// checks the decoded codes, that the register holds with cfg_se low, and
// that the previous word appears on cfg_so while the next one goes in.
module rpts_config_reg_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DW = 5;
  localparam int unsigned PW = 3;
  localparam int unsigned W  = DW + PW;

  logic          clk = 1'b0, rst_n = 1'b0, cfg_se = 1'b0, cfg_si = 1'b0, cfg_so;
  logic [DW-1:0] delay_sel;
  logic [PW-1:0] path_sel;
  int            checks = 0, failures = 0;

  rpts_config_reg #(.DSEL_W(DW), .PSEL_W(PW)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_se(cfg_se), .cfg_si(cfg_si), .cfg_so(cfg_so),
    .delay_sel(delay_sel), .path_sel(path_sel));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev, word, out;
    #1200;
    check(delay_sel == '0 && path_sel == '0, "reset clears");
    @(negedge clk); rst_n = 1'b1;
    prev = '0;
    for (int rep = 0; rep < 30; rep++) begin
      word = W'($urandom);
      out  = '0;
      for (int b = 0; b < W; b++) begin
        @(negedge clk);
        out[b] = cfg_so;
        cfg_se = 1'b1; cfg_si = word[b];
      end
      @(negedge clk); cfg_se = 1'b0; cfg_si = 1'($urandom);
      check(out == prev, "previous word shifted out");
      check(delay_sel == word[DW-1:0], "delay select code");
      check(path_sel == word[W-1:DW], "path select code");
      repeat (3) @(negedge clk);
      check({path_sel, delay_sel} == word, "holds with cfg_se low");
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
