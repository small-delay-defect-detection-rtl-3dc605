// path_select_mux_tb: every select code with random inputs: code 0 gives the
// calibration input, code i the core path i-1.
module path_select_mux_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N = 7;
  localparam int unsigned W = 3;

  logic         cal_in;
  logic [N-1:0] paths;
  logic [W-1:0] sel;
  logic         path_out;
  int           checks = 0, failures = 0;

  path_select_mux #(.N_CORE_PATHS(N), .SEL_W(W)) dut (
    .cal_in(cal_in), .paths(paths), .sel(sel), .path_out(path_out));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int rep = 0; rep < 40; rep++) begin
      for (int s = 0; s < (1 << W); s++) begin
        cal_in = 1'($urandom);
        paths  = N'($urandom);
        sel    = W'(s);
        #10;
        if (s == 0)      exp = cal_in;
        else if (s <= N) exp = (paths >> (s - 1)) & 1;
        else             exp = 1'b0;
        checks++;
        if (path_out !== exp) begin
          failures++;
          $display("FAIL sel=%0d cal=%b paths=%b out=%b", s, cal_in, paths, path_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
