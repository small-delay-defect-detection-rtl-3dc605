// rpts_tb: exercises the reference path test structure as a tester would.
// A core path is emulated by the testbench: at the launch clock edge the
// selected core input falls after DP ps. For several chain taps k the
// reference delay is TRI + k*INV; the detector must record a glitch exactly
// when the core path is slower than the selected reference. Both
// launch-on-shift and launch-on-capture are used, the result is read
// through the one-bit insertion shift, the calibration input (code 0) is
// raced against the chain, and the ring-oscillator mode is checked through
// the frequency divider: period 2**DIV_BITS * 2*(TRI + k*INV).
module rpts_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_INV = 16;
  localparam int unsigned NCP   = 7;
  localparam int unsigned DIVB  = 8;
  localparam int unsigned INV   = 20;
  localparam int unsigned TRI   = 20;
  localparam int unsigned DW    = 5;
  localparam int unsigned PW    = 3;

  logic clk = 1'b0, rst_n = 1'b0, se = 1'b1, glitch_en = 1'b1;
  logic launch_d = 1'b0, launch_si = 1'b0, launch_so, cap_si = 1'b0, cap_so;
  logic cfg_se = 1'b0, cfg_si = 1'b0, cfg_so, ro_en = 1'b0;
  logic [NCP-1:0] core_paths = '0;
  logic freq_out, glitch_q;
  int   checks = 0, failures = 0;
  int   n_pass = 0, n_fail = 0, n_los = 0, n_loc = 0, n_cal = 0, n_ro = 0;

  rpts dut (
    .clk(clk), .rst_n(rst_n), .se(se), .glitch_en(glitch_en),
    .launch_d(launch_d), .launch_si(launch_si), .launch_so(launch_so),
    .cap_si(cap_si), .cap_so(cap_so), .cfg_se(cfg_se), .cfg_si(cfg_si),
    .cfg_so(cfg_so), .ro_en(ro_en), .core_paths(core_paths),
    .freq_out(freq_out), .glitch_q(glitch_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick();
    #2000 clk = 1'b1; #2000 clk = 1'b0;
  endtask

  task automatic load_cfg(input int unsigned dsel, input int unsigned psel);
    logic [DW+PW-1:0] w;
    w = {PW'(psel), DW'(dsel)};
    for (int b = 0; b < DW + PW; b++) begin
      cfg_se = 1'b1; cfg_si = w[b]; tick();
    end
    cfg_se = 1'b0;
  endtask

  // One race. k: chain tap, j: core path index (-1: calibration input),
  // dp: core path delay, loc: launch on capture instead of on shift.
  // Returns the expected glitch so callers can count cases.
  task automatic race(input int unsigned k, input int j, input int unsigned dp,
                      input bit loc, input bit expect_glitch);
    logic pre, v;
    // Launch value: the selected tap must rise, so L falls for even k.
    pre = ((k % 2) == 0) ? 1'b1 : 1'b0;
    load_cfg(k, (j < 0) ? 0 : j + 1);
    glitch_en = 1'b1; se = 1'b1;
    if (j >= 0) core_paths[j] = 1'b1;
    launch_si = pre; cap_si = 1'($urandom); tick();
    check(launch_so == pre, "launch-flop preset by shift");
    #1000;
    glitch_en = 1'b0; #500;
    if (loc) begin se = 1'b0; launch_d = ~pre; n_loc++; end
    else     begin se = 1'b1; launch_si = ~pre; n_los++; end
    #2000 clk = 1'b1;
    if (j >= 0) fork begin #(dp) core_paths[j] = 1'b0; end join_none
    #2000 clk = 1'b0;
    check(launch_so == ~pre, "transition launched");
    if (loc) check(cap_so == 1'b1, "capture-flop captured quiet NAND A");
    check(glitch_q == expect_glitch,
          $sformatf("race k=%0d path=%0d dp=%0d loc=%0b: glitch %0b expected %0b",
                    k, j, dp, loc, glitch_q, expect_glitch));
    // Insertion shift with glitch_en still low.
    se = 1'b1; v = 1'($urandom); cap_si = v; tick();
    check(cap_so == (v ^ expect_glitch), "result inserted into the scan chain");
    glitch_en = 1'b1; #100;
    check(glitch_q == 1'b0, "detector cleared");
    if (expect_glitch) n_fail++; else n_pass++;
  endtask

  task automatic ring(input int unsigned k);
    time t1, t2;
    load_cfg(k, 0);
    ro_en = 1'b1;
    repeat (3) @(posedge freq_out);
    t1 = $time;
    @(posedge freq_out);
    t2 = $time;
    check(t2 - t1 == (1 << DIVB) * 2 * (TRI + k * INV),
          $sformatf("ring period through tap %0d: %0t", k, t2 - t1));
    ro_en = 1'b0;
    n_ro++;
    #2000;
  endtask

  initial begin : watchdog
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000 rst_n = 1'b1;
    // Reference longer than the core path: no glitch (path validated).
    race(14, 0, 250, 1'b0, 1'b0);
    race(12, 3, 200, 1'b0, 1'b0);
    // Reference shorter than the core path: glitch.
    race(8, 0, 250, 1'b0, 1'b1);
    race(3, 6, 100, 1'b0, 1'b1);
    // Sweep the tap against one path to bracket its delay (330 ps).
    for (int unsigned k = 2; k <= N_INV; k++)
      race(k, 1, 330, 1'b0, (TRI + k * INV) < 330);
    // Launch on capture.
    race(10, 2, 150, 1'b1, 1'b0);
    race(5, 2, 150, 1'b1, 1'b1);
    // Calibration input raced against an odd tap. The calibration node
    // falls first, so NAND A never sees both inputs high: no glitch.
    race(7, -1, 0, 1'b0, 1'b0);
    n_cal++;
    // Ring-oscillator calibration.
    ring(N_INV);
    ring(10);
    checks++;
    if (n_pass == 0 || n_fail == 0 || n_los == 0 || n_loc == 0 || n_cal == 0 || n_ro == 0)
      failures++;
    $display("counts: pass=%0d fail=%0d los=%0d loc=%0d cal=%0d ring=%0d",
             n_pass, n_fail, n_los, n_loc, n_cal, n_ro);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
