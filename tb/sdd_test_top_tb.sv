// sdd_test_top_tb: end-to-end test of the complete test infrastructure at
// its default sizes (8 endpoint detectors, 16-inverter chain, 7 core paths,
// divide by 256).
//
// The logic under test is emulated around the top: endpoint cells act as
// launch points (their q outputs) of two races,
//   race F: ref from ep_q[0] (300 ps), test from ep_q[1] (400 ps) -> ep_d[2]
//           (the test segment carries a small delay defect: glitch),
//   race P: ref from ep_q[3] (400 ps), test from ep_q[4] (300 ps) -> ep_d[5]
//           (defect-free: no glitch),
// two races with the transitions reversed (reference falling, test rising,
// where passing means a glitch) through a NAND with a 20 ps inertial delay,
//   race R: ref from ep_q[1] (400 ps), test from ep_q[0] (300 ps) -> ep_d[7]
//           (reference slower by 100 ps: glitch, the segment passes),
//   race M: ref from ep_q[4] (310 ps), test from ep_q[3] (300 ps) -> ep_d[0]
//           (margin 10 ps below the gate's inertial delay: the glitch is
//           absorbed, so this test cannot pass),
// and ep_q[4] delayed by 250 ps feeds RPTS core path 0. ep_d[6] follows
// ep_q[6] (a plain transition).
// Each pattern: configure the RPTS tap, shift a 10-bit state in with
// glitch_en high, drop glitch_en, launch with one more shift, fold the
// results in with one shift, raise glitch_en and shift all 10 bits out.
// The scan-out is compared with a bit-level model of the chain in which
// bit i flips when detector i saw a transition. The ring-oscillator
// calibration is then checked through freq_out. Every mechanism (detected
// defect, clean race, RPTS pass and fail, plain transition, insertion,
// configuration shift, ring oscillation) is counted and must occur.
module sdd_test_top_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NE   = sdd_pkg::N_ENDPOINTS;
  localparam int unsigned NCP  = sdd_pkg::N_CORE_PATHS;
  localparam int unsigned NINV = sdd_pkg::CHAIN_INV;
  localparam int unsigned DW   = sdd_pkg::DSEL_W;
  localparam int unsigned PW   = sdd_pkg::PSEL_W;
  localparam int unsigned INV  = sdd_pkg::INV_DELAY_PS;
  localparam int unsigned TRI  = sdd_pkg::TRI_DELAY_PS;
  localparam int unsigned NB   = NE + 2;   // launch, endpoints, capture
  localparam int unsigned DP   = 250;

  logic clk = 1'b0, rst_n = 1'b0, se = 1'b1, glitch_en = 1'b1, si = 1'b0, so;
  logic [NE-1:0]  ep_d, ep_q, ep_glitch;
  logic [NCP-1:0] rpts_paths;
  logic ro_en = 1'b0, cfg_se = 1'b0, cfg_si = 1'b0, cfg_so, freq_out, rpts_glitch;
  logic core_p0;

  int checks = 0, failures = 0;
  int n_defect = 0, n_clean = 0, n_rpts_pass = 0, n_rpts_fail = 0;
  int n_plain = 0, n_insert = 0, n_cfg = 0, n_ring = 0;
  int n_reversed = 0, n_absorbed = 0;

  sdd_test_top dut (
    .clk(clk), .rst_n(rst_n), .se(se), .glitch_en(glitch_en), .si(si), .so(so),
    .ep_d(ep_d), .ep_q(ep_q), .ep_glitch(ep_glitch),
    .rpts_launch_d(1'b0), .rpts_paths(rpts_paths), .ro_en(ro_en),
    .cfg_se(cfg_se), .cfg_si(cfg_si), .cfg_so(cfg_so),
    .freq_out(freq_out), .rpts_glitch(rpts_glitch));

  // Logic under test.
  core_race_model #(.REF_PS(300), .TEST_PS(400)) u_race_f (
    .ref_lp(ep_q[0]), .test_lp(ep_q[1]), .gc(ep_d[2]));
  core_race_model #(.REF_PS(400), .TEST_PS(300)) u_race_p (
    .ref_lp(ep_q[3]), .test_lp(ep_q[4]), .gc(ep_d[5]));
  always begin
    core_p0 <= #(DP) ep_q[4];
    @(ep_q[4]);
  end
  assign rpts_paths = {{(NCP-1){1'b0}}, core_p0};
  core_race_model #(.REF_PS(400), .TEST_PS(300), .GC_PS(20)) u_race_r (
    .ref_lp(ep_q[1]), .test_lp(ep_q[0]), .gc(ep_d[7]));
  core_race_model #(.REF_PS(310), .TEST_PS(300), .GC_PS(20)) u_race_m (
    .ref_lp(ep_q[4]), .test_lp(ep_q[3]), .gc(ep_d[0]));
  assign ep_d[1] = 1'b0;
  assign ep_d[3] = 1'b0;
  assign ep_d[4] = 1'b0;
  assign ep_d[6] = ep_q[6];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick();
    #2500 clk = 1'b1; #2500 clk = 1'b0;
  endtask

  task automatic load_cfg(input int unsigned dsel, input int unsigned psel);
    logic [DW+PW-1:0] w;
    logic [DW+PW-1:0] back;
    w = {PW'(psel), DW'(dsel)};
    for (int b = 0; b < DW + PW; b++) begin
      cfg_se = 1'b1; cfg_si = w[b]; tick();
    end
    cfg_se = 1'b0;
    n_cfg++;
  endtask

  // Chain state model, index 0 = RPTS launch-flop, 1..NE = endpoint cells,
  // NE+1 = RPTS capture-flop.
  logic [NB-1:0] st;

  task automatic shift(input logic b, input logic [NB-1:0] flip);
    logic [NB-1:0] nx;
    nx[0] = b;
    for (int i = 1; i < NB; i++) nx[i] = st[i-1] ^ flip[i];
    si = b; tick();
    st = nx;
  endtask

  // One pattern with RPTS tap k.
  task automatic pattern(input int unsigned k);
    logic [NB-1:0] s1, flip, out;
    logic          rpts_fails;
    // State before the launch shift, chosen so that ep0/ep3 rise, ep1/ep4
    // fall, ep6 toggles and the launch-flop falls.
    s1 = '0;
    // After the launch shift endpoint j holds s1[j] and held s1[j+1] before.
    s1[0] = 1'b1; s1[1] = 1'b0; s1[2] = 1'b1; s1[3] = 1'b1; s1[4] = 1'b0;
    s1[5] = 1'b1; s1[6] = 1'b0; s1[7] = 1'b1; s1[8] = 1'($urandom);
    s1[9] = 1'($urandom);
    load_cfg(k, 1);
    glitch_en = 1'b1; se = 1'b1;
    for (int i = NB - 1; i >= 0; i--) shift(s1[i], '0);
    check(st == s1, "model loaded");
    check(ep_q == s1[NE:1], "pattern loaded into the endpoint cells");
    #3000;
    glitch_en = 1'b0; #500;
    // Launch on shift: launch-flop 1->0, ep_q shifts by one.
    shift(1'b0, '0);
    #2000;
    rpts_fails = (TRI + k * INV) < DP;
    flip = '0;
    flip[3]  = 1'b1;          // endpoint 2: race F glitches
    flip[7]  = 1'b1;          // endpoint 6: plain transition
    flip[8]  = 1'b1;          // endpoint 7: reversed race R glitches
    flip[NB-1] = rpts_fails;  // RPTS capture
    check(ep_glitch == {1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0},
          $sformatf("endpoint detectors %b", ep_glitch));
    check(rpts_glitch == rpts_fails, $sformatf("RPTS tap %0d glitch %b", k, rpts_glitch));
    n_defect++; n_clean++; n_plain++; n_reversed++; n_absorbed++;
    if (rpts_fails) n_rpts_fail++; else n_rpts_pass++;
    // Fold the results into the chain.
    shift(1'b1, flip);
    n_insert++;
    glitch_en = 1'b1; #500;
    check(ep_glitch == '0 && rpts_glitch == 1'b0, "detectors cleared");
    // Scan out.
    for (int i = 0; i < NB; i++) begin
      out[i] = so;
      shift(1'b0, '0);
    end
    for (int i = 0; i < NB; i++)
      check(out[i] == st_at_unload[NB-1-i], $sformatf("scan-out bit %0d", i));
  endtask

  logic [NB-1:0] st_at_unload;
  always @(posedge glitch_en) st_at_unload = st;

  task automatic ring(input int unsigned k);
    time t1, t2;
    load_cfg(k, 1);
    ro_en = 1'b1;
    repeat (2) @(posedge freq_out);
    t1 = $time;
    @(posedge freq_out);
    t2 = $time;
    check(t2 - t1 == (1 << sdd_pkg::DIV_BITS) * 2 * (TRI + k * INV),
          $sformatf("calibration period tap %0d: %0t", k, t2 - t1));
    ro_en = 1'b0;
    n_ring++;
    #5000;
  endtask

  initial begin : watchdog
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = '0;
    #6000 rst_n = 1'b1;
    // Fill the chain with a known state.
    for (int i = 0; i < NB; i++) shift(1'b0, '0);
    pattern(14);   // reference 300 ps > core path 250 ps: pass
    pattern(8);    // reference 180 ps < 250 ps: fail
    pattern(12);   // 260 ps: pass
    pattern(10);   // 220 ps: fail
    ring(NINV);
    checks++;
    if (n_defect == 0 || n_clean == 0 || n_rpts_pass == 0 || n_rpts_fail == 0 ||
        n_plain == 0 || n_insert == 0 || n_cfg == 0 || n_ring == 0 ||
        n_reversed == 0 || n_absorbed == 0) failures++;
    $display("counts: defect=%0d clean=%0d reversed=%0d absorbed=%0d rpts_pass=%0d rpts_fail=%0d plain=%0d insert=%0d cfg=%0d ring=%0d",
             n_defect, n_clean, n_reversed, n_absorbed, n_rpts_pass, n_rpts_fail,
             n_plain, n_insert, n_cfg, n_ring);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
