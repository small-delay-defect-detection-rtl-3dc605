// rpts: reference path test structure. An on-chip, calibratable reference
// delay that is raced against a core path to bound that path's delay without
// a faster-than-at-speed clock.
//
// A transition launched by the scan launch-flop enters an inverter delay
// chain; the delay-select multiplexer picks the tap that gives the wanted
// reference delay and drives the top input of NAND A, the convergence gate.
// The path-select multiplexer drives NAND A's other input from the core
// endpoint under test (or, for code 0, from the chain input for
// calibration). NAND A feeds a glitch detector whose capture-flop sits in
// the scan chain. With the launch polarity chosen so that the core input
// falls (1->0) and the selected tap rises (0->1): if the core path is
// faster than the chain, NAND A stays at 1 and no glitch is recorded; if it
// is slower, NAND A pulses low for the difference and the detector records it.
// With ro_en high the chain is closed into a ring through the selected tap
// and a feedback tri-state inverter; the ring signal is divided by
// 2**DIV_BITS onto freq_out for calibration against an external meter.
//
// Scan: launch_si -> launch-flop -> launch_so, and separately
// cap_si -> capture-flop -> cap_so, so both can sit anywhere in a chain.
// The configuration codes are loaded through cfg_si/cfg_so with cfg_se.
// rst_n clears the configuration register and the divider.
// Tools report a combinational loop through the delay chain, the
// delay-select multiplexer and the feedback inverter: that loop is the ring
// oscillator and is intended; it is broken by ro_en = 0.
// The structure follows the published one; the chain length, the number of
// core inputs, the code assignment, the divider ratio and the separate
// configuration chain are this implementation's choices.
module rpts #(
  parameter int unsigned CHAIN_INV     = sdd_pkg::CHAIN_INV,
  parameter int unsigned N_CORE_PATHS  = sdd_pkg::N_CORE_PATHS,
  parameter int unsigned DIV_BITS      = sdd_pkg::DIV_BITS,
  parameter int unsigned INV_DELAY_PS  = sdd_pkg::INV_DELAY_PS,
  parameter int unsigned TRI_DELAY_PS  = sdd_pkg::TRI_DELAY_PS,
  parameter int unsigned RECT_DELAY_PS = sdd_pkg::RECT_DELAY_PS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    se,
  input  logic                    glitch_en,
  input  logic                    launch_d,
  input  logic                    launch_si,
  output logic                    launch_so,
  input  logic                    cap_si,
  output logic                    cap_so,
  input  logic                    cfg_se,
  input  logic                    cfg_si,
  output logic                    cfg_so,
  input  logic                    ro_en,
  input  logic [N_CORE_PATHS-1:0] core_paths,
  output logic                    freq_out,
  output logic                    glitch_q
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_TAPS = CHAIN_INV + 1;
  localparam int unsigned DSEL_W = $clog2(N_TAPS);
  localparam int unsigned PSEL_W = $clog2(N_CORE_PATHS + 1);

  logic              launch_q;
  logic [CHAIN_INV:0] taps;
  logic              ref_tap;
  logic              race_in;
  logic              nand_a;
  logic [DSEL_W-1:0] delay_sel;
  logic [PSEL_W-1:0] path_sel;

  rpts_config_reg #(.DSEL_W(DSEL_W), .PSEL_W(PSEL_W)) u_cfg (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_se   (cfg_se),
    .cfg_si   (cfg_si),
    .cfg_so   (cfg_so),
    .delay_sel(delay_sel),
    .path_sel (path_sel)
  );

  scan_flop u_launch (
    .clk(clk),
    .se (se),
    .d  (launch_d),
    .si (launch_si),
    .q  (launch_q)
  );
  assign launch_so = launch_q;

  delay_chain #(
    .CHAIN_INV   (CHAIN_INV),
    .INV_DELAY_PS(INV_DELAY_PS),
    .TRI_DELAY_PS(TRI_DELAY_PS)
  ) u_chain (
    .launch_q   (launch_q),
    .ro_en      (ro_en),
    .ro_feedback(ref_tap),
    .taps       (taps)
  );

  delay_select_mux #(.N_TAPS(N_TAPS), .SEL_W(DSEL_W)) u_dsel (
    .taps   (taps),
    .sel    (delay_sel),
    .tap_out(ref_tap)
  );

  path_select_mux #(.N_CORE_PATHS(N_CORE_PATHS), .SEL_W(PSEL_W)) u_psel (
    .cal_in  (taps[0]),
    .paths   (core_paths),
    .sel     (path_sel),
    .path_out(race_in)
  );

  // NAND A: the convergence gate of the race.
  assign nand_a = ~(ref_tap & race_in);

  glitch_detector #(.RECT_DELAY_PS(RECT_DELAY_PS)) u_gd (
    .clk      (clk),
    .se       (se),
    .glitch_en(glitch_en),
    .d        (nand_a),
    .si       (cap_si),
    .q        (cap_so),
    .glitch_q (glitch_q)
  );

  freq_divider #(.DIV_BITS(DIV_BITS)) u_div (
    .clk_in (ref_tap),
    .rst_n  (rst_n),
    .clk_out(freq_out)
  );
endmodule
