// sdd_test_top: test infrastructure for race-based small-delay-defect
// detection on a chip.
//
// N_ENDPOINTS glitch-detecting scan cells sit at endpoints of the logic
// under test (ep_d in, ep_q out to the logic) and share one scan chain with
// the reference path test structure (RPTS):
//   si -> RPTS launch-flop -> endpoint cell 0 .. N_ENDPOINTS-1
//      -> RPTS capture-flop -> so
// A test shifts a pattern in with glitch_en = 1, drops glitch_en, launches
// (last shift or a capture cycle), gives one more shift with glitch_en low
// to fold every detector's result into the chain, raises glitch_en and
// shifts out. Bit i of a detector flips when a transition reached its
// endpoint during the race. The RPTS races a selectable chain delay
// against one of rpts_paths (core endpoints to be validated) and provides
// the ring-oscillator calibration output freq_out; its codes are loaded
// through the separate cfg_si/cfg_se/cfg_so chain. rst_n clears the RPTS
// configuration and divider. All scan cells use clk. The combinational
// loop tools report inside the RPTS is its ring oscillator (see rpts), and
// the latch in every detector is its intended storage element.
// The organisation follows the published method; the chain order, the
// endpoint count and the separate configuration chain are this
// implementation's choices.
module sdd_test_top #(
  parameter int unsigned N_ENDPOINTS   = sdd_pkg::N_ENDPOINTS,
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
  input  logic                    si,
  output logic                    so,
  input  logic [N_ENDPOINTS-1:0]  ep_d,
  output logic [N_ENDPOINTS-1:0]  ep_q,
  output logic [N_ENDPOINTS-1:0]  ep_glitch,
  input  logic                    rpts_launch_d,
  input  logic [N_CORE_PATHS-1:0] rpts_paths,
  input  logic                    ro_en,
  input  logic                    cfg_se,
  input  logic                    cfg_si,
  output logic                    cfg_so,
  output logic                    freq_out,
  output logic                    rpts_glitch
);
  timeunit 1ps; timeprecision 1ps;

  logic launch_so;
  logic [N_ENDPOINTS:0] chain;

  rpts #(
    .CHAIN_INV    (CHAIN_INV),
    .N_CORE_PATHS (N_CORE_PATHS),
    .DIV_BITS     (DIV_BITS),
    .INV_DELAY_PS (INV_DELAY_PS),
    .TRI_DELAY_PS (TRI_DELAY_PS),
    .RECT_DELAY_PS(RECT_DELAY_PS)
  ) u_rpts (
    .clk       (clk),
    .rst_n     (rst_n),
    .se        (se),
    .glitch_en (glitch_en),
    .launch_d  (rpts_launch_d),
    .launch_si (si),
    .launch_so (launch_so),
    .cap_si    (chain[N_ENDPOINTS]),
    .cap_so    (so),
    .cfg_se    (cfg_se),
    .cfg_si    (cfg_si),
    .cfg_so    (cfg_so),
    .ro_en     (ro_en),
    .core_paths(rpts_paths),
    .freq_out  (freq_out),
    .glitch_q  (rpts_glitch)
  );

  assign chain[0] = launch_so;

  for (genvar i = 0; i < N_ENDPOINTS; i++) begin : g_ep
    glitch_detector #(.RECT_DELAY_PS(RECT_DELAY_PS)) u_gd (
      .clk      (clk),
      .se       (se),
      .glitch_en(glitch_en),
      .d        (ep_d[i]),
      .si       (chain[i]),
      .q        (chain[i+1]),
      .glitch_q (ep_glitch[i])
    );
    assign ep_q[i] = chain[i+1];
  end
endmodule
