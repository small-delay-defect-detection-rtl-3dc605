// rpts_config_reg: scan register that holds the delay-select and
// test-path-select codes of the reference path test structure.
//
// A separate shift register of DSEL_W + PSEL_W bits, clocked by clk. While
// cfg_se is high it shifts one bit per clock from cfg_si toward cfg_so
// (cfg_so is bit 0, so a word is shifted in least significant bit first);
// while cfg_se is low it holds. Bits [DSEL_W-1:0] are the delay-select code
// and the bits above it the path-select code. Keeping it apart from the
// main scan chain stops the launch shift of a pattern from disturbing the
// selected tap; that split, the bit order and the absence of a shadow
// register are this implementation's choices.
module rpts_config_reg #(
  parameter int unsigned DSEL_W = sdd_pkg::DSEL_W,
  parameter int unsigned PSEL_W = sdd_pkg::PSEL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_se,
  input  logic              cfg_si,
  output logic              cfg_so,
  output logic [DSEL_W-1:0] delay_sel,
  output logic [PSEL_W-1:0] path_sel
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned W = DSEL_W + PSEL_W;

  logic [W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (cfg_se) sr <= {cfg_si, sr[W-1:1]};
  end

  assign cfg_so    = sr[0];
  assign delay_sel = sr[DSEL_W-1:0];
  assign path_sel  = sr[W-1:DSEL_W];
endmodule
