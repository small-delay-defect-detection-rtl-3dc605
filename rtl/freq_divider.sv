// freq_divider: divides the ring-oscillator signal for an off-chip pin.
//
// A DIV_BITS-bit counter advances on every rising edge of clk_in; its top
// bit is clk_out, a square wave at f(clk_in) / 2**DIV_BITS. The delay of the
// selected chain follows from the measured clk_out frequency f_out as
// 1 / (2 * f_out * 2**DIV_BITS) per half-period of the ring. rst_n
// (asynchronous, active low) clears the counter so the first output edge
// comes exactly 2**(DIV_BITS-1) input cycles after release. The binary
// counter and its reset are this implementation's choices; the divide ratio
// is a parameter.
module freq_divider #(
  parameter int unsigned DIV_BITS = sdd_pkg::DIV_BITS
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps; timeprecision 1ps;

  logic [DIV_BITS-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign clk_out = cnt[DIV_BITS-1];
endmodule
