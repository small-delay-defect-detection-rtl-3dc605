// freq_divider_tb: after reset the output must rise after 2**(DIV_BITS-1)
// input cycles and then toggle every 2**(DIV_BITS-1) cycles, i.e. run at
// 1/2**DIV_BITS of the input frequency.
module freq_divider_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DIV_BITS = 8;
  localparam int unsigned HALF     = 1 << (DIV_BITS - 1);

  logic clk_in = 1'b0, rst_n = 1'b0, clk_out;
  int   checks = 0, failures = 0;
  int   n_in = 0;

  freq_divider #(.DIV_BITS(DIV_BITS)) dut (.clk_in(clk_in), .rst_n(rst_n), .clk_out(clk_out));

  always #50 clk_in = ~clk_in;
  always @(posedge clk_in) n_in++;

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    #1000;
    checks++;
    if (clk_out !== 1'b0) failures++;
    @(negedge clk_in); rst_n = 1'b1; start = n_in;
    for (int e = 1; e <= 8; e++) begin
      @(clk_out);
      checks++;
      if (n_in - start != e * HALF || clk_out != (e % 2)) begin
        failures++;
        $display("FAIL edge %0d after %0d input cycles", e, n_in - start);
      end
    end
    // Reset in the middle clears the count.
    @(negedge clk_in); rst_n = 1'b0; #10;
    checks++;
    if (clk_out !== 1'b0) failures++;
    @(negedge clk_in); rst_n = 1'b1; start = n_in;
    @(posedge clk_out);
    checks++;
    if (n_in - start != HALF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
