// delay_chain_tb: with ro_en low, a launch edge must reach tap k after
// TRI + k*INV ps with the right polarity. With ro_en high and the ring closed
// by the testbench through an even tap, the ring must oscillate with period
// 2*(TRI + k*INV); through an odd tap it must settle.
module delay_chain_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N   = 16;
  localparam int unsigned INV = 20;
  localparam int unsigned TRI = 20;

  logic          launch_q = 1'b0, ro_en = 1'b0;
  logic [N:0]    taps;
  int unsigned   fb_sel = N;
  logic          fb;
  int            checks = 0, failures = 0;

  delay_chain #(.CHAIN_INV(N), .INV_DELAY_PS(INV), .TRI_DELAY_PS(TRI)) dut (
    .launch_q(launch_q), .ro_en(ro_en), .ro_feedback(fb), .taps(taps));

  assign fb = taps[fb_sel];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time t_edge [N+1];
  logic [N:0] taps_prev = '0;
  int         n_edge [N+1] = '{default: 0};
  always @(taps) begin
    for (int k = 0; k <= N; k++)
      if (taps[k] != taps_prev[k]) begin t_edge[k] = $time; n_edge[k]++; end
    taps_prev = taps;
  end

  initial begin
    time t0, t1, t2;
    int  edges;
    #2000;
    for (int rep = 0; rep < 4; rep++) begin
      launch_q = ~launch_q; t0 = $time;
      #1000;
      for (int k = 0; k <= N; k++) begin
        check(t_edge[k] - t0 == TRI + k * INV, $sformatf("tap %0d delay %0t", k, t_edge[k] - t0));
        check(taps[k] == (((k % 2) == 0) ? ~launch_q : launch_q), $sformatf("tap %0d level", k));
      end
    end

    // Ring oscillator through the whole chain.
    fb_sel = N; ro_en = 1'b1;
    #5000;
    @(posedge taps[N]); t1 = $time;
    repeat (10) @(posedge taps[N]);
    t2 = $time;
    check((t2 - t1) == 10 * 2 * (TRI + N * INV), $sformatf("ring period %0t", (t2 - t1) / 10));

    // Shorter even tap.
    fb_sel = 6; #5000;
    @(posedge taps[6]); t1 = $time;
    repeat (10) @(posedge taps[6]);
    t2 = $time;
    check((t2 - t1) == 10 * 2 * (TRI + 6 * INV), "ring period through tap 6");

    // Odd tap: even number of inversions, the loop latches.
    fb_sel = 5; #5000;
    edges = n_edge[5];
    #5000;
    check(n_edge[5] == edges, "odd tap does not oscillate");
    check(edges > 0, "edge monitor saw the earlier ring");
    ro_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
