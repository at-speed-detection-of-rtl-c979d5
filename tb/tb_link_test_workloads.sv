// tb_link_test_workloads -- the delay test run at fixed data-to-Write
// margins t_l, as in the published analysis of the method: t_l/T_R = 1, 0.5
// and 0.1 on good links, with the give-up limits l the analysis lists for a
// fault probability of 0.1 (13, 91 and 448 experiments), and t_l/T_R = -0.5
// on a bad link.  T_R = 10 ns (domain B), domain A runs at 7.3 ns so the
// arrival phase wanders from experiment to experiment.  The transmitter
// leads Write by one A cycle, so t_l = 7.3 ns + WRITE_DELAY - DATA_DELAY.
//
// One experiment decides with probability g = |t_l|/T_R (1 for |t_l| >= T_R),
// so the expected number of experiments per test is about T_R/|t_l|.
// That figure assumes Write arrives at a uniformly random phase of the
// receiver clock.  Here the arrival phase is partly tied to the receiver
// clock by the handshake loop itself (RTR leaves on a B edge) and clock A
// jitters (which also moves t_l by up to +-0.5 ns), so only the trend is
// checked against it.  For each margin: every test gives the right verdict
// and none hits the give-up limit; the mean number of experiments over 40
// tests is below 1.5 for t_l = T_R and within a factor of 3 of T_R/|t_l|
// otherwise; and on the good links it grows as t_l shrinks.
`timescale 1ns / 1ps
module tb_link_test_workloads;
  import gals_dft_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned C = 12;
  localparam int unsigned N = 4;
  localparam int         TESTS = 40;
  // per link: t_l in ns, give-up limit, expected verdict
  localparam real        TL   [N] = '{10.0, 5.0, 1.0, -5.0};
  localparam int         LMAX [N] = '{13, 91, 448, 91};

  logic         clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  logic         a_test_start [N], a_in_ready [N], a_busy [N];
  logic         b_test_start [N], b_test_done [N], b_out_valid [N];
  logic [W-1:0] b_out_data [N];
  logic [C-1:0] b_experiments [N];
  test_result_e b_test_result [N];
  logic [W-1:0] mask = '0;

  int checks = 0, failures = 0;
  real prev_mean;

  // Clock A: 7.3 ns mean period with up to +-0.25 ns of random jitter per
  // half period, as an independent oscillator has; without it the phase of
  // the handshake loop can lock and the same outcome repeats.
  always #(3.4 + real'($urandom_range(0, 500)) / 1000.0) clk_a = ~clk_a;
  always #5    clk_b = ~clk_b;

  // WRITE_DELAY - DATA_DELAY = t_l - 7.3
  gals_link_top #(.DATA_W(W), .CNT_W(C), .WRITE_DELAY_NS(3.7), .DATA_DELAY_NS(1.0))
    u_tl10 (.clk_a, .rst_a_n, .a_test_mode(1'b1), .a_test_start(a_test_start[0]),
            .a_victim_mask(mask), .a_in_valid(1'b0), .a_in_data('0), .a_in_ready(a_in_ready[0]),
            .a_busy(a_busy[0]), .clk_b, .rst_b_n, .b_test_mode(1'b1),
            .b_test_start(b_test_start[0]), .b_victim_mask(mask), .b_max_experiments(C'(LMAX[0])),
            .b_test_done(b_test_done[0]), .b_test_result(b_test_result[0]),
            .b_experiments(b_experiments[0]), .b_out_valid(b_out_valid[0]),
            .b_out_data(b_out_data[0]), .b_out_ready(1'b1));
  gals_link_top #(.DATA_W(W), .CNT_W(C), .WRITE_DELAY_NS(1.0), .DATA_DELAY_NS(3.3))
    u_tl5 (.clk_a, .rst_a_n, .a_test_mode(1'b1), .a_test_start(a_test_start[1]),
           .a_victim_mask(mask), .a_in_valid(1'b0), .a_in_data('0), .a_in_ready(a_in_ready[1]),
           .a_busy(a_busy[1]), .clk_b, .rst_b_n, .b_test_mode(1'b1),
           .b_test_start(b_test_start[1]), .b_victim_mask(mask), .b_max_experiments(C'(LMAX[1])),
           .b_test_done(b_test_done[1]), .b_test_result(b_test_result[1]),
           .b_experiments(b_experiments[1]), .b_out_valid(b_out_valid[1]),
           .b_out_data(b_out_data[1]), .b_out_ready(1'b1));
  gals_link_top #(.DATA_W(W), .CNT_W(C), .WRITE_DELAY_NS(1.0), .DATA_DELAY_NS(7.3))
    u_tl1 (.clk_a, .rst_a_n, .a_test_mode(1'b1), .a_test_start(a_test_start[2]),
           .a_victim_mask(mask), .a_in_valid(1'b0), .a_in_data('0), .a_in_ready(a_in_ready[2]),
           .a_busy(a_busy[2]), .clk_b, .rst_b_n, .b_test_mode(1'b1),
           .b_test_start(b_test_start[2]), .b_victim_mask(mask), .b_max_experiments(C'(LMAX[2])),
           .b_test_done(b_test_done[2]), .b_test_result(b_test_result[2]),
           .b_experiments(b_experiments[2]), .b_out_valid(b_out_valid[2]),
           .b_out_data(b_out_data[2]), .b_out_ready(1'b1));
  gals_link_top #(.DATA_W(W), .CNT_W(C), .WRITE_DELAY_NS(1.0), .DATA_DELAY_NS(13.3))
    u_tlm5 (.clk_a, .rst_a_n, .a_test_mode(1'b1), .a_test_start(a_test_start[3]),
            .a_victim_mask(mask), .a_in_valid(1'b0), .a_in_data('0), .a_in_ready(a_in_ready[3]),
            .a_busy(a_busy[3]), .clk_b, .rst_b_n, .b_test_mode(1'b1),
            .b_test_start(b_test_start[3]), .b_victim_mask(mask), .b_max_experiments(C'(LMAX[3])),
            .b_test_done(b_test_done[3]), .b_test_result(b_test_result[3]),
            .b_experiments(b_experiments[3]), .b_out_valid(b_out_valid[3]),
            .b_out_data(b_out_data[3]), .b_out_ready(1'b1));

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(N); i++) begin
      a_test_start[i] = 0;
      b_test_start[i] = 0;
    end
    #50 rst_a_n = 1; rst_b_n = 1;
    prev_mean = 0.0;
    for (int i = 0; i < int'(N); i++) begin
      int   total, giveups;
      real  mean, want;
      total = 0; giveups = 0;
      for (int t = 0; t < TESTS; t++) begin
        int waited;
        mask = W'(1) << (t % W);
        @(posedge clk_a); #0.1 a_test_start[i] = 1;
        @(posedge clk_a); #0.1 a_test_start[i] = 0;
        repeat (3) @(posedge clk_b); #0.1 b_test_start[i] = 1;
        @(posedge clk_b); #0.1 b_test_start[i] = 0;
        waited = 0;
        while (!b_test_done[i] && waited < 100000) begin
          @(posedge clk_b); #0.1; waited++;
        end
        expect_true("test ends", b_test_done[i]);
        expect_true("verdict", b_test_result[i] == (TL[i] > 0.0 ? FAULT_IS_ABSENT : FAULT_IS_PRESENT));
        if (int'(b_experiments[i]) >= LMAX[i]) giveups++;
        total += int'(b_experiments[i]);
        repeat (6) @(posedge clk_a);
      end
      mean = real'(total) / TESTS;
      want = (TL[i] >= 10.0 || TL[i] <= -10.0) ? 1.0 : 10.0 / (TL[i] < 0.0 ? -TL[i] : TL[i]);
      $display("t_l/T_R = %4.1f  l = %0d  mean experiments = %5.2f (T_R/|t_l| = %5.2f), give-ups %0d",
               TL[i] / 10.0, LMAX[i], mean, want, giveups);
      expect_true("no give-up", giveups == 0);
      if (want == 1.0) expect_true("about one experiment per test", mean < 1.5);
      else expect_true("mean experiments near T_R/|t_l|", mean > want / 3.0 && mean < want * 3.0);
      if (i > 0 && TL[i] > 0.0) expect_true("more experiments for a smaller margin", mean > prev_mean);
      prev_mean = mean;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
