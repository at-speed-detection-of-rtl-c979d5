// tb_gals_link_top_full -- the design at its default sizes (32-bit data,
// 12-bit experiment counter, fault-free link of 1 ns wires), clocks A 7.3 ns
// and B 10 ns.  One complete operation: a burst of functional words, a
// switch to test mode, the delay test of every one of the 32 lines in turn
// with the largest give-up limit of the published analysis (2244
// experiments), and a switch back to functional traffic.  The fault-free
// link (data-to-Write margin 7.3 ns) must pass every test.
`timescale 1ns / 1ps
module tb_gals_link_top_full;
  import gals_dft_pkg::*;
  localparam int unsigned W = DEFAULT_DATA_W;
  localparam int unsigned C = DEFAULT_CNT_W;

  logic         clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  logic         a_test_mode = 0, a_test_start = 0, a_in_valid = 0, a_in_ready, a_busy;
  logic [W-1:0] a_victim_mask = '0, a_in_data = '0;
  logic         b_test_mode = 0, b_test_start = 0, b_test_done, b_out_valid, b_out_ready = 0;
  logic [W-1:0] b_victim_mask = '0, b_out_data;
  logic [C-1:0] b_max_experiments = '0, b_experiments;
  test_result_e b_test_result;
  int           checks = 0, failures = 0, total_exps = 0;

  gals_link_top dut (.*);

  always #3.65 clk_a = ~clk_a;
  always #5    clk_b = ~clk_b;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s at %0t: got %0d want %0d", what, $time, got, want);
    end
  endtask

  task automatic functional(input int count);
    for (int t = 0; t < count; t++) begin
      logic [W-1:0] w;
      int           waited;
      w = $urandom;
      @(posedge clk_a); #0.1 a_in_valid = 1; a_in_data = w;
      do @(posedge clk_a); while (!a_in_ready);
      #0.1 a_in_valid = 0;
      waited = 0;
      while (!b_out_valid && waited < 100) begin
        @(posedge clk_b); #0.1; waited++;
      end
      expect_eq("functional word", b_out_data, w);
      b_out_ready = 1;
      @(posedge clk_b); #0.1 b_out_ready = 0;
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
    #50 rst_a_n = 1; rst_b_n = 1;
    functional(16);
    repeat (2) @(posedge clk_b); #0.1 b_test_mode = 1;
    repeat (4) @(posedge clk_a); #0.1 a_test_mode = 1;
    for (int k = 0; k < int'(W); k++) begin
      int waited;
      a_victim_mask = W'(1) << k;
      b_victim_mask = W'(1) << k;
      b_max_experiments = C'(2244);
      @(posedge clk_a); #0.1 a_test_start = 1;
      @(posedge clk_a); #0.1 a_test_start = 0;
      repeat (3) @(posedge clk_b); #0.1 b_test_start = 1;
      @(posedge clk_b); #0.1 b_test_start = 0;
      waited = 0;
      while (!b_test_done && waited < 100000) begin
        @(posedge clk_b); #0.1; waited++;
      end
      expect_eq("test ends", b_test_done, 1);
      expect_eq("fault-free line passes", b_test_result, FAULT_IS_ABSENT);
      total_exps += int'(b_experiments);
      repeat (8) @(posedge clk_a);
    end
    @(posedge clk_a); #0.1 a_test_mode = 0;
    repeat (2) @(posedge clk_b); #0.1 b_test_mode = 0;
    functional(16);
    $display("32 lines tested, %0d experiments in all", total_exps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
