// tb_gals_link_top -- end-to-end test of two GALS domains joined by the
// handshake link, with unrelated clocks (A: 7.3 ns, B: 10 ns).  Four copies
// of the design differ only in the link delays.  The transmitter puts data on
// the lines one A cycle before Write, so the data-to-Write margin at the
// receiver is t_l = 7.3 ns + WRITE_DELAY - (delay of the slowest data line):
//   good : all lines 1 ns           t_l = +7.3 ns  -> FAULT_IS_ABSENT
//   bad  : line 5 +25 ns            t_l = -17.7 ns (< -T_R) -> PRESENT at the
//                                   first experiment
//   marg : line 9 +10 ns            t_l = -2.7 ns  -> PRESENT, by detection
//                                   or by giving up
//   zero : line 2 +7.3 ns           t_l = 0        -> never decidable: the
//                                   test gives up after exactly
//                                   max_experiments experiments
// Every data line switches in every experiment (victims against aggressors),
// so the slow line is seen whichever line is the victim.  Also checked:
// functional words arrive intact and in order before and after tests (mode
// switches both ways), and each mechanism (functional transfer, verdict
// absent, verdict present by detection, undecided experiment repeated,
// give-up, mode switch) occurs at least once.
`timescale 1ns / 1ps
module tb_gals_link_top;
  import gals_dft_pkg::*;
  localparam int unsigned W = 16;
  localparam int unsigned C = 12;
  localparam int unsigned N = 4;
  localparam int GOOD = 0, BAD = 1, MARG = 2, ZERO = 3;

  logic         clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  logic         a_test_mode [N], a_test_start [N], a_in_valid [N], a_in_ready [N], a_busy [N];
  logic [W-1:0] a_victim_mask [N], a_in_data [N];
  logic         b_test_mode [N], b_test_start [N], b_test_done [N], b_out_valid [N], b_out_ready [N];
  logic [W-1:0] b_victim_mask [N], b_out_data [N];
  logic [C-1:0] b_max_experiments [N], b_experiments [N];
  test_result_e b_test_result [N];

  int checks = 0, failures = 0;
  int n_func = 0, n_absent = 0, n_detect = 0, n_repeat = 0, n_giveup = 0, n_switch = 0;

  always #3.65 clk_a = ~clk_a;
  always #5    clk_b = ~clk_b;

  `define LINK_INST(IDX, SL, EXTRA) \
    gals_link_top #(.DATA_W(W), .CNT_W(C), .SLOW_LINE(SL), .SLOW_EXTRA_NS(EXTRA)) u_dut_``IDX ( \
      .clk_a(clk_a), .rst_a_n(rst_a_n), .a_test_mode(a_test_mode[IDX]), \
      .a_test_start(a_test_start[IDX]), .a_victim_mask(a_victim_mask[IDX]), \
      .a_in_valid(a_in_valid[IDX]), .a_in_data(a_in_data[IDX]), .a_in_ready(a_in_ready[IDX]), \
      .a_busy(a_busy[IDX]), \
      .clk_b(clk_b), .rst_b_n(rst_b_n), .b_test_mode(b_test_mode[IDX]), \
      .b_test_start(b_test_start[IDX]), .b_victim_mask(b_victim_mask[IDX]), \
      .b_max_experiments(b_max_experiments[IDX]), .b_test_done(b_test_done[IDX]), \
      .b_test_result(b_test_result[IDX]), .b_experiments(b_experiments[IDX]), \
      .b_out_valid(b_out_valid[IDX]), .b_out_data(b_out_data[IDX]), .b_out_ready(b_out_ready[IDX]))

  `LINK_INST(0, -1, 0.0);
  `LINK_INST(1, 5, 25.0);
  `LINK_INST(2, 9, 10.0);
  `LINK_INST(3, 2, 7.3);

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s at %0t: got %0d want %0d", what, $time, got, want);
    end
  endtask

  // Send `count` words over link i in functional mode, checking each.
  task automatic functional(input int i, input int count);
    for (int t = 0; t < count; t++) begin
      logic [W-1:0] w;
      int           waited;
      w = W'($urandom);
      @(posedge clk_a); #0.1 a_in_valid[i] = 1; a_in_data[i] = w;
      do @(posedge clk_a); while (!a_in_ready[i]);  // taken at this edge
      #0.1 a_in_valid[i] = 0;
      waited = 0;
      while (!b_out_valid[i] && waited < 100) begin
        @(posedge clk_b); #0.1; waited++;
      end
      expect_eq("functional word arrives", b_out_valid[i], 1);
      expect_eq("functional word", b_out_data[i], w);
      b_out_ready[i] = 1;
      @(posedge clk_b); #0.1 b_out_ready[i] = 0;
      n_func++;
    end
  endtask

  task automatic to_test_mode(input int i);
    repeat (2) @(posedge clk_b); #0.1 b_test_mode[i] = 1;
    repeat (4) @(posedge clk_a); #0.1 a_test_mode[i] = 1;
    repeat (2) @(posedge clk_a);
    n_switch++;
  endtask

  task automatic to_functional_mode(input int i);
    @(posedge clk_a); #0.1 a_test_mode[i] = 0;
    repeat (2) @(posedge clk_b); #0.1 b_test_mode[i] = 0;
    n_switch++;
  endtask

  // One test of link i with the given victim mask; returns the verdict.
  task automatic link_test(input int i, input logic [W-1:0] m, input int maxe,
                           output test_result_e res, output int exps);
    int waited;
    a_victim_mask[i] = m;
    b_victim_mask[i] = m;
    b_max_experiments[i] = C'(maxe);
    @(posedge clk_a); #0.1 a_test_start[i] = 1;
    @(posedge clk_a); #0.1 a_test_start[i] = 0;
    repeat (3) @(posedge clk_b);  // setup word settles on the lines
    #0.1 b_test_start[i] = 1;
    @(posedge clk_b); #0.1 b_test_start[i] = 0;
    waited = 0;
    while (!b_test_done[i] && waited < 200000) begin
      @(posedge clk_b); #0.1; waited++;
    end
    expect_eq("test ends", b_test_done[i], 1);
    res  = b_test_result[i];
    exps = int'(b_experiments[i]);
    if (exps > 1) n_repeat++;
    repeat (8) @(posedge clk_a);
    expect_eq("transmitter idle after test", a_busy[i], 0);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test_result_e res;
    int           exps;
    for (int i = 0; i < N; i++) begin
      a_test_mode[i] = 0; a_test_start[i] = 0; a_in_valid[i] = 0; a_in_data[i] = '0;
      a_victim_mask[i] = '0; b_test_mode[i] = 0; b_test_start[i] = 0; b_out_ready[i] = 0;
      b_victim_mask[i] = '0; b_max_experiments[i] = '0;
    end
    #50 rst_a_n = 1; rst_b_n = 1;

    // Functional traffic on the good link, then tests of every line.
    functional(GOOD, 8);
    to_test_mode(GOOD);
    for (int k = 0; k < int'(W); k++) begin
      link_test(GOOD, W'(1) << k, 64, res, exps);
      expect_eq("good link: fault absent", res, FAULT_IS_ABSENT);
      if (res == FAULT_IS_ABSENT) n_absent++;
    end
    link_test(GOOD, 16'h0101, 64, res, exps);  // two victims at once
    expect_eq("good link, two victims: fault absent", res, FAULT_IS_ABSENT);
    to_functional_mode(GOOD);
    functional(GOOD, 4);

    // Clearly bad link: detected at the first experiment, any victim.
    to_test_mode(BAD);
    for (int k = 0; k < 4; k++) begin
      link_test(BAD, W'(1) << (k * 5), 64, res, exps);
      expect_eq("bad link: fault present", res, FAULT_IS_PRESENT);
      expect_eq("bad link: one experiment", exps, 1);
      if (res == FAULT_IS_PRESENT && exps == 1) n_detect++;
    end

    // Marginal bad link: never passes.
    to_test_mode(MARG);
    for (int k = 0; k < 10; k++) begin
      link_test(MARG, W'(1) << 9, 3, res, exps);
      expect_eq("marginal link: fault present", res, FAULT_IS_PRESENT);
      if (exps < 3) n_detect++;
    end

    // t_l = 0: every experiment undecided, give up after max.
    to_test_mode(ZERO);
    for (int k = 0; k < 3; k++) begin
      link_test(ZERO, W'(1) << 2, 5 + k, res, exps);
      expect_eq("t_l = 0: fault present", res, FAULT_IS_PRESENT);
      expect_eq("t_l = 0: gave up after max", exps, 5 + k);
      if (exps == 5 + k) n_giveup++;
    end

    $display("functional=%0d absent=%0d detected=%0d repeated=%0d giveup=%0d switches=%0d",
             n_func, n_absent, n_detect, n_repeat, n_giveup, n_switch);
    expect_eq("mechanism: functional transfer", n_func > 0, 1);
    expect_eq("mechanism: verdict absent", n_absent > 0, 1);
    expect_eq("mechanism: fault detected", n_detect > 0, 1);
    expect_eq("mechanism: undecided experiment repeated", n_repeat > 0, 1);
    expect_eq("mechanism: give-up", n_giveup > 0, 1);
    expect_eq("mechanism: mode switch", n_switch > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
