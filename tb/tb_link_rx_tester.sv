// tb_link_rx_tester -- plays the transmitter and the link against the
// receiving end.  For each experiment the testbench puts the next test word
// on the data lines at a chosen time dd and raises Write at time dw, both
// relative to an active edge E of the receiver clock (period 10 ns).  The
// verdict of each experiment is worked out here from the times alone:
//   Write is first sampled high at edge ew = E + 10*ceil(dw/10);
//   first read correct  <=> data changed before edge ew - 10  -> ABSENT
//   second read wrong   <=> data changed after edge ew        -> PRESENT
//   otherwise undecided; after max_experiments undecided ones -> PRESENT.
// Directed cases (each outcome, the give-up rule, max_experiments = 0) are
// followed by random runs of experiments, and a functional-mode section
// checks received words and back-pressure (RTR stays low while a received
// word is not taken).
`timescale 1ns / 1ps
module tb_link_rx_tester;
  import gals_dft_pkg::*;
  localparam int unsigned W = 16;
  localparam int unsigned C = 8;

  logic         clk = 0, rst_n = 0;
  logic         test_mode = 0, test_start = 0;
  logic [W-1:0] victim_mask = 16'h0010;
  logic [C-1:0] max_experiments = '0;
  logic         test_done;
  test_result_e test_result;
  logic [C-1:0] experiments;
  logic         out_valid, out_ready = 0;
  logic [W-1:0] out_data;
  logic         write = 0, rtr;
  logic [W-1:0] data = '0;
  int           checks = 0, failures = 0;
  int           n_absent = 0, n_present = 0, n_undecided = 0, n_giveup = 0;

  link_rx_tester #(.DATA_W(W), .CNT_W(C)) dut (.*);

  always #5 clk = ~clk;  // active edges at 5, 15, 25, ...

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s at %0t: got %0d want %0d", what, $time, got, want);
    end
  endtask

  function automatic logic [W-1:0] pattern(input logic [W-1:0] m, input logic ph);
    logic [W-1:0] p;
    for (int b = 0; b < W; b++) p[b] = m[b] ? ph : !ph;
    return p;
  endfunction

  // Verdict of one experiment from the arrival times (ns after edge E).
  function automatic test_result_e judge(input int dd, input int dw);
    int ew;
    ew = 10 * ((dw + 9) / 10);
    if (dd < ew - 10) return FAULT_IS_ABSENT;
    if (dd > ew)      return FAULT_IS_PRESENT;
    return MIGHT_BE_FAULTY;
  endfunction

  // One experiment as the transmitter: wait for RTR, put `word` on the
  // lines at E+dd and raise Write at E+dw, then finish the handshake.
  task automatic experiment(input logic [W-1:0] word, input int dd, input int dw);
    int waited;
    waited = 0;
    while (!rtr && waited < 200) begin
      @(posedge clk); waited++;
    end
    // E is the third active edge from now (30 ns), so dd may be negative.
    @(posedge clk);
    fork
      begin #(dd + 30); data = word; end
      begin #(dw + 30); write = 1; end
    join
    waited = 0;
    while (rtr && waited < 200) begin
      @(posedge clk); waited++;
    end
    #3 write = 0;
  endtask

  task automatic start_test(input logic [W-1:0] m, input int unsigned maxe);
    victim_mask = m;
    max_experiments = C'(maxe);
    data = pattern(m, 1'b0);  // setup word put on the lines by the transmitter
    @(posedge clk); #1 test_start = 1;
    @(posedge clk); #1 test_start = 0;
  endtask

  // Run a test whose experiments use the given times; check the verdict.
  task automatic run_test(input logic [W-1:0] m, input int unsigned maxe,
                          input int dds[$], input int dws[$]);
    test_result_e want, v;
    int           n;
    start_test(m, maxe);
    want = MIGHT_BE_FAULTY;
    n = 0;
    while (want == MIGHT_BE_FAULTY && n < int'(maxe)) begin
      v = judge(dds[n], dws[n]);
      experiment(pattern(m, ~n[0]), dds[n], dws[n]);
      n++;
      if (v == MIGHT_BE_FAULTY) n_undecided++;
      want = v;
    end
    if (want == MIGHT_BE_FAULTY) begin
      want = FAULT_IS_PRESENT;
      if (maxe > 0) n_giveup++;
    end
    if (want == FAULT_IS_ABSENT) n_absent++; else n_present++;
    repeat (6) @(posedge clk);
    #1;
    expect_eq("test_done", test_done, 1);
    expect_eq("verdict", test_result, want);
    expect_eq("experiments made", experiments, n);
    expect_eq("RTR low at the end", rtr, 0);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dds[$], dws[$];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    test_mode = 1;
    repeat (3) @(posedge clk);
    expect_eq("RTR low when idle in test mode", rtr, 0);

    // Directed: clear pass, clear fault, give-up, decide after repeats.
    run_test(16'h0010, 5, '{-13}, '{3});
    run_test(16'h0100, 5, '{24}, '{3});
    run_test(16'h0001, 5, '{2, 4, 1, 6, 8}, '{3, 7, 3, 9, 9});
    run_test(16'h8000, 10, '{2, 4, 5, -7}, '{3, 7, 6, 7});
    run_test(16'h0003, 10, '{2, 4, 15}, '{3, 7, 3});
    run_test(16'h0002, 1, '{5}, '{3});
    // max_experiments = 0: verdict at once, no handshake
    start_test(16'h0004, 0);
    repeat (3) @(posedge clk); #1;
    expect_eq("max 0: done", test_done, 1);
    expect_eq("max 0: present", test_result, FAULT_IS_PRESENT);
    expect_eq("max 0: no experiment", experiments, 0);
    expect_eq("max 0: no RTR", rtr, 0);

    // Random runs.
    for (int t = 0; t < 40; t++) begin
      int unsigned maxe;
      dds.delete(); dws.delete();
      maxe = 1 + $urandom_range(0, 12);
      for (int k = 0; k < int'(maxe); k++) begin
        int dd;
        dws.push_back($urandom_range(1, 9));
        do dd = $urandom_range(0, 50) - 20; while (dd % 10 == 0);
        // mostly undecided-looking times, to exercise repetition
        if ($urandom_range(0, 3) != 0) dd = $urandom_range(1, 9);
        dds.push_back(dd);
      end
      run_test(W'($urandom) | W'(1), maxe, dds, dws);
    end

    // Functional mode: words are taken at Write; back-pressure holds RTR.
    test_mode = 0;
    for (int t = 0; t < 4; t++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      experiment(w, 1, 4);
      repeat (4) @(posedge clk); #1;
      expect_eq("functional word valid", out_valid, 1);
      expect_eq("functional word", out_data, w);
      expect_eq("RTR held low while word not taken", rtr, 0);
      out_ready = 1;
      @(posedge clk); #1 out_ready = 0;
      expect_eq("word taken", out_valid, 0);
    end

    expect_eq("absent verdicts seen", n_absent > 0, 1);
    expect_eq("present verdicts seen", n_present > 0, 1);
    expect_eq("undecided experiments seen", n_undecided > 0, 1);
    expect_eq("give-ups seen", n_giveup > 0, 1);
    $display("absent=%0d present=%0d undecided=%0d giveup=%0d", n_absent, n_present, n_undecided, n_giveup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
