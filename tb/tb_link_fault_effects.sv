// tb_link_fault_effects -- what a delay fault on each kind of wire does to
// functional traffic, and that the delay test tells them apart.  Four links
// (clock A 7.3 ns, clock B 10 ns) carry the same 24 random words:
//   nominal   : all wires 1 ns
//   slow Write: Write 21 ns      -> words correct, throughput lower
//   slow RTR  : RTR 21 ns        -> words correct, throughput lower
//   slow Data : data line 3 +25 ns -> words may be corrupted
// Checked: the nominal link and the slow-control links deliver every word
// intact; the slow-control links take longer for the burst than the nominal
// one; the slow-data link corrupts at least one word (a word on which line 3
// switched); afterwards the delay test passes the slow-Write link (a late
// Write only widens the margin) and reports the fault on the slow-data link.
`timescale 1ns / 1ps
module tb_link_fault_effects;
  import gals_dft_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned C = 12;
  localparam int unsigned N = 4;
  localparam int         WORDS = 24;
  localparam int NOM = 0, SLOW_W = 1, SLOW_R = 2, SLOW_D = 3;

  logic         clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  logic         a_test_mode [N], a_test_start [N], a_in_valid [N], a_in_ready [N], a_busy [N];
  logic [W-1:0] a_in_data [N], mask;
  logic         b_test_mode [N], b_test_start [N], b_test_done [N], b_out_valid [N], b_out_ready [N];
  logic [W-1:0] b_out_data [N];
  logic [C-1:0] b_experiments [N];
  test_result_e b_test_result [N];
  logic [W-1:0] words [WORDS];
  realtime      burst_time [N];
  int           errors [N];

  int checks = 0, failures = 0;

  always #3.65 clk_a = ~clk_a;
  always #5    clk_b = ~clk_b;

  for (genvar i = 0; i < int'(N); i++) begin : g_link
    localparam real WD = (i == SLOW_W) ? 21.0 : 1.0;
    localparam real RD = (i == SLOW_R) ? 21.0 : 1.0;
    localparam int  SL = (i == SLOW_D) ? 3 : -1;
    localparam real SE = (i == SLOW_D) ? 25.0 : 0.0;
    gals_link_top #(.DATA_W(W), .CNT_W(C), .WRITE_DELAY_NS(WD), .RTR_DELAY_NS(RD),
                    .SLOW_LINE(SL), .SLOW_EXTRA_NS(SE)) u_dut (
      .clk_a, .rst_a_n, .a_test_mode(a_test_mode[i]), .a_test_start(a_test_start[i]),
      .a_victim_mask(mask), .a_in_valid(a_in_valid[i]), .a_in_data(a_in_data[i]),
      .a_in_ready(a_in_ready[i]), .a_busy(a_busy[i]),
      .clk_b, .rst_b_n, .b_test_mode(b_test_mode[i]), .b_test_start(b_test_start[i]),
      .b_victim_mask(mask), .b_max_experiments(C'(64)), .b_test_done(b_test_done[i]),
      .b_test_result(b_test_result[i]), .b_experiments(b_experiments[i]),
      .b_out_valid(b_out_valid[i]), .b_out_data(b_out_data[i]), .b_out_ready(b_out_ready[i]));
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Send the burst over link i; the receiver side always takes words at once.
  task automatic burst(input int i);
    realtime t0;
    t0 = $realtime;
    errors[i] = 0;
    fork
      begin
        for (int t = 0; t < WORDS; t++) begin
          @(posedge clk_a); #0.1 a_in_valid[i] = 1; a_in_data[i] = words[t];
          do @(posedge clk_a); while (!a_in_ready[i]);
          #0.1 a_in_valid[i] = 0;
        end
      end
      begin
        for (int t = 0; t < WORDS; t++) begin
          int waited;
          waited = 0;
          do begin @(posedge clk_b); waited++; end while (!b_out_valid[i] && waited < 1000);
          if (b_out_data[i] != words[t]) errors[i]++;
          #0.1 b_out_ready[i] = 1;
          @(posedge clk_b); #0.1 b_out_ready[i] = 0;
        end
      end
    join
    burst_time[i] = $realtime - t0;
  endtask

  task automatic delay_test(input int i, output test_result_e res);
    int waited;
    #0.1 b_test_mode[i] = 1;
    repeat (4) @(posedge clk_a); #0.1 a_test_mode[i] = 1;
    mask = 8'h01;
    @(posedge clk_a); #0.1 a_test_start[i] = 1;
    @(posedge clk_a); #0.1 a_test_start[i] = 0;
    repeat (3) @(posedge clk_b); #0.1 b_test_start[i] = 1;
    @(posedge clk_b); #0.1 b_test_start[i] = 0;
    waited = 0;
    while (!b_test_done[i] && waited < 100000) begin
      @(posedge clk_b); #0.1; waited++;
    end
    expect_true("test ends", b_test_done[i]);
    res = b_test_result[i];
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test_result_e res;
    mask = '0;
    for (int i = 0; i < int'(N); i++) begin
      a_test_mode[i] = 0; a_test_start[i] = 0; a_in_valid[i] = 0; a_in_data[i] = '0;
      b_test_mode[i] = 0; b_test_start[i] = 0; b_out_ready[i] = 0;
    end
    for (int t = 0; t < WORDS; t++) begin
      words[t] = W'($urandom);
    end
    words[1][3] = ~words[0][3];  // make sure line 3 switches at least once
    #50 rst_a_n = 1; rst_b_n = 1;
    for (int i = 0; i < int'(N); i++) burst(i);
    for (int i = 0; i < int'(N); i++)
      $display("link %0d: burst of %0d words in %0.1f ns, %0d corrupted", i, WORDS, burst_time[i], errors[i]);
    expect_true("nominal link: words intact", errors[NOM] == 0);
    expect_true("slow Write: words intact", errors[SLOW_W] == 0);
    expect_true("slow RTR: words intact", errors[SLOW_R] == 0);
    expect_true("slow Write: lower throughput", burst_time[SLOW_W] > burst_time[NOM]);
    expect_true("slow RTR: lower throughput", burst_time[SLOW_R] > burst_time[NOM]);
    expect_true("slow data line: words corrupted", errors[SLOW_D] > 0);
    delay_test(SLOW_W, res);
    expect_true("slow Write: delay test passes", res == FAULT_IS_ABSENT);
    delay_test(SLOW_D, res);
    expect_true("slow data line: delay test finds the fault", res == FAULT_IS_PRESENT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
