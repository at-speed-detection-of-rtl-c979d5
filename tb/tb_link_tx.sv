// tb_link_tx -- drives the transmitting end of the link as the receiver
// would (RTR up, wait for Write, RTR down, wait for Write low) and checks:
//   * functional words arrive on Data unchanged, with an in_ready pulse;
//   * nothing is sent while in_valid is low;
//   * Data is on the lines SETUP_CYCLES cycles before Write rises and does
//     not change while Write is high;
//   * the cycle counts of the handshake (RTR passes a two-flop
//     synchronizer: Data changes on the 3rd edge after RTR rises, Write
//     rises SETUP_CYCLES edges later and falls on the 3rd edge after RTR
//     falls);
//   * test mode: test_start puts ~mask on the lines without Write, then the
//     experiments send mask, ~mask, mask, ...
`timescale 1ns / 1ps
module tb_link_tx;
  localparam int unsigned W     = 16;
  localparam int unsigned SETUP = 2;

  logic         clk = 0, rst_n = 0;
  logic         test_mode = 0, test_start = 0;
  logic [W-1:0] victim_mask = '0;
  logic         in_valid = 0, in_ready;
  logic [W-1:0] in_data = '0;
  logic         rtr = 0, write, busy;
  logic [W-1:0] data;
  int           checks = 0, failures = 0;

  link_tx #(.DATA_W(W), .SETUP_CYCLES(SETUP)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s at %0t: got %0h want %0h", what, $time, got, want);
    end
  endtask

  // One handshake as the receiver; returns the word and checks timing.
  task automatic handshake(output logic [W-1:0] word, output int ready_pulses);
    int n;
    logic [W-1:0] prev, loaded;
    ready_pulses = 0;
    prev = data;
    @(posedge clk); #1 rtr = 1;
    n = 0;
    while (data === prev && !write && n < 20) begin
      @(posedge clk); #1; n++;
      if (in_ready) ready_pulses++;
    end
    expect_eq("edges from RTR to Data", n, 3);
    loaded = data;
    n = 0;
    while (!write && n < 20) begin
      expect_eq("Data stable during setup", data, loaded);
      @(posedge clk); #1; n++;
    end
    expect_eq("edges from Data to Write", n, SETUP);
    word = data;
    repeat (2) begin
      @(posedge clk); #1;
      expect_eq("Data held while Write high", data, word);
      expect_eq("Write held while RTR high", write, 1);
    end
    rtr = 0;
    n = 0;
    while (write && n < 20) begin
      @(posedge clk); #1; n++;
    end
    expect_eq("edges from RTR low to Write low", n, 3);
    expect_eq("Data held after Write low", data, word);
  endtask

  function automatic logic [W-1:0] inv(input logic [W-1:0] v);
    return ~v;
  endfunction

  // Watch in_ready at each edge.
  int ready_seen = 0;
  always @(posedge clk) if (in_ready) ready_seen++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word, m;
    int           rp;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    expect_eq("Write low after reset", write, 0);
    expect_eq("Data zero after reset", data, 0);

    // No word: RTR alone starts nothing.
    @(posedge clk); #1 rtr = 1;
    repeat (8) @(posedge clk);
    #1 expect_eq("no transfer without in_valid", write, 0);
    expect_eq("idle without in_valid", busy, 0);
    rtr = 0;
    repeat (4) @(posedge clk);

    // Functional words.
    for (int t = 0; t < 4; t++) begin
      #1 in_valid = 1;
      in_data  = 16'hA5C3 ^ W'(t * 16'h1111);
      ready_seen = 0;
      handshake(word, rp);
      expect_eq("functional word", word, 16'hA5C3 ^ W'(t * 16'h1111));
      expect_eq("one in_ready pulse per word", ready_seen, 1);
      in_valid = 0;
      repeat (2) @(posedge clk);
    end

    // Test mode.
    m = 16'h0040;
    #1 test_mode = 1; victim_mask = m;
    @(posedge clk); #1 test_start = 1;
    @(posedge clk); #1 test_start = 0;
    expect_eq("setup word on the lines", data, inv(m));
    expect_eq("no Write for the setup word", write, 0);
    for (int j = 0; j < 4; j++) begin
      ready_seen = 0;
      handshake(word, rp);
      expect_eq("test word of experiment", word, j[0] ? inv(m) : m);
      expect_eq("no in_ready in test mode", ready_seen, 0);
    end
    // A second test restarts the phase.
    m = 16'h0300;
    victim_mask = m;
    @(posedge clk); #1 test_start = 1;
    @(posedge clk); #1 test_start = 0;
    expect_eq("setup word of second test", data, inv(m));
    handshake(word, rp);
    expect_eq("first word of second test", word, m);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
