// tb_test_pattern_gen -- checks the worst-case test word bit by bit: every
// line in the victim mask must equal the phase, every other line its
// complement.  Walking single-line masks, a few multi-line masks and random
// masks, both phases.
`timescale 1ns / 1ps
module tb_test_pattern_gen;
  localparam int unsigned W = 32;

  logic [W-1:0] mask, pattern;
  logic         phase;
  int           checks = 0, failures = 0;

  test_pattern_gen #(.DATA_W(W)) dut (.victim_mask(mask), .phase(phase), .pattern(pattern));

  task automatic check_one(input logic [W-1:0] m, input logic p);
    mask  = m;
    phase = p;
    #1;
    for (int b = 0; b < W; b++) begin
      logic want;
      want = m[b] ? p : !p;
      checks++;
      if (pattern[b] !== want) begin
        failures++;
        $display("FAIL mask=%h phase=%0d bit %0d = %0d, want %0d", m, p, b, pattern[b], want);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < W; k++) begin
      check_one(W'(1) << k, 1'b1);
      check_one(W'(1) << k, 1'b0);
    end
    check_one(32'h0000_0003, 1'b1);
    check_one(32'h8000_0101, 1'b0);
    for (int n = 0; n < 50; n++) check_one($urandom, n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
