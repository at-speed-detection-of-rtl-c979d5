// link_tx -- transmitting end of a handshake link between two GALS domains
// (the "Switch A" side).
//
// The link uses two control wires: Write, driven by this end, and Ready To
// Receive (RTR), driven by the receiver.  A transfer is a four-phase
// handshake:
//   1. the receiver raises RTR;
//   2. this end (seeing RTR through a two-flop synchronizer) puts a word on
//      Data, holds it there for SETUP_CYCLES clock cycles and then raises
//      Write, so that on a good link the data reaches the receiver before
//      Write does;
//   3. the receiver drops RTR;
//   4. this end drops Write.  Data is held until the next transfer.
// The wire order (RTR up, Data, Write up, RTR down, Write down) follows the
// link's handshake; the synchronizer and SETUP_CYCLES are this design's
// choices.
//
// Two sources feed the link:
//   * functional mode (test_mode = 0): a word from the in_valid/in_data
//     port, taken with an in_ready pulse at the start of the transfer;
//   * test mode (test_mode = 1): the test word of test_pattern_gen.  A
//     test_start pulse (while idle) puts the "setup" word, phase 0, on the
//     lines without a Write and restarts the phase; experiment j then sends
//     phase 1 for even j and phase 0 for odd j, so the lines under test
//     switch at every experiment.  The receiver computes the same sequence.
// test_mode and victim_mask must be stable while a test runs.
`timescale 1ns / 1ps
module link_tx #(
  parameter int unsigned DATA_W       = gals_dft_pkg::DEFAULT_DATA_W,
  parameter int unsigned SETUP_CYCLES = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // test control (from the test access of this domain)
  input  logic              test_mode,
  input  logic              test_start,
  input  logic [DATA_W-1:0] victim_mask,
  // functional input
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  // link wires
  input  logic              rtr,
  output logic              write,
  output logic [DATA_W-1:0] data,
  // status
  output logic              busy
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WRITE} state_e;

  localparam int unsigned SW = (SETUP_CYCLES > 1) ? $clog2(SETUP_CYCLES + 1) : 1;

  state_e            state;
  logic              rtr_s;
  logic              phase_q;
  logic [SW-1:0]     setup_cnt;
  logic [DATA_W-1:0] pat_next;
  logic [DATA_W-1:0] pat_setup;
  logic              start_xfer;

  sync2 u_rtr_sync (.clk(clk), .rst_n(rst_n), .d(rtr), .q(rtr_s));

  test_pattern_gen #(.DATA_W(DATA_W)) u_pat_next (
    .victim_mask(victim_mask), .phase(phase_q), .pattern(pat_next)
  );
  test_pattern_gen #(.DATA_W(DATA_W)) u_pat_setup (
    .victim_mask(victim_mask), .phase(1'b0), .pattern(pat_setup)
  );

  // A transfer starts when the receiver is ready and there is a word.
  always_comb begin
    start_xfer = (state == S_IDLE) && rtr_s && (test_mode || in_valid);
    in_ready   = start_xfer && !test_mode;
    busy       = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      write     <= 1'b0;
      data      <= '0;
      phase_q   <= 1'b1;
      setup_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (test_start) begin
            data    <= pat_setup;
            phase_q <= 1'b1;
          end else if (start_xfer) begin
            if (test_mode) begin
              data    <= pat_next;
              phase_q <= ~phase_q;
            end else begin
              data <= in_data;
            end
            setup_cnt <= '0;
            state     <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (SW'(setup_cnt + 1'b1) >= SW'(SETUP_CYCLES)) begin
            write <= 1'b1;
            state <= S_WRITE;
          end else begin
            setup_cnt <= setup_cnt + 1'b1;
          end
        end
        S_WRITE: begin
          if (!rtr_s) begin
            write <= 1'b0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: Data must not change while Write is high.
  property p_data_stable;
    @(posedge clk) disable iff (!rst_n) write && $past(write) |-> data == $past(data);
  endproperty
  a_data_stable: assert property (p_data_stable);

endmodule
