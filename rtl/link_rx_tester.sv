// link_rx_tester -- receiving end of a handshake link between two GALS
// domains (the "Switch B" side), with the at-speed delay-fault test.
//
// Fault model: t_l is the time from the moment the data reaches this end
// until Write reaches it.  A negative t_l (a data line slower than Write)
// may corrupt a transfer.  The test reads the data lines at the active clock
// edge just before Write is seen (first read) and at the edge on which Write
// is first seen (second read), and compares both with the expected test
// word:
//   * first read correct  -> the data came before Write: FAULT_IS_ABSENT;
//   * second read wrong   -> the data came after Write:  FAULT_IS_PRESENT;
//   * otherwise the two arrivals fell between the same pair of clock edges
//     and this experiment cannot judge; the handshake is completed and the
//     experiment repeated.  The clocks of the two domains are unrelated, so
//     the arrival phase changes from one experiment to the next.
// After max_experiments undecided experiments the verdict is
// FAULT_IS_PRESENT (conservative: a good link can be rejected, a bad one is
// never accepted).  The decision rules, the repetition and the give-up rule
// follow the method; where its printed algorithm tests the second read for
// equality, the prose "erroneous at the second read" is followed.
//
// Sampling: Write and Data are sampled by the same first rank of flops at
// each edge and pass a second rank together (a two-flop synchronizer for
// Write, a matched delay for Data).  So the two reads are still taken at the
// edges before and at Write's arrival, two cycles later.  This alignment is
// this design's choice.
//
// Handshake (both modes): raise RTR, wait for Write, take the data, drop
// RTR, wait for Write to fall.  In functional mode (test_mode = 0) the word
// taken at Write's arrival goes out on out_valid/out_data and is held until
// out_ready; RTR is raised again only when the output is free.  In test mode
// a test_start pulse (while idle or done) starts Algorithm_Receiver; the
// handshake of the deciding experiment is also completed so the transmitter
// ends idle.  test_done stays high with test_result and the number of
// experiments made until the next test_start.  Expected words: experiment i
// (from 0) expects test_pattern_gen(victim_mask, phase = ~i[0]), the same
// sequence link_tx sends after its own test_start.
//
// Mode switches: an unanswered functional RTR is withdrawn when test_mode
// rises.  Safe switching order (this design's rule): into test mode, stop
// a_in_valid, raise the receiver's test_mode, then the transmitter's; back
// to functional mode, lower the transmitter's first, then the receiver's.
`timescale 1ns / 1ps
module link_rx_tester
  import gals_dft_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned CNT_W  = DEFAULT_CNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // test control and result (test access of this domain)
  input  logic              test_mode,
  input  logic              test_start,
  input  logic [DATA_W-1:0] victim_mask,
  input  logic [CNT_W-1:0]  max_experiments,
  output logic              test_done,
  output test_result_e      test_result,
  output logic [CNT_W-1:0]  experiments,
  // functional output
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready,
  // link wires
  input  logic              write,
  input  logic [DATA_W-1:0] data,
  output logic              rtr
);

  typedef enum logic [2:0] {
    S_IDLE,       // functional mode, nothing requested
    S_F_WAIT,     // functional: RTR high, waiting for Write
    S_F_RELEASE,  // functional: RTR low, waiting for Write low
    S_T_WAIT,     // test: RTR high, taking first reads until Write
    S_T_RELEASE,  // test: RTR low, waiting for Write low
    S_T_DONE      // test: verdict held
  } state_e;

  state_e            state;
  logic              w_meta, w_s;
  logic [DATA_W-1:0] d_meta, d_s;
  logic [DATA_W-1:0] first_read;
  logic              phase_q;        // phase of the current experiment
  logic [DATA_W-1:0] expected;
  logic              ff_correct, second_wrong;

  // First and second rank: Write and Data sampled at the same edges.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_meta <= 1'b0;
      w_s    <= 1'b0;
      d_meta <= '0;
      d_s    <= '0;
    end else begin
      w_meta <= write;
      w_s    <= w_meta;
      d_meta <= data;
      d_s    <= d_meta;
    end
  end

  test_pattern_gen #(.DATA_W(DATA_W)) u_expected (
    .victim_mask(victim_mask), .phase(phase_q), .pattern(expected)
  );

  always_comb begin
    ff_correct   = (first_read == expected);
    second_wrong = (d_s != expected);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rtr         <= 1'b0;
      first_read  <= '0;
      phase_q     <= 1'b1;
      experiments <= '0;
      test_done   <= 1'b0;
      test_result <= MIGHT_BE_FAULTY;
      out_valid   <= 1'b0;
      out_data    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;

      unique case (state)
        S_IDLE, S_T_DONE: begin
          if (test_mode && test_start) begin
            experiments <= '0;
            phase_q     <= 1'b1;
            test_done   <= 1'b0;
            test_result <= MIGHT_BE_FAULTY;
            if (max_experiments == '0) begin
              // No experiment allowed: nothing can clear the link.
              test_done   <= 1'b1;
              test_result <= FAULT_IS_PRESENT;
              state       <= S_T_DONE;
            end else begin
              first_read <= victim_mask ^ {DATA_W{1'b1}};  // cannot pass as correct
              rtr        <= 1'b1;
              state      <= S_T_WAIT;
            end
          end else if (!test_mode && !out_valid && !w_s) begin
            rtr   <= 1'b1;
            state <= S_F_WAIT;
          end
        end

        S_F_WAIT: begin
          if (test_mode && !w_s) begin
            // Mode switch: withdraw an unanswered request.
            rtr   <= 1'b0;
            state <= S_IDLE;
          end else if (w_s) begin
            out_data  <= d_s;
            out_valid <= 1'b1;
            rtr       <= 1'b0;
            state     <= S_F_RELEASE;
          end
        end

        S_F_RELEASE: begin
          if (!w_s) state <= S_IDLE;
        end

        S_T_WAIT: begin
          if (!w_s) begin
            first_read <= d_s;
          end else begin
            // d_s is the second read, first_read the one before it.
            if (ff_correct) begin
              test_result <= FAULT_IS_ABSENT;
            end else if (second_wrong) begin
              test_result <= FAULT_IS_PRESENT;
            end
            experiments <= experiments + 1'b1;
            rtr         <= 1'b0;
            state       <= S_T_RELEASE;
          end
        end

        S_T_RELEASE: begin
          if (!w_s) begin
            if (test_result != MIGHT_BE_FAULTY) begin
              test_done <= 1'b1;
              state     <= S_T_DONE;
            end else if (experiments >= max_experiments) begin
              test_result <= FAULT_IS_PRESENT;
              test_done   <= 1'b1;
              state       <= S_T_DONE;
            end else begin
              phase_q    <= ~phase_q;
              first_read <= expected;  // the word now on the lines: wrong for the next experiment
              rtr        <= 1'b1;
              state      <= S_T_WAIT;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: RTR is not raised while Write is still seen high.
  property p_rtr_rise;
    @(posedge clk) disable iff (!rst_n) $rose(rtr) |-> !$past(w_s);
  endproperty
  a_rtr_rise: assert property (p_rtr_rise);

endmodule
