// gals_link_top -- two GALS domains joined by a handshake link, with the
// at-speed delay-fault test of that link.
//
// Domain A (clk_a) holds the transmitting end (link_tx), domain B (clk_b)
// the receiving end with the tester (link_rx_tester).  They are joined by
// the Write, Data and Ready To Receive wires (gals_link_wires, a timing model
// whose delays are parameters of this top; a data line slower than Write is
// the fault under test).  The two clocks are inputs: each domain's own clock
// generator is outside this design.  Each domain has its own reset and its
// own test controls, as would come from that domain's test access; a test is
// run by giving link_tx a test_start pulse (putting the setup word on the
// lines), then link_rx_tester a test_start pulse with the same victim_mask,
// and waiting for b_test_done.  With both test_mode inputs low the link
// carries words from a_in_* to b_out_*.
`timescale 1ns / 1ps
module gals_link_top
  import gals_dft_pkg::*;
#(
  parameter int unsigned DATA_W         = DEFAULT_DATA_W,
  parameter int unsigned CNT_W          = DEFAULT_CNT_W,
  parameter int unsigned SETUP_CYCLES   = 1,
  parameter real         WRITE_DELAY_NS = 1.0,
  parameter real         DATA_DELAY_NS  = 1.0,
  parameter real         RTR_DELAY_NS   = 1.0,
  parameter int          SLOW_LINE      = -1,
  parameter real         SLOW_EXTRA_NS  = 0.0
) (
  // domain A: transmitter
  input  logic              clk_a,
  input  logic              rst_a_n,
  input  logic              a_test_mode,
  input  logic              a_test_start,
  input  logic [DATA_W-1:0] a_victim_mask,
  input  logic              a_in_valid,
  input  logic [DATA_W-1:0] a_in_data,
  output logic              a_in_ready,
  output logic              a_busy,
  // domain B: receiver and tester
  input  logic              clk_b,
  input  logic              rst_b_n,
  input  logic              b_test_mode,
  input  logic              b_test_start,
  input  logic [DATA_W-1:0] b_victim_mask,
  input  logic [CNT_W-1:0]  b_max_experiments,
  output logic              b_test_done,
  output test_result_e      b_test_result,
  output logic [CNT_W-1:0]  b_experiments,
  output logic              b_out_valid,
  output logic [DATA_W-1:0] b_out_data,
  input  logic              b_out_ready
);

  logic              write_tx, write_rx, rtr_tx, rtr_rx;
  logic [DATA_W-1:0] data_tx, data_rx;

  link_tx #(.DATA_W(DATA_W), .SETUP_CYCLES(SETUP_CYCLES)) u_tx (
    .clk        (clk_a),
    .rst_n      (rst_a_n),
    .test_mode  (a_test_mode),
    .test_start (a_test_start),
    .victim_mask(a_victim_mask),
    .in_valid   (a_in_valid),
    .in_data    (a_in_data),
    .in_ready   (a_in_ready),
    .rtr        (rtr_tx),
    .write      (write_tx),
    .data       (data_tx),
    .busy       (a_busy)
  );

  gals_link_wires #(
    .DATA_W        (DATA_W),
    .WRITE_DELAY_NS(WRITE_DELAY_NS),
    .DATA_DELAY_NS (DATA_DELAY_NS),
    .RTR_DELAY_NS  (RTR_DELAY_NS),
    .SLOW_LINE     (SLOW_LINE),
    .SLOW_EXTRA_NS (SLOW_EXTRA_NS)
  ) u_wires (
    .write_tx(write_tx),
    .data_tx (data_tx),
    .rtr_tx  (rtr_tx),
    .write_rx(write_rx),
    .data_rx (data_rx),
    .rtr_rx  (rtr_rx)
  );

  link_rx_tester #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_rx (
    .clk            (clk_b),
    .rst_n          (rst_b_n),
    .test_mode      (b_test_mode),
    .test_start     (b_test_start),
    .victim_mask    (b_victim_mask),
    .max_experiments(b_max_experiments),
    .test_done      (b_test_done),
    .test_result    (b_test_result),
    .experiments    (b_experiments),
    .out_valid      (b_out_valid),
    .out_data       (b_out_data),
    .out_ready      (b_out_ready),
    .write          (write_rx),
    .data           (data_rx),
    .rtr            (rtr_rx)
  );

endmodule
