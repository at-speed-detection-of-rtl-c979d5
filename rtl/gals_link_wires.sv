// gals_link_wires -- behavioural model of the long wires between two GALS
// domains; not synthesizable logic (it is interconnect), only a timing model
// for simulation.
//
// Write and the Data bus run from the transmitting domain to the receiving
// one, Ready To Receive (RTR) back.  Each wire delays its signal by a fixed
// time.  One data line (SLOW_LINE, -1 for none) can be given an extra delay
// SLOW_EXTRA_NS: this is the delay fault the link test looks for, a data
// line arriving later than Write (crosstalk or process variation).  All
// delays are in ns; their defaults are this design's choice (the fault-free
// link).  The delays are inertial, as in a continuous assignment: a pulse
// shorter than the delay would be swallowed, which the four-phase handshake
// never produces.
`timescale 1ns / 1ps
module gals_link_wires #(
  parameter int unsigned DATA_W        = gals_dft_pkg::DEFAULT_DATA_W,
  parameter real         WRITE_DELAY_NS = 1.0,
  parameter real         DATA_DELAY_NS  = 1.0,
  parameter real         RTR_DELAY_NS   = 1.0,
  parameter int          SLOW_LINE      = -1,
  parameter real         SLOW_EXTRA_NS  = 0.0
) (
  // transmitter side
  input  logic              write_tx,
  input  logic [DATA_W-1:0] data_tx,
  output logic              rtr_tx,
  // receiver side
  output logic              write_rx,
  output logic [DATA_W-1:0] data_rx,
  input  logic              rtr_rx
);

  assign #(WRITE_DELAY_NS) write_rx = write_tx;
  assign #(RTR_DELAY_NS)   rtr_tx   = rtr_rx;

  for (genvar i = 0; i < DATA_W; i++) begin : g_line
    localparam real LINE_DELAY_NS = (i == SLOW_LINE) ? DATA_DELAY_NS + SLOW_EXTRA_NS
                                                     : DATA_DELAY_NS;
    assign #(LINE_DELAY_NS) data_rx[i] = data_tx[i];
  end

endmodule
