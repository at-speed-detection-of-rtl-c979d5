// gals_dft_pkg -- types shared by the two ends of a handshake link between
// two GALS (globally asynchronous, locally synchronous) clock domains and by
// the delay-fault test that runs across it.
//
// test_result_e holds the three verdicts of the receiver's test: a test
// starts as MIGHT_BE_FAULTY and ends as FAULT_IS_ABSENT or FAULT_IS_PRESENT.
// The encoding (0, 1, 2) is this design's choice.
`timescale 1ns / 1ps
package gals_dft_pkg;

  typedef enum logic [1:0] {
    MIGHT_BE_FAULTY  = 2'd0,
    FAULT_IS_ABSENT  = 2'd1,
    FAULT_IS_PRESENT = 2'd2
  } test_result_e;

  // Default width of the data bus and of the experiment counter.  The data
  // width is this design's choice; 12 counter bits hold the largest give-up
  // limit of the published analysis (2244 experiments).
  localparam int unsigned DEFAULT_DATA_W = 32;
  localparam int unsigned DEFAULT_CNT_W  = 12;

endpackage
