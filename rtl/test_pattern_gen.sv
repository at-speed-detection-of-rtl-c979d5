// test_pattern_gen -- worst-case test word for the link delay test.
//
// Only one or a few data lines are tested at a time.  The lines under test
// (the victims, set in victim_mask) take the value `phase`, every other line
// (the aggressors) the opposite value.  The transmitter alternates phase from
// one experiment to the next, so at every experiment each victim switches in
// the direction opposite to all its neighbours, which is the crosstalk case
// that slows a victim line the most.  The choice of "victims against all
// aggressors" as the worst case is this design's reading of "appropriate
// test patterns"; the testing of one or a few lines at once follows the
// method.  Purely combinational; both link ends instantiate it, so the
// receiver knows the expected word without it crossing the link.
`timescale 1ns / 1ps
module test_pattern_gen #(
  parameter int unsigned DATA_W = gals_dft_pkg::DEFAULT_DATA_W
) (
  input  logic [DATA_W-1:0] victim_mask,
  input  logic              phase,
  output logic [DATA_W-1:0] pattern
);

  always_comb begin
    pattern = phase ? victim_mask : ~victim_mask;
  end

endmodule
