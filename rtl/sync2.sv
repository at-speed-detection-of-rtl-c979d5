// sync2 -- two-flop synchronizer for a single asynchronous control bit
// entering a clock domain.  The output follows the input two active clock
// edges later.  Reset value is 0.
`timescale 1ns / 1ps
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
