// tb_gals_link_wires -- checks the wire delays of the link timing model:
// Write, RTR and every data line follow their input after exactly their
// configured delay, and the one slow line after its extra delay.
`timescale 1ns / 1ps
module tb_gals_link_wires;
  localparam int unsigned W = 8;

  logic         write_tx, write_rx, rtr_tx, rtr_rx;
  logic [W-1:0] data_tx, data_rx;
  int           checks = 0, failures = 0;

  gals_link_wires #(
    .DATA_W(W), .WRITE_DELAY_NS(2.0), .DATA_DELAY_NS(3.0), .RTR_DELAY_NS(4.0),
    .SLOW_LINE(5), .SLOW_EXTRA_NS(6.0)
  ) dut (.*);

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %h want %h", what, $time, got, want);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_tx = 0; rtr_rx = 0; data_tx = '0;
    #20;
    // t = 20: everything changes at once
    write_tx = 1; rtr_rx = 1; data_tx = 8'hFF;
    #1.5  expect_eq("write before delay", W'(write_rx), 0);
    #1.0  expect_eq("write after 2 ns", W'(write_rx), 1);        // t=22.5
    expect_eq("data before 3 ns", data_rx, 8'h00);
    #1.0  expect_eq("data after 3 ns (slow line still low)", data_rx, 8'hDF); // t=23.5
    expect_eq("rtr before 4 ns", W'(rtr_tx), 0);
    #1.0  expect_eq("rtr after 4 ns", W'(rtr_tx), 1);            // t=24.5
    #4.0  expect_eq("slow line before 9 ns", data_rx, 8'hDF);    // t=28.5
    #1.0  expect_eq("slow line after 9 ns", data_rx, 8'hFF);     // t=29.5
    // falling edges
    #10 write_tx = 0; data_tx = 8'h00;                            // t=39.5
    #2.5  expect_eq("write fall", W'(write_rx), 0);
    #1.0  expect_eq("data fall, slow line high", data_rx, 8'h20);
    #6.0  expect_eq("slow line fall", data_rx, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
