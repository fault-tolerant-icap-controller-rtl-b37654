// tb_hirel_scrubber_top: end-to-end test of the hardened scrubber on a small
// device (8 frames), a fast UART (8 clocks per bit) and a short watchdog
// period. The test body is in scrub_e2e.svh.
`define SCRUB_DUT_PARAMS #(.NUM_FRAMES(8), .CLK_HZ(8000), .BAUD(1000), .WDT_TIMEOUT(30000), .PROG_INIT("tb/prog_test.hex"))
module tb_hirel_scrubber_top;
  localparam bit TMR_T       = 1'b1;
  localparam int NF          = 8;
  localparam int CLK_HZ_T    = 8000;
  localparam int BAUD_T      = 1000;
  localparam int WDT_T       = 30000;
  `include "scrub_e2e.svh"

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
`undef SCRUB_DUT_PARAMS
