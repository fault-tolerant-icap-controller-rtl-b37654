// tb_hirel_full: the end-to-end scrubber test with every parameter of the
// design at its default: 5960 frames, 50 MHz clock, 115200 baud, 2^25-clock
// watchdog, empty program memory. The test body is in scrub_e2e.svh.
`define SCRUB_DUT_PARAMS
module tb_hirel_full;
  localparam bit TMR_T       = 1'b1;
  localparam int NF          = 5960;
  localparam int CLK_HZ_T    = 50_000_000;
  localparam int BAUD_T      = 115_200;
  localparam int WDT_T       = 1 << 25;
  `include "scrub_e2e.svh"

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
`undef SCRUB_DUT_PARAMS
