// tb_hirel_plain: the end-to-end scrubbing test of scrub_e2e.svh on the
// unmitigated build (TMR = 0): one control logic, one DMA with one frame
// buffer and one program BRAM. The scrubbing flow (patching walk, run scans,
// corrections, MBU report, UART reports, watchdog) must work exactly as in the
// hardened build; the upsets inside the scrubber are left out, since this
// build has no copy to outvote them (tb_seu_campaign measures that).
`define SCRUB_DUT_PARAMS #(.TMR(1'b0), .NUM_FRAMES(8), .CLK_HZ(8000), .BAUD(1000), .WDT_TIMEOUT(30000), .PROG_INIT("tb/prog_test.hex"))
module tb_hirel_plain;
  localparam bit TMR_T       = 1'b0;
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
