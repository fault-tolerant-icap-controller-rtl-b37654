// watchdog_timer: detects a processor that has stopped running its program.
//
// The scrubbing program restarts ("kicks") the timer regularly. If TIMEOUT
// clocks pass without a kick, timeout pulses for one clock, expired is set
// and stays set until reset, and the count starts again so that a processor
// that stays hung is reported again every TIMEOUT clocks. The number of
// expiries is counted in timeouts (saturating). This lets the test monitor
// tell a crashed scrubber from one that is merely busy.
//
// The document says only that watchdog timers identify a processor failure;
// the period, the sticky flag and the counter are this design's choices. The
// default period, 2^25 clocks (0.67 s at 50 MHz), is longer than the slowest
// full "walk" of the device the document quotes (278 ms).
module watchdog_timer #(
  parameter int unsigned TIMEOUT = 1 << 25,
  localparam int unsigned CW     = $clog2(TIMEOUT + 1)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       kick,
  output logic       timeout,
  output logic       expired,
  output logic [7:0] timeouts
);
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      expired  <= 1'b0;
      timeouts <= '0;
    end else if (kick) begin
      count <= '0;
    end else if (count == CW'(TIMEOUT - 1)) begin
      count   <= '0;
      expired <= 1'b1;
      if (timeouts != 8'hFF) timeouts <= timeouts + 8'd1;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign timeout = !rst && !kick && (count == CW'(TIMEOUT - 1));
endmodule
