// uart_tx: serial transmitter that sends the scrubber's reports to a host PC.
//
// Each byte written with valid is sent as one start bit (0), eight data bits
// least significant first, and one stop bit (1), each bit lasting
// CLK_HZ / BAUD clocks (rounded). busy is high from the clock after valid
// until the stop bit has ended; a valid while busy is ignored. The line
// idles high.
//
// The document names an RS-232 port and a UART that sends upset data and
// status to a PC; the 8N1 format and 115200 baud are this design's choice,
// and the 50 MHz default clock is the rate the document's test ran at.
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  localparam int unsigned DIV   = (CLK_HZ + BAUD / 2) / BAUD,
  localparam int unsigned DW    = $clog2(DIV + 1)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       busy,
  output logic       tx
);
  logic [9:0]    shreg;   // {stop, data[7:0], start}, sent from bit 0
  logic [3:0]    nbits;   // bits left to send
  logic [DW-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '1;
      nbits <= '0;
      tick  <= '0;
      tx    <= 1'b1;
    end else if (nbits == 0) begin
      tx <= 1'b1;
      if (valid) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        tick  <= '0;
      end
    end else begin
      tx <= shreg[0];
      if (tick == DW'(DIV - 1)) begin
        tick  <= '0;
        shreg <= {1'b1, shreg[9:1]};
        nbits <= nbits - 4'd1;
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end

  assign busy = (nbits != 0);
endmodule
