// dma_bram: the ICAP DMA's frame buffer, a true dual-port block RAM.
//
// Port A belongs to the ICAP DMA: it stores the words read back from the
// configuration memory and supplies the words of a frame being written back.
// Port B belongs to the control logic, through which the processor inspects a
// frame and patches the bit that the Frame ECC syndrome points at.
//
// Both ports are synchronous: a read returns the word one clock after the
// address is presented (read-before-write when the same port writes). If both
// ports write one address in the same cycle, port B wins. The contents start
// at zero. DEPTH 512 x 32 bits is one 18-kbit block RAM, of which a 41-word
// frame uses the bottom.
module dma_bram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A (DMA side)
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B (control logic side)
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
