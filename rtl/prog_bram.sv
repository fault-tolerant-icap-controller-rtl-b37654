// prog_bram: one copy of the processor's program memory, a dual-port block RAM.
//
// The memory holds the precompiled scrubbing program of the 8-bit PicoBlaze
// (KCPSM3) controller: 1024 instructions of 18 bits. Port A is the
// processor's instruction fetch (read only). Port B belongs to the BRAM
// scrubber, which walks the memory and writes back any word that disagrees
// with the other two copies.
//
// Both ports are synchronous with one clock of read latency. The contents are
// loaded from INIT_FILE (hex, one word per line) when it is given; otherwise
// they start at zero.
module prog_bram #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned W         = 18,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: instruction fetch
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_rdata,
  // port B: scrubber read / write-back
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
