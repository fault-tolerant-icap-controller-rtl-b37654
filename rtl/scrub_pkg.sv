// scrub_pkg: types and constants shared by the internal configuration scrubber.
//
// The scrubber reads configuration frames back through the ICAP (internal
// configuration access port), checks them with the device's Frame ECC block,
// repairs single-bit upsets and writes the frame back. This package holds:
//   * the frame geometry (words per frame, ECC syndrome width),
//   * the command codes the processor gives the ICAP DMA,
//   * the I/O port map the processor uses to reach the control logic,
//     the UART and the watchdog timer,
//   * the configuration packet words the DMA sends to the ICAP.
//
// The frame geometry and packet words follow the Virtex-4 configuration
// interface, the device family the scrubber was built for; the port map and
// command codes are this design's own choices.
package scrub_pkg;

  // ---------------------------------------------------------------- frame
  // A Virtex-4 frame is 41 words of 32 bits; the Frame ECC syndrome is 12 bits
  // (11 bits of Hamming position plus one overall parity bit).
  localparam int unsigned FRAME_WORDS = 41;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned SYN_W       = 12;
  localparam int unsigned FAR_W       = 32;

  // ---------------------------------------------------------------- DMA commands
  typedef enum logic [2:0] {
    DMA_NOP   = 3'd0,
    DMA_READ  = 3'd1,  // read one frame (at FAR) into the DMA BRAM ("walk" step)
    DMA_WRITE = 3'd2,  // write the DMA BRAM contents to the frame at FAR
    DMA_RUN   = 3'd3,  // read all frames in one stream, flag any ECC error ("run")
    DMA_CLEAR = 3'd4   // clear the sticky error flags in the control logic
  } dma_cmd_e;

  // ---------------------------------------------------------------- I/O port map
  // PicoBlaze-style 8-bit I/O: OUTPUT writes out_port to port_id, INPUT reads
  // in_port selected by port_id.
  localparam logic [7:0] P_FAR0     = 8'h00;  // W: FAR byte 0 (LSB) .. byte 3
  localparam logic [7:0] P_FAR3     = 8'h03;
  localparam logic [7:0] P_CMD      = 8'h04;  // W: DMA command (dma_cmd_e)
  localparam logic [7:0] P_ADDR     = 8'h05;  // W: DMA BRAM word address
  localparam logic [7:0] P_WDATA0   = 8'h08;  // W: BRAM write data byte 0 .. 3
  localparam logic [7:0] P_WDATA3   = 8'h0B;  //    writing byte 3 stores the word
  localparam logic [7:0] P_STATUS   = 8'h10;  // R: status byte (status_t)
  localparam logic [7:0] P_SYN_LO   = 8'h11;  // R: last syndrome [7:0]
  localparam logic [7:0] P_SYN_HI   = 8'h12;  // R: last syndrome [11:8]
  localparam logic [7:0] P_RDATA0   = 8'h14;  // R: BRAM read data byte 0 .. 3
  localparam logic [7:0] P_RDATA3   = 8'h17;
  localparam logic [7:0] P_UART_TX  = 8'h20;  // W: byte to send to the host PC
  localparam logic [7:0] P_UART_ST  = 8'h21;  // R: bit 0 = UART busy
  localparam logic [7:0] P_WDT_KICK = 8'h22;  // W: restart the watchdog timer
  localparam logic [7:0] P_WDT_ST   = 8'h23;  // R: bit 0 = watchdog has expired

  typedef struct packed {
    logic       reserved;
    logic       wdt_expired; // filled in by the top-level I/O decode
    logic       run_error;   // a "run" scan saw an ECC error somewhere
    logic       mbu;         // last frame: uncorrectable (even number of bit errors)
    logic       ecc_error;   // last frame: Frame ECC reported an error
    logic       syn_valid;   // a syndrome has been captured since the last command
    logic       done;        // last DMA command finished
    logic       busy;        // DMA command in progress
  } status_t;

  // ---------------------------------------------------------------- ICAP packets
  localparam logic [31:0] PKT_DUMMY     = 32'hFFFF_FFFF;
  localparam logic [31:0] PKT_SYNC      = 32'hAA99_5566;
  localparam logic [31:0] PKT_NOOP      = 32'h2000_0000;
  localparam logic [31:0] PKT_WR_CMD    = 32'h3000_8001; // type 1 write CMD, 1 word
  localparam logic [31:0] PKT_WR_FAR    = 32'h3000_2001; // type 1 write FAR, 1 word
  localparam logic [31:0] PKT_WR_FDRI   = 32'h3000_4000; // type 1 write FDRI, count in type 2
  localparam logic [31:0] PKT_RD_FDRO   = 32'h2800_6000; // type 1 read FDRO, count in type 2
  localparam logic [31:0] PKT_T2_WR     = 32'h5000_0000; // type 2 write, [26:0] word count
  localparam logic [31:0] PKT_T2_RD     = 32'h4800_0000; // type 2 read,  [26:0] word count
  localparam logic [31:0] CMD_WCFG      = 32'h0000_0001;
  localparam logic [31:0] CMD_RCFG      = 32'h0000_0004;
  localparam logic [31:0] CMD_DESYNC    = 32'h0000_000D;

  // 2-of-3 bitwise majority.
  function automatic logic [WORD_W-1:0] maj3(input logic [WORD_W-1:0] a,
                                             input logic [WORD_W-1:0] b,
                                             input logic [WORD_W-1:0] c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
