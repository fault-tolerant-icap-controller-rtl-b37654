// hirel_scrubber_top: high-reliability internal configuration scrubber.
//
// An SRAM FPGA keeps its configuration in memory cells that radiation can
// flip. This scrubber lives inside the FPGA it protects: it reads every
// configuration frame back through the ICAP, lets the hard Frame ECC block
// compute the frame's SECDED syndrome, flips the bit the syndrome points at
// and writes the frame back, with no external memory, controller or pins.
// Because the scrubber is itself built from configuration memory, it is
// hardened: the control logic and the ICAP DMA (with its frame buffer) are
// triplicated with feedback TMR, and the processor's program memory is kept
// in three copies that a dedicated BRAM scrubber keeps in agreement.
//
// Blocks and connections:
//   processor (3 domains, outside) --I/O bus--> scrub_ctrl --cmd/BRAM--> icap_dma --> ICAP
//   Frame ECC (outside) --syndrome--> scrub_ctrl
//   processor fetch addresses --> bram_scrubber --> voted instruction
//   processor I/O bus (voted) --> uart_tx (reports), watchdog_timer (kicks)
// The processor (an 8-bit PicoBlaze, three copies), the ICAP and the Frame ECC
// are device primitives or vendor cores and are brought out as ports.
//
// I/O map (ports in scrub_pkg): 0x00-0x17 control logic, 0x20/0x21 UART data
// and busy, 0x22/0x23 watchdog kick and expired. The status byte at 0x10
// carries the watchdog flag in bit 6. in_port is combinational from port_id.
//
// TMR = 0 builds the unmitigated scrubber with the same ports: one copy of the
// control logic and the DMA, one frame buffer and one program BRAM with no
// scrubber (2 BRAMs against 6 for the hardened build); only domain 0's inputs
// are used.
module hirel_scrubber_top
  import scrub_pkg::*;
#(
  parameter bit          TMR            = 1'b1,
  parameter int unsigned NUM_FRAMES     = 5960,
  parameter int unsigned DMA_BRAM_DEPTH = 512,
  parameter int unsigned PROG_DEPTH     = 1024,
  parameter string       PROG_INIT      = "",
  parameter int unsigned CLK_HZ         = 50_000_000,
  parameter int unsigned BAUD           = 115_200,
  parameter int unsigned WDT_TIMEOUT    = 1 << 25,
  localparam int unsigned PAW           = $clog2(PROG_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // processor domains: I/O bus
  input  logic [7:0]         pb_port_id      [3],
  input  logic [7:0]         pb_out_port     [3],
  input  logic               pb_write_strobe [3],
  output logic [7:0]         pb_in_port      [3],
  // processor domains: instruction fetch
  input  logic [PAW-1:0]     pb_address      [3],
  output logic [17:0]        pb_instruction,
  // ICAP primitive
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [WORD_W-1:0]  icap_i,
  input  logic [WORD_W-1:0]  icap_o,
  input  logic               icap_busy,
  // Frame ECC primitive
  input  logic               ecc_error,
  input  logic [SYN_W-1:0]   ecc_syndrome,
  input  logic               ecc_syndrome_valid,
  // monitoring
  output logic               uart_txd,
  output logic               wdt_expired,
  output logic [7:0]         wdt_timeouts,
  output logic [15:0]        prog_repairs
);
  localparam int unsigned DAW = $clog2(DMA_BRAM_DEPTH);

  // ---------------------------------------------------------------- control logic <-> DMA
  logic              cmd_valid [3];
  dma_cmd_e          cmd       [3];
  logic [FAR_W-1:0]  far       [3];
  logic              dma_busy  [3];
  logic              dma_done  [3];
  logic              b_we      [3];
  logic [DAW-1:0]    b_addr    [3];
  logic [WORD_W-1:0] b_wdata   [3];
  logic [WORD_W-1:0] b_rdata   [3];
  logic [7:0]        ctrl_in   [3];
  status_t           ctrl_st   [3];

  scrub_ctrl #(.TMR(TMR), .BRAM_DEPTH(DMA_BRAM_DEPTH)) u_ctrl (
    .clk, .rst,
    .port_id(pb_port_id), .out_port(pb_out_port), .write_strobe(pb_write_strobe),
    .in_port(ctrl_in), .status(ctrl_st),
    .ecc_error, .ecc_syndrome, .ecc_valid(ecc_syndrome_valid),
    .dma_cmd_valid(cmd_valid), .dma_cmd(cmd), .dma_far(far),
    .dma_busy, .dma_done,
    .b_we, .b_addr, .b_wdata, .b_rdata
  );

  icap_dma #(.TMR(TMR), .NUM_FRAMES(NUM_FRAMES), .BRAM_DEPTH(DMA_BRAM_DEPTH)) u_dma (
    .clk, .rst,
    .cmd_valid, .cmd, .cmd_far(far), .busy(dma_busy), .done(dma_done),
    .b_we, .b_addr, .b_wdata, .b_rdata,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy
  );

  // ---------------------------------------------------------------- program memory
  logic prog_repair, prog_pass;

  // Hardened build: three copies kept in agreement by the BRAM scrubber.
  // Plain build: one program BRAM fetched by domain 0, port B unused.
  if (TMR) begin : g_prog3
    bram_scrubber #(.DEPTH(PROG_DEPTH), .W(18), .INIT_FILE(PROG_INIT)) u_prog (
      .clk, .rst,
      .pb_address, .instruction(pb_instruction),
      .repair(prog_repair), .repair_count(prog_repairs), .pass_done(prog_pass)
    );
  end else begin : g_prog1
    logic [17:0] b_unused;
    prog_bram #(.DEPTH(PROG_DEPTH), .W(18), .INIT_FILE(PROG_INIT)) u_mem (
      .clk,
      .a_addr(pb_address[0]), .a_rdata(pb_instruction),
      .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata(b_unused)
    );
    assign prog_repair  = 1'b0;
    assign prog_pass    = 1'b0;
    assign prog_repairs = '0;
  end

  // ---------------------------------------------------------------- UART and watchdog
  // They are single copies, written through the vote of the three domains' buses.
  logic [16:0] bus_voted;
  logic        bus_mis;
  logic [7:0]  v_port, v_data;
  logic        v_wr;

  tmr_voter #(.W(17)) u_bus_vote (
    .a({pb_port_id[0], pb_out_port[0], pb_write_strobe[0]}),
    .b(TMR ? {pb_port_id[1], pb_out_port[1], pb_write_strobe[1]}
           : {pb_port_id[0], pb_out_port[0], pb_write_strobe[0]}),
    .c(TMR ? {pb_port_id[2], pb_out_port[2], pb_write_strobe[2]}
           : {pb_port_id[0], pb_out_port[0], pb_write_strobe[0]}),
    .y(bus_voted), .mismatch(bus_mis)
  );
  assign {v_port, v_data, v_wr} = bus_voted;

  logic uart_busy, wdt_timeout;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst, .data(v_data), .valid(v_wr && v_port == P_UART_TX),
    .busy(uart_busy), .tx(uart_txd)
  );

  watchdog_timer #(.TIMEOUT(WDT_TIMEOUT)) u_wdt (
    .clk, .rst, .kick(v_wr && v_port == P_WDT_KICK),
    .timeout(wdt_timeout), .expired(wdt_expired), .timeouts(wdt_timeouts)
  );

  // ---------------------------------------------------------------- read mux
  for (genvar i = 0; i < 3; i++) begin : g_in
    always_comb begin
      unique case (pb_port_id[i])
        P_UART_ST: pb_in_port[i] = {7'd0, uart_busy};
        P_WDT_ST:  pb_in_port[i] = {7'd0, wdt_expired};
        P_STATUS:  pb_in_port[i] = ctrl_in[i] | {1'b0, wdt_expired, 6'd0};
        default:   pb_in_port[i] = ctrl_in[i];
      endcase
    end
  end

  logic unused;
  assign unused = ^{bus_mis, prog_repair, prog_pass, wdt_timeout,
                    ctrl_st[0], ctrl_st[1], ctrl_st[2]};

endmodule
