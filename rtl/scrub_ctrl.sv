// scrub_ctrl: control logic between the 8-bit processor and the ICAP DMA.
//
// The processor runs the scrubbing program and sees the hardware only through
// 8-bit I/O ports (PicoBlaze OUTPUT/INPUT: port_id, out_port, write_strobe,
// in_port). This block turns those byte accesses into what the DMA and the
// Frame ECC need, and keeps the timing the processor cannot:
//   * assembles the 32-bit frame address (FAR) from four byte writes;
//   * issues DMA commands (read frame, write frame, run scan) and holds a
//     command until the DMA is free to take it;
//   * gives byte access to the 32-bit words of the DMA BRAM (an address port,
//     four read-data ports, and four write-data ports where the write of the
//     top byte stores the word), so the processor can flip the upset bit;
//   * captures the Frame ECC result when its syndrome-valid strobe fires, which
//     the processor could miss, and keeps sticky flags: ecc_error and mbu for
//     the last frame read, run_error for any frame of a run scan.
// Port numbers are in scrub_pkg. in_port is combinational from port_id; the
// BRAM read ports show the word at the address written at least two clocks
// earlier (a PicoBlaze INPUT that follows an OUTPUT always meets this).
//
// An uncorrectable (multi-bit) upset is flagged as mbu when the syndrome's
// overall-parity bit (bit 11) is clear but the position bits are not: an even
// number of flipped bits, which single-error-correct / double-error-detect
// coding can see but not locate.
//
// Fault tolerance: with TMR = 1 the block is triplicated, one copy per
// processor domain, each with its own bus and DMA interface. The registers use
// feedback TMR (tmr_state). The register map, the command hand-off and the
// flag set are this design's choices; the document gives the block's purpose.
module scrub_ctrl
  import scrub_pkg::*;
#(
  parameter bit          TMR        = 1'b1,
  parameter int unsigned BRAM_DEPTH = 512,
  localparam int unsigned AW        = $clog2(BRAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // processor I/O bus, one per domain
  input  logic [7:0]        port_id      [3],
  input  logic [7:0]        out_port     [3],
  input  logic              write_strobe [3],
  output logic [7:0]        in_port      [3],
  output status_t           status       [3],
  // Frame ECC primitive (shared)
  input  logic              ecc_error,
  input  logic [SYN_W-1:0]  ecc_syndrome,
  input  logic              ecc_valid,
  // ICAP DMA, one per domain
  output logic              dma_cmd_valid [3],
  output dma_cmd_e          dma_cmd       [3],
  output logic [FAR_W-1:0]  dma_far       [3],
  input  logic              dma_busy      [3],
  input  logic              dma_done      [3],
  output logic              b_we          [3],
  output logic [AW-1:0]     b_addr        [3],
  output logic [WORD_W-1:0] b_wdata       [3],
  input  logic [WORD_W-1:0] b_rdata       [3]
);
  typedef struct packed {
    logic [FAR_W-1:0] far_addr;
    logic [AW-1:0]    addr;
    logic [23:0]      wdata;      // bytes 0..2 of the next BRAM write
    logic [SYN_W-1:0] syndrome;
    logic             pend;       // command waiting for the DMA
    dma_cmd_e         cmd;
    logic             run_op;     // the last command was a run scan
    logic             syn_valid;
    logic             ecc_err;
    logic             mbu;
    logic             run_err;
    logic             done;
  } ctrl_state_t;

  localparam int unsigned SW = $bits(ctrl_state_t);

  logic [SW-1:0] d_vec [3];
  logic [SW-1:0] q_vec [3];

  tmr_state #(.W(SW), .TMR(TMR), .RST_VAL('0)) u_state (
    .clk, .rst, .d(d_vec), .q(q_vec)
  );

  for (genvar i = 0; i < 3; i++) begin : g_dom
    ctrl_state_t s, n;
    logic        wr;
    status_t     st;

    assign s  = ctrl_state_t'(q_vec[i]);
    assign wr = write_strobe[i];

    always_comb begin
      n = s;
      // processor writes
      if (wr) begin
        unique case (port_id[i])
          8'h00: n.far_addr[7:0]   = out_port[i];
          8'h01: n.far_addr[15:8]  = out_port[i];
          8'h02: n.far_addr[23:16] = out_port[i];
          8'h03: n.far_addr[31:24] = out_port[i];
          P_ADDR:   n.addr = AW'(out_port[i]);
          8'h08: n.wdata[7:0]   = out_port[i];
          8'h09: n.wdata[15:8]  = out_port[i];
          8'h0A: n.wdata[23:16] = out_port[i];
          P_CMD: begin
            if (dma_cmd_e'(out_port[i][2:0]) == DMA_CLEAR) begin
              n.syn_valid = 1'b0; n.ecc_err = 1'b0; n.mbu = 1'b0;
              n.run_err   = 1'b0; n.done    = 1'b0;
            end else if (out_port[i][2:0] != 3'd0) begin
              n.pend      = 1'b1;
              n.cmd       = dma_cmd_e'(out_port[i][2:0]);
              n.run_op    = (dma_cmd_e'(out_port[i][2:0]) == DMA_RUN);
              n.syn_valid = 1'b0; n.ecc_err = 1'b0; n.mbu = 1'b0; n.done = 1'b0;
              if (dma_cmd_e'(out_port[i][2:0]) == DMA_RUN) n.run_err = 1'b0;
            end
          end
          default: ;
        endcase
      end
      // the DMA takes a pending command in a cycle where it is idle
      if (s.pend && !dma_busy[i]) n.pend = 1'b0;
      if (dma_done[i]) n.done = 1'b1;
      // Frame ECC capture
      if (ecc_valid) begin
        if (s.run_op) begin
          if (ecc_error) begin
            n.run_err  = 1'b1;
            n.syndrome = ecc_syndrome;
          end
        end else begin
          n.syn_valid = 1'b1;
          n.syndrome  = ecc_syndrome;
          n.ecc_err   = ecc_error;
          n.mbu       = ecc_error && !ecc_syndrome[SYN_W-1] && (ecc_syndrome[SYN_W-2:0] != '0);
        end
      end
    end

    assign d_vec[i] = SW'(n);

    always_comb begin
      st = '0;
      st.busy      = s.pend || dma_busy[i];
      st.done      = s.done;
      st.syn_valid = s.syn_valid;
      st.ecc_error = s.ecc_err;
      st.mbu       = s.mbu;
      st.run_error = s.run_err;
    end
    assign status[i] = st;

    // processor reads
    always_comb begin
      unique case (port_id[i])
        P_STATUS: in_port[i] = st;
        P_SYN_LO: in_port[i] = s.syndrome[7:0];
        P_SYN_HI: in_port[i] = 8'(s.syndrome[SYN_W-1:8]);
        8'h14:    in_port[i] = b_rdata[i][7:0];
        8'h15:    in_port[i] = b_rdata[i][15:8];
        8'h16:    in_port[i] = b_rdata[i][23:16];
        8'h17:    in_port[i] = b_rdata[i][31:24];
        default:  in_port[i] = 8'h00;
      endcase
    end

    // DMA side
    assign dma_cmd_valid[i] = s.pend;
    assign dma_cmd[i]       = s.cmd;
    assign dma_far[i]       = s.far_addr;
    assign b_addr[i]        = s.addr;
    assign b_we[i]          = wr && (port_id[i] == P_WDATA3);
    assign b_wdata[i]       = {out_port[i], s.wdata};

    // command hand-off: held while the DMA is busy, dropped once it is taken
    a_cmd_held: assert property (@(posedge clk) disable iff (rst)
        dma_cmd_valid[i] && dma_busy[i] |=> dma_cmd_valid[i])
      else $error("scrub_ctrl: DMA command withdrawn before it was taken");
    a_cmd_once: assert property (@(posedge clk) disable iff (rst)
        dma_cmd_valid[i] && !dma_busy[i] && !wr |=> !dma_cmd_valid[i])
      else $error("scrub_ctrl: DMA command offered again after it was taken");
  end

endmodule
