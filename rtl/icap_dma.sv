// icap_dma: streams configuration frames between the ICAP and a frame buffer.
//
// The DMA turns one command from the control logic into a complete ICAP
// transaction, so that the ICAP gets a word on every clock cycle and the slow
// 8-bit processor never has to feed it:
//   DMA_READ  - read back the frame at FAR into the DMA BRAM (one "walk" step);
//   DMA_WRITE - write the 41 words in the DMA BRAM to the frame at FAR;
//   DMA_RUN   - read back all NUM_FRAMES frames from address 0 in a single
//               stream without storing them. The Frame ECC block checks every
//               frame as it passes; this is the fast "run" scan.
// Each transaction is: a 10-word header (dummy, sync word, command RCFG or
// WCFG, FAR, FDRO/FDRI packet with a type-2 word count), then the data words
// (written one per clock from the BRAM, or captured whenever the ICAP drops
// BUSY), then a 3-word trailer that desynchronises the port. The R/W line
// changes only in a clock where CE is high: the DMA deselects the ICAP for one
// clock when it turns from writing to reading and back.
//
// Fault tolerance: with TMR = 1 the DMA is triplicated. Each of the three
// domains has its own command inputs, its own copy of the DMA BRAM and its own
// next-state logic; the state registers use feedback TMR (tmr_state), and the
// three domains' ICAP inputs are voted into the single ICAP primitive. With
// TMR = 0 there is one state register and one DMA BRAM, and only domain 0's
// inputs are used.
//
// Timing: a command is taken in the clock cycle cmd_valid is high while busy is
// low. busy rises the next cycle; done is high for one cycle at the end.
// A frame write occupies the ICAP for 10 + FRAME_WORDS + 1 + 3 clocks.
//
// The command set, packet format and word counts are this design's reading of
// the Virtex-4 configuration interface; the document gives the DMA's job
// (feed the ICAP every cycle, store its output in the DMA BRAM, pass the BRAM
// to the control logic), not its insides.
module icap_dma
  import scrub_pkg::*;
#(
  parameter bit          TMR        = 1'b1,
  parameter int unsigned NUM_FRAMES = 5960,
  parameter int unsigned BRAM_DEPTH = 512,
  localparam int unsigned AW        = $clog2(BRAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // per-domain command interface (from the control logic)
  input  logic              cmd_valid [3],
  input  dma_cmd_e          cmd       [3],
  input  logic [FAR_W-1:0]  cmd_far      [3],
  output logic              busy      [3],
  output logic              done      [3],
  // per-domain BRAM port B (to the control logic)
  input  logic              b_we      [3],
  input  logic [AW-1:0]     b_addr    [3],
  input  logic [WORD_W-1:0] b_wdata   [3],
  output logic [WORD_W-1:0] b_rdata   [3],
  // ICAP primitive
  output logic              icap_ce_n,
  output logic              icap_write_n,
  output logic [WORD_W-1:0] icap_i,
  input  logic [WORD_W-1:0] icap_o,
  input  logic              icap_busy
);
  localparam int unsigned RUN_WORDS = NUM_FRAMES * FRAME_WORDS;
  localparam int unsigned CNT_W     = $clog2(RUN_WORDS + 1);
  localparam int unsigned HDR_LEN   = 10;
  localparam int unsigned TAIL_LEN  = 3;

  typedef enum logic [2:0] {
    S_IDLE, S_HDR, S_WDATA, S_RSW, S_RDATA, S_TSW, S_TAIL, S_DONE
  } dstate_e;

  typedef enum logic [1:0] { OP_READ, OP_WRITE, OP_RUN } op_e;

  typedef struct packed {
    dstate_e          st;
    op_e              op;
    logic [3:0]       idx;
    logic [CNT_W-1:0] cnt;
    logic [FAR_W-1:0] far_addr;
  } dma_state_t;

  localparam int unsigned SW = $bits(dma_state_t);
  localparam dma_state_t RST_STATE = '{st: S_IDLE, op: OP_READ, idx: '0, cnt: '0, far_addr: '0};

  logic [SW-1:0] d_vec [3];
  logic [SW-1:0] q_vec [3];

  tmr_state #(.W(SW), .TMR(TMR), .RST_VAL(RST_STATE)) u_state (
    .clk, .rst, .d(d_vec), .q(q_vec)
  );

  // Word count of the data phase for an operation.
  function automatic logic [CNT_W-1:0] op_words(input op_e op);
    return (op == OP_RUN) ? CNT_W'(RUN_WORDS) : CNT_W'(FRAME_WORDS);
  endfunction

  // Header word idx of an operation.
  function automatic logic [WORD_W-1:0] hdr_word(input op_e op, input logic [3:0] idx,
                                                 input logic [FAR_W-1:0] f);
    logic [WORD_W-1:0] wc;
    wc = WORD_W'(op_words(op));
    if (op == OP_WRITE) begin
      unique case (idx)
        4'd0: return PKT_DUMMY;
        4'd1: return PKT_SYNC;
        4'd2: return PKT_NOOP;
        4'd3: return PKT_WR_CMD;
        4'd4: return CMD_WCFG;
        4'd5: return PKT_WR_FAR;
        4'd6: return f;
        4'd7: return PKT_NOOP;
        4'd8: return PKT_WR_FDRI;
        default: return PKT_T2_WR | wc;
      endcase
    end else begin
      unique case (idx)
        4'd0: return PKT_DUMMY;
        4'd1: return PKT_SYNC;
        4'd2: return PKT_NOOP;
        4'd3: return PKT_WR_CMD;
        4'd4: return CMD_RCFG;
        4'd5: return PKT_WR_FAR;
        4'd6: return f;
        4'd7: return PKT_RD_FDRO;
        4'd8: return PKT_T2_RD | wc;
        default: return PKT_NOOP;
      endcase
    end
  endfunction

  function automatic logic [WORD_W-1:0] tail_word(input logic [3:0] idx);
    unique case (idx)
      4'd0:    return PKT_WR_CMD;
      4'd1:    return CMD_DESYNC;
      default: return PKT_NOOP;
    endcase
  endfunction

  // ICAP-side outputs of each domain, voted below: {ce_n, write_n, data}
  localparam int unsigned IW = WORD_W + 2;
  logic [IW-1:0] icap_vec [3];
  logic [WORD_W-1:0] a_rd0, b_rd0;   // domain 0's frame buffer read data

  for (genvar i = 0; i < 3; i++) begin : g_dom
    dma_state_t s, n;
    logic          a_we;
    logic [AW-1:0] a_addr;
    logic [WORD_W-1:0] a_wdata, a_rdata;
    logic          ce_n, write_n;
    logic [WORD_W-1:0] data;

    assign s = dma_state_t'(q_vec[i]);

    always_comb begin
      n       = s;
      a_we    = 1'b0;
      a_addr  = AW'(s.cnt);
      a_wdata = icap_o;
      ce_n    = 1'b1;
      write_n = 1'b0;
      data    = PKT_NOOP;
      unique case (s.st)
        S_IDLE: begin
          if (cmd_valid[i]) begin
            n.idx = '0;
            n.cnt = '0;
            n.far_addr = cmd_far[i];
            unique case (cmd[i])
              DMA_READ:  begin n.st = S_HDR; n.op = OP_READ;  end
              DMA_WRITE: begin n.st = S_HDR; n.op = OP_WRITE; end
              DMA_RUN:   begin n.st = S_HDR; n.op = OP_RUN; n.far_addr = '0; end
              default:   ;
            endcase
          end
        end
        S_HDR: begin
          ce_n = 1'b0;
          data = hdr_word(s.op, s.idx, s.far_addr);
          a_addr = '0;               // prefetch word 0 for a write
          n.idx = s.idx + 4'd1;
          if (s.idx == 4'(HDR_LEN - 1)) begin
            n.idx = '0;
            n.st  = (s.op == OP_WRITE) ? S_WDATA : S_RSW;
          end
        end
        S_WDATA: begin
          ce_n   = 1'b0;
          data   = a_rdata;          // word s.cnt, addressed last cycle
          a_addr = AW'(s.cnt + 1'b1);
          n.cnt  = s.cnt + 1'b1;
          if (s.cnt == op_words(s.op) - 1'b1) begin
            n.cnt = '0;
            n.st  = S_TSW;
          end
        end
        S_RSW: begin                 // deselect before switching to read
          write_n = 1'b1;
          n.st    = S_RDATA;
        end
        S_RDATA: begin
          ce_n    = 1'b0;
          write_n = 1'b1;
          if (!icap_busy) begin
            a_we  = (s.op == OP_READ);
            n.cnt = s.cnt + 1'b1;
            if (s.cnt == op_words(s.op) - 1'b1) begin
              n.cnt = '0;
              n.st  = S_TSW;
            end
          end
        end
        S_TSW: begin                 // deselect, back to write for the trailer
          n.st    = S_TAIL;
        end
        S_TAIL: begin
          ce_n  = 1'b0;
          data  = tail_word(s.idx);
          n.idx = s.idx + 4'd1;
          if (s.idx == 4'(TAIL_LEN - 1)) begin
            n.idx = '0;
            n.st  = S_DONE;
          end
        end
        S_DONE:  n.st = S_IDLE;
        default: n.st = S_IDLE;
      endcase
    end

    assign d_vec[i]    = SW'(n);
    assign busy[i]     = (s.st != S_IDLE);
    assign done[i]     = (s.st == S_DONE);
    assign icap_vec[i] = {ce_n, write_n, data};

    // Hardened build: one frame buffer per domain. Plain build: only domain 0
    // has one, and the other (unused) domains see its read data.
    logic [WORD_W-1:0] b_rd;
    if (TMR || i == 0) begin : g_mem
      dma_bram #(.DEPTH(BRAM_DEPTH), .W(WORD_W)) u_bram (
        .clk,
        .a_we, .a_addr, .a_wdata, .a_rdata,
        .b_we(b_we[i]), .b_addr(b_addr[i]), .b_wdata(b_wdata[i]), .b_rdata(b_rd)
      );
    end else begin : g_share
      assign a_rdata = a_rd0;
      assign b_rd    = b_rd0;
    end
    if (i == 0) begin : g_first
      assign a_rd0 = a_rdata;
      assign b_rd0 = b_rd;
    end
    assign b_rdata[i] = b_rd;
  end

  logic [IW-1:0] icap_voted;
  logic          icap_mismatch;

  tmr_voter #(.W(IW)) u_icap_vote (
    .a(icap_vec[0]),
    .b(TMR ? icap_vec[1] : icap_vec[0]),
    .c(TMR ? icap_vec[2] : icap_vec[0]),
    .y(icap_voted), .mismatch(icap_mismatch)
  );

  assign {icap_ce_n, icap_write_n, icap_i} = icap_voted;

  // ICAP rule: R/W changes only in a clock where the port is deselected.
  a_rw_deselected: assert property (@(posedge clk) disable iff (rst)
      (icap_write_n != $past(icap_write_n)) |-> icap_ce_n)
    else $error("icap_dma: R/W changed while CE was asserted");

endmodule
