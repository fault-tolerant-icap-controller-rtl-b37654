// icap_model: behavioural model of the ICAP port, the configuration memory
// behind it and the Frame ECC block that watches its readback data.
// Testbench only; not synthesizable logic.
//
// Configuration memory: NUM_FRAMES frames of 41 x 32-bit words, frame f at
// cfg[f*41 +: 41]. The frame code is a SECDED code over the 1312 bits: bit p
// (p = word*32 + bit) has position code p+1 for p < 1311, and bit 1311 is the
// overall parity bit. The 12-bit syndrome is {overall parity, XOR of the
// position codes of all set bits}; a clean frame has syndrome 0, a single
// upset at p gives {1, p+1} (or {1, 0} for p = 1311), two upsets give
// {0, nonzero}. The check bits sit at p = 2^k - 1 (k = 0..10) plus p = 1311;
// init_frame() fills a frame with random data and sets them.
//
// ICAP: written words (CE low, R/W low) are parsed as configuration packets:
// sync word, type-1 writes to CMD / FAR, FDRI and FDRO with the word count in
// a following type-2 packet, DESYNC. A type-2 FDRI write stores the next
// words into frames from FAR on. A type-2 FDRO read makes the port return
// that many words while CE is low and R/W high: O and BUSY are registered;
// a change of R/W in a clock where CE is low is counted in rw_errors;
// BUSY is low in a clock where O holds a readback word. RD_LAT clocks pass
// before the first word, and every STALL_EVERY-th word is held back for a
// clock (0 = never) to exercise BUSY.
//
// Frame ECC: for each 41 readback words the model pulses syndrome_valid in the
// clock in which the last word is on O, with syndrome and error (syndrome != 0).
module icap_model
  import scrub_pkg::*;
#(
  parameter int unsigned NUM_FRAMES  = 8,
  parameter int unsigned RD_LAT      = 3,
  parameter int unsigned STALL_EVERY = 0
) (
  input  logic              clk,
  input  logic              ce_n,
  input  logic              write_n,
  input  logic [WORD_W-1:0] i_data,
  output logic [WORD_W-1:0] o_data,
  output logic              busy,
  output logic              ecc_error,
  output logic [SYN_W-1:0]  ecc_syndrome,
  output logic              ecc_valid
);
  localparam int unsigned FW = FRAME_WORDS;

  logic [31:0] cfg [NUM_FRAMES * FW];

  // statistics for the testbench
  int unsigned frames_written = 0;
  int unsigned frames_read    = 0;
  int unsigned syncs          = 0;
  int unsigned protocol_errors = 0;
  int unsigned stalls         = 0;
  int unsigned rw_errors      = 0;   // R/W changed while CE was low
  logic        rw_q           = 1'b0;

  // ---------------------------------------------------------------- frame code
  function automatic logic [SYN_W-1:0] syndrome_of(input int unsigned f);
    logic [10:0] pos;
    logic        par;
    pos = '0; par = 1'b0;
    for (int w = 0; w < FW; w++)
      for (int b = 0; b < 32; b++) begin
        int p;
        p = w * 32 + b;
        if (cfg[f * FW + w][b]) begin
          par ^= 1'b1;
          if (p < FW * 32 - 1) pos ^= 11'(p + 1);
        end
      end
    return {par, pos};
  endfunction

  function automatic void flip(input int unsigned f, input int unsigned p);
    cfg[f * FW + p / 32][p % 32] ^= 1'b1;
  endfunction

  function automatic void init_frame(input int unsigned f);
    logic [SYN_W-1:0] s;
    for (int w = 0; w < FW; w++) cfg[f * FW + w] = $urandom;
    for (int k = 0; k < 11; k++) begin           // clear check bits
      int p;
      p = (1 << k) - 1;
      cfg[f * FW + p / 32][p % 32] = 1'b0;
    end
    cfg[f * FW + FW - 1][31] = 1'b0;
    s = syndrome_of(f);
    for (int k = 0; k < 11; k++) if (s[k]) flip(f, (1 << k) - 1);
    s = syndrome_of(f);
    if (s[11]) flip(f, FW * 32 - 1);
  endfunction

  // ---------------------------------------------------------------- packet parser
  typedef enum logic [2:0] { P_UNSYNC, P_HDR, P_T1DATA, P_T2HDR, P_FDRI } pstate_e;
  pstate_e     ps = P_UNSYNC;
  logic [4:0]  reg_sel;
  int unsigned t1_left;
  int unsigned wr_left, wr_idx;
  logic [31:0] far_q = '0;
  logic [31:0] cmd_q = '0;
  logic [4:0]  last_t1_reg;
  int unsigned rd_left = 0, rd_idx = 0, rd_wait = 0, rd_cnt = 0;

  // drop any half-finished transaction (testbench recovery after a reset)
  function automatic void resync();
    ps      = P_UNSYNC;
    rd_left = 0;
    wr_left = 0;
  endfunction

  // Frame ECC accumulation
  logic [10:0] acc_pos;
  logic        acc_par;
  int unsigned acc_words = 0;

  initial begin
    o_data = '0; busy = 1'b1; ecc_valid = 1'b0; ecc_error = 1'b0; ecc_syndrome = '0;
    acc_pos = '0; acc_par = 1'b0;
    for (int f = 0; f < NUM_FRAMES; f++) init_frame(f);
  end

  always @(posedge clk) begin
    ecc_valid <= 1'b0;
    busy      <= 1'b1;
    rw_q      <= write_n;
    if (!ce_n && write_n != rw_q) rw_errors <= rw_errors + 1;
    if (!ce_n && !write_n) begin
      unique case (ps)
        P_UNSYNC: if (i_data == PKT_SYNC) begin ps <= P_HDR; syncs <= syncs + 1; end
        P_HDR: begin
          if (i_data[31:29] == 3'b001 && i_data[28:27] == 2'b10) begin
            reg_sel     <= i_data[17:13];
            last_t1_reg <= i_data[17:13];
            t1_left     <= 32'(i_data[10:0]);
            if (i_data[10:0] != 0) ps <= P_T1DATA;
            else                   ps <= P_T2HDR;
          end else if (i_data[31:29] == 3'b001 && i_data[28:27] == 2'b01) begin
            last_t1_reg <= i_data[17:13];
            ps <= P_T2HDR;
          end else if (i_data[31:29] == 3'b001 && i_data[28:27] == 2'b00) begin
            // NOOP
          end else protocol_errors <= protocol_errors + 1;
        end
        P_T1DATA: begin
          if (reg_sel == 5'd4) begin
            cmd_q <= i_data;
            if (i_data == CMD_DESYNC) ps <= P_UNSYNC; else ps <= P_HDR;
          end else begin
            if (reg_sel == 5'd1) far_q <= i_data;
            ps <= P_HDR;
          end
        end
        P_T2HDR: begin
          if (i_data[31:29] == 3'b010 && i_data[28:27] == 2'b10 && last_t1_reg == 5'd2
              && cmd_q == CMD_WCFG) begin
            wr_left <= 32'(i_data[26:0]); wr_idx <= 0; ps <= P_FDRI;
          end else if (i_data[31:29] == 3'b010 && i_data[28:27] == 2'b01 && last_t1_reg == 5'd3
                       && cmd_q == CMD_RCFG) begin
            rd_left <= 32'(i_data[26:0]); rd_idx <= 0; rd_wait <= RD_LAT; rd_cnt <= 0;
            acc_words <= 0; acc_pos <= '0; acc_par <= 1'b0;
            ps <= P_HDR;
          end else begin
            protocol_errors <= protocol_errors + 1;
            ps <= P_HDR;
          end
        end
        P_FDRI: begin
          if (far_q * FW + wr_idx < NUM_FRAMES * FW) cfg[far_q * FW + wr_idx] <= i_data;
          else protocol_errors <= protocol_errors + 1;
          wr_idx  <= wr_idx + 1;
          if ((wr_idx + 1) % FW == 0) frames_written <= frames_written + 1;
          if (wr_left == 1) ps <= P_HDR;
          wr_left <= wr_left - 1;
        end
        default: ps <= P_UNSYNC;
      endcase
    end else if (!ce_n && write_n && rd_left != 0) begin
      if (rd_wait != 0) begin
        rd_wait <= rd_wait - 1;
      end else if (STALL_EVERY != 0 && rd_cnt == STALL_EVERY) begin
        rd_cnt <= 0;
        stalls <= stalls + 1;
      end else begin
        automatic logic [31:0] w;
        automatic logic [10:0] pos;
        automatic logic        par;
        automatic int unsigned widx;
        w = (far_q * FW + rd_idx < NUM_FRAMES * FW) ? cfg[far_q * FW + rd_idx] : 32'h0;
        o_data  <= w;
        busy    <= 1'b0;
        rd_idx  <= rd_idx + 1;
        rd_left <= rd_left - 1;
        rd_cnt  <= rd_cnt + 1;
        // Frame ECC
        pos = acc_pos; par = acc_par;
        widx = acc_words;
        for (int b = 0; b < 32; b++)
          if (w[b]) begin
            par ^= 1'b1;
            if (widx * 32 + b < FW * 32 - 1) pos ^= 11'(widx * 32 + b + 1);
          end
        if (widx == FW - 1) begin
          ecc_valid    <= 1'b1;
          ecc_syndrome <= {par, pos};
          ecc_error    <= ({par, pos} != 0);
          frames_read  <= frames_read + 1;
          acc_words <= 0; acc_pos <= '0; acc_par <= 1'b0;
        end else begin
          acc_words <= widx + 1; acc_pos <= pos; acc_par <= par;
        end
      end
    end
  end
endmodule
