// tb_icap_dma: self-checking test of the triplicated ICAP DMA against the
// ICAP / configuration memory / Frame ECC model.
//
// Checks: a frame read lands word for word in every DMA BRAM copy with the
// right Frame ECC syndrome (0 for a clean frame, {1, p+1} after one upset);
// a frame write stores the BRAM words in the right frame and takes
// 10 + 41 + 1 + 3 clocks of ICAP traffic, one word per clock; a run scan
// reads every frame once and passes each frame through the Frame ECC; an
// upset forced into one copy of the DMA state mid-transaction is outvoted and
// repaired; read stalls (BUSY high) are waited out; R/W never changes while
// CE is low.
module tb_icap_dma;
  import scrub_pkg::*;

  localparam int NF = 6;
  localparam int FW = FRAME_WORDS;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              cmd_valid [3];
  dma_cmd_e          cmd       [3];
  logic [FAR_W-1:0]  far       [3];
  logic              busy      [3];
  logic              done      [3];
  logic              b_we      [3];
  logic [8:0]        b_addr    [3];
  logic [WORD_W-1:0] b_wdata   [3];
  logic [WORD_W-1:0] b_rdata   [3];
  logic              ce_n, write_n, icap_busy, ecc_err, ecc_v;
  logic [31:0]       icap_i, icap_o;
  logic [11:0]       ecc_syn;

  icap_dma #(.TMR(1'b1), .NUM_FRAMES(NF)) dut (
    .clk, .rst, .cmd_valid, .cmd, .cmd_far(far), .busy, .done,
    .b_we, .b_addr, .b_wdata, .b_rdata,
    .icap_ce_n(ce_n), .icap_write_n(write_n), .icap_i, .icap_o, .icap_busy
  );

  icap_model #(.NUM_FRAMES(NF), .RD_LAT(4), .STALL_EVERY(7)) u_icap (
    .clk, .ce_n, .write_n, .i_data(icap_i), .o_data(icap_o), .busy(icap_busy),
    .ecc_error(ecc_err), .ecc_syndrome(ecc_syn), .ecc_valid(ecc_v)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Frame ECC results seen
  int          n_valid = 0;
  logic [11:0] last_syn;
  logic        last_err;
  int          ce_cycles = 0;
  always @(posedge clk) begin
    if (ecc_v) begin n_valid++; last_syn = ecc_syn; last_err = ecc_err; end
    if (!ce_n) ce_cycles++;
  end

  task automatic command(input dma_cmd_e c, input int f, output int cycles);
    for (int i = 0; i < 3; i++) begin cmd_valid[i] = 1'b1; cmd[i] = c; far[i] = 32'(f); end
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) cmd_valid[i] = 1'b0;
    cycles = 0;
    while (!done[0]) begin @(posedge clk); #1; cycles++; end
    @(posedge clk); #1;
  endtask

  task automatic bram_read(input int copy, input int a, output logic [31:0] d);
    b_addr[copy] = 9'(a);
    @(posedge clk); #1;
    d = b_rdata[copy];
  endtask

  task automatic bram_write_all(input int a, input logic [31:0] d);
    for (int i = 0; i < 3; i++) begin b_we[i] = 1'b1; b_addr[i] = 9'(a); b_wdata[i] = d; end
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) b_we[i] = 1'b0;
  endtask

  logic [31:0] w, golden [FW];
  int cyc, ce0, nv0;

  initial begin
    for (int i = 0; i < 3; i++) begin
      cmd_valid[i] = 0; cmd[i] = DMA_NOP; far[i] = '0; b_we[i] = 0; b_addr[i] = '0; b_wdata[i] = '0;
    end
    repeat (3) @(posedge clk); #1 rst = 1'b0;

    // 1. clean frame read
    for (int k = 0; k < FW; k++) golden[k] = u_icap.cfg[2 * FW + k];
    nv0 = n_valid;
    command(DMA_READ, 2, cyc);
    check(n_valid == nv0 + 1, "one syndrome per frame read");
    check(last_syn == 12'h000 && !last_err, "clean frame syndrome 0");
    for (int c = 0; c < 3; c++)
      for (int k = 0; k < FW; k++) begin
        bram_read(c, k, w);
        check(w == golden[k], $sformatf("read frame word %0d copy %0d", k, c));
      end
    check(u_icap.stalls > 0, "read stalls exercised");

    // 2. single upset in frame 4 at bit position 700
    u_icap.flip(4, 700);
    command(DMA_READ, 4, cyc);
    check(last_err && last_syn == {1'b1, 11'd701}, $sformatf("SBU syndrome %h", last_syn));

    // 3. frame write from BRAM to frame 1, with an upset in one copy of the DMA
    //    state during the transfer
    for (int k = 0; k < FW; k++) begin golden[k] = 32'hC0DE_0000 + 32'(k * 7); bram_write_all(k, golden[k]); end
    for (int i = 0; i < 3; i++) begin cmd_valid[i] = 1'b1; cmd[i] = DMA_WRITE; far[i] = 32'd1; end
    ce0 = ce_cycles;
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) cmd_valid[i] = 1'b0;
    repeat (20) @(posedge clk);
    #1 dut.u_state.g_tmr.r[1] = ~dut.u_state.g_tmr.r[1];
    cyc = 21;
    while (!done[0]) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1;
    for (int k = 0; k < FW; k++)
      check(u_icap.cfg[1 * FW + k] == golden[k], $sformatf("written word %0d", k));
    check(ce_cycles - ce0 == 10 + FW + 3, $sformatf("ICAP busy for %0d clocks in a frame write", ce_cycles - ce0));
    check(cyc == 10 + FW + 1 + 3 + 1, $sformatf("frame write latency %0d", cyc));
    check(dut.u_state.g_tmr.r[0] == dut.u_state.g_tmr.r[1] && dut.u_state.g_tmr.r[1] == dut.u_state.g_tmr.r[2],
          "state copies agree again after the upset");
    check(u_icap.protocol_errors == 0, "no ICAP protocol errors");

    // 4. run scan over all frames: frame 4 holds the upset, frame 1 the
    //    hand-written words (not a valid code word)
    nv0 = n_valid;
    begin
      automatic int errs = 0;
      fork
        begin
          for (int g = 0; g < 200000; g++) begin
            @(posedge clk);
            if (ecc_v && ecc_err) errs++;
            if (done[0]) break;
          end
        end
        command(DMA_RUN, 0, cyc);
      join
      check(n_valid == nv0 + NF, $sformatf("run scan checked %0d frames", n_valid - nv0));
      check(errs == 2, $sformatf("run scan flagged %0d erroneous frames", errs));
    end
    check(u_icap.syncs == 4, "one sync per transaction");
    check(u_icap.rw_errors == 0, "R/W changed only while the ICAP was deselected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
