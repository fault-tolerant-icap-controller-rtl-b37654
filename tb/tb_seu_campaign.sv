// tb_seu_campaign: a simulated upset campaign on the ICAP DMA, comparing the
// hardened (TMR = 1) and the unmitigated (TMR = 0) build.
//
// Each build gets its own ICAP / configuration memory model. For each of
// N_TX transactions (alternating frame write and frame read) one bit of the
// DMA's state is flipped at a random clock during the transfer: in the TMR
// build, one bit of one of the three copies; in the plain build, one bit of
// its only copy. A transaction fails if the DMA does not finish, the frame
// written or read back is wrong, or the ICAP sees a malformed packet. After a
// failure the DMA is reset (the configuration memory is rewritten with the
// expected frame) and the campaign continues.
// Expected: the TMR build never fails; the plain build fails in a share of
// the transactions. Both counts are printed.
module tb_seu_campaign;
  import scrub_pkg::*;

  localparam int NF   = 4;
  localparam int FW   = FRAME_WORDS;
  localparam int N_TX = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int fails [2] = '{0, 0};
  int done_cnt [2] = '{0, 0};
  int finished_n = 0;

  for (genvar g = 0; g < 2; g++) begin : g_build
    localparam bit TMR = (g == 0);
    logic              rst = 1'b1;
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

    icap_dma #(.TMR(TMR), .NUM_FRAMES(NF)) u_dma (
      .clk, .rst, .cmd_valid, .cmd, .cmd_far(far), .busy, .done,
      .b_we, .b_addr, .b_wdata, .b_rdata,
      .icap_ce_n(ce_n), .icap_write_n(write_n), .icap_i, .icap_o, .icap_busy
    );

    icap_model #(.NUM_FRAMES(NF), .RD_LAT(2), .STALL_EVERY(0)) u_icap (
      .clk, .ce_n, .write_n, .i_data(icap_i), .o_data(icap_o), .busy(icap_busy),
      .ecc_error(ecc_err), .ecc_syndrome(ecc_syn), .ecc_valid(ecc_v)
    );

    // one upset in the DMA state
    if (g == 0) begin : g_up
      task automatic upset();
        int unsigned bitpos, k;
        bitpos = $urandom % $bits(g_build[0].u_dma.d_vec[0]);
        k = $urandom % 3;
        g_build[0].u_dma.u_state.g_tmr.r[k][bitpos] = ~g_build[0].u_dma.u_state.g_tmr.r[k][bitpos];
      endtask
    end else begin : g_up
      task automatic upset();
        int unsigned bitpos;
        bitpos = $urandom % $bits(g_build[0].u_dma.d_vec[0]);
        g_build[1].u_dma.u_state.g_single.r0[bitpos] = ~g_build[1].u_dma.u_state.g_single.r0[bitpos];
      endtask
    end

    // An upset in the plain build may break any rule of the ICAP port; its
    // assertions are switched off, the failure is counted below instead.
    if (g == 1) begin : g_quiet
      initial $assertoff(0, u_dma);
    end

    initial begin
      logic [31:0] pattern [FW];
      logic [31:0] w;
      int          f, pe0, t, hit;
      bit          ok, wr;
      for (int i = 0; i < 3; i++) begin
        cmd_valid[i] = 0; cmd[i] = DMA_NOP; far[i] = '0; b_we[i] = 0; b_addr[i] = '0; b_wdata[i] = '0;
      end
      repeat (3) @(posedge clk); #1 rst = 1'b0;
      for (int n = 0; n < N_TX; n++) begin
        f  = n % NF;
        wr = (n % 2 == 0);
        pe0 = int'(u_icap.protocol_errors);
        if (wr) begin
          for (int k = 0; k < FW; k++) begin
            pattern[k] = $urandom;
            for (int i = 0; i < 3; i++) begin b_we[i] = 1; b_addr[i] = 9'(k); b_wdata[i] = pattern[k]; end
            @(posedge clk); #1;
          end
          for (int i = 0; i < 3; i++) b_we[i] = 0;
        end else begin
          for (int k = 0; k < FW; k++) pattern[k] = u_icap.cfg[f * FW + k];
        end
        for (int i = 0; i < 3; i++) begin cmd_valid[i] = 1; cmd[i] = wr ? DMA_WRITE : DMA_READ; far[i] = 32'(f); end
        @(posedge clk); #1;
        for (int i = 0; i < 3; i++) cmd_valid[i] = 0;
        hit = 1 + int'($urandom % 50);
        t = 0;
        while (!done[0] && t < 400) begin
          @(posedge clk); #1; t++;
          if (t == hit) g_up.upset();
        end
        ok = done[0];
        repeat (2) @(posedge clk); #1;
        if (ok) begin
          done_cnt[g]++;
          for (int k = 0; k < FW; k++) begin
            if (wr) begin
              if (u_icap.cfg[f * FW + k] != pattern[k]) ok = 0;
            end else begin
              b_addr[0] = 9'(k); @(posedge clk); #1; w = b_rdata[0];
              if (w != pattern[k]) ok = 0;
            end
          end
        end
        if (int'(u_icap.protocol_errors) != pe0) ok = 0;
        if (!ok) begin
          fails[g]++;
          // recover: reset the DMA, restore the frame, resynchronise the port
          rst = 1'b1;
          for (int k = 0; k < FW; k++) u_icap.cfg[f * FW + k] = pattern[k];
          repeat (3) @(posedge clk); #1 rst = 1'b0;
          u_icap.resync();
        end
      end
      finished_n++;
    end
  end

  initial begin
    wait (finished_n == 2);
    $display("upset campaign, %0d transactions each: TMR failures=%0d, plain failures=%0d",
             N_TX, fails[0], fails[1]);
    check(fails[0] == 0, "TMR build never fails");
    check(fails[1] > 0, "plain build fails under upsets");
    check(done_cnt[0] == N_TX, "every TMR transaction finishes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
