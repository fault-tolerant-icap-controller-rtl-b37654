// tb_scrub_ctrl: the control logic driven by PicoBlaze-style OUTPUT / INPUT
// cycles (port_id for two clocks, write_strobe in the second) on all three
// domains, against a simple DMA stand-in (busy for a fixed time, then done)
// and a reference BRAM in the testbench.
// Checks: FAR assembled from four bytes; a command is held until the DMA is
// idle and reaches it once; BRAM words written and read byte by byte; Frame
// ECC results captured (clean, single error, double error -> mbu); run scan
// errors set run_error; the clear command; an upset in one copy of the
// control state is outvoted.
module tb_scrub_ctrl;
  import scrub_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0]  port_id [3], out_port [3], in_port [3];
  logic        write_strobe [3];
  status_t     status [3];
  logic        ecc_error, ecc_valid;
  logic [11:0] ecc_syndrome;
  logic        dma_cmd_valid [3], dma_busy [3], dma_done [3], b_we [3];
  dma_cmd_e    dma_cmd [3];
  logic [31:0] dma_far [3], b_wdata [3], b_rdata [3];
  logic [8:0]  b_addr [3];

  scrub_ctrl #(.TMR(1'b1)) dut (
    .clk, .rst, .port_id, .out_port, .write_strobe, .in_port, .status,
    .ecc_error, .ecc_syndrome, .ecc_valid,
    .dma_cmd_valid, .dma_cmd, .dma_far, .dma_busy, .dma_done,
    .b_we, .b_addr, .b_wdata, .b_rdata
  );

  // DMA stand-in: takes a command when idle, busy 20 clocks, done 1 clock
  int          dma_left = 0;
  int          cmds_taken = 0;
  dma_cmd_e    last_cmd;
  logic [31:0] last_far;
  logic [31:0] bram [512];
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) if (b_we[i] && i == 0) bram[b_addr[0]] <= b_wdata[0];
    for (int i = 0; i < 3; i++) b_rdata[i] <= bram[b_addr[i]];
    if (dma_left == 0 && dma_cmd_valid[0]) begin
      dma_left <= 20; cmds_taken++; last_cmd <= dma_cmd[0]; last_far <= dma_far[0];
    end else if (dma_left > 0) dma_left <= dma_left - 1;
  end
  always_comb for (int i = 0; i < 3; i++) begin
    dma_busy[i] = dma_left != 0;
    dma_done[i] = dma_left == 1;
  end

  task automatic pb_out(input logic [7:0] p, input logic [7:0] d);
    for (int i = 0; i < 3; i++) begin port_id[i] = p; out_port[i] = d; end
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) write_strobe[i] = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) write_strobe[i] = 1'b0;
  endtask

  task automatic pb_in(input logic [7:0] p, output logic [7:0] d);
    for (int i = 0; i < 3; i++) port_id[i] = p;
    @(posedge clk); #1;
    @(posedge clk);
    d = in_port[0];
    #1;
  endtask

  task automatic ecc_pulse(input logic [11:0] s);
    ecc_syndrome = s; ecc_error = (s != 0); ecc_valid = 1'b1;
    @(posedge clk); #1 ecc_valid = 1'b0;
  endtask

  logic [7:0] d8;
  logic [31:0] w;
  status_t st;

  initial begin
    for (int i = 0; i < 3; i++) begin port_id[i] = 0; out_port[i] = 0; write_strobe[i] = 0; end
    for (int i = 0; i < 512; i++) bram[i] = 32'h1000_0000 + 32'(i);
    ecc_valid = 0; ecc_error = 0; ecc_syndrome = 0;
    repeat (3) @(posedge clk); #1 rst = 1'b0;

    // FAR and a read command
    pb_out(8'h00, 8'h44); pb_out(8'h01, 8'h33); pb_out(8'h02, 8'h22); pb_out(8'h03, 8'h11);
    pb_out(P_CMD, 8'(DMA_READ));
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(st.busy && !st.done, "busy after command");
    // a second command while busy is held, then taken once
    pb_out(P_CMD, 8'(DMA_WRITE));
    ecc_pulse(12'h000);
    repeat (45) @(posedge clk); #1;
    check(cmds_taken == 2, $sformatf("%0d commands reached the DMA", cmds_taken));
    check(last_cmd == DMA_WRITE && last_far == 32'h1122_3344, "command and FAR");
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(!st.busy && st.done, "done after DMA finished");

    // BRAM byte access
    pb_out(P_ADDR, 8'd7);
    pb_in(8'h14, d8); w[7:0] = d8;  pb_in(8'h15, d8); w[15:8] = d8;
    pb_in(8'h16, d8); w[23:16] = d8; pb_in(8'h17, d8); w[31:24] = d8;
    check(w == 32'h1000_0007, $sformatf("BRAM word read %h", w));
    pb_out(8'h08, 8'hEF); pb_out(8'h09, 8'hBE); pb_out(8'h0A, 8'hAD); pb_out(8'h0B, 8'hDE);
    check(bram[7] == 32'hDEAD_BEEF, "BRAM word written");

    // Frame ECC capture after a read command
    pb_out(P_CMD, 8'(DMA_READ));
    ecc_pulse({1'b1, 11'd701});
    pb_in(P_SYN_LO, d8); check(d8 == 8'(701), "syndrome low byte");
    pb_in(P_SYN_HI, d8); check(d8 == {4'h0, 1'b1, 3'(701 >> 8)}, "syndrome high byte");
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(st.syn_valid && st.ecc_error && !st.mbu, "single error flags");
    // upset one copy of the control state: flip the ecc flag of copy 2
    dut.u_state.g_tmr.r[2] = dut.u_state.g_tmr.r[2] ^ '1;
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(st.syn_valid && st.ecc_error && !st.mbu, "flags survive an upset in one copy");
    check(dut.u_state.g_tmr.r[2] == dut.u_state.g_tmr.r[0], "upset copy repaired");
    repeat (25) @(posedge clk); #1;

    pb_out(P_CMD, 8'(DMA_READ));
    ecc_pulse({1'b0, 11'd300});
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(st.ecc_error && st.mbu, "double error flagged as mbu");
    repeat (25) @(posedge clk); #1;

    // run scan: one bad frame among clean ones
    pb_out(P_CMD, 8'(DMA_RUN));
    ecc_pulse(12'h000); ecc_pulse({1'b1, 11'd5}); ecc_pulse(12'h000);
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(st.run_error && !st.syn_valid, "run error flagged");
    repeat (25) @(posedge clk); #1;
    pb_out(P_CMD, 8'(DMA_CLEAR));
    pb_in(P_STATUS, d8); st = status_t'(d8);
    check(!st.run_error && !st.done && !st.ecc_error, "clear");
    check(cmds_taken == 5, $sformatf("clear does not reach the DMA (%0d)", cmds_taken));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
