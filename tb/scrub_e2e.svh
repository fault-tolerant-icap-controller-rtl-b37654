// scrub_e2e.svh: body of the end-to-end scrubber tests, included by
// tb_hirel_scrubber_top (small device), tb_hirel_full (default sizes) and
// tb_hirel_plain (small device, unmitigated build).
// The including module defines the localparams TMR_T (hardened or plain
// build), NF (frames), CLK_HZ_T, BAUD_T and WDT_T, and the macro
// SCRUB_DUT_PARAMS with the top's parameters (empty for the default-size test).
//
// Testbench side:
//   * icap_model: the ICAP, the configuration memory and the Frame ECC;
//   * a behavioural stand-in for the three PicoBlaze processors, written as
//     tasks that make OUTPUT / INPUT bus cycles on all three domains at once.
//     It runs the scrubbing program's flow: initialise, an initial "walk"
//     that patches frames which already show an error (their check bits are
//     changed so the frame reads clean), an initial "run", then repeated
//     "run" scans; when a run sees an error it walks every frame and corrects
//     each single-bit upset (or reports a multi-bit one), reporting each event
//     over the UART;
//   * a UART receiver that checks every report byte;
//   * upset injection: configuration bits (single and double upsets in one
//     frame), one copy of the DMA and control-logic state, one copy of a
//     program-memory word, and a wrong bus value from one processor domain.
// Each mechanism is counted and must have happened at least once.

  import scrub_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- DUT
  logic [7:0]  pb_port_id [3], pb_out_port [3], pb_in_port [3];
  logic        pb_write_strobe [3];
  logic [9:0]  pb_address [3];
  logic [17:0] pb_instruction;
  logic        icap_ce_n, icap_write_n, icap_busy, ecc_error, ecc_valid;
  logic [31:0] icap_i, icap_o;
  logic [11:0] ecc_syndrome;
  logic        uart_txd, wdt_expired;
  logic [7:0]  wdt_timeouts;
  logic [15:0] prog_repairs;

  hirel_scrubber_top `SCRUB_DUT_PARAMS dut (
    .clk, .rst,
    .pb_port_id, .pb_out_port, .pb_write_strobe, .pb_in_port,
    .pb_address, .pb_instruction,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy,
    .ecc_error, .ecc_syndrome, .ecc_syndrome_valid(ecc_valid),
    .uart_txd, .wdt_expired, .wdt_timeouts, .prog_repairs
  );

  icap_model #(.NUM_FRAMES(NF), .RD_LAT(5), .STALL_EVERY(13)) u_icap (
    .clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i_data(icap_i), .o_data(icap_o),
    .busy(icap_busy), .ecc_error, .ecc_syndrome, .ecc_valid
  );

  // ---------------------------------------------------------------- mechanism counters
  int n_walk = 0, n_patch = 0, n_run_clean = 0, n_run_err = 0, n_correct = 0, n_mbu = 0;
  int n_uart = 0, n_tmr_dma = 0, n_tmr_ctrl = 0, n_prog_repair = 0, n_dom_fault = 0;
  int n_wdt = 0, n_stall = 0;

  // ---------------------------------------------------------------- UART receiver
  localparam int DIV = (CLK_HZ_T + BAUD_T / 2) / BAUD_T;
  logic [7:0] expect_q [$];
  initial begin
    logic [7:0] r;
    forever begin
      @(negedge uart_txd);
      repeat (DIV / 2) @(posedge clk);
      for (int b = 0; b < 8; b++) begin
        repeat (DIV) @(posedge clk);
        r[b] = uart_txd;
      end
      repeat (DIV) @(posedge clk);
      check(uart_txd == 1'b1, "UART stop bit");
      check(expect_q.size() > 0 && expect_q[0] == r, $sformatf("UART byte %h", r));
      if (expect_q.size() > 0) void'(expect_q.pop_front());
      n_uart++;
    end
  end

  // ---------------------------------------------------------------- processor bus stand-in
  int bad_dom = -1;   // when >= 0, that domain drives a wrong out_port value

  task automatic pb_out(input logic [7:0] p, input logic [7:0] d);
    for (int i = 0; i < 3; i++) begin
      pb_port_id[i] = p;
      pb_out_port[i] = (i == bad_dom) ? ~d : d;
    end
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) pb_write_strobe[i] = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) pb_write_strobe[i] = 1'b0;
  endtask

  task automatic pb_in(input logic [7:0] p, output logic [7:0] d);
    for (int i = 0; i < 3; i++) pb_port_id[i] = p;
    @(posedge clk); #1;
    @(posedge clk);
    d = pb_in_port[0];
    check(pb_in_port[1] == d && pb_in_port[2] == d, "domains read the same value");
    #1;
  endtask

  task automatic status(output status_t st);
    logic [7:0] d;
    pb_in(P_STATUS, d);
    st = status_t'(d);
  endtask

  task automatic dma(input dma_cmd_e c);
    status_t st;
    pb_out(P_CMD, 8'(c));
    do status(st); while (st.busy || !st.done);
  endtask

  task automatic set_far(input int f);
    for (int b = 0; b < 4; b++) pb_out(8'(b), 8'(f >> (8 * b)));
  endtask

  task automatic read_word(input int a, output logic [31:0] w);
    logic [7:0] d;
    pb_out(P_ADDR, 8'(a));
    for (int b = 0; b < 4; b++) begin pb_in(8'(P_RDATA0 + b), d); w[8*b +: 8] = d; end
  endtask

  task automatic write_word(input int a, input logic [31:0] w);
    pb_out(P_ADDR, 8'(a));
    for (int b = 0; b < 4; b++) pb_out(8'(P_WDATA0 + b), w[8*b +: 8]);
  endtask

  task automatic flip_bit(input int p);
    logic [31:0] w;
    read_word(p / 32, w);
    w[p % 32] = ~w[p % 32];
    write_word(p / 32, w);
  endtask

  task automatic uart_send(input logic [7:0] b);
    logic [7:0] d;
    do pb_in(P_UART_ST, d); while (d[0]);
    expect_q.push_back(b);
    pb_out(P_UART_TX, b);
  endtask

  task automatic report(input logic [7:0] tag, input int f, input logic [11:0] s);
    uart_send(tag); uart_send(8'(f)); uart_send(s[7:0]); uart_send({4'h0, s[11:8]});
  endtask

  task automatic get_syndrome(output logic [11:0] s);
    logic [7:0] lo, hi;
    pb_in(P_SYN_LO, lo); pb_in(P_SYN_HI, hi);
    s = {hi[3:0], lo};
  endtask

  // Read one frame; returns its status and syndrome.
  task automatic read_frame(input int f, output status_t st, output logic [11:0] s);
    set_far(f);
    dma(DMA_READ);
    status(st);
    get_syndrome(s);
    check(st.syn_valid, "syndrome captured for the frame read");
  endtask

  // Patch: change the check bits so that the frame as it is reads clean.
  task automatic patch_frame(input int f, input logic [11:0] s);
    logic par;
    par = s[11];
    for (int k = 0; k < 11; k++)
      if (s[k]) begin flip_bit((1 << k) - 1); par ^= 1'b1; end
    if (par) flip_bit(FRAME_WORDS * 32 - 1);
    dma(DMA_WRITE);
  endtask

  // Correct a single upset located by the syndrome.
  task automatic correct_frame(input logic [11:0] s);
    int p;
    p = (s[10:0] == 0) ? FRAME_WORDS * 32 - 1 : int'(s[10:0]) - 1;
    flip_bit(p);
    dma(DMA_WRITE);
  endtask

  // Walk: read every frame; patch (initial walk) or correct what is found.
  task automatic walk(input bit initial_walk);
    status_t st;
    logic [11:0] s;
    longint      t_start;
    t_start = $time;
    n_walk++;
    for (int f = 0; f < NF; f++) begin
      read_frame(f, st, s);
      if (st.ecc_error) begin
        if (initial_walk) begin
          patch_frame(f, s); n_patch++; report(8'hA0, f, s);
        end else if (st.mbu) begin
          n_mbu++; report(8'hD0, f, s);
        end else begin
          correct_frame(s); n_correct++; report(8'hC0, f, s);
        end
      end
    end
    if (initial_walk)
      $display("initial walk of %0d frames: %0d clocks", NF, ($time - t_start) / 10);
  endtask

  // Run: one stream over all frames; returns whether an error was seen.
  task automatic run_scan(output bit err);
    status_t st;
    pb_out(P_CMD, 8'(DMA_RUN));
    do status(st); while (st.busy || !st.done);
    err = st.run_error;
    if (err) n_run_err++; else n_run_clean++;
  endtask

  // ---------------------------------------------------------------- upsets inside the scrubber
  // Hardened build only: one copy of the DMA state, one copy of the control
  // state and one copy of a program word. The plain build has no copy to
  // outvote an upset, so these are left out there.
  if (TMR_T) begin : g_inj
    task automatic dma_upset();
      dut.u_dma.u_state.g_tmr.r[1] = ~dut.u_dma.u_state.g_tmr.r[1];
      n_tmr_dma++;
    endtask
    task automatic ctrl_upset();
      dut.u_ctrl.u_state.g_tmr.r[0] = ~dut.u_ctrl.u_state.g_tmr.r[0];
      n_tmr_ctrl++;
    endtask
    task automatic prog_upset();
      dut.g_prog3.u_prog.g_copy[2].u_mem.mem[12] = dut.g_prog3.u_prog.g_copy[2].u_mem.mem[12] ^ 18'h00401;
    endtask
    task automatic prog_check();
      check(prog_repairs >= 1, "program memory upset repaired");
      check(dut.g_prog3.u_prog.g_copy[2].u_mem.mem[12] == dut.g_prog3.u_prog.g_copy[0].u_mem.mem[12],
            "copies agree");
      check(pb_instruction == dut.g_prog3.u_prog.g_copy[0].u_mem.mem[12], "voted fetch");
    endtask
  end else begin : g_inj
    task automatic dma_upset();  endtask
    task automatic ctrl_upset(); endtask
    task automatic prog_upset(); endtask
    task automatic prog_check();
      check(prog_repairs == 0, "no program repairs in the plain build");
      check(pb_instruction == dut.g_prog1.u_mem.mem[12], "plain fetch");
    endtask
  end

  // ---------------------------------------------------------------- golden image
  logic [31:0] golden [NF * FRAME_WORDS];
  task automatic snapshot();
    for (int k = 0; k < NF * FRAME_WORDS; k++) golden[k] = u_icap.cfg[k];
  endtask
  function automatic bit frame_matches(input int f);
    for (int k = 0; k < FRAME_WORDS; k++)
      if (u_icap.cfg[f * FRAME_WORDS + k] != golden[f * FRAME_WORDS + k]) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------------------------------------------------------- the test
  bit err;
  int f_sbu, f_mbu, t0;
  initial begin
    for (int i = 0; i < 3; i++) begin
      pb_port_id[i] = 0; pb_out_port[i] = 0; pb_write_strobe[i] = 0; pb_address[i] = 0;
    end
    repeat (4) @(posedge clk); #1 rst = 1'b0;

    // frames that already differ from their code before scrubbing starts
    u_icap.flip(1, 77);
    if (NF > 3) u_icap.flip(NF - 2, 1000);

    // initialisation
    pb_out(P_CMD, 8'(DMA_CLEAR));
    pb_out(P_WDT_KICK, 8'h00);

    // initial walk with patching
    walk(1'b1);
    for (int f = 0; f < NF; f++)
      check(u_icap.syndrome_of(f) == 0, $sformatf("frame %0d clean after initial walk", f));
    snapshot();

    // initial run: clean
    t0 = $time;
    run_scan(err);
    check(!err, "initial run clean");
    $display("run scan of %0d frames: %0d clocks", NF, ($time - t0) / 10);

    // a single upset: the run finds it, the walk corrects it
    f_sbu = NF / 2;
    u_icap.flip(f_sbu, 555);
    run_scan(err);
    check(err, "run sees the upset");
    if (err) walk(1'b0);
    check(frame_matches(f_sbu), "single upset corrected");
    pb_out(P_WDT_KICK, 8'h00);

    // upsets inside the scrubber itself while it works: one copy of the DMA
    // state, one copy of the control state, one program word, one bad domain
    u_icap.flip(0, 1311);                  // the overall parity bit itself
    fork
      begin
        run_scan(err);
        check(err, "run sees the parity-bit upset");
        walk(1'b0);
      end
      begin
        repeat (40) @(posedge clk);
        #1 g_inj.dma_upset();
        repeat (7) @(posedge clk);
        #1 g_inj.ctrl_upset();
        g_inj.prog_upset();
      end
    join
    check(frame_matches(0), "parity-bit upset corrected with scrubber upsets present");
    pb_out(P_WDT_KICK, 8'h00);

    // one processor domain writes wrong values during a correction
    u_icap.flip(NF - 1, 3);
    bad_dom = 1;
    n_dom_fault++;
    run_scan(err);
    check(err, "run sees upset (domain 1 faulty)");
    walk(1'b0);
    bad_dom = -1;
    check(frame_matches(NF - 1), "upset corrected while one domain is faulty");

    // a double upset in one frame: detected, not correctable
    f_mbu = 2 % NF;
    u_icap.flip(f_mbu, 40); u_icap.flip(f_mbu, 900);
    run_scan(err);
    check(err, "run sees the double upset");
    walk(1'b0);
    check(n_mbu == 1, "double upset reported as MBU");
    check(!frame_matches(f_mbu), "double upset stays (SECDED cannot locate it)");
    // clear it from the golden image for the final run
    u_icap.flip(f_mbu, 40); u_icap.flip(f_mbu, 900);
    run_scan(err);
    check(!err, "final run clean");
    pb_out(P_WDT_KICK, 8'h00);

    // program memory: the upset copy has been rewritten, fetch sees good words
    for (int i = 0; i < 3; i++) pb_address[i] = 10'd12;
    @(posedge clk); @(posedge clk); #1;
    g_inj.prog_check();
    n_prog_repair = int'(prog_repairs);
    n_stall = int'(u_icap.stalls);

    // all reports sent
    while (expect_q.size() != 0) @(posedge clk);
    check(u_icap.protocol_errors == 0, "no ICAP protocol errors");
    check(u_icap.rw_errors == 0, "R/W changed only while the ICAP was deselected");

    // the processor stops: the watchdog must expire
    t0 = $time;
    while (!wdt_expired && ($time - t0) / 10 < WDT_T + 10) @(posedge clk);
    check(wdt_expired, "watchdog expired after the processor stopped");
    if (wdt_expired) n_wdt++;

    $display("mechanisms: walk=%0d patch=%0d run_clean=%0d run_error=%0d correct=%0d mbu=%0d uart_bytes=%0d",
             n_walk, n_patch, n_run_clean, n_run_err, n_correct, n_mbu, n_uart);
    $display("            tmr_dma_upsets=%0d tmr_ctrl_upsets=%0d prog_repairs=%0d domain_faults=%0d wdt=%0d icap_stalls=%0d",
             n_tmr_dma, n_tmr_ctrl, n_prog_repair, n_dom_fault, n_wdt, n_stall);
    check(n_walk > 0, "walk happened");        check(n_patch > 0, "patch happened");
    check(n_run_clean > 0, "clean run happened"); check(n_run_err > 0, "run error happened");
    check(n_correct >= 3, "corrections happened"); check(n_mbu > 0, "MBU happened");
    check(n_uart > 0, "UART reports happened");
    if (TMR_T) begin
      check(n_tmr_dma > 0, "DMA upset happened");
      check(n_tmr_ctrl > 0, "control upset happened"); check(n_prog_repair > 0, "program repair happened");
    end
    check(n_dom_fault > 0, "domain fault happened"); check(n_wdt > 0, "watchdog expiry happened");
    check(n_stall > 0, "ICAP stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
