// tb_bram_scrubber: the triplicated program memory with its scrubber.
// Loads tb/prog_test.hex (word i = (i * 0x2B5 + 0x111) mod 2^18 for i < 64).
// Checks: fetch returns the image even when one copy of a word is upset and
// one domain's fetch address is wrong; every upset is rewritten within one
// scrub pass (2 * DEPTH clocks) and counted once; a pass takes exactly
// 2 * DEPTH clocks; a word with two bad copies is not repaired correctly
// (the limit of voting), which the test records as expected behaviour.
module tb_bram_scrubber;
  localparam int D = 64;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [5:0]  pb_address [3];
  logic [17:0] instruction;
  logic        repair, pass_done;
  logic [15:0] repair_count;

  bram_scrubber #(.DEPTH(D), .INIT_FILE("tb/prog_test.hex")) dut (
    .clk, .rst, .pb_address, .instruction, .repair, .repair_count, .pass_done
  );

  function automatic logic [17:0] img(input int i);
    return 18'((i * 'h2B5 + 'h111));
  endfunction

  int passes = 0, last_pass = -1, cyc = 0, pass_len = 0;
  always @(posedge clk) begin
    cyc++;
    if (pass_done && !rst) begin
      if (last_pass >= 0) pass_len = cyc - last_pass;
      last_pass = cyc; passes++;
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) pb_address[i] = '0;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    // upsets in different copies at addresses 3, 17, 40, 41
    dut.g_copy[0].u_mem.mem[3]  ^= 18'h00100;
    dut.g_copy[1].u_mem.mem[17] ^= 18'h20001;
    dut.g_copy[2].u_mem.mem[40] ^= 18'h00040;
    dut.g_copy[1].u_mem.mem[41] ^= 18'h3FFFF;
    // fetch through the voters while the copies disagree; domain 2 fetches
    // from a wrong address
    foreach (pb_address[i]) pb_address[i] = 6'd3;
    pb_address[2] = 6'd9;
    @(posedge clk); #1 check(instruction == img(3), "voted fetch hides upset at 3");
    foreach (pb_address[i]) pb_address[i] = 6'd17;
    @(posedge clk); #1 check(instruction == img(17), "voted fetch hides upset at 17");
    // let one full pass (plus a step) run
    repeat (2 * D + 2) @(posedge clk);
    #1;
    for (int a = 0; a < D; a++) begin
      check(dut.g_copy[0].u_mem.mem[a] == img(a), $sformatf("copy 0 word %0d repaired", a));
      check(dut.g_copy[1].u_mem.mem[a] == img(a), $sformatf("copy 1 word %0d repaired", a));
      check(dut.g_copy[2].u_mem.mem[a] == img(a), $sformatf("copy 2 word %0d repaired", a));
    end
    check(repair_count == 16'd4, $sformatf("repairs counted %0d", repair_count));
    repeat (4 * D) @(posedge clk);
    #1 check(pass_len == 2 * D, $sformatf("scrub pass takes %0d clocks", pass_len));
    check(passes >= 3, "scrubber keeps running");
    check(repair_count == 16'd4, "no spurious repairs");
    // two copies upset the same way: the vote follows them (limit of TMR)
    dut.g_copy[0].u_mem.mem[10] ^= 18'h1;
    dut.g_copy[1].u_mem.mem[10] ^= 18'h1;
    repeat (2 * D + 2) @(posedge clk);
    #1 check(dut.g_copy[2].u_mem.mem[10] == (img(10) ^ 18'h1), "double upset outvotes the good copy");
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
