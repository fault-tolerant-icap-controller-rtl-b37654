// tb_watchdog_timer: with TIMEOUT = 50, kicks every 30 clocks keep the timer
// quiet; after the kicks stop, timeout must pulse exactly 50 clocks after the
// last kick and then every 50 clocks, expired must stay set and timeouts
// count the expiries.
module tb_watchdog_timer;
  localparam int T = 50;
  logic clk = 1'b0, rst = 1'b1, kick = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic timeout, expired;
  logic [7:0] timeouts;
  watchdog_timer #(.TIMEOUT(T)) dut (.clk, .rst, .kick, .timeout, .expired, .timeouts);

  int pulses = 0, cyc = 0, first = -1;
  always @(posedge clk) begin
    cyc++;
    if (timeout) begin pulses++; if (first < 0) first = cyc; end
  end

  int kick_cyc;
  initial begin
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    for (int k = 0; k < 10; k++) begin
      repeat (29) @(posedge clk);
      #1 kick = 1'b1; @(posedge clk); #1 kick = 1'b0;
    end
    kick_cyc = cyc;
    check(pulses == 0 && !expired, "kicked timer stays quiet");
    repeat (3 * T + 5) @(posedge clk); #1;
    check(first - kick_cyc == T, $sformatf("first timeout %0d clocks after last kick", first - kick_cyc));
    check(pulses == 3, $sformatf("%0d timeouts in 3 periods", pulses));
    check(expired, "expired is set");
    check(timeouts == 8'd3, "expiries counted");
    kick = 1'b1; @(posedge clk); #1 kick = 1'b0;
    check(expired, "expired stays set after a kick");
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
