// tb_tmr_state: checks the feedback-TMR register. Each domain computes
// "state + 1" from its own voted value (a counter). An upset written into one
// of the three copies must not change any domain's view and must be gone
// after the next clock; with TMR = 0 the same upset does show (the baseline).
module tb_tmr_state;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] d [3], q [3], d1 [3], q1 [3];
  tmr_state #(.W(8), .TMR(1'b1), .RST_VAL(8'h10)) dut (.clk, .rst, .d, .q);
  tmr_state #(.W(8), .TMR(1'b0), .RST_VAL(8'h10)) ref1 (.clk, .rst, .d(d1), .q(q1));

  for (genvar i = 0; i < 3; i++) begin : g
    assign d[i]  = q[i] + 8'd1;
    assign d1[i] = q1[i] + 8'd1;
  end

  logic [7:0] expv;
  initial begin
    repeat (2) @(posedge clk); #1;
    check(q[0] == 8'h10 && q[1] == 8'h10 && q[2] == 8'h10, "reset value");
    rst = 1'b0;
    expv = 8'h10;
    for (int t = 0; t < 40; t++) begin
      @(posedge clk); #1; expv++;
      if (t % 5 == 2) begin
        int k;
        k = t % 3;
        dut.g_tmr.r[k] = dut.g_tmr.r[k] ^ 8'(1 << (t % 8));   // upset one copy
        #1;
        for (int i = 0; i < 3; i++) check(q[i] == expv, $sformatf("voted view hides upset, t=%0d", t));
      end else begin
        for (int i = 0; i < 3; i++) check(q[i] == expv, $sformatf("count t=%0d dom %0d", t, i));
        check(dut.g_tmr.r[0] == expv && dut.g_tmr.r[1] == expv && dut.g_tmr.r[2] == expv, "copies repaired");
      end
    end
    // baseline: one register, an upset shows at once
    ref1.g_single.r0 = ref1.g_single.r0 ^ 8'h01;
    #1 check(q1[0] == (expv ^ 8'h01), "unmitigated register shows upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
