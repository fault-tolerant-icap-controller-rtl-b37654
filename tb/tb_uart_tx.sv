// tb_uart_tx: sends random bytes at CLK_HZ / BAUD = 8 clocks per bit and
// decodes the line independently (sampling mid-bit after each falling start
// edge). Checks each byte, the stop bit, the bit time and that busy covers
// the whole frame.
module tb_uart_tx;
  localparam int DIV = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] data;
  logic valid, busy, tx;
  uart_tx #(.CLK_HZ(DIV * 1000), .BAUD(1000)) dut (.clk, .rst, .data, .valid, .busy, .tx);

  logic [7:0] sent [$];
  int received = 0;

  // receiver
  initial begin
    logic [7:0] r;
    forever begin
      @(negedge tx);
      repeat (DIV / 2) @(posedge clk);
      check(tx == 1'b0, "start bit");
      for (int b = 0; b < 8; b++) begin
        repeat (DIV) @(posedge clk);
        r[b] = tx;
      end
      repeat (DIV) @(posedge clk);
      check(tx == 1'b1, "stop bit");
      check(sent.size() > 0 && r == sent[0], $sformatf("byte %h", r));
      if (sent.size() > 0) void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    valid = 0; data = 0;
    repeat (3) @(posedge clk); #1 rst = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    for (int n = 0; n < 12; n++) begin
      int t;
      data = 8'($urandom); valid = 1'b1;
      sent.push_back(data);
      @(posedge clk); #1 valid = 1'b0;
      t = 0;
      while (busy) begin @(posedge clk); #1; t++; end
      check(t == 10 * DIV, $sformatf("busy for %0d clocks", t));
      repeat ($urandom % 5) @(posedge clk);
      #1;
    end
    repeat (2 * DIV) @(posedge clk);
    check(received == 12, $sformatf("%0d bytes received", received));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
