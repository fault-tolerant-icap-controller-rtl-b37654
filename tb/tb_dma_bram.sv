// tb_dma_bram: random reads and writes on both ports of the frame buffer
// against a reference array, with the one-clock read latency and the
// read-before-write behaviour checked.
module tb_dma_bram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_we, b_we;
  logic [8:0]  a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  dma_bram dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_we, .b_addr, .b_wdata, .b_rdata);

  logic [31:0] refm [512];
  logic [31:0] exp_a, exp_b;

  initial begin
    for (int i = 0; i < 512; i++) refm[i] = '0;
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int t = 0; t < 3000; t++) begin
      a_we = ($urandom % 3) == 0; b_we = ($urandom % 3) == 0;
      a_addr = 9'($urandom % 64); b_addr = 9'($urandom % 64);
      if (a_addr == b_addr) a_we = 0;
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = refm[a_addr]; exp_b = refm[b_addr];
      @(posedge clk);
      if (a_we) refm[a_addr] = a_wdata;
      if (b_we) refm[b_addr] = b_wdata;
      #1;
      checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL port A t=%0d", t); end
      checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL port B t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
