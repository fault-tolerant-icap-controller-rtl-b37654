// tb_prog_bram: the program memory loads tb/prog_test.hex (64 words, word i =
// (i * 0x2B5 + 0x111) mod 2^18, the rest zero), returns it on the fetch port
// one clock after the address, and takes writes on the scrub port.
module tb_prog_bram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  a_addr, b_addr;
  logic [17:0] a_rdata, b_rdata, b_wdata;
  logic        b_we;
  prog_bram #(.INIT_FILE("tb/prog_test.hex")) dut (.clk, .a_addr, .a_rdata, .b_we, .b_addr, .b_wdata, .b_rdata);

  function automatic logic [17:0] img(input int i);
    return (i < 64) ? 18'((i * 'h2B5 + 'h111)) : 18'h0;
  endfunction

  initial begin
    b_we = 0; b_addr = 0; b_wdata = 0;
    for (int i = 0; i < 80; i++) begin
      a_addr = 10'(i); b_addr = 10'(79 - i);
      @(posedge clk); #1;
      checks++; if (a_rdata !== img(i)) begin failures++; $display("FAIL fetch %0d", i); end
      checks++; if (b_rdata !== img(79 - i)) begin failures++; $display("FAIL scrub read %0d", i); end
    end
    b_we = 1; b_addr = 10'd5; b_wdata = 18'h2_AAAA; a_addr = 10'd5;
    @(posedge clk); #1 b_we = 0;
    checks++; if (a_rdata !== img(5)) begin failures++; $display("FAIL read-before-write"); end
    @(posedge clk); #1;
    checks++; if (a_rdata !== 18'h2_AAAA) begin failures++; $display("FAIL write"); end
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
