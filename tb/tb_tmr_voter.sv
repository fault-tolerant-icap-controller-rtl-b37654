// tb_tmr_voter: exhaustive check of the 2-of-3 majority voter on 3-bit words
// (every combination of a, b, c) against a per-bit count of ones, plus random
// 8-bit vectors with one corrupted copy.
module tb_tmr_voter;
  int checks = 0, failures = 0;
  logic [2:0] a, b, c, y;
  logic       mis;
  logic [7:0] a8, b8, c8, y8;
  logic       mis8;

  tmr_voter #(.W(3)) dut  (.a, .b, .c, .y, .mismatch(mis));
  tmr_voter #(.W(8)) dut8 (.a(a8), .b(b8), .c(c8), .y(y8), .mismatch(mis8));

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [2:0] exp;
      {a, b, c} = 9'(i);
      #1;
      for (int k = 0; k < 3; k++) exp[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++; if (y !== exp) begin failures++; $display("FAIL y %b %b %b -> %b", a, b, c, y); end
      checks++; if (mis !== !(a == b && b == c)) begin failures++; $display("FAIL mismatch"); end
    end
    for (int i = 0; i < 200; i++) begin
      logic [7:0] good;
      good = 8'($urandom);
      a8 = good; b8 = good; c8 = good;
      case (i % 3)
        0: a8 = 8'($urandom);
        1: b8 = 8'($urandom);
        default: c8 = 8'($urandom);
      endcase
      #1;
      checks++; if (y8 !== good) begin failures++; $display("FAIL single bad copy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
