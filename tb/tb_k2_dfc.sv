// tb_k2_dfc - checks the clock control bits and the clock-controlled FSR-B
// multiplications for random words and all four (cl1, cl2) combinations.
module tb_k2_dfc;
  import k2_ref_pkg::*;

  logic [31:0] a2, b0, b8, term0, term8;
  logic        cl1, cl2;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  k2_dfc dut (.a2, .b0, .b8, .cl1, .cl2, .term0, .term8);

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a2 = $urandom; b0 = $urandom; b8 = $urandom;
      if (i < 8) b0 = 32'h1 << (24 + i);   // single bits in the top byte
      #1;
      seen[{a2[31], a2[30]}]++;
      check(32'(cl1), 32'(a2[30]), "cl1");
      check(32'(cl2), 32'(a2[31]), "cl2");
      check(term0, a2[30] ? ra1(b0) : ra2(b0), "term0");
      check(term8, a2[31] ? ra3(b8) : b8, "term8");
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL clock-control case %0d never seen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
