// tb_k2_sbox - exhaustive check of the S-box table against a search-based inverse
// plus the printed affine matrix, and against five well-known AES S-box entries.
module tb_k2_sbox;
  import k2_ref_pkg::*;

  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  k2_sbox dut (.din, .dout);

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); #1;
      check(dout, rsbox(8'(i)), $sformatf("sbox[%02h]", i));
    end
    din = 8'h00; #1; check(dout, 8'h63, "known 00");
    din = 8'h01; #1; check(dout, 8'h7c, "known 01");
    din = 8'h53; #1; check(dout, 8'hed, "known 53");
    din = 8'h10; #1; check(dout, 8'hca, "known 10");
    din = 8'hff; #1; check(dout, 8'h16, "known ff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
