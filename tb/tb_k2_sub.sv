// tb_k2_sub - checks the Sub step (S-boxes then MixColumn) on random words against
// the reference model, plus the well-known MixColumn column db 13 53 45 -> 8e 4d a1 bc
// (fed through the inverse S-box values so that the S-box stage is bypassed).
module tb_k2_sub;
  import k2_ref_pkg::*;

  logic [31:0] din, dout;
  int checks = 0, failures = 0;

  k2_sub dut (.din, .dout);

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    for (int i = 0; i < 256; i++) if (rsbox(8'(i)) == y) return 8'(i);
    return 8'h00;
  endfunction

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
    logic [31:0] x;
    // c0 = db, c1 = 13, c2 = 53, c3 = 45 (c0 least significant)
    din = {inv_sbox(8'h45), inv_sbox(8'h53), inv_sbox(8'h13), inv_sbox(8'hdb)}; #1;
    check(dout, 32'hbca14d8e, "MixColumn known column");
    din = 32'h0; #1;
    check(dout, 32'h63636363, "Sub(0)");
    for (int i = 0; i < 300; i++) begin
      x = $urandom;
      din = x; #1;
      check(dout, rsub(x), $sformatf("Sub(%08h)", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
