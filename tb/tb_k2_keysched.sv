// tb_k2_keysched - expands random keys and the all-zero key, compares K0..K11 with
// the reference key schedule, and checks that done rises on the 10th clock edge after the edge that samples start.
module tb_k2_keysched;
  import k2_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key;
  logic [11:0][31:0] ek;
  int checks = 0, failures = 0, cycles = 0;

  k2_keysched dut (.clk, .rst_n, .start, .key, .busy, .done, .ek);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kexp_t exp;
    int t0, lat;
    key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      key = (n == 0) ? 128'h0 : {$urandom, $urandom, $urandom, $urandom};
      exp = rkeysched(key);
      @(negedge clk); start = 1; t0 = cycles;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      lat = cycles - t0 - 1;  // clock edges after the one that samples start
      checks++;
      if (lat != 10) begin failures++; $display("FAIL latency %0d, expected 10", lat); end
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (ek[i] !== exp[i]) begin
          failures++;
          $display("FAIL key %0d K%0d: got %08h expected %08h", n, i, ek[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
