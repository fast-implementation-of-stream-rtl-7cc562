// tb_k2_nlf_impl2 - checks the nonlinear function variant against the reference
// update equations. FSR-B is modelled as a real shift register of random words, so the
// look-ahead taps (B_{t+5}, B_{t+10}) are consistent with the next clock's B_{t+4},
// B_{t+9}. The test clears the registers, primes one clock, then steps with random
// stalls, checking z^H and z^L every clock; it clears again half way through.
// Counts: steps, stalls, step directly after a stall and vice versa.
module tb_k2_nlf_impl2;
  import k2_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  k2_pkg::nlf_taps_t taps;
  logic [31:0] zh, zl;
  logic [10:0][31:0] bm;
  logic [31:0] a0, a4;
  logic [31:0] r1, r2, l1, l2;
  int checks = 0, failures = 0, cycles = 0;
  int n_step = 0, n_stall = 0, n_resume = 0, n_clear = 0;
  logic primed;
  k2_nlf_impl2 dut (.clk, .rst_n, .clear, .step, .taps, .zh, .zl, .primed);

  assign taps = '{a0: a0, a4: a4, b0: bm[0], b4: bm[4], b5: bm[5], b9: bm[9], b10: bm[10]};

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_clear();
    @(negedge clk); clear = 1; step = 0;
    for (int m = 0; m < 11; m++) bm[m] = $urandom;
    @(negedge clk); clear = 0;
    {r1, r2, l1, l2} = '0;
    n_clear++;
    // priming clock: step stays 0
    @(negedge clk);
  endtask

  initial begin
    logic prev_step;
    bm = '0; a0 = '0; a4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      do_clear();
      prev_step = 1'b0;
      for (int i = 0; i < 400; i++) begin
        a0 = $urandom; a4 = $urandom;
        #1;
        checks += 2;
        if (zl !== ((bm[0] + r2) ^ r1 ^ a4)) begin
          failures++; $display("FAIL zl at %0d: got %08h", i, zl);
        end
        if (zh !== ((bm[10] + l2) ^ l1 ^ a0)) begin
          failures++; $display("FAIL zh at %0d: got %08h", i, zh);
        end
        step = (i < 20) ? 1'b1 : (($urandom % 4) != 0);
        if (step) begin
          n_step++;
          if (!prev_step) n_resume++;
          {r1, r2, l1, l2} = {rsub(l2 + bm[9]), rsub(r1), rsub(r2 + bm[4]), rsub(l1)};
        end else n_stall++;
        prev_step = step;
        @(negedge clk);
        if (step) bm = {32'($urandom), bm[10:1]};
      end
    end
    checks++;
    if (n_step == 0 || n_stall == 0 || n_resume < 2 || n_clear < 2) failures++;
    $display("steps=%0d stalls=%0d resumes=%0d clears=%0d", n_step, n_stall, n_resume, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
