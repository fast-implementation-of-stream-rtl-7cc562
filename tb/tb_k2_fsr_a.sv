// tb_k2_fsr_a - drives FSR-A with load, random steps/holds and random init-mode
// z^L, and compares every stage with a history-based model
// A_{t+5} = alpha0*A_t ^ A_{t+3} (^ z^L in init mode).
module tb_k2_fsr_a;
  import k2_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0, init_mode = 0;
  logic [4:0][31:0] load_val, a, model;
  logic [31:0] zl;
  int checks = 0, failures = 0, cycles = 0, n_steps = 0, n_holds = 0, n_init = 0;

  k2_fsr_a dut (.clk, .rst_n, .load, .load_val, .step, .init_mode, .zl, .a);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] fb;
    load_val = '0; zl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 5; m++) load_val[m] = $urandom;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; model = load_val;
    for (int i = 0; i < 600; i++) begin
      step = ($urandom % 4) != 0; init_mode = ($urandom % 2) == 0; zl = $urandom;
      fb = ra0(model[0]) ^ model[3] ^ (init_mode ? zl : 32'h0);
      if (step) begin model = {fb, model[4:1]}; n_steps++; if (init_mode) n_init++; end
      else n_holds++;
      @(negedge clk);
      for (int m = 0; m < 5; m++) begin
        checks++;
        if (a[m] !== model[m]) begin
          failures++;
          $display("FAIL cycle %0d stage %0d: got %08h expected %08h", i, m, a[m], model[m]);
        end
      end
    end
    checks++;
    if (n_steps == 0 || n_holds == 0 || n_init == 0) failures++;
    $display("steps=%0d holds=%0d init_steps=%0d", n_steps, n_holds, n_init);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
