// tb_k2_fsr_b - FSR-B together with the dynamic feedback controller: random
// control word A_{t+2}, random steps/holds and init-mode z^H, compared with
// B_{t+11} = (alpha1|alpha2)*B_t ^ B_{t+1} ^ B_{t+6} ^ (1|alpha3)*B_{t+8} (^ z^H).
module tb_k2_fsr_b;
  import k2_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0, init_mode = 0;
  logic [10:0][31:0] load_val, b, model;
  logic [31:0] zh, a2, term0, term8;
  logic cl1, cl2;
  int checks = 0, failures = 0, cycles = 0, n_steps = 0, n_holds = 0, n_init = 0;

  k2_dfc u_dfc (.a2, .b0(b[0]), .b8(b[8]), .cl1, .cl2, .term0, .term8);
  k2_fsr_b dut (.clk, .rst_n, .load, .load_val, .step, .init_mode, .zh, .term0, .term8, .b);

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
    load_val = '0; zh = '0; a2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 11; m++) load_val[m] = $urandom;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; model = load_val;
    for (int i = 0; i < 600; i++) begin
      step = ($urandom % 4) != 0; init_mode = ($urandom % 2) == 0; zh = $urandom; a2 = $urandom;
      fb = (a2[30] ? ra1(model[0]) : ra2(model[0])) ^ model[1] ^ model[6]
         ^ (a2[31] ? ra3(model[8]) : model[8]) ^ (init_mode ? zh : 32'h0);
      if (step) begin model = {fb, model[10:1]}; n_steps++; if (init_mode) n_init++; end
      else n_holds++;
      @(negedge clk);
      for (int m = 0; m < 11; m++) begin
        checks++;
        if (b[m] !== model[m]) begin
          failures++;
          $display("FAIL cycle %0d stage %0d: got %08h expected %08h", i, m, b[m], model[m]);
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
