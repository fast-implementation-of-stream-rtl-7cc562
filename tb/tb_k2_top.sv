// tb_k2_top - end-to-end test of the K2 keystream generator at its default
// configuration, against the software reference model.
// It sets up several key/IV pairs (all-zero and random), checks the 37-clock set-up
// latency, compares every keystream word taken, and exercises: back-to-back output
// at one 64-bit word per clock, consumer stalls (ready low), re-keying while
// running, and a restart in the middle of initialisation. Each mechanism is counted
// and a failure is counted for one that never happened.
module tb_k2_top;
  import k2_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready = 0;
  logic [127:0] key, iv;
  logic busy, valid;
  logic [63:0] ks;
  int checks = 0, failures = 0, cycles = 0;
  int n_setup = 0, n_init_clocks = 0, n_words = 0, n_stall = 0, n_rekey_run = 0;
  int n_restart_init = 0, max_burst = 0;

  k2_top dut (.clk, .rst_n, .start, .key, .iv, .busy, .keystream_valid(valid),
              .keystream_ready(ready), .keystream(ks));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (dut.init_mode && dut.doing) n_init_clocks++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // Start a set-up; if abort_after > 0, issue a new start that many clocks later.
  task automatic setup(inout logic [127:0] k, inout logic [127:0] v, input int abort_after);
    int t0, lat;
    @(negedge clk); key = k; iv = v; start = 1; t0 = cycles;
    @(negedge clk); start = 0; key = '0; iv = '0;
    if (abort_after > 0) begin
      repeat (abort_after) @(negedge clk);
      checks++;
      if (!busy || valid) begin failures++; $display("FAIL not in set-up when restarting"); end
      n_restart_init++;
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      key = k; iv = v; start = 1; t0 = cycles;
      @(negedge clk); start = 0; key = '0; iv = '0;
    end
    while (!valid) @(negedge clk);
    lat = cycles - t0 - 1;
    checks++;
    if (lat != 37) begin failures++; $display("FAIL set-up latency %0d, expected 37", lat); end
    n_setup++;
  endtask

  // Take n words, with stall probability stall_pct.
  task automatic take(K2Model m, int n, int stall_pct);
    int got = 0, burst = 0;
    while (got < n) begin
      ready = ($urandom % 100) >= stall_pct;
      #1;
      checks++;
      if (!valid) begin failures++; $display("FAIL valid dropped in RUN"); end
      if (ready) begin
        check64(ks, m.next(), $sformatf("word %0d", got));
        got++; n_words++; burst++;
        if (burst > max_burst) max_burst = burst;
      end else begin
        n_stall++; burst = 0;
      end
      @(negedge clk);
    end
    ready = 0;
  endtask

  initial begin
    K2Model m;
    logic [127:0] k, v;
    m = new();
    key = '0; iv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1: all-zero key and IV, a long back-to-back run
    k = '0; v = '0;
    setup(k, v, 0); m.setup(k, v);
    take(m, 64, 0);

    // 2: random key/IV with stalls, then re-key while running
    for (int n = 0; n < 3; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      setup(k, v, 0); m.setup(k, v);
      if (n > 0) n_rekey_run++;
      take(m, 40, 30);
    end

    // 3: restart in the middle of initialisation (20 clocks into the set-up)
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    setup(k, v, 20);   // returns the key/IV of the second start
    m.setup(k, v);
    take(m, 30, 20);

    checks++;
    if (n_rekey_run == 0 || n_restart_init == 0 || n_stall == 0 || max_burst < 32 ||
        n_init_clocks < 24 * n_setup) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("setups=%0d init_clocks=%0d words=%0d stalls=%0d rekey_in_run=%0d restart_in_init=%0d max_burst=%0d",
             n_setup, n_init_clocks, n_words, n_stall, n_rekey_run, n_restart_init, max_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
