// tb_k2_ctrl - checks the sequencer on its own: with a key schedule that reports
// done 10 clocks after start, sched_start must pulse once, then one priming clock,
// then 24 clocks of doing with init_mode, then valid with doing following ready.
// A start while running and a start during initialisation must both restart the
// sequence.
module tb_k2_ctrl;
  logic clk = 0, rst_n = 0, start = 0, key_done = 0, ready = 0;
  logic key_start, sched_start, doing, init_mode, valid, busy;
  int checks = 0, failures = 0, cycles = 0;
  int n_restart_run = 0, n_restart_init = 0, n_stall = 0;

  k2_ctrl dut (.clk, .rst_n, .start, .key_done, .ready, .key_start, .sched_start, .doing,
               .init_mode, .valid, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Stand-in for the key schedule: done one clock, 10 clock edges after start.
  int ks_cnt = -1;
  always @(posedge clk) begin
    key_done <= 1'b0;
    if (key_start) ks_cnt <= 9;
    else if (ks_cnt > 0) ks_cnt <= ks_cnt - 1;
    else if (ks_cnt == 0) begin key_done <= 1'b1; ks_cnt <= -1; end
  end

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(logic [5:0] got, logic [5:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cycles, got, exp);
    end
  endtask

  // Runs one set-up from a start pulse; abort_at >= 0 re-issues start at that
  // clock of the set-up (counts from the start edge).
  task automatic setup_seq(int abort_at);
    @(negedge clk); start = 1; #1;
    expect_bits({busy, valid, doing, sched_start, init_mode, key_start}, 6'b100001, "start cycle");
    @(negedge clk); start = 0;
    for (int c = 1; c <= 37; c++) begin
      logic [5:0] exp;
      #1;
      if (c == abort_at) begin n_restart_init++; setup_seq(-1); return; end
      // c = clocks since the edge that sampled start
      if (c <= 11)      exp = 6'b100000;             // key schedule (done seen at 11)
      else if (c == 12) exp = 6'b100100;             // LOAD
      else if (c == 13) exp = 6'b100000;             // PRIME
      else              exp = 6'b101010;             // INIT
      expect_bits({busy, valid, doing, sched_start, init_mode, key_start}, exp,
                  $sformatf("set-up clock %0d", c));
      @(negedge clk);
    end
    expect_bits({busy, valid, doing, sched_start, init_mode, key_start},
                {3'b010 | {2'b0, ready}, 3'b000}, "first RUN clock");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ready = 1;
    setup_seq(-1);
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 50; i++) begin
        ready = 1'($urandom % 2);
        #1;
        if (!ready) n_stall++;
        expect_bits({busy, valid, doing, sched_start, init_mode, key_start},
                    {2'b01, ready, 3'b000}, "RUN");
        @(negedge clk);
      end
      n_restart_run++;
      setup_seq(round == 1 ? 20 : -1);
    end
    checks++;
    if (n_restart_run == 0 || n_restart_init == 0 || n_stall == 0) failures++;
    $display("restarts_in_run=%0d restarts_in_init=%0d stalls=%0d", n_restart_run, n_restart_init, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
