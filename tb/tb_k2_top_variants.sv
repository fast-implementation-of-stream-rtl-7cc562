// tb_k2_top_variants - runs the three nonlinear-function micro-architectures
// (NLF_IMPL = 1, 2, 3) side by side on the same key, IV and ready pattern and checks
// that each produces the reference keystream, including across stalls and re-keying.
module tb_k2_top_variants;
  import k2_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready = 0;
  logic [127:0] key, iv;
  logic [2:0] busy, valid;
  logic [2:0][63:0] ks;
  int checks = 0, failures = 0, cycles = 0, n_stall = 0, n_words = 0;

  k2_top #(.NLF_IMPL(1)) dut1 (.clk, .rst_n, .start, .key, .iv, .busy(busy[0]),
    .keystream_valid(valid[0]), .keystream_ready(ready), .keystream(ks[0]));
  k2_top #(.NLF_IMPL(2)) dut2 (.clk, .rst_n, .start, .key, .iv, .busy(busy[1]),
    .keystream_valid(valid[1]), .keystream_ready(ready), .keystream(ks[1]));
  k2_top #(.NLF_IMPL(3)) dut3 (.clk, .rst_n, .start, .key, .iv, .busy(busy[2]),
    .keystream_valid(valid[2]), .keystream_ready(ready), .keystream(ks[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    K2Model m;
    logic [127:0] k, v;
    logic [63:0] exp;
    m = new();
    key = '0; iv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      m.setup(k, v);
      @(negedge clk); key = k; iv = v; start = 1;
      @(negedge clk); start = 0;
      while (valid != 3'b111) @(negedge clk);
      for (int i = 0; i < 100; i++) begin
        ready = ($urandom % 3) != 0;
        #1;
        checks++;
        if (valid != 3'b111) begin failures++; $display("FAIL valid mismatch %b", valid); end
        if (ready) begin
          exp = m.next();
          n_words++;
          for (int d = 0; d < 3; d++) begin
            checks++;
            if (ks[d] !== exp) begin
              failures++;
              $display("FAIL NLF_IMPL=%0d word %0d: got %016h expected %016h", d + 1, i, ks[d], exp);
            end
          end
        end else n_stall++;
        @(negedge clk);
      end
      ready = 0;
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("words=%0d stalls=%0d", n_words, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
