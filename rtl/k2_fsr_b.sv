// k2_fsr_b - FSR-B, the eleven-stage 32-bit feedback shift register of K2.
//
// Stage i holds B_{t+i}. On each step the register shifts towards stage 0 and the new
// stage 10 becomes
//   B_{t+11} = term0 ^ B_{t+1} ^ B_{t+6} ^ term8      (^ z^H_t while init_mode = 1)
// where term0 = (alpha1 or alpha2)*B_t and term8 = (1 or alpha3)*B_{t+8} come from
// the dynamic feedback controller (k2_dfc), which sees FSR-A stage 2.
// Interface: load (priority) writes load_val; step advances one clock; otherwise
// hold. Asynchronous active-low reset clears the stages (this design's choice).
// Timing: one step per clock.
module k2_fsr_b
  import k2_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  word_t [10:0]     load_val,
  input  logic             step,
  input  logic             init_mode,
  input  word_t            zh,
  input  word_t            term0,   // clock-controlled multiple of B_t
  input  word_t            term8,   // clock-controlled multiple of B_{t+8}
  output word_t [10:0]     b
);

  word_t feedback;

  always_comb begin
    feedback = term0 ^ b[1] ^ b[6] ^ term8;
    if (init_mode) feedback ^= zh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b <= '0;
    end else if (load) begin
      b <= load_val;
    end else if (step) begin
      b <= {feedback, b[10:1]};
    end
  end

endmodule
