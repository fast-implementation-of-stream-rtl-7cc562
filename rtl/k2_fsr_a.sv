// k2_fsr_a - FSR-A, the five-stage 32-bit feedback shift register of K2.
//
// Stage i holds A_{t+i}. On each step the register shifts towards stage 0 and the new
// stage 4 becomes A_{t+5} = alpha0*A_t ^ A_{t+3}, the feedback polynomial
// alpha0 x^5 + x^2 + 1. During the 24 initialisation clocks (init_mode = 1) the
// low keystream word z^L_t is also XORed into the feedback.
// Interface: load (priority) writes load_val into all stages; step advances one
// clock; otherwise the stages hold. The asynchronous active-low reset clears the
// stages (a reset value is this design's choice; K2 always loads before use).
// Timing: one step per clock, the new state is visible the cycle after the step.
module k2_fsr_a
  import k2_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  word_t [4:0]      load_val,
  input  logic             step,
  input  logic             init_mode,
  input  word_t            zl,
  output word_t [4:0]      a
);

  word_t feedback;

  always_comb begin
    feedback = mul_alpha0(a[0]) ^ a[3];
    if (init_mode) feedback ^= zl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0;
    end else if (load) begin
      a <= load_val;
    end else if (step) begin
      a <= {feedback, a[4:1]};
    end
  end

endmodule
