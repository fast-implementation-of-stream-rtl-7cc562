// k2_nlf_impl2 - K2 nonlinear function with pipeline registers L0 and R0
// (Implementation 2).
//
// The paths B -> adder -> Sub -> L1/R1 are cut by registers L0 and R0 placed between
// the adders and the Sub blocks. To keep the cipher's function, L0/R0 must hold, at
// every clock t, the sums of the *current* state:
//   L0 = R2_t + B_{t+4}          R0 = L2_t + B_{t+9}
// so they are computed one clock ahead. When the cipher steps, the next state's
// operands are R2_{t+1} = Sub(R1_t), L2_{t+1} = Sub(L1_t) (outputs of the R2/L2 Sub
// blocks) and B_{t+5}, B_{t+10} (FSR-B stage 5 and 10, which shift into stages 4 and
// 9). When it does not step, they are R2, L2 and stages 4, 9. Four selectors, all
// steered by step, choose between the two: two on the FSR-B side (b04/b05, b09/b10)
// and two between the R2/L2 registers and their Sub outputs.
// Then on a step: L1 <= Sub(L0), R1 <= Sub(R0), R2 <= Sub(R1), L2 <= Sub(L1).
// Interface: same as k2_nlf_impl1. Rule: after clear the block needs one clock with
// step = 0 to fill L0/R0 from the loaded state before the first step ('primed' goes
// high); an assertion checks it. This priming rule is this design's choice.
module k2_nlf_impl2
  import k2_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      step,
  input  nlf_taps_t taps,
  output word_t     zh,
  output word_t     zl,
  output logic      primed
);

  word_t r1, r2, l1, l2, l0, r0;
  word_t sub_r1, sub_r2, sub_l1, sub_l2;
  word_t sel_r2, sel_l2, sel_b4, sel_b9;

  assign zl = (taps.b0 + r2) ^ r1 ^ taps.a4;
  assign zh = (taps.b10 + l2) ^ l1 ^ taps.a0;

  k2_sub u_sub_r1 (.din(r0), .dout(sub_r1));  // next R1
  k2_sub u_sub_r2 (.din(r1), .dout(sub_r2));  // next R2
  k2_sub u_sub_l1 (.din(l0), .dout(sub_l1));  // next L1
  k2_sub u_sub_l2 (.din(l1), .dout(sub_l2));  // next L2

  // The four selectors.
  assign sel_r2 = step ? sub_r2    : r2;
  assign sel_l2 = step ? sub_l2    : l2;
  assign sel_b4 = step ? taps.b5   : taps.b4;
  assign sel_b9 = step ? taps.b10  : taps.b9;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r1, r2, l1, l2, l0, r0} <= '0;
      primed <= 1'b0;
    end else if (clear) begin
      {r1, r2, l1, l2, l0, r0} <= '0;
      primed <= 1'b0;
    end else begin
      l0     <= sel_r2 + sel_b4;
      r0     <= sel_l2 + sel_b9;
      primed <= 1'b1;
      if (step) begin
        r1 <= sub_r1;
        r2 <= sub_r2;
        l1 <= sub_l1;
        l2 <= sub_l2;
      end
    end
  end

  a_step_after_prime: assert property (@(posedge clk) disable iff (!rst_n)
                                       (step && !clear) |-> primed)
    else $error("k2_nlf_impl2: step before L0/R0 were primed");

endmodule
