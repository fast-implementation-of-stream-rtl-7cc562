// k2_nlf_impl3 - K2 nonlinear function with parallel adder/register pairs
// (Implementation 3).
//
// Like Implementation 2, the adder -> Sub paths into L1 and R1 are cut by registers,
// but instead of selecting the adder operands, both candidate sums are computed in
// parallel every clock and registered:
//   L0  <= R2 + B_{t+4}            (valid next clock if the state holds)
//   L00 <= Sub(R1) + B_{t+5}       (= R2_{t+1} + B_{t+1+4}, valid if the state steps)
//   R0  <= L2 + B_{t+9}
//   R00 <= Sub(L1) + B_{t+10}      (= L2_{t+1} + B_{t+1+9})
// A flag 'adv' remembers whether the previous clock stepped, and two selectors after
// the registers feed Sub: L1 <= Sub(adv ? L00 : L0), R1 <= Sub(adv ? R00 : R0).
// Only two selectors are needed, and they sit after the registers, off the adder path.
// Interface: same as k2_nlf_impl2, including the one-clock priming rule after clear
// (this design's choice), checked by an assertion.
module k2_nlf_impl3
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

  word_t r1, r2, l1, l2;
  word_t l0, l00, r0, r00;
  logic  adv;
  word_t sub_r1, sub_r2, sub_l1, sub_l2;
  word_t sel_l, sel_r;

  assign zl = (taps.b0 + r2) ^ r1 ^ taps.a4;
  assign zh = (taps.b10 + l2) ^ l1 ^ taps.a0;

  // The two selectors between the register pairs and Sub.
  assign sel_l = adv ? l00 : l0;
  assign sel_r = adv ? r00 : r0;

  k2_sub u_sub_r1 (.din(sel_r), .dout(sub_r1));  // next R1
  k2_sub u_sub_r2 (.din(r1),    .dout(sub_r2));  // next R2
  k2_sub u_sub_l1 (.din(sel_l), .dout(sub_l1));  // next L1
  k2_sub u_sub_l2 (.din(l1),    .dout(sub_l2));  // next L2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r1, r2, l1, l2, l0, l00, r0, r00} <= '0;
      adv    <= 1'b0;
      primed <= 1'b0;
    end else if (clear) begin
      {r1, r2, l1, l2, l0, l00, r0, r00} <= '0;
      adv    <= 1'b0;
      primed <= 1'b0;
    end else begin
      l0     <= r2 + taps.b4;
      l00    <= sub_r2 + taps.b5;
      r0     <= l2 + taps.b9;
      r00    <= sub_l2 + taps.b10;
      adv    <= step;
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
    else $error("k2_nlf_impl3: step before the register pairs were primed");

endmodule
