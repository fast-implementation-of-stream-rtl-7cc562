// k2_nlf_impl1 - K2 nonlinear function, direct form (Implementation 1).
//
// Four 32-bit internal registers R1, R2, L1, L2. Keystream of the current state:
//   z^L = (B_t + R2) ^ R1 ^ A_{t+4}        z^H = (B_{t+10} + L2) ^ L1 ^ A_t
// ('+' is addition modulo 2^32, written as a plain adder). On a step:
//   R1 <= Sub(L2 + B_{t+9})   R2 <= Sub(R1)   L1 <= Sub(R2 + B_{t+4})   L2 <= Sub(L1)
// The S-boxes are tables (k2_sbox). The longest path is B -> adder -> Sub -> R1/L1.
// Interface: clear (priority) zeroes the four registers, as the K2 state load
// requires; step advances one clock; zh/zl are combinational from the registers and
// the taps. The taps field b5 is not used by this variant. Asynchronous active-low
// reset clears the registers (this design's choice).
module k2_nlf_impl1
  import k2_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      step,
  input  nlf_taps_t taps,
  output word_t     zh,
  output word_t     zl
);

  word_t r1, r2, l1, l2;
  word_t sub_r1_in, sub_l1_in, sub_r1, sub_r2, sub_l1, sub_l2;

  assign zl = (taps.b0 + r2) ^ r1 ^ taps.a4;
  assign zh = (taps.b10 + l2) ^ l1 ^ taps.a0;

  assign sub_r1_in = l2 + taps.b9;
  assign sub_l1_in = r2 + taps.b4;

  k2_sub u_sub_r1 (.din(sub_r1_in), .dout(sub_r1));  // next R1
  k2_sub u_sub_r2 (.din(r1),        .dout(sub_r2));  // next R2
  k2_sub u_sub_l1 (.din(sub_l1_in), .dout(sub_l1));  // next L1
  k2_sub u_sub_l2 (.din(l1),        .dout(sub_l2));  // next L2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r1, r2, l1, l2} <= '0;
    end else if (clear) begin
      {r1, r2, l1, l2} <= '0;
    end else if (step) begin
      r1 <= sub_r1;
      r2 <= sub_r2;
      l1 <= sub_l1;
      l2 <= sub_l2;
    end
  end

endmodule
