// k2_dfc - dynamic feedback controller of K2 with its clock-controlled multipliers.
//
// The two clock control bits are taken from FSR-A stage 2 (A_{t+2}):
// cl1 = A_{t+2}[30], cl2 = A_{t+2}[31]. They select the FSR-B feedback coefficients:
//   term0 = (alpha1 if cl1 else alpha2) * B_t
//   term8 = (alpha3 if cl2 else 1)      * B_{t+8}
// since alpha1^cl1 + alpha2^(1-cl1) - 1 equals alpha1 for cl1 = 1 and alpha2 for
// cl1 = 0. The two products are XORed into the FSR-B feedback by k2_fsr_b.
// Interface: purely combinational.
module k2_dfc
  import k2_pkg::*;
(
  input  word_t a2,     // A_{t+2}
  input  word_t b0,     // B_t
  input  word_t b8,     // B_{t+8}
  output logic  cl1,
  output logic  cl2,
  output word_t term0,
  output word_t term8
);

  assign cl1   = a2[30];
  assign cl2   = a2[31];
  assign term0 = cl1 ? mul_alpha1(b0) : mul_alpha2(b0);
  assign term8 = cl2 ? mul_alpha3(b8) : b8;

endmodule
