// k2_sub - the 32-bit Sub step of K2.
//
// The input word is split into four bytes, each byte goes through the AES S-box
// (k2_sbox), and the four results are mixed by the AES MixColumn matrix
// (02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02) with the least
// significant byte as c0. The same Sub is used by the nonlinear function and by the
// key schedule.
// Interface: combinational, din -> dout, no clock.
module k2_sub
  import k2_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  word_t s;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    k2_sbox u_sbox (.din(din[8*i +: 8]), .dout(s[8*i +: 8]));
  end

  assign dout = mix_column(s);

endmodule
