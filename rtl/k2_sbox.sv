// k2_sbox - the 8-to-8 bit substitution of the K2 Sub step (the AES S-box).
//
// The substitution is the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (0 maps to 0) followed by the AES affine map with constant 0x63.
// Following the table-based variant of the design, the result is not computed by
// inversion logic at run time: the 256 entries are computed once at elaboration by
// k2_pkg::sbox_calc and the block is a read-only table, which synthesis maps to
// LUTs or a ROM.
// Interface: combinational, din -> dout, no clock.
module k2_sbox
  import k2_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);

  typedef byte_t table_t [256];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam table_t SBOX = build_table();

  assign dout = SBOX[din];

endmodule
