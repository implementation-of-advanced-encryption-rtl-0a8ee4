// aes_subbytes: SubBytes (inverse_in = 0) or InvSubBytes (inverse_in = 1) of
// one byte, purely combinational.
//
// Only one forward S-box is used for both directions. With S(x) = A(x^-1),
// where A is the affine map, the field inverse is x^-1 = A^-1(S(x)), so
//   InvS(y) = (A^-1(y))^-1 = A^-1(S(A^-1(y))).
// In inverse mode the byte therefore passes through the inverse affine map,
// the forward S-box and the inverse affine map again. Sharing the S-box this
// way is a choice of this design.
module aes_subbytes
  import aes_pkg::*;
(
  input  logic  inverse_in,
  input  byte_t data_in,
  output byte_t data_out
);

  byte_t s_in, s_out;

  assign s_in = inverse_in ? inv_affine(data_in) : data_in;

  aes_sbox u_s1 (
    .data_in (s_in),
    .data_out(s_out)
  );

  assign data_out = inverse_in ? inv_affine(s_out) : s_out;

endmodule
