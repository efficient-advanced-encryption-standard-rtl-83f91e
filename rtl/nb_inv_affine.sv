// nb_inv_affine: inverse of the S-box affine transformation in the normal
// basis generated by alpha = {33}, placed in front of the inversion unit for
// decryption (InvSubBytes = inverse(inverse-affine(x))).
//
// The document asks for this function but does not print it. The equations
// below are the standard inverse affine map (b' = A^-1 * (b ^ {63}), i.e.
// rotations 1, 3, 6 plus {05}) carried through the same change of basis as
// nb_affine; the constant is {C5} in the normal basis. Combinational.
module nb_inv_affine
  import aes_nb_pkg::*;
(
  input  nb_byte_t i,
  output nb_byte_t q
);

  assign q[0] = i[0] ^ i[1] ^ i[2] ^ i[3] ^ i[4] ^ i[5] ^ i[7] ^ 1'b1;
  assign q[1] = i[2] ^ i[3] ^ i[7];
  assign q[2] = i[1] ^ i[3] ^ i[5] ^ 1'b1;
  assign q[3] = i[3] ^ i[5] ^ i[7];
  assign q[4] = i[4];
  assign q[5] = i[4] ^ i[5];
  assign q[6] = i[3] ^ i[4] ^ 1'b1;
  assign q[7] = i[3] ^ i[5] ^ i[6] ^ 1'b1;

endmodule
