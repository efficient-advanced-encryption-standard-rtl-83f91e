// nb_affine: the AES S-box affine transformation, rewritten for the normal
// basis generated by alpha = {33}.
//
// The standard affine map b' = A*b ^ {63} is linear plus a constant, so a
// change of basis turns it into another small XOR network with a constant.
// The eight equations below are the published normal-basis form (14 XORs
// before sharing i[6]^i[5]); the constant {63} appears as the inverted bits
// 0, 3 and 7 ({89} in the normal basis). Purely combinational.
module nb_affine
  import aes_nb_pkg::*;
(
  input  nb_byte_t i,
  output nb_byte_t q
);

  logic x65;  // shared subexpression i[6] ^ i[5]
  assign x65 = i[6] ^ i[5];

  assign q[0] = i[6] ^ i[2] ^ i[1] ^ i[0] ^ 1'b1;
  assign q[1] = x65 ^ i[2];
  assign q[2] = i[5] ^ i[4] ^ i[3] ^ i[1];
  assign q[3] = i[6] ^ i[4] ^ 1'b1;
  assign q[4] = i[4];
  assign q[5] = i[5] ^ i[4];
  assign q[6] = i[7] ^ x65;
  assign q[7] = x65 ^ i[3] ^ 1'b1;

endmodule
