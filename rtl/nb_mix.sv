// nb_mix: one of the four identical 8-bit mix units of the 32-bit datapath.
//
// Mix unit r receives the column's bytes rotated so that a = s[r],
// b = s[r+1], c = s[r+2], d = s[r+3] (indices mod 4) and produces row r of
//   MixColumns:     q = {02}a ^ {03}b ^ c ^ d
//   InvMixColumns:  q = {0E}a ^ {0B}b ^ {0D}c ^ {09}d      (inv = 1)
// All bytes are in the normal basis (alpha = {33}); {02} is the published
// normal-basis XOR network (nb_mul2) and {03}x = {02}x ^ x.
// For the inverse, the unit first adds {04}(a^c) to a and c and {04}(b^d) to
// b and d, then applies the forward equation; this factorisation
// ({0E,0B,0D,09} = {02,03,01,01} x {05,00,04,00}) is this implementation's
// way of adding the inverse mix the document calls for, not the document's.
// Combinational.
module nb_mix
  import aes_nb_pkg::*;
(
  input  logic     inv,
  input  nb_byte_t a,
  input  nb_byte_t b,
  input  nb_byte_t c,
  input  nb_byte_t d,
  output nb_byte_t q
);

  nb_byte_t u, v, a2, b2, c2, d2, ta, tb;

  always_comb begin
    u  = inv ? nb_mul2(nb_mul2(a ^ c)) : 8'h00;
    v  = inv ? nb_mul2(nb_mul2(b ^ d)) : 8'h00;
    a2 = a ^ u;
    c2 = c ^ u;
    b2 = b ^ v;
    d2 = d ^ v;
    ta = nb_mul2(a2);
    tb = nb_mul2(b2) ^ b2;
    q  = ta ^ tb ^ c2 ^ d2;
  end

endmodule
