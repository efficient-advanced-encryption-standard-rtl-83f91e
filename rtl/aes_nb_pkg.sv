// aes_nb_pkg: types, constants and small GF(2^8) functions shared by the
// normal-basis AES datapath.
//
// Every byte in this design is a GF(2^8) element written in the normal basis
// generated by alpha = {33} (polynomial-basis value, AES field polynomial
// x^8+x^4+x^3+x+1): bit i is the coefficient of alpha^(2^i). With that bit
// order, squaring is a one-bit rotate left and the field's one is {FF}.
// The basis, the multiply-by-{02} equations and the AES round structure follow
// the published architecture; the state/word types, the rcon table and the
// sequence numbering are this implementation's own.
package aes_nb_pkg;

  typedef logic [7:0] nb_byte_t;          // one field element, normal basis
  typedef nb_byte_t [3:0] nb_word_t;      // one column/word, index = row

  localparam int unsigned NROUNDS = 10;   // AES-128

  // Multiply by {02} in the normal basis (alpha = {33}).
  function automatic nb_byte_t nb_mul2(nb_byte_t i);
    nb_byte_t q;
    q[0] = i[7] ^ i[6] ^ i[4] ^ i[2] ^ i[1];
    q[1] = i[6] ^ i[5] ^ i[4] ^ i[1];
    q[2] = i[7] ^ i[4] ^ i[0];
    q[3] = i[4] ^ i[2] ^ i[0];
    q[4] = i[6] ^ i[5] ^ i[2];
    q[5] = i[7] ^ i[6] ^ i[2] ^ i[1];
    q[6] = i[6] ^ i[5] ^ i[4] ^ i[3] ^ i[2] ^ i[0];
    q[7] = i[6] ^ i[4] ^ i[2] ^ i[1];
    return q;
  endfunction

  // Round constant of round k (1..10): {02}^(k-1), written in the normal basis.
  function automatic nb_byte_t nb_rcon(logic [3:0] k);
    nb_byte_t r;
    case (k)
      4'd1:    r = 8'hFF;  // {01}
      4'd2:    r = 8'h1D;  // {02}
      4'd3:    r = 8'h3A;  // {04}
      4'd4:    r = 8'h7E;  // {08}
      4'd5:    r = 8'h74;  // {10}
      4'd6:    r = 8'h97;  // {20}
      4'd7:    r = 8'hFC;  // {40}
      4'd8:    r = 8'hF2;  // {80}
      4'd9:    r = 8'hE8;  // {1B}
      4'd10:   r = 8'hC4;  // {36}
      default: r = 8'h00;
    endcase
    return r;
  endfunction

  // One-bit rotations of a byte (Definitions RL and RR).
  function automatic nb_byte_t rotl1(nb_byte_t x);
    return {x[6:0], x[7]};
  endfunction
  function automatic nb_byte_t rotr1(nb_byte_t x);
    return {x[0], x[7:1]};
  endfunction

endpackage
