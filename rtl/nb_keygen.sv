// nb_keygen: on-the-fly AES-128 round-key update around the shared S-boxes.
//
// The round key lives in the register files as four words w0..w3 (byte r of
// word j in file r). A key step borrows the four S-box units for one pass:
//   sbox_in  - the word the S-boxes must substitute: w3 for encryption,
//              w3 ^ w2 (= preceding w3) for decryption. Byte r goes to unit r.
//   sub      - the four S-box results, SubWord(sbox_in) by row.
// With T = RotWord(sub) ^ {rcon, 0, 0, 0} the new key is
//   encryption (next key):      n0 = w0^T, n1 = w1^n0, n2 = w2^n1, n3 = w3^n2
//   decryption (preceding key): p3 = w3^w2, p2 = w2^w1, p1 = w1^w0, p0 = w0^T
// rnd is the round whose constant is used (1..10): the round of the key that
// is produced for encryption, the round of the key consumed for decryption.
// RotWord is pure wiring: row r takes the S-box output of row r+1.
// Combinational; the caller loads the result into the register files.
// The shared-S-box key step and the forward/backward on-the-fly update follow
// the document; the word-parallel XOR chain is this implementation's choice.
module nb_keygen
  import aes_nb_pkg::*;
(
  input  logic          dec,
  input  logic [3:0]    rnd,
  input  nb_word_t [3:0] key,      // key[j] = word j
  output nb_word_t      sbox_in,
  input  nb_word_t      sub,
  output nb_word_t [3:0] key_next
);

  nb_word_t t;

  always_comb begin
    sbox_in = dec ? (key[3] ^ key[2]) : key[3];
    for (int r = 0; r < 4; r++)
      t[r] = sub[(r + 1) % 4];
    t[0] = t[0] ^ nb_rcon(rnd);
    if (!dec) begin
      key_next[0] = key[0] ^ t;
      key_next[1] = key[1] ^ key_next[0];
      key_next[2] = key[2] ^ key_next[1];
      key_next[3] = key[3] ^ key_next[2];
    end else begin
      key_next[3] = key[3] ^ key[2];
      key_next[2] = key[2] ^ key[1];
      key_next[1] = key[1] ^ key[0];
      key_next[0] = key[0] ^ t;
    end
  end

endmodule
