// nb_lookup: rotated conjugate-set-leader table of the normal-basis inverter.
//
// Rotating (squaring) an element rotates its inverse the same way, so one
// table entry per conjugate set (the eight rotations of a byte) is enough.
// Each set's leader is chosen as a rotation whose bits 7:6 are 01, so only
// bits 5:0 of a candidate are decoded and the table holds 34 entries for
// GF(2^8) (alpha = {33}). The two sets with no 01 pattern, {00} and {FF},
// are handled by the inversion unit and are not stored.
//
// Interface: idx = bits 5:0 of a candidate whose bits 7:6 are 01.
// inv = inverse of that leader in the normal basis, or 00 when the candidate
// is not a leader (every true inverse is non-zero, so an OR of inv is the
// "found" test). Purely combinational.
// The table contents are the published leader/inverse pairs; coding it as a
// case statement (left to logic synthesis) is this implementation's choice.
module nb_lookup
  import aes_nb_pkg::*;
(
  input  logic [5:0] idx,
  output nb_byte_t   inv
);

  always_comb begin
    unique case (idx)
      6'h00: inv = 8'hCB;  // leader 40
      6'h02: inv = 8'hAE;  // leader 42
      6'h04: inv = 8'h11;  // leader 44
      6'h06: inv = 8'h0D;  // leader 46
      6'h07: inv = 8'h52;  // leader 47
      6'h0D: inv = 8'hAD;  // leader 4D
      6'h0E: inv = 8'h07;  // leader 4E
      6'h10: inv = 8'hB7;  // leader 50
      6'h11: inv = 8'h7D;  // leader 51
      6'h12: inv = 8'h47;  // leader 52
      6'h15: inv = 8'hAA;  // leader 55
      6'h16: inv = 8'h17;  // leader 56
      6'h1A: inv = 8'h81;  // leader 5A
      6'h1E: inv = 8'h02;  // leader 5E
      6'h20: inv = 8'h96;  // leader 60
      6'h21: inv = 8'h36;  // leader 61
      6'h22: inv = 8'h26;  // leader 62
      6'h26: inv = 8'hBB;  // leader 66
      6'h27: inv = 8'h3C;  // leader 67
      6'h28: inv = 8'h32;  // leader 68
      6'h2C: inv = 8'hC2;  // leader 6C
      6'h2D: inv = 8'h6A;  // leader 6D
      6'h2E: inv = 8'hFB;  // leader 6E
      6'h2F: inv = 8'hA0;  // leader 6F
      6'h30: inv = 8'hE4;  // leader 70
      6'h31: inv = 8'h65;  // leader 71
      6'h35: inv = 8'h12;  // leader 75
      6'h37: inv = 8'hCC;  // leader 77
      6'h38: inv = 8'hCE;  // leader 78
      6'h3A: inv = 8'h7C;  // leader 7A
      6'h3C: inv = 8'h7A;  // leader 7C
      6'h3D: inv = 8'h51;  // leader 7D
      6'h3E: inv = 8'hE7;  // leader 7E
      6'h3F: inv = 8'hCD;  // leader 7F
      default: inv = 8'h00;
    endcase
  end

endmodule
