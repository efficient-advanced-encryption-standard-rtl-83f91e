// tb_nb_keygen: the key update against the FIPS-197 key schedule computed in
// the polynomial basis. The S-box results the datapath would supply are
// produced here by the reference S-box. Encryption: every step of the
// schedule of the FIPS-197 example key and of random keys. Decryption: the
// backward step must return the preceding round key.
module tb_nb_keygen;
  import aes_ref_pkg::*;

  logic            dec;
  logic [3:0]      rnd;
  logic [3:0][3:0][7:0] key, key_next;
  logic [3:0][7:0] sbox_in, sub;
  int checks = 0, failures = 0;

  nb_keygen dut (.*);

  // 128-bit AES-order block -> words/rows in the normal basis, and back.
  function automatic logic [3:0][3:0][7:0] to_words(logic [127:0] k);
    logic [3:0][3:0][7:0] w;
    for (int j = 0; j < 4; j++)
      for (int r = 0; r < 4; r++) w[j][r] = p2n(k[127 - 8*(4*j + r) -: 8]);
    return w;
  endfunction
  function automatic logic [127:0] from_words(logic [3:0][3:0][7:0] w);
    logic [127:0] k;
    for (int j = 0; j < 4; j++)
      for (int r = 0; r < 4; r++) k[127 - 8*(4*j + r) -: 8] = n2p(w[j][r]);
    return k;
  endfunction

  task automatic step(bit d, int k, logic [127:0] cur, logic [127:0] exp);
    dec = d;
    rnd = 4'(k);
    key = to_words(cur);
    #1;
    for (int r = 0; r < 4; r++) sub[r] = p2n(sbox(n2p(sbox_in[r])));
    #1;
    checks++;
    if (from_words(key_next) !== exp) begin
      failures++;
      $display("FAIL dec=%0d rnd=%0d: %h expected %h", d, k, from_words(key_next), exp);
    end
  endtask

  initial begin
    logic [127:0] k0, kprev, knext;
    for (int t = 0; t < 6; t++) begin
      k0 = (t == 0) ? 128'h000102030405060708090a0b0c0d0e0f : {$urandom, $urandom, $urandom, $urandom};
      kprev = k0;
      for (int k = 1; k <= 10; k++) begin
        knext = key_step(kprev, k);
        step(1'b0, k, kprev, knext);
        // decryption step from key k uses rcon(k) and returns key k-1
        step(1'b1, k, knext, kprev);
        kprev = knext;
      end
      if (t == 0) begin
        checks++;
        if (kprev !== 128'h13111d7fe3944a17f307a78b4d2b30c5) begin
          failures++;
          $display("FAIL FIPS-197 last round key %h", kprev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
