// tb_aes_nb_core: end-to-end test of the normal-basis AES-128 core at its
// default (and only) configuration.
// Vectors: the FIPS-197 example (key 000102..0f, plaintext 00112233..ff) and
// random blocks and keys. Inputs are converted to the normal basis here and
// results converted back; the expected values come from the polynomial-basis
// reference model. Each block is encrypted, then decrypted with the key_out
// of the encryption (the last round key), and must return the plaintext;
// key_out after decryption must be the cipher key again.
// The cycles from start to done are measured for every block. The published
// average is 108 cycles of the main clock, i.e. 216 cycles of the
// shift-register clock at which this single-clock design runs; the mean here
// must lie within 5 % of that (205 to 227 cycles).
// Mechanisms counted, each of which must occur: preliminary shift, table
// miss, lookup of the second value of a pair, 00/FF bypass of the inverter,
// issue held by the round hazard, a unit not ready for its byte of a pass,
// write-back held for a late inverter, key pass, last-round mix bypass, decryption.
module tb_aes_nb_core;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         start = 0, decrypt = 0, busy, done;
  logic [127:0] din = '0, key = '0, dout, key_out;
  int checks = 0, failures = 0, cycle = 0;

  aes_nb_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // ---------------- mechanism counters ----------------
  localparam int NM = 10;
  string m_name [NM] = '{"preliminary shift", "table miss", "second-of-pair lookup",
                         "00/FF inverter bypass", "round hazard stall", "inverter busy stall",
                         "write-back waits for late inverter", "key pass", "last-round mix bypass",
                         "decryption pass"};
  int m_cnt [NM];
  always @(negedge clk) if (rst_n) begin
    if (dut.g_sbox[0].u_inv.load && dut.g_sbox[0].u_inv.in_pre) m_cnt[0]++;
    if (dut.g_sbox[0].u_inv.t_busy && !dut.g_sbox[0].u_inv.t_triv &&
        (dut.g_sbox[0].u_inv.c0 || dut.g_sbox[0].u_inv.c1) &&
        dut.g_sbox[0].u_inv.lut_inv == 0) m_cnt[1]++;
    if (dut.g_sbox[0].u_inv.handoff && !dut.g_sbox[0].u_inv.t_triv &&
        dut.g_sbox[0].u_inv.c1) m_cnt[2]++;
    if (dut.g_sbox[0].u_inv.load && dut.g_sbox[0].u_inv.in_triv) m_cnt[3]++;
    if (dut.st == dut.S_RUN && dut.iss < 50 && !dut.iss_ok) m_cnt[4]++;
    if (dut.pass_ok && |(dut.u_in_valid & ~dut.u_in_ready)) m_cnt[5]++;
    if (dut.st == dut.S_RUN && |dut.a_v && !(&dut.a_v)) m_cnt[6]++;
    if (dut.key_we && dut.st == dut.S_RUN) m_cnt[7]++;
    if (dut.wr_en && dut.st == dut.S_RUN && dut.last_rnd) m_cnt[8]++;
    if (dut.wr_en && dut.st == dut.S_RUN && dut.dec_q) m_cnt[9]++;
  end

  task automatic run(bit d, logic [127:0] in_p, logic [127:0] key_p, output logic [127:0] out_p,
                     output logic [127:0] kout_p, output int cycles);
    int t0;
    @(posedge clk); #1;
    din = blk_p2n(in_p); key = blk_p2n(key_p); decrypt = d; start = 1;
    t0 = cycle;
    @(posedge clk); #1;
    start = 0;
    while (!done) begin @(posedge clk); #1; end
    cycles = cycle - t0;
    out_p  = blk_n2p(dout);
    kout_p = blk_n2p(key_out);
  endtask

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] pt, k, ct, ct_ref, k10, back, k0;
    int cyc, sum_cyc = 0, nblk = 0, min_cyc = 1 << 30, max_cyc = 0;
    for (int i = 0; i < NM; i++) m_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      if (t == 0) begin
        pt = 128'h00112233445566778899aabbccddeeff;
        k  = 128'h000102030405060708090a0b0c0d0e0f;
      end else begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        k  = {$urandom, $urandom, $urandom, $urandom};
      end
      ct_ref = (t == 0) ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a : encrypt(pt, k);
      run(1'b0, pt, k, ct, k10, cyc);
      chk(ct, ct_ref, "ciphertext");
      chk(k10, last_round_key(k), "last round key");
      sum_cyc += cyc; nblk++;
      if (cyc < min_cyc) min_cyc = cyc;
      if (cyc > max_cyc) max_cyc = cyc;
      run(1'b1, ct_ref, k10, back, k0, cyc);
      chk(back, pt, "decrypted plaintext");
      chk(k0, k, "cipher key after decryption");
      sum_cyc += cyc; nblk++;
      if (cyc < min_cyc) min_cyc = cyc;
      if (cyc > max_cyc) max_cyc = cyc;
    end
    $display("cycles per block: min %0d max %0d mean %0.1f", min_cyc, max_cyc,
             real'(sum_cyc) / real'(nblk));
    checks++;
    if (sum_cyc * 20 > 216 * 21 * nblk || sum_cyc * 20 < 216 * 19 * nblk) begin
      failures++;
      $display("FAIL mean block time more than 5 %% away from 216 cycles");
    end
    for (int i = 0; i < NM; i++) begin
      $display("  %-36s %0d", m_name[i], m_cnt[i]);
      checks++;
      if (m_cnt[i] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", m_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
