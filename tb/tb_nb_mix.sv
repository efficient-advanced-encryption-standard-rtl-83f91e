// tb_nb_mix: four mix units wired as in the datapath (unit r sees the column
// rotated by r) must produce MixColumns, and with inv = 1 InvMixColumns, of
// random columns. The reference works in the polynomial basis.
module tb_nb_mix;
  import aes_ref_pkg::*;

  logic       inv;
  logic [7:0] s [4];
  logic [7:0] q [4];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 4; r++) begin : g
    nb_mix dut (.inv, .a(s[r]), .b(s[(r+1)%4]), .c(s[(r+2)%4]), .d(s[(r+3)%4]), .q(q[r]));
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      state_t ps, pm;
      inv = t[0];
      for (int r = 0; r < 4; r++) begin
        s[r] = 8'($urandom);
        if (t < 8) s[r] = (t < 4) ? 8'h00 : 8'hFF;
        ps[r][0] = n2p(s[r]);
        for (int c = 1; c < 4; c++) ps[r][c] = 8'h00;
      end
      pm = mix_columns(ps, inv);
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (q[r] != p2n(pm[r][0])) begin
          failures++;
          $display("FAIL inv=%0d row %0d: %h expected %h", inv, r, q[r], p2n(pm[r][0]));
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
