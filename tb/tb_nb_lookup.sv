// tb_nb_lookup: exhaustive check of the conjugate-set-leader table.
// For each of the 64 candidates 01xxxxxx: a non-zero output must be the true
// inverse (product = one, {FF} in the normal basis). The leaders found must
// be exactly 34 and lie in 34 different conjugate sets, which together with
// {00} and {FF} must cover all 256 bytes.
module tb_nb_lookup;
  import aes_ref_pkg::*;

  logic [5:0] idx;
  logic [7:0] inv;
  int checks = 0, failures = 0;

  nb_lookup dut (.idx, .inv);

  function automatic logic [7:0] rl(logic [7:0] x, int k);
    for (int i = 0; i < k; i++) x = {x[6:0], x[7]};
    return x;
  endfunction

  initial begin
    bit covered [256];
    int nleaders = 0, ncovered = 0;
    foreach (covered[i]) covered[i] = 0;
    for (int i = 0; i < 64; i++) begin
      logic [7:0] x;
      idx = 6'(i);
      x = {2'b01, idx};
      #1;
      if (inv != 0) begin
        nleaders++;
        checks++;
        if (gmul(n2p(x), n2p(inv)) != 8'h01) begin
          failures++;
          $display("FAIL leader %h -> %h is not its inverse", x, inv);
        end
        checks++;
        if (covered[x]) begin
          failures++;
          $display("FAIL leader %h shares a conjugate set with another leader", x);
        end
        for (int k = 0; k < 8; k++) covered[rl(x, k)] = 1;
      end
    end
    covered[8'h00] = 1;
    covered[8'hFF] = 1;
    foreach (covered[i]) if (covered[i]) ncovered++;
    checks++;
    if (nleaders != 34) begin failures++; $display("FAIL %0d leaders, expected 34", nleaders); end
    checks++;
    if (ncovered != 256) begin failures++; $display("FAIL leaders cover %0d bytes", ncovered); end
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
