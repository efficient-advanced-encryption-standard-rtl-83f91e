// tb_nb_inv_affine: exhaustive check of the normal-basis inverse affine transform
// against the standard inverse affine map computed in the polynomial basis.
module tb_nb_inv_affine;
  import aes_ref_pkg::*;

  logic [7:0] i, q;
  int checks = 0, failures = 0;

  nb_inv_affine dut (.i, .q);

  initial begin
    for (int v = 0; v < 256; v++) begin
      i = 8'(v);
      #1;
      checks++;
      if (q != p2n(inv_affine(n2p(i)))) begin
        failures++;
        $display("FAIL inv_affine(%h) = %h, expected %h", i, q, p2n(inv_affine(n2p(i))));
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
