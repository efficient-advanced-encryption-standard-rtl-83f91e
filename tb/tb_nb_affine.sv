// tb_nb_affine: exhaustive check of the normal-basis affine transform
// against the standard affine map computed in the polynomial basis.
module tb_nb_affine;
  import aes_ref_pkg::*;

  logic [7:0] i, q;
  int checks = 0, failures = 0;

  nb_affine dut (.i, .q);

  initial begin
    for (int v = 0; v < 256; v++) begin
      i = 8'(v);
      #1;
      checks++;
      if (q != p2n(affine(n2p(i)))) begin
        failures++;
        $display("FAIL affine(%h) = %h, expected %h", i, q, p2n(affine(n2p(i))));
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
