// tb_nb_rf: one row register file against a behavioural copy. Random state
// writes, reads through the read port and the full view, and key loads;
// also checks that reset clears everything.
module tb_nb_rf;
  logic            clk = 0, rst_n = 0;
  logic [1:0]      rd_addr = 0, wr_addr = 0;
  logic [7:0]      rd_data, wr_data = 0;
  logic            wr_en = 0, key_we = 0;
  logic [3:0][7:0] st_q, key_d = '0, key_q;
  logic [7:0]      m_st [4], m_key [4];
  int checks = 0, failures = 0;

  nb_rf dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int j = 0; j < 4; j++) begin
      chk(st_q[j], 8'h00, "state after reset");
      chk(key_q[j], 8'h00, "key after reset");
      m_st[j] = 0; m_key[j] = 0;
    end
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(posedge clk); #1;
      wr_en   = $urandom % 2 == 0;
      wr_addr = 2'($urandom);
      wr_data = 8'($urandom);
      key_we  = $urandom % 5 == 0;
      key_d   = {$urandom, $urandom};
      rd_addr = 2'($urandom);
      #1;
      chk(rd_data, m_st[rd_addr], "read port");
      @(posedge clk);
      if (wr_en) m_st[wr_addr] = wr_data;
      if (key_we) for (int j = 0; j < 4; j++) m_key[j] = key_d[j];
      #1;
      wr_en = 0; key_we = 0;
      for (int j = 0; j < 4; j++) begin
        chk(st_q[j], m_st[j], "state view");
        chk(key_q[j], m_key[j], "key view");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
