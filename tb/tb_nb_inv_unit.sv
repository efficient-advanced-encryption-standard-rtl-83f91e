// tb_nb_inv_unit: the rotate/lookup inverter against GF(2^8) inversion done
// in the polynomial basis.
// Phase 1 sends each of the 256 bytes alone and checks the result and its
// latency (out_valid rises 2 to 9 edges after the accepting edge).
// Phase 2 streams all bytes twice, in random order, with random gaps on the
// input and random back-pressure on the output, and checks the results in
// order. Mechanisms seen (preliminary shift, table miss, 00/FF, lookup of
// the second value of the pair) are counted
// and each must occur.
module tb_nb_inv_unit;
  import aes_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0, cycle = 0;
  logic [7:0] exp_inv [256];

  nb_inv_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Mechanism counters (observed inside the unit). Inputs change just after
  // a rising edge, so at the falling edge every signal holds the value the
  // next rising edge will act on.
  int n_pre = 0, n_miss = 0, n_triv = 0, n_c1 = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.load && dut.in_pre)  n_pre++;
    if (dut.load && dut.in_triv) n_triv++;
    if (dut.t_busy && !dut.t_triv && (dut.c0 || dut.c1) && dut.lut_inv == 0) n_miss++;
    if (dut.handoff && !dut.t_triv && dut.c1) n_c1++;
  end

  function automatic void check(logic [7:0] x, logic [7:0] y);
    checks++;
    if (y !== exp_inv[x]) begin
      failures++;
      $display("FAIL inv(%h) = %h, expected %h", x, y, exp_inv[x]);
    end
  endfunction

  logic [7:0] q [$];
  logic [7:0] order [512];

  initial begin
    int lat, max_lat = 0, min_lat = 99, t0, sum_lat = 0;
    for (int v = 0; v < 256; v++) exp_inv[v] = p2n(ginv(n2p(8'(v))));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- phase 1: one byte at a time ----
    out_ready = 1;
    for (int v = 0; v < 256; v++) begin
      @(posedge clk); #1;
      in_valid = 1; in_data = 8'(v);
      @(negedge clk);
      if (!in_ready) begin failures++; $display("FAIL idle unit not ready"); end
      t0 = cycle;
      @(posedge clk); #1;
      in_valid = 0;
      @(negedge clk);
      while (!out_valid) @(negedge clk);
      lat = cycle - t0 - 1;          // edges after the accepting edge
      sum_lat += lat;
      check(8'(v), out_data);
      if (lat > max_lat) max_lat = lat;
      if (lat < min_lat) min_lat = lat;
    end
    checks++;
    if (max_lat > 9 || min_lat < 2) begin
      failures++;
      $display("FAIL latency range %0d..%0d cycles", min_lat, max_lat);
    end
    $display("latency %0d..%0d cycles, average %0.2f", min_lat, max_lat, real'(sum_lat) / 256.0);
    // ---- phase 2: streaming with gaps and back-pressure ----
    for (int i = 0; i < 512; i++) order[i] = 8'(i);
    for (int i = 511; i > 256; i--) begin
      automatic int j = 256 + int'($urandom % (i - 255));
      automatic logic [7:0] t = order[i];
      order[i] = order[j];
      order[j] = t;
    end
    t0 = cycle;
    fork
      begin
        @(posedge clk); #1;
        for (int i = 0; i < 512; i++) begin
          while ($urandom % 4 == 0) begin in_valid = 0; @(posedge clk); #1; end
          in_valid = 1; in_data = order[i];
          @(negedge clk);
          while (!in_ready) @(negedge clk);
          q.push_back(order[i]);
          @(posedge clk); #1;
        end
        in_valid = 0;
      end
      begin
        int got = 0;
        while (got < 512) begin
          @(posedge clk); #1;
          out_ready = ($urandom % 3 != 0);
          @(negedge clk);
          if (out_valid && out_ready) begin
            if (q.size() == 0) begin
              failures++;
              $display("FAIL output with nothing outstanding");
            end else check(q.pop_front(), out_data);
            got++;
          end
        end
      end
    join
    $display("streamed 512 bytes in %0d cycles", cycle - t0);
    checks++;
    if (n_c1 == 0) begin failures++; $display("FAIL no second-of-pair lookup seen"); end
    checks += 3;
    if (n_pre == 0)  begin failures++; $display("FAIL no preliminary shift seen"); end
    if (n_miss == 0) begin failures++; $display("FAIL no table miss seen"); end
    if (n_triv == 0) begin failures++; $display("FAIL no 00/FF input seen"); end
    $display("preliminary shifts %0d, table misses %0d, 00/FF %0d, second-of-pair hits %0d", n_pre, n_miss, n_triv, n_c1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
