// tb_aes_nb_throughput: throughput workload for aes_nb_core. Encrypts and
// then decrypts 100 random blocks under random keys (20,000 S-box
// inversions each way), checks every result against the polynomial-basis
// reference, and reports the mean block time and the throughput it implies.
// The published figure is 108 main-clock cycles per block, 156 Mbit/s at
// 132 MHz; this single-clock design runs at the shift-register rate
// (2 x 132 MHz), so 108 main-clock cycles correspond to 216 cycles here. The
// mean must lie within 5 % of that, and the throughput within 5 % of 156.
module tb_aes_nb_throughput;
  import aes_ref_pkg::*;

  localparam int NBLK = 100;

  logic         clk = 0, rst_n = 0;
  logic         start = 0, decrypt = 0, busy, done;
  logic [127:0] din = '0, key = '0, dout, key_out;
  int checks = 0, failures = 0, cycle = 0;

  aes_nb_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic run(bit d, logic [127:0] in_p, logic [127:0] key_p,
                     output logic [127:0] out_p, output logic [127:0] kout_p,
                     output int cycles);
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

  initial begin
    logic [127:0] pt, k, ct, k10, back, k0;
    int cyc;
    longint sum_enc = 0, sum_dec = 0;
    real mean_enc, mean_dec;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NBLK; t++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      k  = {$urandom, $urandom, $urandom, $urandom};
      run(1'b0, pt, k, ct, k10, cyc);
      sum_enc += cyc;
      checks++;
      if (ct !== encrypt(pt, k)) begin
        failures++;
        $display("FAIL encrypt block %0d", t);
      end
      run(1'b1, ct, k10, back, k0, cyc);
      sum_dec += cyc;
      checks++;
      if (back !== pt || k0 !== k) begin
        failures++;
        $display("FAIL decrypt block %0d", t);
      end
    end
    mean_enc = real'(sum_enc) / NBLK;
    mean_dec = real'(sum_dec) / NBLK;
    $display("mean cycles per block: encrypt %0.1f, decrypt %0.1f", mean_enc, mean_dec);
    $display("throughput at 264 MHz (2 x 132 MHz): %0.1f Mbit/s encrypt",
             128.0 * 264.0 / mean_enc);
    checks += 3;
    if (mean_enc > 216.0 * 1.05 || mean_enc < 216.0 * 0.95) begin
      failures++; $display("FAIL encryption block time off by more than 5 %%");
    end
    if (mean_dec > 216.0 * 1.05 || mean_dec < 216.0 * 0.95) begin
      failures++; $display("FAIL decryption block time off by more than 5 %%");
    end
    if (128.0 * 264.0 / mean_enc < 156.0 * 0.95 || 128.0 * 264.0 / mean_enc > 156.0 * 1.05) begin
      failures++; $display("FAIL throughput off by more than 5 %% from 156 Mbit/s");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 2 * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
