// nb_inv_unit: multiplicative inverse in GF(2^8), normal basis, by rotation
// and a small lookup (one of the four S-box inversion units).
//
// In the normal basis squaring is a rotation, and inversion commutes with
// squaring, so inv(x) = RR^k(inv(RL^k(x))) for any k. The unit therefore
// needs the inverse of only one rotation ("leader") per conjugate set:
//   top register    - loaded with x, rotated left two bits per cycle. Each
//                     cycle it tests the pair (value, value rotated left once)
//                     for bits 7:6 = 01; the matching one is looked up in
//                     nb_lookup. A non-zero table output (OR tree) means a
//                     leader was found after k rotations. A value whose pair
//                     holds no 01 candidate, or whose candidate is not a
//                     leader, is rotated two places on. On load the same test
//                     is applied to the incoming byte and, when neither
//                     position qualifies, it is loaded pre-rotated by two.
//                     00 and FF (no 0-1 transition anywhere, found by an OR
//                     of x ^ RL(x), told apart by bit 7) are their own inverse.
//   bottom register - loaded with the table output and k, rotated right two
//                     bits per cycle (one on the last step if k is odd) until
//                     k rotations are undone; it then holds inv(x).
//   output register - holds the result until the consumer takes it.
// The three registers form a pipeline, so the top register searches for the
// next byte while the bottom one rotates back the previous result.
//
// Interface: valid/ready on both sides; a byte is accepted when in_valid and
// in_ready are high at a rising clock edge and delivered when out_valid and
// out_ready are. out_valid rises 2 to 9 clock edges after the edge that
// accepted the byte, depending on the value (search 1-4 cycles, right
// rotation 0-4 cycles, one cycle into the output register; 4.9 on average
// over all 256 bytes). A new byte can be accepted in the cycle the top
// register hands its leader on.
//
// The rotate/lookup/rotate-back scheme, the two-bit steps, the pair test and
// the preliminary shift follow the published inversion architecture. The
// document clocks the shift registers with a second clock at twice the main
// clock rate; here everything runs on one clock, each cycle being one step
// of the shift registers with the lookup completing in the same cycle. The
// handshakes and the output register's holding behaviour are this design's.
module nb_inv_unit
  import aes_nb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  nb_byte_t in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output nb_byte_t out_data
);

  // ---------------- top (rotate-left) register ----------------
  logic       t_busy, t_triv;
  nb_byte_t   t_val;
  logic [2:0] t_cnt;

  // ---------------- bottom (rotate-right) register ------------
  logic       b_busy;
  nb_byte_t   b_val;
  logic [2:0] b_cnt;

  // ---------------- output register ---------------------------
  logic       o_valid;
  nb_byte_t   o_data;

  // Pair test on the top register.
  logic     c0, c1;
  logic [5:0] cand;
  nb_byte_t lut_inv, res;
  logic     found, handoff, b_done, b_move, b_free;
  logic [2:0] res_cnt;

  assign c0   = (t_val[7:6] == 2'b01);
  assign c1   = (t_val[6:5] == 2'b01);
  // Candidate for the table: bits 5:0 of the value (c0) or of the value
  // rotated left once (c1); bits 7:6 are 01 in either case.
  assign cand = c0 ? t_val[5:0] : {t_val[4:0], t_val[7]};

  nb_lookup u_lut (.idx(cand), .inv(lut_inv));

  assign found   = t_busy && (t_triv || ((c0 || c1) && (|lut_inv)));
  assign res     = t_triv ? t_val : lut_inv;
  assign res_cnt = t_triv ? 3'd0 : (c0 ? t_cnt : t_cnt + 3'd1);

  assign b_done  = b_busy && (b_cnt == 3'd0);
  assign b_move  = b_done && (!o_valid || out_ready);
  assign b_free  = !b_busy || b_move;
  assign handoff = found && b_free;

  assign in_ready = !t_busy || handoff;

  // Load-time test: uniform byte (00/FF) and preliminary double shift.
  logic load, in_triv, in_pre;
  assign load    = in_valid && in_ready;
  assign in_triv = ((in_data ^ rotl1(in_data)) == 8'h00);
  assign in_pre  = !in_triv && (in_data[7:6] != 2'b01) && (in_data[6:5] != 2'b01);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_busy <= 1'b0;
      t_triv <= 1'b0;
      t_val  <= '0;
      t_cnt  <= '0;
    end else if (load) begin
      t_busy <= 1'b1;
      t_triv <= in_triv;
      t_val  <= in_pre ? rotl1(rotl1(in_data)) : in_data;
      t_cnt  <= in_pre ? 3'd2 : 3'd0;
    end else if (handoff) begin
      t_busy <= 1'b0;
    end else if (t_busy && !found) begin
      t_val  <= rotl1(rotl1(t_val));
      t_cnt  <= t_cnt + 3'd2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_busy <= 1'b0;
      b_val  <= '0;
      b_cnt  <= '0;
    end else if (handoff) begin
      b_busy <= 1'b1;
      b_val  <= res;
      b_cnt  <= res_cnt;
    end else if (b_move) begin
      b_busy <= 1'b0;
    end else if (b_busy && b_cnt >= 3'd2) begin
      b_val  <= rotr1(rotr1(b_val));
      b_cnt  <= b_cnt - 3'd2;
    end else if (b_busy && b_cnt == 3'd1) begin
      b_val  <= rotr1(b_val);
      b_cnt  <= 3'd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_data  <= '0;
    end else if (b_move) begin
      o_valid <= 1'b1;
      o_data  <= b_val;
    end else if (out_ready) begin
      o_valid <= 1'b0;
    end
  end

  assign out_valid = o_valid;
  assign out_data  = o_data;

  // Every non-uniform byte meets its leader within eight rotations: a search
  // step that finds nothing must never start from rotation 6 or 7.
  a_leader_found: assert property (@(posedge clk) disable iff (!rst_n)
      (t_busy && !found) |-> (t_cnt < 3'd6))
    else $error("nb_inv_unit: no conjugate set leader for %h", t_val);

  // Handshake rule: a result offered and not taken stays offered, unchanged.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("nb_inv_unit: output dropped or changed while stalled");

endmodule
