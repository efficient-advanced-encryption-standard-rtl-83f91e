// aes_nb_core: 32-bit AES-128 encryption/decryption core working entirely in
// the normal basis generated by alpha = {33}.
//
// Datapath (one 32-bit column per pass):
//   four register files (nb_rf, one state row each, plus that row's key)
//     -> [decryption: nb_inv_affine] -> four nb_inv_unit (rotate/lookup
//     inverters, variable latency) -> [encryption or key pass: nb_affine]
//     -> four 8-bit affine registers -> four nb_mix units (bypassed in the
//     last round) -> XOR with a round-key word -> written back to the files.
// ShiftRows is never performed: pass c of round k reads row r at address
// (c + r*k) mod 4 (decryption: (c - r*k) mod 4) and writes the result back
// to the same address, so the rows stay pre-shifted in place.
// Key expansion shares the S-boxes: ahead of every round one key pass feeds
// the key word from nb_keygen through the four units and loads the new round
// key. A block takes 50 passes in a fixed order, numbered s = 0..49:
// s % 5 == 0 is the key pass for round s/5+1, otherwise data column
// s%5-1 of round s/5+1. Each inverter takes its byte of the current pass as
// soon as it is ready (a pass ends when all four have taken theirs) and
// delivers into its own affine register; the write-back fires when all four
// registers are full. The inverters keep order, so the write-back side
// numbers results the same way. A data pass of round k is issued only when
// all of round k-1 is written back; a key pass only when the previous key is.
// Decryption runs the inverse cipher: the key input is the last round key,
// each key pass computes the preceding key, and a data pass computes
// InvMix(InvSub(x) ^ key) (no InvMix in the last round).
//
// Interface: pulse start for one cycle while busy is low with din (plaintext
// or ciphertext), key (cipher key, or the last round key when decrypt = 1) and
// decrypt valid. Bytes are in AES order (byte n = bits 127-8n..120-8n, state
// element row r column c = byte 4c+r) and every byte is in the normal basis.
// Loading takes 4 cycles (din ^ key, one column per cycle); done pulses for
// one cycle when dout holds the result. key_out then holds the last key used:
// round key 10 after encryption (the decryption key for this cipher key) and
// the cipher key after decryption. The number of cycles per block depends
// on the data because the inverters take 1 to 4 search steps per byte.
//
// Following the document: the four register files with one row each, the
// pre-shifted reads, four inverters with their own output registers, the
// normal-basis affine and mix units, the mix bypass in the last round, the
// key expansion on the datapath's S-boxes, and decryption by an inverse
// affine in front of the inverters and an inverse mix. This design's own:
// a single clock, the valid/ready coupling of the units (issued and
// drained independently, joined at the affine registers), the pass order and
// its hazard rules, the in-place write-back addressing, the parallel key load
// and the 128-bit load/unload ports.
module aes_nb_core
  import aes_nb_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] din,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout,
  output logic [127:0] key_out
);

  // Passes through the four S-box units per block: one key pass ahead of
  // every round plus four data passes per round.
  localparam int unsigned NPASSES = 5 * NROUNDS;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_UNLOAD} state_t;
  state_t st;

  logic       dec_q;        // mode latched at start
  logic [1:0] load_col;
  logic [5:0] iss, wbs;     // next pass to issue / to write back

  // ---------------- byte access helpers ----------------
  function automatic nb_byte_t blk_byte(logic [127:0] v, logic [1:0] r, logic [1:0] c);
    return v[8'd127 - {c, r, 3'b000} -: 8];
  endfunction

  // Pass number decoding.
  function automatic logic pass_is_key(logic [5:0] s);
    return (s % 6'd5) == 6'd0;
  endfunction
  function automatic logic [3:0] pass_round(logic [5:0] s);
    return 4'(s / 6'd5) + 4'd1;
  endfunction
  function automatic logic [1:0] pass_col(logic [5:0] s);
    return 2'(s % 6'd5) - 2'd1;
  endfunction
  // Register-file address of row r for column c in round k.
  // Only k mod 4 matters.
  function automatic logic [1:0] rf_addr(logic dec, logic [1:0] r, logic [1:0] c,
                                         logic [1:0] k);
    logic [1:0] off;
    off = r * k;
    return dec ? c - off : c + off;
  endfunction

  // ---------------- register files ----------------
  logic [1:0]         rd_addr [4];
  nb_byte_t           rd_data [4];
  logic               wr_en;
  logic [1:0]         wr_addr [4];
  nb_word_t           wr_data;
  nb_byte_t [3:0]     st_q    [4];
  logic               key_we;
  nb_word_t [3:0]     key_d;       // key_d[j][r]
  nb_byte_t [3:0]     key_q   [4]; // key_q[r][j]
  nb_word_t [3:0]     key_w;       // key_w[j][r]

  for (genvar r = 0; r < 4; r++) begin : g_rf
    nb_byte_t [3:0] kd;
    for (genvar j = 0; j < 4; j++) begin : g_kw
      assign kd[j]       = key_d[j][r];
      assign key_w[j][r] = key_q[r][j];
    end
    nb_rf #(.NWORDS(4)) u_rf (
      .clk, .rst_n,
      .rd_addr(rd_addr[r]), .rd_data(rd_data[r]),
      .wr_en, .wr_addr(wr_addr[r]), .wr_data(wr_data[r]),
      .st_q(st_q[r]),
      .key_we, .key_d(kd), .key_q(key_q[r])
    );
  end

  // ---------------- issue side ----------------
  logic       iss_key;
  logic [3:0] iss_rnd;
  logic [1:0] iss_col;
  logic       iss_ok, pass_ok, pass_done;
  logic [3:0] u_in_valid, u_in_ready, u_out_valid, u_out_ready;
  logic [3:0] issued;          // units that have taken pass iss already
  nb_byte_t   u_in  [4];
  nb_byte_t   u_out [4];
  nb_word_t   ks_in;           // key word to substitute (from nb_keygen)
  nb_word_t   ks_sub;
  logic [3:0] kg_rnd;
  nb_word_t [3:0] key_next;

  assign iss_key = pass_is_key(iss);
  assign iss_rnd = pass_round(iss);
  assign iss_col = pass_col(iss);

  // Hazards: data of round k waits for all of round k-1 (write-back has
  // reached key pass k); key pass k waits for key pass k-1 to be written.
  always_comb begin
    if (iss_key) iss_ok = (iss < 6'd5) || (wbs + 6'd9 >= 6'(5 * iss_rnd));
    else         iss_ok = (wbs + 6'd5 >= 6'(5 * iss_rnd));
  end
  // Each unit takes its byte of pass iss as soon as it is ready; the pass is
  // complete when all four have taken it.
  assign pass_ok    = (st == S_RUN) && (iss < 6'(NPASSES)) && iss_ok;
  assign u_in_valid = pass_ok ? ~issued : 4'b0000;
  assign pass_done  = pass_ok && (&(issued | (u_in_valid & u_in_ready)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        issued <= '0;
    else if (st != S_RUN || pass_done) issued <= '0;
    else                               issued <= issued | (u_in_valid & u_in_ready);
  end

  for (genvar r = 0; r < 4; r++) begin : g_sbox
    nb_byte_t ia;
    assign rd_addr[r] = (st == S_UNLOAD) ? 2'd0
                      : rf_addr(dec_q, 2'(r), iss_col, iss_rnd[1:0]);
    nb_inv_affine u_iaff (.i(rd_data[r]), .q(ia));
    assign u_in[r] = iss_key ? ks_in[r] : (dec_q ? ia : rd_data[r]);
    nb_inv_unit u_inv (
      .clk, .rst_n,
      .in_valid(u_in_valid[r]), .in_ready(u_in_ready[r]), .in_data(u_in[r]),
      .out_valid(u_out_valid[r]), .out_ready(u_out_ready[r]),
      .out_data(u_out[r])
    );
  end

  // ---------------- affine registers ----------------
  // One 8-bit register per unit, filled independently. a_seq[r] numbers the
  // passes unit r has delivered; the write-back fires when all four hold a
  // result and consumes them together as pass wbs.
  logic       wb_key;
  logic [3:0] wb_rnd;
  logic [1:0] wb_col;
  logic       wb_fire;
  logic [3:0] a_v;
  nb_word_t   a_q;
  logic [5:0] a_seq [4];

  assign wb_key  = pass_is_key(wbs);
  assign wb_rnd  = pass_round(wbs);
  assign wb_col  = pass_col(wbs);
  assign wb_fire = (st == S_RUN) && (&a_v);

  for (genvar r = 0; r < 4; r++) begin : g_aff
    nb_byte_t af;
    logic     cap;
    nb_affine u_aff (.i(u_out[r]), .q(af));
    assign u_out_ready[r] = !a_v[r] || wb_fire;
    assign cap            = u_out_valid[r] && u_out_ready[r];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_q[r]   <= '0;
        a_v[r]   <= 1'b0;
        a_seq[r] <= '0;
      end else if (st == S_LOAD) begin
        a_v[r]   <= 1'b0;
        a_seq[r] <= '0;
      end else if (cap) begin
        a_q[r]   <= (dec_q && !pass_is_key(a_seq[r])) ? u_out[r] : af;
        a_v[r]   <= 1'b1;
        a_seq[r] <= a_seq[r] + 6'd1;
      end else if (wb_fire) begin
        a_v[r]   <= 1'b0;
      end
    end

    // The write-back numbering must match every unit's own numbering.
    a_wb_in_step: assert property (@(posedge clk) disable iff (!rst_n)
        wb_fire |-> (a_seq[r] == wbs + 6'd1))
      else $error("aes_nb_core: unit %0d out of step with write-back", r);
  end

  // ---------------- mix, key XOR, write-back ----------------
  nb_word_t kw, mix_in, mix_out, res;
  logic     last_rnd;

  assign kw       = key_w[wb_col];
  assign last_rnd = (wb_rnd == 4'(NROUNDS));
  assign mix_in   = dec_q ? (a_q ^ kw) : a_q;

  for (genvar r = 0; r < 4; r++) begin : g_mix
    nb_mix u_mix (
      .inv(dec_q),
      .a(mix_in[r]), .b(mix_in[(r+1)%4]), .c(mix_in[(r+2)%4]), .d(mix_in[(r+3)%4]),
      .q(mix_out[r])
    );
  end

  always_comb begin
    if (dec_q) res = last_rnd ? mix_in : mix_out;
    else       res = (last_rnd ? a_q : mix_out) ^ kw;
  end

  // Key step: encryption produces key k from key k-1 with rcon(k);
  // decryption produces key 10-k from key 11-k with rcon(11-k).
  assign ks_sub = a_q;
  assign kg_rnd = dec_q ? 4'(NROUNDS + 1) - wb_rnd : wb_rnd;

  nb_keygen u_kg (
    .dec(dec_q), .rnd(kg_rnd), .key(key_w),
    .sbox_in(ks_in), .sub(ks_sub), .key_next(key_next)
  );

  always_comb begin
    wr_en   = 1'b0;
    key_we  = 1'b0;
    key_d   = key_next;
    wr_data = res;
    for (int r = 0; r < 4; r++)
      wr_addr[r] = rf_addr(dec_q, 2'(r), wb_col, wb_rnd[1:0]);
    if (st == S_LOAD) begin
      wr_en  = 1'b1;
      key_we = (load_col == 2'd0);
      for (int r = 0; r < 4; r++) begin
        wr_addr[r] = load_col;
        wr_data[r] = blk_byte(din, 2'(r), load_col) ^ blk_byte(key, 2'(r), load_col);
        for (int j = 0; j < 4; j++)
          key_d[j][r] = blk_byte(key, 2'(r), 2'(j));
      end
    end else if (wb_fire) begin
      wr_en  = !wb_key;
      key_we = wb_key;
    end
  end

  // ---------------- result ----------------
  // After ten rounds row r sits rotated by 10*r = 2r (mod 4) places, for
  // encryption (+r per round) and decryption (-r per round) alike.
  logic [127:0] unload;
  for (genvar r = 0; r < 4; r++) begin : g_unl_r
    for (genvar c = 0; c < 4; c++) begin : g_unl_c
      assign unload[127 - 8*(4*c + r) -: 8] = st_q[r][(c + 2*r) % 4];
    end
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      dec_q    <= 1'b0;
      load_col <= '0;
      iss      <= '0;
      wbs      <= '0;
      done     <= 1'b0;
      dout     <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st       <= S_LOAD;
          dec_q    <= decrypt;
          load_col <= '0;
        end
        S_LOAD: begin
          load_col <= load_col + 2'd1;
          if (load_col == 2'd3) begin
            st  <= S_RUN;
            iss <= '0;
            wbs <= '0;
          end
        end
        S_RUN: begin
          if (pass_done) iss <= iss + 6'd1;
          if (wb_fire)   wbs <= wbs + 6'd1;
          if (wb_fire && wbs == 6'(NPASSES - 1)) st <= S_UNLOAD;
        end
        S_UNLOAD: begin
          dout <= unload;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < 4; j++)
        key_out[127 - 8*(4*j + r) -: 8] = key_w[j][r];
  end

endmodule
