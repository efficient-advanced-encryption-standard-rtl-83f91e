// nb_rf: register file for one row of the AES state, extended with that
// row of the current round key.
//
// Four such files hold the 128-bit state: file r holds row r, entry j being
// one byte of the state. A read and a write port serve the datapath. Because
// each row lives in its own file, ShiftRows costs nothing: the sequencer picks
// the read address per file, and each result byte is written back to the slot
// it was read from, so the rows stay pre-shifted and the next round simply
// reads with a further offset. The key part (four more bytes, word j of the
// round key) is read all at once and loaded all at once by the key update.
//
// Interface: state read is combinational (rd_addr -> rd_data); state write
// and key load take effect at the rising clock edge. All registers reset to
// zero. st_q exposes the four state bytes for unloading the result.
// The row-per-file layout and the pre-shifted reading follow the published
// design; the write-back-in-place addressing, the key load port and the
// reset are this implementation's choices.
module nb_rf
  import aes_nb_pkg::*;
#(
  parameter int unsigned NWORDS = 4   // bytes of one row (block length / 32)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(NWORDS)-1:0] rd_addr,
  output nb_byte_t                  rd_data,
  input  logic                      wr_en,
  input  logic [$clog2(NWORDS)-1:0] wr_addr,
  input  nb_byte_t                  wr_data,
  output nb_byte_t [NWORDS-1:0]     st_q,
  input  logic                      key_we,
  input  nb_byte_t [NWORDS-1:0]     key_d,
  output nb_byte_t [NWORDS-1:0]     key_q
);

  nb_byte_t [NWORDS-1:0] st, key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= '0;
      key <= '0;
    end else begin
      if (wr_en)  st[wr_addr] <= wr_data;
      if (key_we) key <= key_d;
    end
  end

  assign rd_data = st[rd_addr];
  assign st_q    = st;
  assign key_q   = key;

endmodule
