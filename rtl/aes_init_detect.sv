// aes_init_detect: column-parity check of the initial round, in which the
// plaintext held in the data register is XORed with the initial key.
//
// For each column j, G_j = P(DRout_j) ^ P(Key_j) ^ P(Rin_j), with P the 8-bit
// XOR of a column's four bytes, DRout the Detect_Reg output (a copy of the
// plaintext), Key the key register and Rin the multiplexer output. It is zero
// when the initial round and the multiplexer worked. g_flag(j) is the OR of
// the eight bits of G_j, forced to 0 when enable is low (outside Round 0).
// The OR reduction and the gating are this design's choices.
// Purely combinational.
module aes_init_detect
  import aes_pkg::*;
(
  input  block_t     drout,
  input  block_t     round_key,
  input  block_t     rin,
  input  logic       enable,
  output logic [3:0] g_flag
);

  always_comb begin
    for (int j = 0; j < 4; j++)
      g_flag[j] = enable & (|(col_parity(drout, j) ^ col_parity(round_key, j) ^ col_parity(rin, j)));
  end

endmodule
