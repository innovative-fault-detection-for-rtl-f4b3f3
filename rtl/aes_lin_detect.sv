// aes_lin_detect: column-parity check of the multiplexer and the three linear
// transformations (ShiftRows, MixColumns, AddRoundKey).
//
// MixColumns keeps the XOR of a column's bytes, ShiftRows only moves bytes
// between columns and AddRoundKey adds the key's column parity, so for each
// column j of the multiplexer output Rin in rounds 1..10
//   P(Rin_j) = P(K_j) ^ s(0,j) ^ s(1,j+1) ^ s(2,j+2) ^ s(3,j+3)
// where s is the ShiftRows input (column indices mod 4) and P is the 8-bit XOR
// of a column's four bytes. F_j = P(Rin_j) ^ P(K_j) ^ P(SRin_j) must be zero;
// f_flag(j) is the OR of its eight bits, forced to 0 when enable is low
// (the multiplexer is not selecting the round output). The OR reduction and
// the gating are this design's choices; the equation is the scheme's.
// Purely combinational.
module aes_lin_detect
  import aes_pkg::*;
(
  input  block_t     rin,
  input  block_t     round_key,
  input  block_t     sr_in,
  input  logic       enable,
  output logic [3:0] f_flag
);

  always_comb begin
    logic [7:0] p_srin, f;
    for (int j = 0; j < 4; j++) begin
      p_srin = '0;
      for (int i = 0; i < 4; i++) p_srin ^= sr_in[127-8*(4*((j+i)%4)+i) -: 8];
      f = col_parity(rin, j) ^ col_parity(round_key, j) ^ p_srin;
      f_flag[j] = enable & (|f);
    end
  end

endmodule
