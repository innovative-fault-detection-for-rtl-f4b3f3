// aes_linear: the three linear transformations of an AES round, ShiftRows,
// MixColumns and AddRoundKey, from the SubBytes output to the round output.
//
// ShiftRows rotates row r left by r bytes: output s(r,c) = input s(r,(c+r) mod 4).
// MixColumns is skipped in the last round (last_round = 1), which selects the
// ShiftRows output instead; this is the last-round multiplexer of the
// architecture. AddRoundKey XORs the round key.
//
// fi_lin is a fault-injection mask on the round output, zero in normal use.
// Purely combinational.
module aes_linear
  import aes_pkg::*;
(
  input  block_t sr_in,
  input  block_t round_key,
  input  logic   last_round,
  input  block_t fi_lin,
  output block_t round_out
);

  block_t sr_out, mc_out;

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr_out[127-8*(4*c+r) -: 8] = sr_in[127-8*(4*((c+r)%4)+r) -: 8];
  end

  aes_mixcolumns u_mix (
    .din (sr_out),
    .dout(mc_out)
  );

  assign round_out = (last_round ? sr_out : mc_out) ^ round_key ^ fi_lin;

endmodule
