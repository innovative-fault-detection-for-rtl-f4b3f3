// aes_subbytes: the SubBytes transformation, sixteen AES S-boxes working in
// parallel on the 128-bit data register output (alpha) and producing alpha'.
//
// Each S-box is a read of the 256-entry table aes_pkg::SBOX, which is computed
// at elaboration from the FIPS-197 definition (inverse in GF(2^8), then the
// affine map). The fault detection around it does not depend on how the S-box
// is built, so a table was chosen as the simplest form.
//
// fi_sbox is a fault-injection mask XORed onto the outputs; it is zero in
// normal use. Purely combinational.
module aes_subbytes
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t fi_sbox,
  output block_t dout
);

  block_t sb;

  always_comb begin
    for (int n = 0; n < 16; n++) sb[127-8*n -: 8] = SBOX[din[127-8*n -: 8]];
  end

  assign dout = sb ^ fi_sbox;

endmodule
