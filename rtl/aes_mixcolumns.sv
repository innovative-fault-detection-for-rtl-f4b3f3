// aes_mixcolumns: the MixColumns transformation of AES. Each 32-bit column
// (s0,s1,s2,s3) is multiplied over GF(2^8) by the circulant matrix whose first
// row is (02 03 01 01):
//   s0' = 2*s0 ^ 3*s1 ^ s2 ^ s3      s1' = s0 ^ 2*s1 ^ 3*s2 ^ s3
//   s2' = s0 ^ s1 ^ 2*s2 ^ 3*s3      s3' = 3*s0 ^ s1 ^ s2 ^ 2*s3
// Because 02^03^01^01 = 01, the XOR of a column's four bytes is unchanged,
// which is what the column-parity fault detection relies on.
// Purely combinational.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  always_comb begin
    logic [7:0] s0, s1, s2, s3, all;
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      s0  = din[127-32*c -: 8];
      s1  = din[119-32*c -: 8];
      s2  = din[111-32*c -: 8];
      s3  = din[103-32*c -: 8];
      all = s0 ^ s1 ^ s2 ^ s3;
      // si' = si ^ all ^ 2*(si ^ s(i+1)), the usual factorisation
      dout[127-32*c -: 8] = s0 ^ all ^ xtime(s0 ^ s1);
      dout[119-32*c -: 8] = s1 ^ all ^ xtime(s1 ^ s2);
      dout[111-32*c -: 8] = s2 ^ all ^ xtime(s2 ^ s3);
      dout[103-32*c -: 8] = s3 ^ all ^ xtime(s3 ^ s0);
    end
  end

endmodule
