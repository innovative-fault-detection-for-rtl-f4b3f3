// aes_sb_detect: fault detection for the SubBytes transformation and the data
// register.
//
// Detect_Reg is a 128-bit copy of the data register: it loads the same value
// (Data_reg_in, Rin) with the same enable. A difference table, separate from
// the S-box table, gives beta(x) = x ^ S(x) for every byte x; it is addressed
// by the data register output alpha = Rout. For each byte (r,c)
//   E(r,c) = beta(Rout) ^ DRout ^ alpha'
// is zero when the data register equals Detect_Reg and alpha' = S(Rout); a
// fault in the data register, in Detect_Reg or in an S-box output makes it
// non-zero. e_flag(4c+r) is the OR of the eight bits of E(r,c); reducing the
// 8-bit syndrome to one flag this way is this design's choice.
//
// The flags are combinational from the register outputs and the S-box
// outputs, valid in every cycle. fi_detect_reg is a fault-injection mask on
// Detect_Reg's D input (zero in normal use). Asynchronous active-low reset,
// matching the data register's reset value.
module aes_sb_detect
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      rin,
  input  logic        load,
  input  block_t      rout,
  input  block_t      sb_out,
  input  block_t      fi_detect_reg,
  output block_t      drout,
  output logic [15:0] e_flag
);

  block_t detect_q, beta, e_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    detect_q <= '0;
    else if (load) detect_q <= rin ^ fi_detect_reg;
  end

  assign drout = detect_q;

  always_comb begin
    for (int n = 0; n < 16; n++) beta[127-8*n -: 8] = BETA[rout[127-8*n -: 8]];
    e_val = beta ^ detect_q ^ sb_out;
    for (int n = 0; n < 16; n++) e_flag[n] = |e_val[127-8*n -: 8];
  end

endmodule
