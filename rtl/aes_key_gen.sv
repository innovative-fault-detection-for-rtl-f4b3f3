// aes_key_gen: key generator of the iterative AES-128 core. It holds the
// current round key in a 128-bit key register and computes the next round key
// on the fly, one per load, with the FIPS-197 AES-128 key expansion:
//   t  = SubWord(RotWord(w3)) ^ {round_constant, 00, 00, 00}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// The key register input multiplexer selects the initial key
// (key_reg_mux_sel = 0) or the next round key (1); the register loads on a
// rising edge with load_key_reg = 1.
//
// Protection: every key byte carries an even-parity bit, computed from the
// register's D value and stored in 16 extra flip-flops. parity_err(15-n) is
// set while byte n of the register output disagrees with its stored parity,
// i.e. after a fault in the key register. The expansion logic itself is not
// covered. The parity scheme is named for the key scheduler; how it is
// placed here is this design's choice.
//
// fi_key_reg is a fault-injection mask on the key register D inputs only
// (zero in normal use). Asynchronous active-low reset clears both registers.
module aes_key_gen
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      init_key,
  input  logic        key_reg_mux_sel,
  input  logic        load_key_reg,
  input  logic [7:0]  round_constant,
  input  block_t      fi_key_reg,
  output block_t      round_key,
  output logic [15:0] parity_err
);

  block_t      key_q, key_d, next_key;
  logic [15:0] par_q;

  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    w0 = key_q[127:96];
    w1 = key_q[95:64];
    w2 = key_q[63:32];
    w3 = key_q[31:0];
    t  = {SBOX[w3[23:16]] ^ round_constant, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  assign key_d = key_reg_mux_sel ? next_key : init_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0;
      par_q <= '0;
    end else if (load_key_reg) begin
      key_q <= key_d ^ fi_key_reg;
      par_q <= byte_parity(key_d);
    end
  end

  assign round_key  = key_q;
  assign parity_err = byte_parity(key_q) ^ par_q;

endmodule
