// aes_state_reg: the data multiplexer and the 128-bit data register.
//
// The multiplexer picks the next register value (Data_reg_in, Rin):
//   data_reg_mux_sel = 11  plaintext                      (Load Inputs)
//   data_reg_mux_sel = 00  Rout ^ round_key, initial round (Round 0)
//   data_reg_mux_sel = 01  round output                   (Round 1..10)
// The encoding is the one of the controller flowchart; code 10 is never
// produced and selects the round output here. The initial-round XOR sits in
// this block, between the register output and the multiplexer.
//
// The register loads Rin on a rising edge with load_data_reg = 1 and is
// cleared by the asynchronous active-low reset. fi_mux corrupts Rin as seen
// by everything downstream (including Detect_Reg); fi_data_reg corrupts only
// this register's D input. Both masks are zero in normal use.
module aes_state_reg
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  block_t   plaintext,
  input  block_t   round_key,
  input  block_t   round_out,
  input  mux_sel_e data_reg_mux_sel,
  input  logic     load_data_reg,
  input  block_t   fi_mux,
  input  block_t   fi_data_reg,
  output block_t   rin,
  output block_t   rout
);

  block_t mux_out, data_q;

  always_comb begin
    unique case (data_reg_mux_sel)
      MUX_PLAIN:  mux_out = plaintext;
      MUX_ROUND0: mux_out = data_q ^ round_key;
      default:    mux_out = round_out;
    endcase
  end

  assign rin = mux_out ^ fi_mux;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             data_q <= '0;
    else if (load_data_reg) data_q <= rin ^ fi_data_reg;
  end

  assign rout = data_q;

endmodule
