// aes_controller: the protected AES controller.
//
// Two identical one-hot FSMs (aes_fsm) run side by side from the same
// encrypt input. Their state vectors are compared in every cycle; when they
// differ, mismatch is raised, the control word is forced to its INIT (idle)
// value in that same cycle, and both FSMs return to INIT on the next rising
// edge, so a disturbed encryption is abandoned instead of producing a
// ciphertext from a wrong round sequence.
//
// The control word is decoded from the main FSM, state by state, as in the
// controller flowchart:
//   INIT         no loads (idle)
//   Load Inputs  data_reg_mux_sel=11, key_reg_mux_sel=0, load both registers
//   Round 0      data_reg_mux_sel=00, key_reg_mux_sel=1, round_constant=01
//   Round k      data_reg_mux_sel=01, key_reg_mux_sel=1,
//                round_constant = 02 04 08 10 20 40 80 1b 36 for k = 1..9
//   Round 10     as Round k, last_round=1, round_constant=00 (key unused)
// The decode is one-hot: each asserted state bit ORs its values in, so an FSM
// with two tokens drives a mix of both states' controls, as real hardware
// would. check_f / check_g tell the datapath checkers when the F and G
// parities are meaningful (rounds 1..10, round 0).
//
// done is a registered one-cycle pulse in the cycle after Round 10, when the
// data register holds the ciphertext. Latency from the edge that leaves INIT
// to done is 12 clock cycles.
// fi_state_a / fi_state_b are fault-injection masks on the two FSMs' state
// flip-flops (zero in normal use). Asynchronous active-low reset.
module aes_controller
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    encrypt,
  input  onehot_t fi_state_a,
  input  onehot_t fi_state_b,
  output ctrl_t   ctrl,
  output onehot_t state,
  output logic    mismatch,
  output logic    done
);

  onehot_t st_a, st_b;

  aes_fsm u_fsm_main (
    .clk       (clk),
    .rst_n     (rst_n),
    .encrypt   (encrypt),
    .sync_reset(mismatch),
    .fi_state  (fi_state_a),
    .state     (st_a)
  );

  aes_fsm u_fsm_shadow (
    .clk       (clk),
    .rst_n     (rst_n),
    .encrypt   (encrypt),
    .sync_reset(mismatch),
    .fi_state  (fi_state_b),
    .state     (st_b)
  );

  assign mismatch = (st_a != st_b);
  assign state    = st_a;

  function automatic logic [7:0] rcon(input int unsigned k);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 0; i < k; i++) r = xtime(r);
    return r;
  endfunction

  always_comb begin
    logic [1:0] sel;
    ctrl = CTRL_IDLE;
    sel  = 2'b00;
    if (!mismatch) begin
      if (st_a[ST_LOAD]) begin
        sel                |= MUX_PLAIN;
        ctrl.load_data_reg  = 1'b1;
        ctrl.load_key_reg   = 1'b1;
      end
      for (int k = 0; k <= NR; k++) begin
        if (st_a[ST_R0+k]) begin
          if (k > 0) sel |= MUX_ROUND;
          ctrl.key_reg_mux_sel = 1'b1;
          ctrl.load_data_reg   = 1'b1;
          ctrl.load_key_reg    = 1'b1;
          if (k < NR) ctrl.round_constant |= rcon(k);
          if (k == NR) ctrl.last_round = 1'b1;
          if (k == 0) ctrl.check_g = 1'b1;
          else        ctrl.check_f = 1'b1;
        end
      end
    end
    ctrl.data_reg_mux_sel = mux_sel_e'(sel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= st_a[ST_R0+NR] & ~mismatch;
  end

endmodule
