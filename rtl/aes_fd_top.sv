// aes_fd_top: iterative AES-128 encryption core with a hybrid fault detection
// scheme that covers the whole implementation: initial round, SubBytes, the
// linear transformations, the data multiplexer and register, the key register
// and the controller.
//
// Datapath (one full round per clock): the multiplexer loads the data
// register with the plaintext, then with the initial round (register XOR
// initial key), then ten times with the round output SubBytes -> ShiftRows ->
// MixColumns (skipped in round 10) -> AddRoundKey. The key generator loads the
// initial key and then steps to the next round key in every round.
//
// Detection:
//   E  Detect_Reg copy of the data register plus the beta = x ^ S(x) table,
//      16 byte flags (SubBytes and data register)
//   F  column parities across the multiplexer and the linear layer, 4 flags,
//      checked in rounds 1..10
//   G  column parities across the initial round, 4 flags, checked in round 0
//   kpar  byte parity of the key register, 16 flags
//   ctrl  the duplicated controller FSMs disagree; the controller then
//         returns to INIT and the encryption is abandoned
// fault_detected is the OR of all flags, held until the next block is loaded;
// this alarm, busy and the done pulse are this design's own additions, while
// the datapath, the controller states and the E/F/G checks follow the scheme.
//
// Interface: hold plaintext and key stable and raise encrypt while the core is
// idle; encrypt is sampled in INIT. The plaintext and key are read one cycle
// later (Load Inputs). done pulses for one cycle 12 cycles after the edge
// that left INIT; ciphertext then holds the result until the next block is
// loaded. A new block can start in the cycle done is high, so back-to-back
// blocks take 13 cycles each.
//
// fi carries fault-injection masks that XOR onto flip-flop D inputs and
// datapath nets and the control word, for fault campaigns in simulation;
// tie it to zero in use.
// All registers use an asynchronous active-low reset.
module aes_fd_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       encrypt,
  input  block_t     plaintext,
  input  block_t     key,
  input  fault_inj_t fi,
  output block_t     ciphertext,
  output logic       done,
  output logic       busy,
  output fd_flags_t  flags,
  output logic       fault_detected
);

  ctrl_t   ctrl_q, ctrl;
  onehot_t state;
  logic    mismatch;
  block_t  round_key, rin, rout, sb_out, round_out, drout;
  logic [15:0] e_flag, kpar;
  logic [3:0]  f_flag, g_flag;

  aes_controller u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .encrypt   (encrypt),
    .fi_state_a(fi.state_a),
    .fi_state_b(fi.state_b),
    .ctrl      (ctrl_q),
    .state     (state),
    .mismatch  (mismatch),
    .done      (done)
  );

  // control word as seen by the datapath (fault-injection point)
  assign ctrl = ctrl_t'(ctrl_q ^ fi.ctrl);

  aes_key_gen u_keygen (
    .clk            (clk),
    .rst_n          (rst_n),
    .init_key       (key),
    .key_reg_mux_sel(ctrl.key_reg_mux_sel),
    .load_key_reg   (ctrl.load_key_reg),
    .round_constant (ctrl.round_constant),
    .fi_key_reg     (fi.key_reg),
    .round_key      (round_key),
    .parity_err     (kpar)
  );

  aes_state_reg u_state (
    .clk             (clk),
    .rst_n           (rst_n),
    .plaintext       (plaintext),
    .round_key       (round_key),
    .round_out       (round_out),
    .data_reg_mux_sel(ctrl.data_reg_mux_sel),
    .load_data_reg   (ctrl.load_data_reg),
    .fi_mux          (fi.mux),
    .fi_data_reg     (fi.data_reg),
    .rin             (rin),
    .rout            (rout)
  );

  aes_subbytes u_sub (
    .din    (rout),
    .fi_sbox(fi.sbox),
    .dout   (sb_out)
  );

  aes_linear u_lin (
    .sr_in     (sb_out),
    .round_key (round_key),
    .last_round(ctrl.last_round),
    .fi_lin    (fi.lin),
    .round_out (round_out)
  );

  aes_sb_detect u_det_sb (
    .clk          (clk),
    .rst_n        (rst_n),
    .rin          (rin),
    .load         (ctrl.load_data_reg),
    .rout         (rout),
    .sb_out       (sb_out),
    .fi_detect_reg(fi.detect_reg),
    .drout        (drout),
    .e_flag       (e_flag)
  );

  aes_lin_detect u_det_lin (
    .rin      (rin),
    .round_key(round_key),
    .sr_in    (sb_out),
    .enable   (ctrl.check_f),
    .f_flag   (f_flag)
  );

  aes_init_detect u_det_init (
    .drout    (drout),
    .round_key(round_key),
    .rin      (rin),
    .enable   (ctrl.check_g),
    .g_flag   (g_flag)
  );

  assign flags = '{e: e_flag, f: f_flag, g: g_flag, kpar: kpar, ctrl: mismatch};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        fault_detected <= 1'b0;
    else if (state[ST_LOAD] && !mismatch) fault_detected <= |flags;
    else if (|flags)                   fault_detected <= 1'b1;
  end

  assign ciphertext = rout;
  assign busy       = ~state[ST_INIT];

endmodule
