// aes_pkg: types, constants and GF(2^8) helpers shared by the fault-detecting
// AES-128 encryption core.
//
// Data layout follows FIPS-197: byte n of a 128-bit block sits in bits
// [127-8n -: 8], and state element s(r,c) (row r, column c) is byte r+4c, so a
// column is one 32-bit word.
//
// The S-box is not typed in as a table. SBOX is computed at elaboration time
// by sbox_table(), which walks the multiplicative group of GF(2^8) with the
// generator 03: p runs through 03^k while q runs through 03^-k, so q is the
// inverse of p, and the affine map of FIPS-197 is applied to q. BETA is the
// difference table used by the SubBytes fault detection, beta(x) = x ^ S(x).
//
// The controller's one-hot state vector has one bit per state of the
// controller flowchart: INIT, Load Inputs, Round 0 .. Round 10.
package aes_pkg;

  localparam int unsigned BLOCK_W  = 128;
  localparam int unsigned NR       = 10;          // rounds of AES-128
  localparam int unsigned N_STATES = NR + 3;      // INIT, Load Inputs, Round 0..NR

  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [N_STATES-1:0] onehot_t;

  // Bit positions in the one-hot state vector.
  localparam int unsigned ST_INIT = 0;
  localparam int unsigned ST_LOAD = 1;
  localparam int unsigned ST_R0   = 2;            // Round k is bit ST_R0 + k

  localparam onehot_t INIT_STATE = onehot_t'(1) << ST_INIT;

  // data_reg_mux_sel encoding of the controller flowchart.
  typedef enum logic [1:0] {
    MUX_ROUND0 = 2'b00,   // initial round: data register XOR key
    MUX_ROUND  = 2'b01,   // rounds 1..10: AddRoundKey output
    MUX_UNUSED = 2'b10,   // not used by the controller; selects the round output
    MUX_PLAIN  = 2'b11    // plaintext
  } mux_sel_e;

  // Control word driven by the controller.
  typedef struct packed {
    mux_sel_e   data_reg_mux_sel;
    logic       key_reg_mux_sel;   // 0: initial key, 1: next round key
    logic       load_data_reg;
    logic       load_key_reg;
    logic [7:0] round_constant;
    logic       last_round;        // skip MixColumns
    logic       check_f;           // F flags meaningful (rounds 1..10)
    logic       check_g;           // G flags meaningful (round 0)
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    data_reg_mux_sel: MUX_ROUND0, key_reg_mux_sel: 1'b0, load_data_reg: 1'b0,
    load_key_reg: 1'b0, round_constant: 8'h00, last_round: 1'b0,
    check_f: 1'b0, check_g: 1'b0};

  // Error detection flags.
  typedef struct packed {
    logic [15:0] e;      // SubBytes / state register, bit 4c+r = E(r,c)
    logic [3:0]  f;      // multiplexer + linear transformations, per column
    logic [3:0]  g;      // initial round, per column
    logic [15:0] kpar;   // key register byte parity
    logic        ctrl;   // the two controller FSMs disagree
  } fd_flags_t;

  // Fault-injection masks, XORed onto flip-flop D inputs and datapath nets.
  // All zero in normal operation.
  typedef struct packed {
    block_t        data_reg;    // data register D input
    block_t        mux;         // multiplexer output (Rin)
    block_t        sbox;        // SubBytes output
    block_t        lin;         // AddRoundKey output
    block_t        detect_reg;  // Detect_Reg D input
    block_t        key_reg;     // key register D input
    onehot_t       state_a;     // main FSM state flip-flops
    onehot_t       state_b;     // redundant FSM state flip-flops
    ctrl_t         ctrl;        // control word on its way to the datapath
  } fault_inj_t;

  // Multiply by x (02) in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [255:0][7:0] sbox_table();
    logic [255:0][7:0] t;
    logic [7:0] p, q;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int k = 0; k < 255; k++) begin
      p = p ^ xtime(p);                    // p := p * 03
      q = q ^ (q << 1);                    // q := q / 03 (multiply by 03^-1 = f6)
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    t[0] = 8'h63;                          // 0 has no inverse; S(0) = affine(0)
    return t;
  endfunction

  function automatic logic [255:0][7:0] beta_table();
    logic [255:0][7:0] s, b;
    s = sbox_table();
    for (int x = 0; x < 256; x++) b[x] = 8'(x) ^ s[x];
    return b;
  endfunction

  localparam logic [255:0][7:0] SBOX = sbox_table();
  localparam logic [255:0][7:0] BETA = beta_table();

  // Byte n (0..15) of a block.
  function automatic logic [7:0] get_byte(input block_t b, input int unsigned n);
    return b[BLOCK_W-1-8*n -: 8];
  endfunction

  // XOR of the four bytes of column c: the 8-bit column parity of the scheme.
  function automatic logic [7:0] col_parity(input block_t b, input int unsigned c);
    return b[127-32*c -: 8] ^ b[119-32*c -: 8] ^ b[111-32*c -: 8] ^ b[103-32*c -: 8];
  endfunction

  // Even parity bit of every byte.
  function automatic logic [15:0] byte_parity(input block_t b);
    logic [15:0] p;
    for (int n = 0; n < 16; n++) p[15-n] = ^b[127-8*n -: 8];
    return p;
  endfunction

endpackage
