// tb_fault_campaign: fault-injection campaign on the protected AES-128 core,
// classifying every injected fault the way the detection-capability tables
// do:
//   silent      ciphertext correct, no flag raised
//   positive    ciphertext correct, a flag raised
//   undetected  ciphertext wrong (or withheld), no flag raised
//   detected    ciphertext wrong (or withheld), a flag raised
// Faults are XOR pulses on flip-flop D inputs and datapath nets, applied for
// one clock cycle (single faults: one bit) or one to three cycles (multiple
// faults: two to eight random bits), aimed at four groups of critical points
// in the proportion 1:4:4:1:
//   initial round        multiplexer, data or key register during Round 0,
//                        data or key register during Load Inputs
//   SubBytes / register  S-box outputs, data register, Detect_Reg, rounds 1..10
//   mux / linear         multiplexer and round output, rounds 1..10
//   controller           either FSM copy or one bit of the control word
//                        driven to the datapath, any cycle
// A fault on the multiplexer while it loads the plaintext is not injected:
// the core cannot tell it from a different plaintext.
// Faults land in any cycle of the block (1 = Load Inputs .. 12 = Round 10,
// 13-14 = INIT), except the initial-round group (cycles 1-2).
// Checks: no single fault may go undetected and every single fault leaves the
// core idle afterwards. Multiple faults escape when flipped bits cancel in a
// column parity or hit both FSM copies identically (which can block both:
// the testbench then resets the core); the escape rate must stay under 1 %.
// Faults on the control word are counted but left out of these checks: the
// scheme has no check on the key-generator controls (load, mux select,
// round constant), and a wrong round key built from them goes unnoticed.
// N_VEC sets the number of vectors per campaign (single, then multiple).
module tb_fault_campaign;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int N_VEC = 2000000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, encrypt = 0;
  block_t plaintext = '0, key = '0, ciphertext;
  fault_inj_t fi = '0;
  logic done, busy, fault_detected;
  fd_flags_t flags;

  aes_fd_top dut (.clk(clk), .rst_n(rst_n), .encrypt(encrypt), .plaintext(plaintext), .key(key),
                  .fi(fi), .ciphertext(ciphertext), .done(done), .busy(busy), .flags(flags),
                  .fault_detected(fault_detected));

  always #5 clk = ~clk;

  // reference ciphertext of the block on the inputs (one call site)
  block_t ref_ct;
  bit ref_ready = 0;
  always @(plaintext or key or ref_ready) if (ref_ready) ref_ct = aes_ref_pkg::encrypt(plaintext, key);

  typedef enum int {SILENT, POSITIVE, UNDETECTED, DETECTED} fclass_e;
  int cls [2][4][4];            // [single/multiple][group][class]
  int hangs [2] = '{0, 0};
  int cw [2][4];                // control-word faults [single/multiple][class]

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Add one random bit for group g to f; returns nothing, picks location.
  function automatic void add_bit(inout fault_inj_t f, input int g, input int cyc);
    int b, w;
    b = $urandom_range(127);
    w = $urandom_range(2);
    case (g)
      0: if (cyc == 1) begin if (w == 0) f.data_reg[b] ^= 1'b1; else f.key_reg[b] ^= 1'b1; end
         else case (w) 0: f.mux[b] ^= 1'b1; 1: f.data_reg[b] ^= 1'b1; default: f.key_reg[b] ^= 1'b1; endcase
      1: case (w) 0: f.sbox[b] ^= 1'b1; 1: f.data_reg[b] ^= 1'b1; default: f.detect_reg[b] ^= 1'b1; endcase
      2: if (w == 0) f.mux[b] ^= 1'b1; else f.lin[b] ^= 1'b1;
      default: case (w) 0: f.state_a[b % N_STATES] ^= 1'b1; 1: f.state_b[b % N_STATES] ^= 1'b1;
                        default: f.ctrl[b % $bits(ctrl_t)] ^= 1'b1; endcase
    endcase
  endfunction

  function automatic int pick_cycle(input int g);
    case (g)
      0: return $urandom_range(2, 1);
      1: return $urandom_range(14, 1);
      2: return $urandom_range(14, 2);
      default: return $urandom_range(14, 1);
    endcase
  endfunction

  task automatic run(input block_t pt, input block_t k, input int fcyc, input int dur, input fault_inj_t f,
                     output block_t ct, output bit got_done, output bit flagged);
    @(negedge clk);
    plaintext = pt; key = k; encrypt = 1;
    @(negedge clk);
    encrypt = 0;
    got_done = 0; flagged = 0; ct = '0;
    for (int cyc = 1; cyc <= 15; cyc++) begin
      if (cyc >= fcyc && cyc < fcyc + dur) fi = f;
      #1 flagged |= (flags != '0);
      @(negedge clk);
      fi = '0;
      if (done && !got_done) begin got_done = 1; ct = ciphertext; end
    end
    #1 flagged |= (flags != '0);
  endtask

  initial begin
    block_t pt, k, ct, gold;
    bit gd, fl, ok;
    int g, cyc, dur, nbits;
    fault_inj_t f;
    fclass_e c;
    real tot, pct [4];
    aes_ref_pkg::init();
    ref_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < N_VEC; v++) begin
        pt = rand_blk(); k = rand_blk();
        case (v % 10)
          0:             g = 0;
          1, 2, 3, 4:    g = 1;
          5, 6, 7, 8:    g = 2;
          default:       g = 3;
        endcase
        cyc = pick_cycle(g);
        f = '0;
        if (m == 0) begin
          dur = 1;
          add_bit(f, g, cyc);
        end else begin
          dur = $urandom_range(3, 1);
          nbits = $urandom_range(8, 2);
          for (int i = 0; i < nbits; i++) add_bit(f, g, cyc);
        end
        run(pt, k, cyc, dur, f, ct, gd, fl);
        gold = ref_ct;
        ok = gd && (ct == gold);
        c = ok ? (fl ? POSITIVE : SILENT) : (fl ? DETECTED : UNDETECTED);
        cls[m][g][c]++;
        if (f.ctrl != '0) cw[m][c]++;
        if (m == 0 && f.ctrl == '0) chk(c != UNDETECTED, $sformatf("single fault undetected: group %0d cycle %0d", g, cyc));
        // after a single fault the core must be back in INIT; identical
        // faults in both FSM copies can block both (all-zero state): reset
        if (m == 0 && f.ctrl == '0) chk(!busy, "core idle after the block");
        if (busy) begin
          hangs[m]++;
          @(negedge clk); rst_n = 0;
          @(negedge clk); rst_n = 1;
        end
      end
    end
    for (int m = 0; m < 2; m++) begin
      int sum [4];
      sum = '{0, 0, 0, 0};
      for (int gg = 0; gg < 4; gg++) begin
        tot = 0;
        for (int cc = 0; cc < 4; cc++) begin tot += cls[m][gg][cc]; sum[cc] += cls[m][gg][cc]; end
        for (int cc = 0; cc < 4; cc++) pct[cc] = 100.0 * cls[m][gg][cc] / tot;
        $display("%s group %0d (%0d faults): positive %6.3f%% silent %6.3f%% undetected %7.4f%% detected %6.3f%%",
                 m ? "multiple" : "single  ", gg, int'(tot), pct[POSITIVE], pct[SILENT], pct[UNDETECTED], pct[DETECTED]);
      end
      tot = sum[0] + sum[1] + sum[2] + sum[3];
      $display("%s all      (%0d faults): positive %6.3f%% silent %6.3f%% undetected %7.4f%% detected %6.3f%%",
               m ? "multiple" : "single  ", int'(tot), 100.0*sum[POSITIVE]/tot, 100.0*sum[SILENT]/tot,
               100.0*sum[UNDETECTED]/tot, 100.0*sum[DETECTED]/tot);
      $display("%s blocks that hung the controller: %0d", m ? "multiple" : "single  ", hangs[m]);
      $display("%s control-word faults: positive %0d silent %0d undetected %0d detected %0d",
               m ? "multiple" : "single  ", cw[m][POSITIVE], cw[m][SILENT], cw[m][UNDETECTED], cw[m][DETECTED]);
      chk(sum[SILENT] > 0 && sum[POSITIVE] > 0 && sum[DETECTED] > 0, "silent, positive and detected faults all occur");
      if (m == 1) chk(100.0 * (sum[UNDETECTED] - cw[m][UNDETECTED]) / (tot - (cw[m][0] + cw[m][1] + cw[m][2] + cw[m][3])) < 1.0,
                      "multiple-fault escape rate under 1 % (control word excluded)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400 * N_VEC * 2 + 64'd10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
