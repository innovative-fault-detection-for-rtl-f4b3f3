// tb_aes_fd_top: end-to-end test of the fault-detecting AES-128 core at its
// default configuration.
//  - FIPS-197 known-answer vectors and random blocks against the reference
//    model, with the 12-cycle latency and silent flags checked every time;
//  - back-to-back blocks with encrypt held high (13 cycles per block);
//  - one injected fault per detection mechanism, checking which flag rises,
//    whether the ciphertext is wrong or withheld, and that fault_detected is
//    set and then cleared by the next block:
//      E  data register, Detect_Reg and S-box faults
//      F  round output fault
//      G  initial-round multiplexer fault
//      kpar  key register fault
//      ctrl  FSM fault: mismatch, return to INIT, no done, then recovery
// Each mechanism's occurrences are counted; one that never occurred fails.
module tb_aes_fd_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

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
  block_t gold;
  bit ref_ready = 0;
  always @(plaintext or key or ref_ready) if (ref_ready) gold = aes_ref_pkg::encrypt(plaintext, key);

  // mechanism counters
  int n_blocks = 0, n_last_round = 0, n_back_to_back = 0;
  int n_e = 0, n_f = 0, n_g = 0, n_kpar = 0, n_ctrl = 0, n_abort = 0, n_sticky_clear = 0;

  always @(posedge clk) if (dut.ctrl.last_round && !flags.ctrl) n_last_round++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Run one block. A fault mask f is applied during cycle fcyc (1 = Load
  // Inputs, 2 = Round 0, ..., 12 = Round 10; 0 = no fault).
  task automatic run(input block_t pt, input block_t k, input int fcyc, input fault_inj_t f,
                     output block_t ct, output bit got_done, output int lat, output fd_flags_t seen);
    @(negedge clk);
    plaintext = pt; key = k; encrypt = 1;
    @(negedge clk);
    encrypt = 0;
    got_done = 0; lat = -1; seen = '0; ct = '0;
    for (int cyc = 1; cyc <= 15; cyc++) begin
      if (cyc == fcyc) fi = f;
      #1 seen |= flags;
      @(negedge clk);
      fi = '0;
      if (done && !got_done) begin
        got_done = 1; lat = cyc; ct = ciphertext;
      end
    end
    #1 seen |= flags;
  endtask

  function automatic fault_inj_t one_bit(input int where, input int bitpos);
    fault_inj_t f = '0;
    case (where)
      0: f.data_reg[bitpos]   = 1'b1;
      1: f.mux[bitpos]        = 1'b1;
      2: f.sbox[bitpos]       = 1'b1;
      3: f.lin[bitpos]        = 1'b1;
      4: f.detect_reg[bitpos] = 1'b1;
      5: f.key_reg[bitpos]    = 1'b1;
      6: f.state_a[bitpos % N_STATES] = 1'b1;
      default: f.state_b[bitpos % N_STATES] = 1'b1;
    endcase
    return f;
  endfunction

  task automatic clean_block(input block_t pt, input block_t k, input string what);
    block_t ct; bit gd; int lat; fd_flags_t seen;
    run(pt, k, 0, '0, ct, gd, lat, seen);
    n_blocks++;
    chk(gd, {what, ": done"});
    chk(lat == 12, $sformatf("%s: latency %0d, expected 12", what, lat));
    chk(ct == gold, $sformatf("%s: ciphertext %h", what, ct));
    chk(seen == '0, $sformatf("%s: flags %h in fault-free run", what, seen));
    chk(!fault_detected, {what, ": fault_detected low"});
  endtask

  initial begin
    block_t ct, pt, k; bit gd; int lat; fd_flags_t seen;
    aes_ref_pkg::init();
    ref_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // FIPS-197 Appendix C.1 and Appendix B
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 0, '0, ct, gd, lat, seen);
    chk(gd && ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 C.1: %h", ct));
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 0, '0, ct, gd, lat, seen);
    chk(gd && ct == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("FIPS-197 B: %h", ct));
    chk(lat == 12, "FIPS-197 B latency");

    for (int i = 0; i < 40; i++) clean_block(rand_blk(), rand_blk(), $sformatf("random %0d", i));

    // back-to-back: encrypt held high, a block every 13 cycles
    begin
      int t_prev, t_now, nd;
      block_t p0;
      k = rand_blk(); p0 = rand_blk();
      @(negedge clk); plaintext = p0; key = k; encrypt = 1;
      nd = 0; t_prev = 0;
      for (int cyc = 0; cyc < 13*4 + 2; cyc++) begin
        @(negedge clk);
        if (done) begin
          chk(ciphertext == gold, "back-to-back ciphertext");
          chk(flags == '0, "back-to-back flags");
          if (nd > 0) begin
            chk(cyc - t_prev == 13, $sformatf("back-to-back period %0d", cyc - t_prev));
            n_back_to_back++;
          end
          t_prev = cyc; nd++;
        end
      end
      encrypt = 0;
      chk(nd >= 4, "back-to-back blocks completed");
      repeat (14) @(negedge clk);
    end

    // --- E: data register fault in Round 5 (cycle 7) -> wrong ciphertext, flagged
    pt = rand_blk(); k = rand_blk();
    run(pt, k, 7, one_bit(0, 45), ct, gd, lat, seen);
    chk(seen.e != 0, "data register fault raises E");
    chk(ct != gold, "data register fault corrupts the ciphertext");
    chk(fault_detected, "fault_detected set");
    if (seen.e != 0) n_e++;
    clean_block(rand_blk(), rand_blk(), "after data register fault");
    if (!fault_detected) n_sticky_clear++;

    // --- E: Detect_Reg fault -> flagged, ciphertext still correct (positive fault)
    run(pt, k, 4, one_bit(4, 100), ct, gd, lat, seen);
    chk(seen.e != 0, "Detect_Reg fault raises E");
    chk(gd && ct == gold, "Detect_Reg fault leaves ciphertext correct");
    if (seen.e != 0) n_e++;

    // --- E: S-box output fault in Round 10 (cycle 12)
    run(pt, k, 12, one_bit(2, 3), ct, gd, lat, seen);
    chk(seen.e == 16'h1 << 15, "S-box fault raises E of byte 15 only");
    if (seen.e != 0) n_e++;

    // --- F: round output fault in Round 3 (cycle 5)
    run(pt, k, 5, one_bit(3, 127), ct, gd, lat, seen);
    chk(seen.f == 4'b0001, "round output fault in byte 0 raises F of column 0");
    chk(ct != gold, "round output fault corrupts the ciphertext");
    if (seen.f != 0) n_f++;

    // --- G: multiplexer fault in Round 0 (cycle 2)
    run(pt, k, 2, one_bit(1, 20), ct, gd, lat, seen);
    chk(seen.g == 4'b1000, "initial-round fault in column 3 raises G of column 3");
    if (seen.g != 0) n_g++;

    // --- key parity: key register fault while loading the initial key (cycle 1)
    run(pt, k, 1, one_bit(5, 64), ct, gd, lat, seen);
    chk(seen.kpar == 16'h1 << 8, "key register fault raises parity flag of byte 7");
    chk(ct != gold, "key register fault corrupts the ciphertext");
    if (seen.kpar != 0) n_kpar++;

    // --- controller: extra token in the main FSM during Round 2 (cycle 4)
    run(pt, k, 4, one_bit(6, ST_R0 + 9), ct, gd, lat, seen);
    chk(seen.ctrl, "FSM fault raises the controller flag");
    chk(!gd, "aborted encryption gives no done");
    chk(!busy, "controller back in INIT");
    if (seen.ctrl) n_ctrl++;
    if (!gd) n_abort++;
    // --- controller: lost token in the shadow FSM during Round 7 (cycle 9)
    run(pt, k, 9, one_bit(7, ST_R0 + 8), ct, gd, lat, seen);
    chk(seen.ctrl && !gd, "shadow FSM fault aborts the encryption");
    if (seen.ctrl) n_ctrl++;
    clean_block(pt, k, "after controller faults");

    $display("blocks=%0d last_round=%0d back_to_back=%0d E=%0d F=%0d G=%0d kpar=%0d ctrl=%0d abort=%0d sticky_clear=%0d",
             n_blocks, n_last_round, n_back_to_back, n_e, n_f, n_g, n_kpar, n_ctrl, n_abort, n_sticky_clear);
    chk(n_last_round > 0, "last-round MixColumns bypass used");
    chk(n_back_to_back > 0, "back-to-back blocks happened");
    chk(n_e > 0 && n_f > 0 && n_g > 0 && n_kpar > 0 && n_ctrl > 0, "every detection mechanism fired");
    chk(n_abort > 0, "controller abort happened");
    chk(n_sticky_clear > 0, "fault_detected cleared by a new block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
