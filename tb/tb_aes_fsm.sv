// tb_aes_fsm: the one-hot controller FSM. Checks the INIT wait, the 13-state
// walk INIT -> Load Inputs -> Round 0..10 -> INIT, the synchronous return to
// INIT, and the faulty behaviours of one-hot hardware: a lost token blocks
// the machine (all zero), an extra token runs two states at once.
module tb_aes_fsm;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enc = 0, sr = 0;
  onehot_t fi = '0, st;

  aes_fsm dut (.clk(clk), .rst_n(rst_n), .encrypt(enc), .sync_reset(sr), .fi_state(fi), .state(st));

  always #5 clk = ~clk;

  task automatic chk(input onehot_t exp, input string what);
    checks++;
    if (st !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, st, exp);
    end
  endtask

  function automatic onehot_t bitv(input int i);
    return onehot_t'(1) << i;
  endfunction

  initial begin
    #7 chk(bitv(0), "reset state");
    #5 rst_n = 1;
    repeat (3) begin @(negedge clk); chk(bitv(0), "INIT waits"); end
    enc = 1;
    @(negedge clk); chk(bitv(1), "Load Inputs");
    enc = 0;
    for (int k = 0; k <= 10; k++) begin @(negedge clk); chk(bitv(2+k), $sformatf("Round %0d", k)); end
    @(negedge clk); chk(bitv(0), "back to INIT");
    // synchronous reset in the middle of a run
    enc = 1; @(negedge clk); enc = 0;
    repeat (4) @(negedge clk);
    chk(bitv(5), "Round 3");
    sr = 1; @(negedge clk); sr = 0;
    chk(bitv(0), "sync reset to INIT");
    // lost token: clear the Round 2 bit as it is entered
    enc = 1; @(negedge clk); enc = 0;          // Load
    @(negedge clk);                            // Round 0
    @(negedge clk);                            // Round 1
    fi = bitv(4); @(negedge clk); fi = '0;     // Round 2 token lost
    chk('0, "blocked");
    repeat (20) @(negedge clk);
    chk('0, "still blocked");
    sr = 1; @(negedge clk); sr = 0;
    // extra token: add Round 9 while the run is in Round 1
    enc = 1; @(negedge clk); enc = 0;          // Load
    @(negedge clk);                            // Round 0
    fi = bitv(2+9); @(negedge clk); fi = '0;   // Round 1 + Round 9
    chk(bitv(3) | bitv(11), "two states");
    @(negedge clk);
    chk(bitv(4) | bitv(12), "Round 2 and Round 10");
    @(negedge clk);
    chk(bitv(5) | bitv(0), "Round 3 and INIT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
