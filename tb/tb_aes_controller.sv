// tb_aes_controller: control word of every state of the flowchart, the
// 12-cycle latency to done, and the protection: a fault in either FSM copy
// raises mismatch, forces the idle control word in that cycle, sends both
// FSMs to INIT and suppresses done.
module tb_aes_controller;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enc = 0, mm, done;
  onehot_t fa = '0, fb = '0, st;
  ctrl_t c;
  localparam logic [7:0] RC [11] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36, 8'h00};

  aes_controller dut (.clk(clk), .rst_n(rst_n), .encrypt(enc), .fi_state_a(fa), .fi_state_b(fb),
                      .ctrl(c), .state(st), .mismatch(mm), .done(done));

  always #5 clk = ~clk;

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic chk_ctrl(input ctrl_t exp, input string what);
    chk(64'(c), 64'(exp), what);
  endtask

  initial begin
    ctrl_t e;
    int cyc;
    #12 rst_n = 1;
    @(negedge clk);
    chk_ctrl(CTRL_IDLE, "INIT");
    for (int run = 0; run < 2; run++) begin
      enc = 1;
      @(negedge clk);                                  // edge that left INIT
      enc = 0;
      cyc = 1;
      e = CTRL_IDLE;
      e.data_reg_mux_sel = MUX_PLAIN; e.load_data_reg = 1; e.load_key_reg = 1;
      chk_ctrl(e, "Load Inputs");
      for (int k = 0; k <= 10; k++) begin
        @(negedge clk); cyc++;
        e = CTRL_IDLE;
        e.data_reg_mux_sel = (k == 0) ? MUX_ROUND0 : MUX_ROUND;
        e.key_reg_mux_sel = 1; e.load_data_reg = 1; e.load_key_reg = 1;
        e.round_constant = RC[k];
        e.last_round = (k == 10);
        e.check_g = (k == 0); e.check_f = (k != 0);
        chk_ctrl(e, $sformatf("Round %0d", k));
        chk(64'(done), 0, "no early done");
      end
      @(negedge clk);
      chk(64'(done), 1, "done");
      chk(64'(cyc), 12, "latency in cycles");
      chk_ctrl(CTRL_IDLE, "INIT again");
      chk(64'(mm), 0, "no mismatch");
    end
    // fault in the shadow FSM during Round 4
    enc = 1; @(negedge clk); enc = 0;
    repeat (5) @(negedge clk);                          // Round 4
    chk(64'(st), 64'(onehot_t'(1) << (ST_R0 + 4)), "in Round 4");
    fb = onehot_t'(1) << 0;
    @(negedge clk); fb = '0;
    #1 chk(64'(mm), 1, "mismatch raised");
    chk_ctrl(CTRL_IDLE, "controls forced idle");
    @(negedge clk);
    chk(64'(st), 64'(INIT_STATE), "back to INIT");
    chk(64'(mm), 0, "mismatch cleared");
    repeat (12) begin @(negedge clk); chk(64'(done), 0, "no done after abort"); end
    // lost token in the main FSM
    enc = 1; @(negedge clk); enc = 0;
    fa = onehot_t'(1) << ST_R0;
    @(negedge clk); fa = '0;
    chk(64'(mm), 1, "lost token detected");
    @(negedge clk);
    chk(64'(st), 64'(INIT_STATE), "recovered to INIT");
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
