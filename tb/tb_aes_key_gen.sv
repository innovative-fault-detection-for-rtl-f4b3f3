// tb_aes_key_gen: loads a key, steps through the ten round keys with the
// FIPS-197 round constants and compares each with the reference key schedule
// (and the FIPS-197 Appendix A.1 last round key). Then flips a key register
// bit and checks that exactly that byte's parity flag rises.
module tb_aes_key_gen;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sel, load;
  logic [7:0] rc;
  logic [15:0] perr;
  logic [127:0] key, fi, rkey;
  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_key_gen dut (.clk(clk), .rst_n(rst_n), .init_key(key), .key_reg_mux_sel(sel), .load_key_reg(load),
                   .round_constant(rc), .fi_key_reg(fi), .round_key(rkey), .parity_err(perr));

  always #5 clk = ~clk;

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] rks [11];
    aes_ref_pkg::init();
    sel = 0; load = 0; rc = 0; fi = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      key = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand_blk();
      key_schedule(key, rks);
      @(negedge clk); sel = 0; load = 1;
      @(negedge clk);
      chk(rkey, key, "initial key");
      // hold: no load
      load = 0;
      @(negedge clk);
      chk(rkey, key, "hold");
      for (int k = 1; k <= 10; k++) begin
        sel = 1; load = 1; rc = RCON[k-1];
        @(negedge clk);
        chk(rkey, rks[k], $sformatf("round key %0d", k));
        chk(128'(perr), 128'(0), "no parity error");
      end
      if (t == 0) chk(rkey, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
      load = 0;
    end
    // fault in the key register: bit 6 of byte 3
    sel = 0; load = 1; fi = 128'h1 << (127 - 8*3 - 1);
    @(negedge clk);
    load = 0; fi = '0;
    chk(rkey, key ^ (128'h1 << (127 - 8*3 - 1)), "faulty key value");
    chk(128'(perr), 128'(16'h1 << (15 - 3)), "parity flag of byte 3");
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
