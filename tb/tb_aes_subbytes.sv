// tb_aes_subbytes: checks all 256 S-box entries of the SubBytes block against
// the reference model and a few FIPS-197 values, plus the fault mask path.
module tb_aes_subbytes;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, fi, dout;

  aes_subbytes dut (.din(din), .fi_sbox(fi), .dout(dout));

  task automatic check(input logic [127:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: din=%h got %h exp %h", what, din, dout, exp);
    end
  endtask

  initial begin
    aes_ref_pkg::init();
    fi = '0;
    // every byte value in every position
    for (int v = 0; v < 256; v++) begin
      for (int n = 0; n < 16; n++) din[127-8*n -: 8] = 8'(v + 17*n);
      #1 check(sub_bytes(din), "table");
    end
    // FIPS-197 Figure 7 entries
    din = {8'h00, 8'h01, 8'h53, 8'hff, 8'h10, 8'hc9, {10{8'h00}}};
    #1 check({8'h63, 8'h7c, 8'hed, 8'h16, 8'hca, 8'hdd, {10{8'h63}}}, "fips");
    // fault mask is XORed on the output
    fi = 128'h1 << 77;
    #1 check(sub_bytes(din) ^ fi, "fault mask");
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
