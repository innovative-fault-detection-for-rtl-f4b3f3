// tb_aes_linear: ShiftRows + MixColumns + AddRoundKey, with and without the
// last-round MixColumns bypass, against the reference model.
module tb_aes_linear;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] sr_in, rk, fi, out, exp;
  logic last;

  aes_linear dut (.sr_in(sr_in), .round_key(rk), .last_round(last), .fi_lin(fi), .round_out(out));

  initial begin
    fi = '0;
    for (int i = 0; i < 400; i++) begin
      sr_in = rand_blk();
      rk    = rand_blk();
      last  = (i % 2) == 1;
      exp   = last ? (shift_rows(sr_in) ^ rk) : (mix_columns(shift_rows(sr_in)) ^ rk);
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL last=%0d in=%h got %h exp %h", last, sr_in, out, exp);
      end
    end
    // FIPS-197 Appendix B, round 1: after SubBytes d42711ae..., key a0fafe17...
    sr_in = 128'hd42711aee0bf98f1b8b45de51e415230;
    rk    = 128'ha0fafe1788542cb123a339392a6c7605;
    last  = 0;
    #1 checks++;
    if (out !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
      failures++;
      $display("FAIL fips round 1: %h", out);
    end
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
