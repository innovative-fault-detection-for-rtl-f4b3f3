// tb_aes_init_detect: G flags. With rin = drout ^ key all flags are low; a bit
// flip in rin, drout or key raises the flag of its column; enable = 0 masks.
module tb_aes_init_detect;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] dr, rk, rin;
  logic en;
  logic [3:0] g;

  aes_init_detect dut (.drout(dr), .round_key(rk), .rin(rin), .enable(en), .g_flag(g));

  task automatic chk(input logic [3:0] exp, input string what);
    checks++;
    if (g !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, g, exp);
    end
  endtask

  initial begin
    int n, b;
    for (int i = 0; i < 300; i++) begin
      dr = rand_blk(); rk = rand_blk(); rin = dr ^ rk; en = 1;
      #1 chk(4'b0, "fault free");
      n = $urandom_range(15); b = $urandom_range(7);
      case (i % 3)
        0: rin[127-8*n-b] ^= 1'b1;
        1: dr[127-8*n-b] ^= 1'b1;
        default: rk[127-8*n-b] ^= 1'b1;
      endcase
      #1 chk(4'b1 << (n/4), "single bit fault");
      // two flips in the same column and bit position cancel (parity limit)
      rin = dr ^ rk;
      rin[127-8*n-b] ^= 1'b1;
      rin[127-8*(4*(n/4) + (n%4+1)%4)-b] ^= 1'b1;
      #1 chk(4'b0, "cancelling double fault");
      en = 0;
      rin[0] ^= 1'b1;
      #1 chk(4'b0, "disabled");
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
