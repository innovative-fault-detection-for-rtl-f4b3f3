// tb_aes_lin_detect: F flags. Builds a correct round from the reference model
// (rin = MixColumns(ShiftRows(s)) ^ key, or without MixColumns) and checks all
// flags low, then corrupts the round output, the key seen by the checker or
// the ShiftRows input and checks the flag of the affected column, and that
// enable = 0 masks the flags.
module tb_aes_lin_detect;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] rin, rk, srin;
  logic en;
  logic [3:0] f;

  aes_lin_detect dut (.rin(rin), .round_key(rk), .sr_in(srin), .enable(en), .f_flag(f));

  task automatic chk(input logic [3:0] exp, input string what);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, f, exp);
    end
  endtask

  initial begin
    int n, b;
    for (int i = 0; i < 300; i++) begin
      srin = rand_blk(); rk = rand_blk(); en = 1;
      rin = ((i % 2) ? shift_rows(srin) : mix_columns(shift_rows(srin))) ^ rk;
      #1 chk(4'b0, "fault free");
      n = $urandom_range(15); b = $urandom_range(7);
      case (i % 3)
        0: begin rin[127-8*n-b] ^= 1'b1; #1 chk(4'b1 << (n/4), "round output fault"); end
        1: begin rk[127-8*n-b] ^= 1'b1;  #1 chk(4'b1 << (n/4), "key fault"); end
        default: begin
          // byte n = s(r,c) of the ShiftRows input lands in column (c - r) mod 4
          srin[127-8*n-b] ^= 1'b1;
          #1 chk(4'b1 << (((n/4) - (n%4) + 4) % 4), "ShiftRows input fault");
        end
      endcase
      en = 0;
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
