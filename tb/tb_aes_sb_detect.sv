// tb_aes_sb_detect: Detect_Reg and the E flags. With the data register model
// equal to Detect_Reg and correct S-box outputs every flag must stay low; a
// flipped bit in the data register, in an S-box output or in Detect_Reg must
// raise exactly the flag of that byte.
module tb_aes_sb_detect;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load;
  logic [127:0] rin, rout, sb, fi, drout;
  logic [15:0] e;

  aes_sb_detect dut (.clk(clk), .rst_n(rst_n), .rin(rin), .load(load), .rout(rout), .sb_out(sb),
                     .fi_detect_reg(fi), .drout(drout), .e_flag(e));

  always #5 clk = ~clk;

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    int n, b;
    aes_ref_pkg::init();
    load = 0; fi = '0; rin = '0; rout = '0; sb = sub_bytes(128'h0);
    #7 chk(e, 16'h0, "after reset");
    #5 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rin = rand_blk(); load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (drout !== rin) begin failures++; $display("FAIL Detect_Reg load"); end
      rout = rin;                       // data register holds the same value
      sb = sub_bytes(rout);
      #1 chk(e, 16'h0, "fault free");
      n = $urandom_range(15); b = $urandom_range(7);
      case (i % 3)
        0: begin rout[127-8*n-b] ^= 1'b1; sb = sub_bytes(rout); end   // data register fault
        1: sb[127-8*n-b] ^= 1'b1;                                     // S-box output fault
        default: begin                                               // Detect_Reg fault
          @(negedge clk); fi = 128'h1 << (127-8*n-b); load = 1;
          @(negedge clk); fi = '0; load = 0;
        end
      endcase
      #1 chk(e, 16'h1 << n, $sformatf("fault kind %0d byte %0d", i % 3, n));
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
