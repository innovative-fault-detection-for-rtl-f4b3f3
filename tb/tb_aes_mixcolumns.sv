// tb_aes_mixcolumns: MixColumns against the reference model on random data
// and on the known column db 13 53 45 -> 8e 4d a1 bc.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] din, dout;

  aes_mixcolumns dut (.din(din), .dout(dout));

  task automatic check(input logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL din=%h got %h exp %h", din, dout, exp);
    end
  endtask

  initial begin
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6;
    #1 check(128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    for (int i = 0; i < 500; i++) begin
      din = rand_blk();
      #1 check(mix_columns(din));
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
