// tb_aes_state_reg: data multiplexer and data register. Checks each select
// code, the initial-round XOR, load enable hold, reset and both fault masks.
module tb_aes_state_reg;
  import aes_pkg::*;
  import aes_ref_pkg::rand_blk;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load;
  block_t pt, rk, ro, fi_mux, fi_reg, rin, rout, model;
  mux_sel_e sel;

  aes_state_reg dut (.clk(clk), .rst_n(rst_n), .plaintext(pt), .round_key(rk), .round_out(ro),
                     .data_reg_mux_sel(sel), .load_data_reg(load), .fi_mux(fi_mux),
                     .fi_data_reg(fi_reg), .rin(rin), .rout(rout));

  always #5 clk = ~clk;

  task automatic chk(input block_t got, input block_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    block_t exp_rin;
    load = 0; sel = MUX_PLAIN; fi_mux = '0; fi_reg = '0;
    pt = rand_blk(); rk = rand_blk(); ro = rand_blk();
    #12 chk(rout, '0, "reset value");
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pt = rand_blk(); rk = rand_blk(); ro = rand_blk();
      sel  = mux_sel_e'($urandom_range(3));
      load = $urandom_range(3) != 0;
      fi_mux = (i % 37 == 5) ? (block_t'(1) << $urandom_range(127)) : '0;
      fi_reg = (i % 41 == 7) ? (block_t'(1) << $urandom_range(127)) : '0;
      case (sel)
        MUX_PLAIN:  exp_rin = pt;
        MUX_ROUND0: exp_rin = model ^ rk;
        default:    exp_rin = ro;
      endcase
      exp_rin ^= fi_mux;
      #1 chk(rin, exp_rin, "mux output");
      if (load) model = exp_rin ^ fi_reg;
      @(posedge clk); #1;
      chk(rout, model, "register");
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
