// tb_pi_mux: self-checking test of the RAM port-A input multiplexer:
// each select value with random data, sign extension of the 16-bit inputs.
module tb_pi_mux;
  import apf_pkg::*;

  mux_sel_e sel;
  word_t alu_q, y;
  io_t iref, iload;
  int checks = 0, failures = 0;

  pi_mux dut (.sel(sel), .alu_q(alu_q), .iref_num(iref), .iload_num(iload), .y(y));

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100) begin
      alu_q = word_t'($urandom);
      iref  = io_t'($urandom);
      iload = io_t'($urandom);
      sel = MUX_ALU;   #1 expect_eq(longint'(y), longint'(alu_q), "alu");
      sel = MUX_IREF;  #1 expect_eq(longint'(y), longint'(iref), "iref");
      sel = MUX_ILOAD; #1 expect_eq(longint'(y), longint'(iload), "iload");
      sel = mux_sel_e'(2'b11); #1 expect_eq(longint'(y), 0, "unused");
    end
    iref = -16'sd5; sel = MUX_IREF; #1 expect_eq(longint'(y), -5, "sign extension");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
