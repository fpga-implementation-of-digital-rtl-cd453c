// tb_pi_ram: self-checking test of the dual-port RAM: constants after
// reset, writes through either port, simultaneous writes, asynchronous reads,
// against an array model.
module tb_pi_ram;
  import apf_pkg::*;

  logic clk = 0, rst, we_a, we_b;
  addr_t adra, adrb;
  word_t din_a, din_b, da, db;
  word_t model [16];
  int checks = 0, failures = 0;

  pi_ram dut (.clk(clk), .rst(rst), .adra(adra), .adrb(adrb), .we_a(we_a), .we_b(we_b),
              .din_a(din_a), .din_b(din_b), .da(da), .db(db));

  always #5 clk = ~clk;

  task automatic cmp(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  initial begin
    rst = 1; we_a = 0; we_b = 0; adra = '0; adrb = '0; din_a = '0; din_b = '0;
    foreach (model[i]) model[i] = '0;
    model[2] = 25'sd20; model[3] = -25'sd20; model[5] = 25'sd102; model[6] = -25'sd51;
    #12 rst = 0;
    for (int i = 0; i < 16; i++) begin
      adra = addr_t'(i); adrb = addr_t'(15 - i); #1;
      cmp(da, model[i], "reset A");
      cmp(db, model[15 - i], "reset B");
    end
    repeat (300) begin
      @(negedge clk);
      adra = addr_t'($urandom); adrb = addr_t'($urandom);
      we_a = $urandom_range(0, 1)[0]; we_b = $urandom_range(0, 1)[0];
      din_a = word_t'($urandom); din_b = word_t'($urandom);
      @(posedge clk);
      if (we_b) model[adrb] = din_b;
      if (we_a) model[adra] = din_a;
      #1 we_a = 0; we_b = 0;
      adra = addr_t'($urandom); adrb = addr_t'($urandom); #1;
      cmp(da, model[adra], "read A");
      cmp(db, model[adrb], "read B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
