// tb_clk_div: self-checking test of the clock divider: tick is one clock
// wide and comes exactly every DIV clocks (DIV = 8 and DIV = 5).
module tb_clk_div;
  logic clk = 0, rst;
  logic tick8, tick5;
  int checks = 0, failures = 0;

  clk_div #(.DIV(8)) dut8 (.clk(clk), .rst(rst), .tick(tick8));
  clk_div #(.DIV(5)) dut5 (.clk(clk), .rst(rst), .tick(tick5));

  always #5 clk = ~clk;

  int cyc = 0, last8 = -1, last5 = -1, n8 = 0, n5 = 0;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (tick8) begin
      if (last8 >= 0) begin checks++; if (cyc - last8 != 8) begin failures++; $display("FAIL div8 period %0d", cyc - last8); end end
      last8 <= cyc; n8 <= n8 + 1;
    end
    if (tick5) begin
      if (last5 >= 0) begin checks++; if (cyc - last5 != 5) begin failures++; $display("FAIL div5 period %0d", cyc - last5); end end
      last5 <= cyc; n5 <= n5 + 1;
    end
  end

  initial begin
    rst = 1;
    #22 rst = 0;
    repeat (400) @(posedge clk);
    #1;
    checks++; if (n8 != 49) begin failures++; $display("FAIL n8=%0d", n8); end
    checks++; if (n5 != 79) begin failures++; $display("FAIL n5=%0d", n5); end
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
