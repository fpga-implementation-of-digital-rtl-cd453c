// tb_pi_reg: self-checking test of the load/clear register: parallel load
// on the clock edge only with load high, hold otherwise, clear at once.
module tb_pi_reg;
  logic clk = 0, clr, load;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  pi_reg #(.W(16)) dut (.clk(clk), .clr(clr), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    clr = 1; load = 0; d = '0; model = '0;
    #12 clr = 0;
    checks++; if (q !== 16'h0) failures++;
    repeat (200) begin
      @(negedge clk);
      load = $urandom_range(0, 1)[0];
      d = 16'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    // asynchronous clear between clock edges
    @(negedge clk); load = 1; d = 16'hBEEF;
    @(posedge clk); #2 clr = 1; #1;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL clear"); end
    clr = 0;
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
