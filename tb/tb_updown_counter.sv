// tb_updown_counter: self-checking test of the up/down counter: load,
// hold without enable, count up/down by STEP, saturation at both limits,
// against a behavioural model.
module tb_updown_counter;
  logic clk = 0, rst, load, en, down;
  logic signed [15:0] load_val, cnt;
  longint model;
  int checks = 0, failures = 0;

  updown_counter #(.W(16), .STEP(64)) dut (.clk(clk), .rst(rst), .load(load), .load_val(load_val),
                                          .en(en), .down(down), .cnt(cnt));

  always #5 clk = ~clk;

  task automatic step(logic l, logic e, logic d, longint v);
    @(negedge clk);
    load = l; en = e; down = d; load_val = 16'(v);
    @(posedge clk);
    if (l) model = v;
    else if (e) begin
      model = d ? model - 64 : model + 64;
      if (model > 32767) model = 32767;
      if (model < -32768) model = -32768;
    end
    #1;
    checks++;
    if (longint'(cnt) != model) begin failures++; $display("FAIL cnt=%0d exp=%0d", cnt, model); end
  endtask

  initial begin
    rst = 1; load = 0; en = 0; down = 0; load_val = '0; model = 0;
    #12 rst = 0;
    step(1, 0, 0, 1000);
    repeat (10) step(0, 1, 0, 0);
    repeat (5) step(0, 0, 1, 0);
    repeat (30) step(0, 1, 1, 0);
    step(1, 0, 0, 32700);
    repeat (5) step(0, 1, 0, 0);   // saturates high
    step(1, 0, 0, -32700);
    repeat (5) step(0, 1, 1, 0);   // saturates low
    repeat (300) step($urandom_range(0, 20) == 0, $urandom_range(0, 1)[0], $urandom_range(0, 1)[0],
                      longint'($signed(16'($urandom))));
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
