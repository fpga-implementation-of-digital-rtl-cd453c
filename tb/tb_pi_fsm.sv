// tb_pi_fsm: self-checking test of the regulator control unit.
// Checks that the machine idles in TOP with START low, that one pass takes
// 29 clocks, that I_inj_en is high exactly once per pass, and compares the
// control word of every state with an independently written table of the
// schedule (addresses, write enables, select, ALU operation, register load
// in S27, I_inj_en in S28).
module tb_pi_fsm;
  import apf_pkg::*;

  logic clk = 0, rst, start;
  ctrl_t ctrl;
  logic busy, done;
  int checks = 0, failures = 0;

  pi_fsm dut (.clk(clk), .rst(rst), .start(start), .ctrl(ctrl), .busy(busy), .done(done));

  always #5 clk = ~clk;

  // Expected schedule: {adra, adrb, we_a, we_b, data_sel, alu_sel, alu_en, inj_en}
  // '1 in adra/adrb position marks a don't-care (-1).
  typedef struct { int adra; int adrb; bit we_a; bit we_b; int sel; int alu; bit alu_en; bit inj; } row_t;
  row_t tbl [29];

  task automatic set(int s, int a, int b, bit wa, bit wb, int sel, int alu, bit ae, bit inj);
    tbl[s] = '{a, b, wa, wb, sel, alu, ae, inj};
  endtask

  task automatic cmp(int got, int exp, string what, int s);
    checks++;
    if (exp >= 0 && got != exp) begin failures++; $display("FAIL S%0d %s got=%0d exp=%0d", s, what, got, exp); end
  endtask

  initial begin
    //   state  adra adrb we_a we_b sel alu  alu_en inj
    set(0,   0, -1, 1, 0, 1, -1, 0, 0);
    set(1,   1, -1, 1, 0, 2, -1, 0, 0);
    set(2,   0,  2, 0, 0, -1, 1, 1, 0);
    set(3,   8, -1, 1, 0, 0, -1, 0, 0);
    set(4,   1,  3, 0, 0, -1, 1, 1, 0);
    set(5,   9, -1, 1, 0, 0, -1, 0, 0);
    set(6,   8, -1, 0, 0, -1, 3, 1, 0);
    set(7,  10, -1, 1, 0, 0, -1, 0, 0);
    set(8,   9, -1, 0, 0, -1, 3, 1, 0);
    set(9,  -1,  8, 0, 1, -1, -1, 0, 0);
    set(10, 10,  8, 0, 0, -1, 0, 1, 0);
    set(11, 11, -1, 1, 0, 0, -1, 0, 0);
    set(12, 11,  5, 0, 0, -1, 2, 1, 0);
    set(13, 12, -1, 1, 0, 0, -1, 0, 0);
    set(14,  4,  6, 0, 0, -1, 2, 1, 0);
    set(15,  9, -1, 1, 0, 0, -1, 0, 0);
    set(16, 11, -1, 0, 0, -1, 4, 1, 0);
    set(17, -1,  4, 0, 1, -1, -1, 0, 0);
    set(18, 12,  9, 0, 0, -1, 0, 1, 0);
    set(19, 13, -1, 1, 0, 0, -1, 0, 0);
    set(20, 13,  7, 0, 0, -1, 0, 1, 0);
    set(21, -1, 14, 0, 1, -1, -1, 0, 0);
    set(22, 14, -1, 0, 0, -1, 4, 1, 0);
    set(23,  7, -1, 1, 0, 0, -1, 0, 0);
    set(24, 14, -1, 0, 0, -1, 3, 1, 0);
    set(25, 15, -1, 1, 0, 0, -1, 0, 0);
    set(26, 15, -1, 0, 0, -1, 5, 1, 0);
    set(27, -1, -1, 0, 0, -1, -1, 0, 0);
    set(28, -1, -1, 0, 0, -1, -1, 0, 1);

    rst = 1; start = 0;
    #12 rst = 0;
    repeat (5) begin
      @(posedge clk); #1;
      checks++; if (busy || ctrl.we_a || ctrl.we_b || ctrl.inj_en || ctrl.reg_ld) begin failures++; $display("FAIL not idle"); end
    end
    @(negedge clk) start = 1;
    @(posedge clk); #1;   // TOP -> S0
    for (int pass = 0; pass < 3; pass++) begin
      for (int s = 0; s < 29; s++) begin
        cmp(busy, 1, "busy", s);
        cmp(ctrl.adra, tbl[s].adra, "adra", s);
        cmp(ctrl.adrb, tbl[s].adrb, "adrb", s);
        cmp(ctrl.we_a, tbl[s].we_a, "we_a", s);
        cmp(ctrl.we_b, tbl[s].we_b, "we_b", s);
        cmp(ctrl.data_sel, tbl[s].sel, "data_sel", s);
        cmp(ctrl.alu_sel, tbl[s].alu, "alu_sel", s);
        cmp(ctrl.alu_en, tbl[s].alu_en, "alu_en", s);
        cmp(ctrl.inj_en, tbl[s].inj, "inj_en", s);
        cmp(ctrl.reg_ld, s == 27, "reg_ld", s);
        cmp(done, tbl[s].inj, "done", s);
        @(posedge clk); #1;
      end
    end
    // START low mid-pass returns to TOP.
    repeat (7) @(posedge clk);
    @(negedge clk) start = 0;
    @(posedge clk); #1;
    checks++; if (busy) begin failures++; $display("FAIL did not return to TOP"); end
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
