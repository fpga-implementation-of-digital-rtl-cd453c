// tb_hcc: self-checking test of the hysteresis current controller.
// With DIV = 2, STEP = 64, DEAD = 3 and a band of 200 it checks, every clock:
// C and C' never high together; the ramp moves up only while C was on and
// down only while C' was on; once settled, the ramp stays within
// band + STEP of the command; each dead interval (both gates off after a
// change) lasts DEAD + 1 clocks; each half switching period is as long as
// the ramp needs to cross the band. It also checks that the command follows
// I_inj_en, that LOAD restarts the ramp at the command and that no switching
// happens with Ena low.
module tb_hcc;
  import apf_pkg::*;

  localparam int DIV = 2, STEP = 64, DEAD = 3;
  logic clk = 0, rst, load, ena, inj_en, c, c_n;
  io_t inj_num, band, ramp;
  int checks = 0, failures = 0;

  hcc #(.DIV(DIV), .STEP(STEP), .DEAD(DEAD)) dut (
    .clk(clk), .rst(rst), .load(load), .ena(ena), .inj_num(inj_num), .inj_en(inj_en),
    .band(band), .c(c), .c_n(c_n), .ramp(ramp));

  always #5 clk = ~clk;

  longint cmd = 0;
  bit settled = 0, c_p = 0, cn_p = 0;
  io_t ramp_p;
  int dead_len = 0, n_dead = 0, n_sw = 0, half = 0, n_half = 0, n_load = 0, no_ena_sw = 0;
  bit in_dead = 0;

  task automatic fail(string m);
    failures++;
    $display("FAIL %s (t=%0t)", m, $time);
  endtask

  always @(posedge clk) if (!rst) begin
    #1;
    checks++;
    if (c && c_n) fail("both gates on");
    // ramp direction follows the gate that was on before the edge
    if (!load) begin
      checks++;
      if (c_p && ramp < ramp_p) fail("ramp fell while C on");
      if (cn_p && ramp > ramp_p) fail("ramp rose while C' on");
    end
    if (settled) begin
      checks++;
      if (longint'(ramp) > cmd + longint'(band) + STEP || longint'(ramp) < cmd - longint'(band) - STEP)
        fail($sformatf("ramp %0d outside band around %0d", ramp, cmd));
    end
    // dead intervals and half periods
    if (!c && !c_n) begin
      if (!in_dead) begin
        in_dead = 1; dead_len = 0;
        n_sw++;
        if (!ena) no_ena_sw++;
        if (settled && n_half > 0) begin
          checks++;
          // crossing 2*band takes ceil(2*band/STEP) ticks, give or take one tick
          if (half < ((2 * int'(band)) / STEP) * DIV - DIV || half > ((2 * int'(band)) / STEP + 2) * DIV + DEAD + 2)
            fail($sformatf("half period %0d clocks", half));
        end
        n_half++;
        half = 0;
      end
      dead_len++;
    end else if (in_dead) begin
      in_dead = 0;
      // the first interval, right after reset, also holds the start-up dead time
      if (n_dead > 0) begin
        checks++;
        if (dead_len != DEAD + 1) fail($sformatf("dead interval %0d clocks", dead_len));
      end
      n_dead++;
    end
    half++;
    c_p = c; cn_p = c_n; ramp_p = ramp;
  end

  task automatic set_cmd(longint v);
    @(negedge clk); inj_num = io_t'(v); inj_en = 1;
    @(negedge clk); inj_en = 0; inj_num = '0;
    cmd = v;
  endtask

  initial begin
    rst = 1; load = 0; ena = 1; inj_en = 0; inj_num = '0; band = 16'sd200;
    #12 rst = 0;
    set_cmd(1000);
    @(negedge clk); load = 1; @(negedge clk); load = 0; n_load++;
    #1 checks++; if (ramp != 16'sd1000) fail("LOAD did not restart the ramp at the command");
    repeat (20) @(posedge clk);
    settled = 1;
    repeat (600) @(posedge clk);
    settled = 0;
    set_cmd(-3000);          // ramp has to travel down: (4000 / 64) * 2 clocks
    repeat (200) @(posedge clk);
    settled = 1; n_half = 0;
    repeat (600) @(posedge clk);
    // Ena low: comparator holds, no new switching
    @(negedge clk); ena = 0; settled = 0; no_ena_sw = 0;
    repeat (30) @(posedge clk);
    #2 checks++; if (no_ena_sw != 0) fail("switching with Ena low");
    @(negedge clk); ena = 1;
    set_cmd(-2900);
    @(negedge clk); load = 1; @(negedge clk); load = 0; n_load++;
    repeat (20) @(posedge clk);
    settled = 1; n_half = 0;
    repeat (400) @(posedge clk);
    checks++; if (n_sw < 20) fail($sformatf("only %0d switchings", n_sw));
    checks++; if (n_dead < 20) fail($sformatf("only %0d dead intervals", n_dead));
    $display("switchings=%0d dead intervals=%0d loads=%0d", n_sw, n_dead, n_load);
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
