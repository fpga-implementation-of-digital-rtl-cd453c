// tb_pi_regulator: self-checking test of the PI regulator FSMD.
// A 64-bit integer model of the PI recurrence (error scaling by I_max and
// >>5, gain products / 1024, accumulation, >>5 and limiter, each step
// saturated to 25 bits) predicts every command. Checks: the command after
// every I_inj_en (valid while I_inj_en is high), I_inj_en 29 clocks after
// the clock that sees START high (states S0..S28) and every 29 clocks after, the limiter clamping
// at both ends, idling in TOP with START low, and resuming afterwards.
module tb_pi_regulator;
  logic clk = 0, rst, start;
  logic signed [15:0] iref, iload, inj_num;
  logic inj_en, sat, busy;
  int checks = 0, failures = 0;

  pi_regulator dut (.clk(clk), .rst(rst), .start(start), .iref_num(iref), .iload_num(iload),
                    .inj_num(inj_num), .inj_en(inj_en), .sat(sat), .busy(busy));

  always #5 clk = ~clk;

  localparam longint IMAX = 20, K1 = 102, K2 = -51, LIM = 32767;
  longint e_old = 0, u_old = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  function automatic longint s25(longint v);
    if (v > 64'sd16777215) return 64'sd16777215;
    if (v < -64'sd16777216) return -64'sd16777216;
    return v;
  endfunction

  function automatic longint pi_step(longint r, longint l);
    longint e, du, u, o;
    e  = s25((s25(r * IMAX) >>> 5) + (s25(l * -IMAX) >>> 5));
    du = s25(s25((e * K1) >>> 10) + s25((e_old * K2) >>> 10));
    u  = s25(u_old + du);
    e_old = e; u_old = u;
    o = u >>> 5;
    if (o > LIM) o = LIM;
    if (o < -LIM) o = -LIM;
    return o;
  endfunction

  // Wait for one I_inj_en, check the command and the spacing in clocks.
  task automatic one_update(int exp_cycles);
    int n = 0;
    longint exp;
    do begin @(posedge clk); n++; #1; end while (!inj_en);
    checks++;
    if (n != exp_cycles) begin failures++; $display("FAIL update after %0d clocks, expected %0d", n, exp_cycles); end
    exp = pi_step(longint'(iref), longint'(iload));
    checks++;
    if (longint'(inj_num) != exp) begin failures++; $display("FAIL inj_num=%0d exp=%0d", inj_num, exp); end
    if (exp == LIM) n_sat_hi++;
    if (exp == -LIM) n_sat_lo++;
    // new samples for the next pass (taken in S0, S1)
  endtask

  initial begin
    rst = 1; start = 0; iref = '0; iload = '0;
    #12 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (busy || inj_en) begin failures++; $display("FAIL not idle"); end
    @(negedge clk); start = 1; iref = 16'sd3000; iload = 16'sd2500;
    one_update(29);           // TOP -> S0 .. S28
    for (int i = 0; i < 40; i++) begin
      iref = 16'($urandom_range(0, 8000)) - 16'sd4000;
      iload = 16'($urandom_range(0, 8000)) - 16'sd4000;
      one_update(29);         // S0 .. S28 after the previous S28 clock
    end
    iref = 16'sd32767; iload = -16'sd32768;
    for (int i = 0; i < 600; i++) one_update(29);
    checks++; if (!sat) begin failures++; $display("FAIL sat flag low at positive limit"); end
    iref = -16'sd32768; iload = 16'sd32767;
    for (int i = 0; i < 1200; i++) one_update(29);
    // idle in TOP
    @(negedge clk); start = 0;
    repeat (60) begin
      @(posedge clk); #1;
      checks++; if (inj_en || busy) begin failures++; $display("FAIL activity with START low"); end
    end
    @(negedge clk); start = 1; iref = 16'sd100; iload = -16'sd100;
    one_update(29);
    for (int i = 0; i < 20; i++) one_update(29);
    checks++; if (n_sat_hi == 0) begin failures++; $display("FAIL positive limit never reached"); end
    checks++; if (n_sat_lo == 0) begin failures++; $display("FAIL negative limit never reached"); end
    $display("limit hits: +%0d -%0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
