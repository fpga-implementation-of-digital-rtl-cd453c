// tb_apf_controller: end-to-end test of the three-phase controller at its
// default parameters. Every clock, each leg's comparator is checked against
// its own command: a ramp above (below) the band turns C (C') off.
// Each phase gets a 50 Hz-like reference (64 regulator updates per period,
// phases 120 degrees apart) and a load current with a fifth harmonic added.
// A 64-bit integer model of the PI recurrence predicts every command of every
// phase. Checked every clock: C and C' of a leg never on together. Checked
// per update: the command of each phase and the 29-clock update period.
// Mechanisms driven and counted, each must occur: regulator updates, limiter
// clamping, idle in TOP with START low and restart, HCC switching on every
// leg, dead-band intervals, LOAD restarting the ramps, Ena low holding the
// switches.
module tb_apf_controller;
  import apf_pkg::*;

  localparam int NPH = 3;
  logic clk = 0, rst, start, hcc_load, hcc_ena;
  io_t iref [NPH], iload [NPH], inj_num [NPH], ramp [NPH];
  io_t hcc_band;
  logic [NPH-1:0] gate_c, gate_cn, inj_en, sat, busy;
  int checks = 0, failures = 0;

  apf_controller dut (
    .clk(clk), .rst(rst), .start(start), .iref_num(iref), .iload_num(iload),
    .hcc_load(hcc_load), .hcc_ena(hcc_ena), .hcc_band(hcc_band),
    .gate_c(gate_c), .gate_cn(gate_cn), .inj_num(inj_num), .inj_en(inj_en),
    .sat(sat), .busy(busy), .ramp(ramp));

  always #5 clk = ~clk;

  localparam longint IMAX = 20, K1 = 102, K2 = -51, LIM = 32767;
  longint e_old [NPH], u_old [NPH];
  int n_upd = 0, n_sat = 0, n_idle = 0, n_load = 0, n_ena_hold = 0;
  int n_sw [NPH], n_dead = 0;

  function automatic longint s25(longint v);
    if (v > 64'sd16777215) return 64'sd16777215;
    if (v < -64'sd16777216) return -64'sd16777216;
    return v;
  endfunction

  function automatic longint pi_step(int p, longint r, longint l);
    longint e, du, u, o;
    e  = s25((s25(r * IMAX) >>> 5) + (s25(l * -IMAX) >>> 5));
    du = s25(s25((e * K1) >>> 10) + s25((e_old[p] * K2) >>> 10));
    u  = s25(u_old[p] + du);
    e_old[p] = e; u_old[p] = u;
    o = u >>> 5;
    if (o > LIM) o = LIM;
    if (o < -LIM) o = -LIM;
    return o;
  endfunction

  task automatic fail(string m);
    failures++;
    $display("FAIL %s (t=%0t)", m, $time);
  endtask

  // Gate monitor. cmd_m is the command each HCC holds (caught with I_inj_en);
  // a ramp beyond the band at one clock must turn the matching gate off at the next.
  logic [NPH-1:0] c_q, cn_q;
  longint cmd_m [NPH], ramp_q [NPH], pend_val [NPH];
  bit pend [NPH];
  bit ena_q = 0, load_q = 0;
  int n_cmp = 0;
  always @(posedge clk) if (!rst) begin
    #1;
    for (int p = 0; p < NPH; p++) begin
      checks++;
      if (gate_c[p] && gate_cn[p]) fail($sformatf("phase %0d both gates on", p));
      if (ena_q && !load_q) begin
        if (ramp_q[p] - cmd_m[p] > longint'(hcc_band)) begin
          n_cmp++; checks++;
          if (gate_c[p]) fail($sformatf("phase %0d C on above the band", p));
        end
        if (ramp_q[p] - cmd_m[p] < -longint'(hcc_band)) begin
          n_cmp++; checks++;
          if (gate_cn[p]) fail($sformatf("phase %0d C' on below the band", p));
        end
      end
      // the HCC catches the command at the end of the clock with I_inj_en
      if (pend[p]) cmd_m[p] = pend_val[p];
      pend[p] = inj_en[p];
      pend_val[p] = longint'(inj_num[p]);
      ramp_q[p] = longint'(ramp[p]);
      if ((c_q[p] && !gate_c[p]) || (cn_q[p] && !gate_cn[p])) begin
        n_sw[p]++;
        if (!hcc_ena) fail("switching with Ena low");
      end
      if (p == 0 && !gate_c[p] && !gate_cn[p] && (c_q[p] || cn_q[p])) n_dead++;
    end
    c_q = gate_c; cn_q = gate_cn; ena_q = hcc_ena; load_q = hcc_load;
  end

  // Sample values for update k.
  task automatic set_inputs(int k, bit big);
    for (int p = 0; p < NPH; p++) begin
      real th;
      th = 2.0 * 3.14159265358979 * (real'(k) / 64.0 - real'(p) / 3.0);
      iref[p]  = io_t'($rtoi(8000.0 * $sin(th)));
      iload[p] = io_t'($rtoi(8000.0 * $sin(th) + 3000.0 * $sin(5.0 * th) + 2000.0 * $cos(th)));
    end
    if (big) begin iref[0] = 16'sd32767; iload[0] = -16'sd32768; end
  endtask

  task automatic one_update(int exp_cycles);
    int n = 0;
    longint exp [NPH];
    do begin @(posedge clk); n++; #2; end while (!inj_en[0]);
    checks++;
    if (n != exp_cycles) fail($sformatf("update after %0d clocks, expected %0d", n, exp_cycles));
    checks++;
    if (inj_en != '1) fail("phases out of step");
    for (int p = 0; p < NPH; p++) exp[p] = pi_step(p, longint'(iref[p]), longint'(iload[p]));
    for (int p = 0; p < NPH; p++) begin
      checks++;
      if (longint'(inj_num[p]) != exp[p]) fail($sformatf("phase %0d inj_num=%0d exp=%0d", p, inj_num[p], exp[p]));
    end
    if (sat != '0) n_sat++;
    n_upd++;
  endtask

  initial begin
    rst = 1; start = 0; hcc_load = 0; hcc_ena = 1; hcc_band = 16'sd300;
    foreach (e_old[p]) begin e_old[p] = 0; cmd_m[p] = 0; ramp_q[p] = 0; pend[p] = 0; pend_val[p] = 0; u_old[p] = 0; n_sw[p] = 0; iref[p] = '0; iload[p] = '0; end
    c_q = '0; cn_q = '0;
    #12 rst = 0;
    @(negedge clk); start = 1; set_inputs(0, 0);
    one_update(29);
    for (int k = 1; k < 192; k++) begin set_inputs(k, 0); one_update(29); end
    // Drive phase 0 into the limiter, then back.
    for (int k = 192; k < 800; k++) begin set_inputs(k, 1); one_update(29); end
    for (int k = 800; k < 900; k++) begin set_inputs(k, 0); one_update(29); end
    // START low: the regulators idle in TOP.
    @(negedge clk); start = 0;
    repeat (40) begin
      @(posedge clk); #2;
      checks++;
      if (busy != '0 || inj_en != '0) fail("regulator active with START low");
    end
    n_idle++;
    @(negedge clk); start = 1; set_inputs(900, 0);
    one_update(29);
    // LOAD restarts every ramp at its command (set in the clock after I_inj_en).
    @(posedge clk); set_inputs(901, 0);
    @(negedge clk); hcc_load = 1; @(negedge clk); hcc_load = 0; #1;
    for (int p = 0; p < NPH; p++) begin
      checks++;
      if (ramp[p] != inj_num[p]) fail($sformatf("phase %0d LOAD: ramp %0d command %0d", p, ramp[p], inj_num[p]));
    end
    n_load++;
    one_update(27);
    for (int k = 902; k < 960; k++) begin set_inputs(k, 0); one_update(29); end
    // Ena low: the switches hold.
    @(negedge clk); hcc_ena = 0;
    for (int k = 960; k < 964; k++) begin set_inputs(k, 0); one_update(29); end
    @(negedge clk); hcc_ena = 1; n_ena_hold++;
    for (int k = 964; k < 1000; k++) begin set_inputs(k, 0); one_update(29); end

    $display("updates=%0d limiter=%0d idle=%0d load=%0d ena_hold=%0d dead=%0d switchings=%0d/%0d/%0d",
             n_upd, n_sat, n_idle, n_load, n_ena_hold, n_dead, n_sw[0], n_sw[1], n_sw[2]);
    checks++; if (n_upd == 0) fail("no regulator update");
    checks++; if (n_sat == 0) fail("limiter never clamped");
    checks++; if (n_idle == 0) fail("never idled in TOP");
    checks++; if (n_load == 0) fail("LOAD never applied");
    checks++; if (n_ena_hold == 0) fail("Ena never held");
    checks++; if (n_dead == 0) fail("no dead-band interval");
    checks++; if (n_cmp == 0) fail("ramp never outside the band");
    for (int p = 0; p < NPH; p++) begin
      checks++; if (n_sw[p] == 0) fail($sformatf("phase %0d never switched", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
