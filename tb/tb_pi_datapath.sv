// tb_pi_datapath: self-checking test of the regulator datapath driven with
// control words directly. A directed sequence computes one scaled error
// term by hand; then random control words run against a model of the RAM,
// multiplexer, ALU, result register and output register, comparing the
// output register and the limiter status every clock.
module tb_pi_datapath;
  import apf_pkg::*;

  logic clk = 0, rst;
  ctrl_t ctrl;
  io_t iref, iload, inj_num;
  logic sat;
  int checks = 0, failures = 0;

  pi_datapath dut (.clk(clk), .rst(rst), .ctrl(ctrl), .iref_num(iref), .iload_num(iload),
                   .inj_num(inj_num), .sat(sat));

  always #5 clk = ~clk;

  longint mem [16];
  longint alu_q, out_q;
  bit sat_q, last_ld = 0;

  function automatic longint sat25(longint v);
    if (v > 64'sd16777215) return 64'sd16777215;
    if (v < -64'sd16777216) return -64'sd16777216;
    return v;
  endfunction

  function automatic longint alu(int op, longint x, longint z);
    case (op)
      0: return sat25(x + z);
      1: return sat25(x * z);
      2: return sat25((x * z) >>> 10);
      3: return x >>> 5;
      4: return x;
      5: return (x > 32767) ? 32767 : ((x < -32767) ? -32767 : x);
      6: return sat25(x - z);
      default: return x;
    endcase
  endfunction

  // Apply one control word for one clock and update the model.
  task automatic cycle(ctrl_t c);
    longint y, dina, q_old;
    bit sat_n;
    @(negedge clk);
    c.inj_en = last_ld;        // I_inj_en follows each register load
    last_ld = c.reg_ld;
    ctrl = c;
    y = alu(int'(c.alu_sel), mem[c.adra], mem[c.adrb]);
    sat_n = (y != mem[c.adra]);
    case (c.data_sel)
      MUX_ALU: dina = alu_q;
      MUX_IREF: dina = longint'(iref);
      MUX_ILOAD: dina = longint'(iload);
      default: dina = 0;
    endcase
    @(posedge clk);
    q_old = alu_q;
    if (c.we_b) mem[c.adrb] = q_old;
    if (c.we_a) mem[c.adra] = dina;
    if (c.alu_en) begin
      alu_q = y;
      if (c.alu_sel == ALU_LIMIT) sat_q = sat_n;
    end
    if (c.reg_ld) out_q = longint'($signed(16'(q_old)));
    #1;
    checks++;
    if (longint'(inj_num) != out_q || sat !== sat_q) begin
      failures++;
      $display("FAIL inj_num=%0d exp=%0d sat=%0b exp=%0b", inj_num, out_q, sat, sat_q);
    end
  endtask

  function automatic ctrl_t mk(int a, int b, bit wa, bit wb, int sel, int op, bit ae, bit inj);
    ctrl_t c;
    c.adra = addr_t'(a); c.adrb = addr_t'(b); c.we_a = wa; c.we_b = wb;
    c.data_sel = mux_sel_e'(sel); c.alu_sel = alu_op_e'(op); c.alu_en = ae; c.reg_ld = inj; c.inj_en = 1'b0;
    return c;
  endfunction

  initial begin
    rst = 1; ctrl = '0; iref = 16'sd1000; iload = -16'sd300;
    foreach (mem[i]) mem[i] = 0;
    mem[2] = 20; mem[3] = -20; mem[5] = 102; mem[6] = -51;
    alu_q = 0; out_q = 0; sat_q = 0;
    #12 rst = 0;
    // Directed: (1000 * 20) >>> 5 = 625 to the output register.
    cycle(mk(0, 0, 1, 0, 1, 0, 0, 0));     // mem[0] <- iref
    cycle(mk(0, 2, 0, 0, 0, 1, 1, 0));     // 1000 * 20
    cycle(mk(8, 0, 1, 0, 0, 0, 0, 0));     // mem[8] <- 20000
    cycle(mk(8, 0, 0, 0, 0, 3, 1, 0));     // >>> 5
    cycle(mk(0, 9, 0, 1, 0, 0, 0, 0));     // mem[9] <- 625 via port B
    cycle(mk(9, 0, 0, 0, 0, 5, 1, 0));     // limiter
    cycle(mk(0, 0, 0, 0, 0, 0, 0, 1));     // output register
    checks++;
    if (inj_num != 16'sd625) begin failures++; $display("FAIL directed result %0d", inj_num); end
    // Random control words.
    repeat (3000) begin
      ctrl_t c;
      c = mk($urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 1), $urandom_range(0, 1),
             $urandom_range(0, 3), $urandom_range(0, 6), $urandom_range(0, 1), $urandom_range(0, 3) == 0);
      if (c.we_a && c.we_b && c.adra == c.adrb) c.we_b = 0;
      if ($urandom_range(0, 7) == 0) begin iref = io_t'($urandom); iload = io_t'($urandom); end
      cycle(c);
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
