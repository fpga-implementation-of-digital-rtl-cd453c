// pi_fsm: control unit of the PI regulator FSMD.
//
// Thirty states: the idle state TOP and the computing states S0..S28. The
// machine stays in TOP while reset is high or START is low; with START high
// it steps S0 -> S1 -> ... -> S28 on successive rising clock edges, and after
// S28 returns to S0 (START still high) or to TOP. One pass computes one PI
// update, so with START held high a new command is produced every 29 clocks.
// The output logic is a Moore decoder giving, per state, the control word:
// RAM addresses and write enables, multiplexer select, ALU operation, ALU
// result latch, output-register load (S27) and I_inj_en (high only in S28).
//
// The state sequence follows the design's 29-state schedule: acquisition of
// I_ref_num and I_load_num (S0, S1), scaling by +/-I_max and >>5 (S2..S9),
// error e(n) (S10, S11), gain products (S12..S15), the sum (S18, S19), the
// accumulation u(n) = u(n-1) + du (S20, S21), >>5 and limiter (S24..S26),
// output register load (S27) and I_inj_en (S28). Each operation takes one state that reads
// operands and selects the ALU operation and a second state that stores the
// result. Where the published schedule would overwrite e(n-1) and u(n-1)
// before they are used, and would keep u(n-1) in a word that S7 also uses,
// this design multiplies e(n-1) first and then copies e(n) (S14..S17),
// keeps u(n-1) at address 7 and copies u(n) into it after the sum
// (S20..S23), keeping the state count and the other addresses.
module pi_fsm
  import apf_pkg::*;
(
  input  logic  clk,
  input  logic  rst,     // asynchronous, active high
  input  logic  start,
  output ctrl_t ctrl,
  output logic  busy,    // in S0..S28
  output logic  done     // high in S28 (same as ctrl.inj_en)
);

  typedef enum logic [4:0] {
    S0,  S1,  S2,  S3,  S4,  S5,  S6,  S7,  S8,  S9,
    S10, S11, S12, S13, S14, S15, S16, S17, S18, S19,
    S20, S21, S22, S23, S24, S25, S26, S27, S28, TOP
  } state_e;

  state_e state, state_n;

  // State memory.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= TOP;
    else     state <= state_n;
  end

  // Next-state logic.
  always_comb begin
    if (!start) state_n = TOP;
    else if (state == TOP || state == S28) state_n = S0;
    else state_n = state_e'(state + 5'd1);
  end

  // Output logic: one control word per state.
  function automatic ctrl_t rd(addr_t a, addr_t b, alu_op_e op);
    ctrl_t c = '0;
    c.adra = a; c.adrb = b; c.alu_sel = op; c.alu_en = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t wr_a(addr_t a, mux_sel_e s);
    ctrl_t c = '0;
    c.adra = a; c.we_a = 1'b1; c.data_sel = s;
    return c;
  endfunction

  function automatic ctrl_t wr_b(addr_t b);
    ctrl_t c = '0;
    c.adrb = b; c.we_b = 1'b1;
    return c;
  endfunction

  always_comb begin
    ctrl = '0;
    unique case (state)
      S0:  ctrl = wr_a(A_IREF, MUX_IREF);               // mem[0] <- I_ref_num
      S1:  ctrl = wr_a(A_ILOAD, MUX_ILOAD);             // mem[1] <- I_load_num
      S2:  ctrl = rd(A_IREF, A_IMAX, ALU_MUL);          // I_ref_num * I_max
      S3:  ctrl = wr_a(A_T8, MUX_ALU);
      S4:  ctrl = rd(A_ILOAD, A_NIMAX, ALU_MUL);        // I_load_num * -I_max
      S5:  ctrl = wr_a(A_T9, MUX_ALU);
      S6:  ctrl = rd(A_T8, A_T8, ALU_SHR);              // >> 5
      S7:  ctrl = wr_a(A_T10, MUX_ALU);
      S8:  ctrl = rd(A_T9, A_T9, ALU_SHR);              // >> 5
      S9:  ctrl = wr_b(A_T8);
      S10: ctrl = rd(A_T10, A_T8, ALU_ADD);             // e(n)
      S11: ctrl = wr_a(A_ERR, MUX_ALU);
      S12: ctrl = rd(A_ERR, A_K, ALU_MULQ);             // e(n) * K
      S13: ctrl = wr_a(A_P1, MUX_ALU);
      S14: ctrl = rd(A_ERR_OLD, A_K2, ALU_MULQ);        // e(n-1) * K(h/T-1)
      S15: ctrl = wr_a(A_T9, MUX_ALU);
      S16: ctrl = rd(A_ERR, A_ERR, ALU_PASS);           // e(n) -> e(n-1)
      S17: ctrl = wr_b(A_ERR_OLD);
      S18: ctrl = rd(A_P1, A_T9, ALU_ADD);              // du
      S19: ctrl = wr_a(A_DU, MUX_ALU);
      S20: ctrl = rd(A_DU, A_U_OLD, ALU_ADD);           // u(n) = u(n-1) + du
      S21: ctrl = wr_b(A_U);
      S22: ctrl = rd(A_U, A_U, ALU_PASS);               // u(n) -> u(n-1)
      S23: ctrl = wr_a(A_U_OLD, MUX_ALU);
      S24: ctrl = rd(A_U, A_U, ALU_SHR);                // u(n) >> 5
      S25: ctrl = wr_a(A_UOUT, MUX_ALU);
      S26: ctrl = rd(A_UOUT, A_UOUT, ALU_LIMIT);        // limiter
      S27: ctrl.reg_ld = 1'b1;                          // register <- result
      S28: ctrl.inj_en = 1'b1;                          // I_inj_num valid
      default: ctrl = '0;                               // TOP
    endcase
  end

  assign busy = (state != TOP);
  assign done = (state == S28);

  // The output register is loaded only in S27 and announced only in S28.
  assert property (@(posedge clk) disable iff (rst) ctrl.reg_ld |-> state == S27);
  assert property (@(posedge clk) disable iff (rst) ctrl.inj_en |-> state == S28);
  assert property (@(posedge clk) disable iff (rst) !(ctrl.we_a && ctrl.we_b && ctrl.adra == ctrl.adrb));

endmodule
