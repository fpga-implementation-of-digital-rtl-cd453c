// pi_datapath: datapath of the PI regulator FSMD.
//
// RAM (pi_ram), input multiplexer (pi_mux), ALU (pi_alu), an ALU result
// register and the output register (pi_reg), wired as the design's datapath:
// the RAM's two read ports feed the ALU operands a and b; when the control
// word's alu_en is set the ALU result is caught in the result register at the
// end of the state, and a later state writes it back through port A (via the
// multiplexer) or port B. reg_ld loads the limited result into the output
// register, whose low 16 bits are the command I_inj_num.
// Status back to the control unit: sat, high when the last limiter operation
// clamped its operand (this design's choice of status signal).
// The control word's inj_en is not used by the datapath logic itself; the
// assertions at the end check that it follows reg_ld by one clock.
// Timing: one state per clock; a result computed in state n is written to
// RAM in state n+1 at the earliest.
module pi_datapath
  import apf_pkg::*;
#(
  parameter word_t IMAX  = 25'sd20,
  parameter word_t K1    = 25'sd102,
  parameter word_t K2    = -25'sd51,
  parameter word_t LIMIT = 25'sd32767
) (
  input  logic  clk,
  input  logic  rst,
  input  ctrl_t ctrl,
  input  io_t   iref_num,
  input  io_t   iload_num,
  output io_t   inj_num,
  output logic  sat
);

  word_t da, db, din_a, alu_y, alu_q;
  logic [IO_W-1:0] inj_q;

  pi_ram #(.IMAX(IMAX), .K1(K1), .K2(K2)) u_ram (
    .clk  (clk),
    .rst  (rst),
    .adra (ctrl.adra),
    .adrb (ctrl.adrb),
    .we_a (ctrl.we_a),
    .we_b (ctrl.we_b),
    .din_a(din_a),
    .din_b(alu_q),
    .da   (da),
    .db   (db)
  );

  pi_mux u_mux (
    .sel      (ctrl.data_sel),
    .alu_q    (alu_q),
    .iref_num (iref_num),
    .iload_num(iload_num),
    .y        (din_a)
  );

  pi_alu #(.LIMIT(LIMIT)) u_alu (
    .op(ctrl.alu_sel),
    .a (da),
    .b (db),
    .y (alu_y)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      alu_q <= '0;
      sat   <= 1'b0;
    end else if (ctrl.alu_en) begin
      alu_q <= alu_y;
      if (ctrl.alu_sel == ALU_LIMIT) sat <= (alu_y != da);
    end
  end

  pi_reg #(.W(IO_W)) u_out (
    .clk (clk),
    .clr (rst),
    .load(ctrl.reg_ld),
    .d   (alu_q[IO_W-1:0]),
    .q   (inj_q)
  );

  assign inj_num = io_t'(inj_q);

  // Handshake rule: a new command loaded into the output register is
  // announced by I_inj_en on the next clock, and I_inj_en never comes alone.
  assert property (@(posedge clk) disable iff (rst) ctrl.reg_ld |=> ctrl.inj_en);
  assert property (@(posedge clk) disable iff (rst) ctrl.inj_en |-> $past(ctrl.reg_ld));

endmodule
