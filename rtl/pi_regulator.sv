// pi_regulator: PI regulator built as an FSMD (control unit + datapath).
//
// Computes, from the sampled reference current I_ref_num and the sampled
// load (source) current I_load_num, both 16-bit signed, the scaled error
//   e(n) = ((I_ref_num * I_max) >>> 5) + ((I_load_num * -I_max) >>> 5)
// (the error multiplied by 1024, with I_max the full-scale current), and
// the incremental PI recurrence
//   u(n) = u(n-1) + K*e(n) + K(h/T - 1)*e(n-1)
// with gains coded * 1024. The command I_inj_num = limit(u(n) >>> 5) goes to
// the output register at the end of S27 and I_inj_en announces it in S28. All arithmetic is done
// serially by one ALU under control of the 30-state machine (pi_fsm).
// Interface: START high runs the machine; inj_num changes on the clock edge
// that ends S27 and inj_en is high for the one clock of S28, so a consumer
// may capture inj_num whenever inj_en is high. inj_en first rises 29 clocks
// after the edge that sees START high (S0..S28), then every 29 clocks. sat tells that the last command was clamped by the limiter.
module pi_regulator
  import apf_pkg::*;
#(
  parameter word_t IMAX  = 25'sd20,
  parameter word_t K1    = 25'sd102,
  parameter word_t K2    = -25'sd51,
  parameter word_t LIMIT = 25'sd32767
) (
  input  logic clk,
  input  logic rst,         // asynchronous, active high
  input  logic start,
  input  io_t  iref_num,
  input  io_t  iload_num,
  output io_t  inj_num,
  output logic inj_en,
  output logic sat,
  output logic busy
);

  ctrl_t ctrl;
  logic  done;

  pi_fsm u_fsm (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .ctrl (ctrl),
    .busy (busy),
    .done (done)
  );

  pi_datapath #(.IMAX(IMAX), .K1(K1), .K2(K2), .LIMIT(LIMIT)) u_dp (
    .clk      (clk),
    .rst      (rst),
    .ctrl     (ctrl),
    .iref_num (iref_num),
    .iload_num(iload_num),
    .inj_num  (inj_num),
    .sat      (sat)
  );

  assign inj_en = done;

endmodule
