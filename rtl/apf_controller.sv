// apf_controller: digital controller of a three-phase shunt active power
// filter: one PI regulator (FSMD) and one hysteresis current controller
// (HCC) per phase.
//
// For each phase the regulator takes the sampled reference current
// I_ref_num and load current I_load_num, computes the PI command I_inj_num
// once every 29 clocks while START is high, and hands it to that phase's
// HCC with the I_inj_en strobe. The HCC turns the command into the
// complementary gate pulses C and C' of the inverter leg, with dead band.
// Phases a, b, c are indices 0, 1, 2 of every array port.
// From the design: the regulator + HCC structure, three identical HCC
// blocks, START/RESET/LOAD/Ena controls. This design's choices: one
// regulator per phase (the design speaks of the PI-controller blocks in
// the plural), shared start, load, enable and band inputs.
module apf_controller
  import apf_pkg::*;
#(
  parameter int unsigned NPH   = 3,
  parameter word_t       IMAX  = 25'sd20,
  parameter word_t       K1    = 25'sd102,
  parameter word_t       K2    = -25'sd51,
  parameter word_t       LIMIT = 25'sd32767,
  parameter int unsigned DIV   = 8,
  parameter int unsigned STEP  = 64,
  parameter int unsigned DEAD  = 4
) (
  input  logic           clk,
  input  logic           rst,               // asynchronous, active high
  input  logic           start,
  input  io_t            iref_num  [NPH],
  input  io_t            iload_num [NPH],
  input  logic           hcc_load,
  input  logic           hcc_ena,
  input  io_t            hcc_band,
  output logic [NPH-1:0] gate_c,
  output logic [NPH-1:0] gate_cn,
  output io_t            inj_num   [NPH],
  output logic [NPH-1:0] inj_en,
  output logic [NPH-1:0] sat,
  output logic [NPH-1:0] busy,
  output io_t            ramp      [NPH]    // HCC current ramps, for observation
);

  for (genvar p = 0; p < NPH; p++) begin : g_phase
    pi_regulator #(.IMAX(IMAX), .K1(K1), .K2(K2), .LIMIT(LIMIT)) u_pi (
      .clk      (clk),
      .rst      (rst),
      .start    (start),
      .iref_num (iref_num[p]),
      .iload_num(iload_num[p]),
      .inj_num  (inj_num[p]),
      .inj_en   (inj_en[p]),
      .sat      (sat[p]),
      .busy     (busy[p])
    );

    hcc #(.DIV(DIV), .STEP(STEP), .DEAD(DEAD)) u_hcc (
      .clk    (clk),
      .rst    (rst),
      .load   (hcc_load),
      .ena    (hcc_ena),
      .inj_num(inj_num[p]),
      .inj_en (inj_en[p]),
      .band   (hcc_band),
      .c      (gate_c[p]),
      .c_n    (gate_cn[p]),
      .ramp   (ramp[p])
    );
  end

endmodule
