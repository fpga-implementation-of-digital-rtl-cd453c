// hcc: hysteresis current controller for one inverter leg.
//
// The command I_inj_num from the PI regulator, caught when inj_en is high,
// is compared with the current ramp of an up/down counter. The ramp rises
// while the upper switch is on and falls while it is off, one STEP per pulse
// of the clock divider. With delta = ramp - command, the comparator turns
// the upper switch off (c = 0, counter counts down) when delta > band and on
// (c = 1, counts up) when delta < -band; inside the band c holds. The gate
// outputs are the switch command C and its complement C', each raised only
// DEAD clocks after c changes, so the two switches of the leg are never on
// together. ena enables the comparator (c holds while it is low); load
// restarts the ramp at the current command.
// From the design: up/down counter, comparator with enable, clock divider,
// complementary outputs with dead band, the switching rule. This design's
// choices: the ramp as a model of the injected current, the step, divider
// and dead-band lengths, band as an input.
// Timing: the switch state changes on the clock edge after the ramp leaves
// the band; the gate that was on goes low at once and the other rises after
// DEAD + 1 clocks with both low.
module hcc
  import apf_pkg::*;
#(
  parameter int unsigned DIV  = 8,
  parameter int unsigned STEP = 64,
  parameter int unsigned DEAD = 4
) (
  input  logic clk,
  input  logic rst,        // asynchronous, active high
  input  logic load,
  input  logic ena,
  input  io_t  inj_num,
  input  logic inj_en,
  input  io_t  band,       // hysteresis band HB (>= 0)
  output logic c,          // upper switch gate (C)
  output logic c_n,        // lower switch gate (C')
  output io_t  ramp        // counter value, for observation
);

  localparam int unsigned DW = (DEAD > 1) ? $clog2(DEAD + 1) : 1;

  io_t  cmd;
  logic tick, sw;
  logic signed [IO_W:0] delta;
  logic [DW-1:0] dcnt;
  logic sw_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         cmd <= '0;
    else if (inj_en) cmd <= inj_num;
  end

  clk_div #(.DIV(DIV)) u_div (
    .clk (clk),
    .rst (rst),
    .tick(tick)
  );

  updown_counter #(.W(IO_W), .STEP(STEP)) u_cnt (
    .clk     (clk),
    .rst     (rst),
    .load    (load),
    .load_val(cmd),
    .en      (tick),
    .down    (!sw),
    .cnt     (ramp)
  );

  // Comparator with hysteresis.
  assign delta = {ramp[IO_W-1], ramp} - {cmd[IO_W-1], cmd};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sw <= 1'b0;
    else if (ena) begin
      if (delta > (IO_W+1)'(band))       sw <= 1'b0;
      else if (delta < -(IO_W+1)'(band)) sw <= 1'b1;
    end
  end

  // Dead band: after each change of sw both gates stay off for DEAD clocks.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sw_q <= 1'b0;
      dcnt <= DW'(DEAD);
    end else begin
      sw_q <= sw;
      if (sw != sw_q)     dcnt <= DW'(DEAD);
      else if (dcnt != 0) dcnt <= dcnt - 1'b1;
    end
  end

  assign c   = sw  && (sw == sw_q) && (dcnt == 0);
  assign c_n = !sw && (sw == sw_q) && (dcnt == 0);

  assert property (@(posedge clk) disable iff (rst) !(c && c_n));

endmodule
