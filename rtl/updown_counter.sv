// updown_counter: signed up/down counter of the hysteresis current controller.
//
// LOAD copies load_val into the counter; otherwise, on each enable pulse the
// counter moves by STEP, down when DOWN is high and up when it is low,
// saturating at the limits of its W-bit signed range. In the controller it
// produces the current ramp that the comparator holds inside the hysteresis
// band. LOAD and DOWN are the design's signal names; the step size and
// saturation are this design's choices.
module updown_counter #(
  parameter int unsigned W    = 16,
  parameter int unsigned STEP = 64
) (
  input  logic                clk,
  input  logic                rst,      // asynchronous, active high
  input  logic                load,
  input  logic signed [W-1:0] load_val,
  input  logic                en,
  input  logic                down,
  output logic signed [W-1:0] cnt
);

  localparam logic signed [W:0] MAXV = (W+1)'((1 << (W-1)) - 1);
  localparam logic signed [W:0] MINV = -MAXV - 1;

  logic signed [W:0] nxt;

  always_comb begin
    nxt = down ? ({cnt[W-1], cnt} - (W+1)'(STEP)) : ({cnt[W-1], cnt} + (W+1)'(STEP));
    if (nxt > MAXV) nxt = MAXV;
    if (nxt < MINV) nxt = MINV;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       cnt <= '0;
    else if (load) cnt <= load_val;
    else if (en)   cnt <= nxt[W-1:0];
  end

endmodule
