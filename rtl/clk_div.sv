// clk_div: clock divider of the hysteresis current controller.
//
// Produces a one-clock enable pulse, tick, every DIV clocks instead of a
// divided clock, so the whole controller stays in one clock domain (this
// design's choice). The up/down counter steps only on tick, which sets how
// fast the modelled current ramps and so the frequency of the switching
// pulses. DIV is not given by the design; 8 is this design's default.
module clk_div #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst,   // asynchronous, active high
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
