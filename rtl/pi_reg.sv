// pi_reg: register with parallel load and asynchronous clear.
//
// W D flip-flops sharing clock, clear and load enable: on a rising clock
// edge with load high the register takes d; a high clear empties it at once.
// In the regulator it holds the command value I_inj_num, loaded when the
// control unit raises I_inj_en in the last state.
module pi_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         clr,   // asynchronous, active high
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else if (load) q <= d;
  end

endmodule
