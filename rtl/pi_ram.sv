// pi_ram: 16-word dual-port memory of the PI regulator datapath.
//
// Two ports, A and B, each with its own address and write enable, read
// asynchronously (as LUT-based distributed RAM does) and write on the rising
// clock edge. Port A writes the input-multiplexer output, port B the ALU
// result register. A write on both ports to the same address gives port A
// priority (this design's choice; the state sequence never does it).
// The asynchronous reset loads the constants the regulator needs (I_max,
// -I_max and the two PI gains) at their fixed addresses and clears every
// other word, so the stored e(n-1) and u(n-1) start at zero; the constants
// being set before the first state follows the design, the reset mechanism
// is this design's choice.
module pi_ram
  import apf_pkg::*;
#(
  parameter word_t IMAX = 25'sd20,     // I_max scaling of the current samples
  parameter word_t K1   = 25'sd102,    // K, coded * 1024 (0.1)
  parameter word_t K2   = -25'sd51     // K(h/T - 1), coded * 1024 (-0.05)
) (
  input  logic  clk,
  input  logic  rst,     // asynchronous, active high
  input  addr_t adra,
  input  addr_t adrb,
  input  logic  we_a,
  input  logic  we_b,
  input  word_t din_a,
  input  word_t din_b,
  output word_t da,
  output word_t db
);

  word_t mem [RAM_DEPTH];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < RAM_DEPTH; i++) mem[i] <= '0;
      mem[A_IMAX]  <= IMAX;
      mem[A_NIMAX] <= -IMAX;
      mem[A_K]     <= K1;
      mem[A_K2]    <= K2;
    end else begin
      if (we_b) mem[adrb] <= din_b;
      if (we_a) mem[adra] <= din_a;
    end
  end

  assign da = mem[adra];
  assign db = mem[adrb];

endmodule
