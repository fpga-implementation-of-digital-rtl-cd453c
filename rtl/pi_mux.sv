// pi_mux: input multiplexer of the PI regulator datapath.
//
// Chooses the data written through RAM port A: the ALU result register
// (select 00), the sampled reference current I_ref_num (01) or the sampled
// load current I_load_num (10). The 16-bit samples are sign-extended to the
// datapath word. Select 11 is unused and returns zero (this design's choice).
module pi_mux
  import apf_pkg::*;
(
  input  mux_sel_e sel,
  input  word_t    alu_q,
  input  io_t      iref_num,
  input  io_t      iload_num,
  output word_t    y
);

  always_comb begin
    unique case (sel)
      MUX_ALU:   y = alu_q;
      MUX_IREF:  y = word_t'(iref_num);
      MUX_ILOAD: y = word_t'(iload_num);
      default:   y = '0;
    endcase
  end

endmodule
