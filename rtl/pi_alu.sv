// pi_alu: combinational arithmetic unit of the PI regulator datapath.
//
// Operations, selected by the three-bit op code: saturating add, saturating
// multiply (scaling of the samples by I_max), saturating gain multiply with
// the product shifted right by GAIN_Q bits (gains are coded * 1024), arithmetic
// shift right by SHIFT_N (5) bits, pass-through (used to copy a value into
// its "previous sample" slot), limiter that clamps to +/-LIMIT, and saturating
// subtract. The operation set follows the design's ALU description and state
// table; saturation instead of wrap-around is this design's choice.
// Purely combinational: the datapath registers the result.
module pi_alu
  import apf_pkg::*;
#(
  parameter word_t LIMIT = 25'sd32767   // limiter bound (16-bit signed output)
) (
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  logic signed [2*DATA_W-1:0] wa, wb, prod;

  always_comb begin
    wa   = {{DATA_W{a[DATA_W-1]}}, a};
    wb   = {{DATA_W{b[DATA_W-1]}}, b};
    prod = a * b;
    unique case (op)
      ALU_ADD:   y = sat_word(wa + wb);
      ALU_SUB:   y = sat_word(wa - wb);
      ALU_MUL:   y = sat_word(prod);
      ALU_MULQ:  y = sat_word(prod >>> GAIN_Q);
      ALU_SHR:   y = a >>> SHIFT_N;
      ALU_PASS:  y = a;
      ALU_LIMIT: y = (a > LIMIT) ? LIMIT : ((a < -LIMIT) ? -LIMIT : a);
      default:   y = a;
    endcase
  end

endmodule
