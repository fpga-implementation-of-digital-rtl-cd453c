// apf_pkg: types and constants shared by the PI regulator (FSMD) and the
// hysteresis current controller of the shunt active power filter controller.
//
// The PI regulator is a finite-state machine with datapath (FSMD). Its control
// unit drives one control word per state (RAM addresses and write enables,
// input multiplexer select, ALU operation, output-register load, I_inj_en), the same
// columns as the state table of the design. The ALU operation codes 000..101
// follow that table; the subtraction code 110 is this design's addition for
// the "subtraction" that the ALU description lists. Memory addresses 0..15
// hold the inputs, the constants and the intermediate results of the PI
// recurrence; the address map is given below.
package apf_pkg;

  // Word width of the RAM, ALU and internal registers (a 25-bit ALU).
  localparam int unsigned DATA_W = 25;
  // Width of the sampled currents and of the command output (16-bit signed).
  localparam int unsigned IO_W = 16;
  // RAM depth: addresses 0..15.
  localparam int unsigned RAM_DEPTH = 16;
  localparam int unsigned ADDR_W = 4;
  // Fractional bits of the PI gains (values coded as gain * 1024).
  localparam int unsigned GAIN_Q = 10;
  // Right shift applied after the scaling products and the output (">>5").
  localparam int unsigned SHIFT_N = 5;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [IO_W-1:0] io_t;

  // ALU operations (three-bit "Sel (ALU)" field).
  typedef enum logic [2:0] {
    ALU_ADD   = 3'b000,  // a + b, saturating
    ALU_MUL   = 3'b001,  // a * b, saturating (scaling by I_max)
    ALU_MULQ  = 3'b010,  // (a * b) >>> GAIN_Q, saturating (gain multiply)
    ALU_SHR   = 3'b011,  // a >>> SHIFT_N
    ALU_PASS  = 3'b100,  // a (delay / copy)
    ALU_LIMIT = 3'b101,  // clamp a to the output limits
    ALU_SUB   = 3'b110   // a - b, saturating
  } alu_op_e;

  // Input multiplexer select ("Data_sel (MUX)") for RAM port A write data.
  typedef enum logic [1:0] {
    MUX_ALU   = 2'b00,   // ALU result register
    MUX_IREF  = 2'b01,   // I_ref_num input
    MUX_ILOAD = 2'b10    // I_load_num input
  } mux_sel_e;

  // Control word from the control unit to the datapath.
  typedef struct packed {
    addr_t    adra;
    addr_t    adrb;
    logic     we_a;
    logic     we_b;
    mux_sel_e data_sel;
    alu_op_e  alu_sel;
    logic     alu_en;   // latch the ALU result at the end of this state
    logic     reg_ld;   // load the output register at the end of this state
    logic     inj_en;   // I_inj_en: the output register holds a new command
  } ctrl_t;

  // RAM address map.
  localparam addr_t A_IREF    = 4'd0;   // I_ref_num
  localparam addr_t A_ILOAD   = 4'd1;   // I_load_num
  localparam addr_t A_IMAX    = 4'd2;   // I_max
  localparam addr_t A_NIMAX   = 4'd3;   // -I_max
  localparam addr_t A_ERR_OLD = 4'd4;   // e(n-1)
  localparam addr_t A_K       = 4'd5;   // K
  localparam addr_t A_K2      = 4'd6;   // K(h/T - 1)
  localparam addr_t A_U_OLD   = 4'd7;   // u(n-1)
  localparam addr_t A_T8      = 4'd8;   // I_ref_num*I_max, then load term >>5
  localparam addr_t A_T9      = 4'd9;   // I_load_num*(-I_max), then e(n-1)*K2
  localparam addr_t A_T10     = 4'd10;  // reference term >>5
  localparam addr_t A_ERR     = 4'd11;  // e(n)
  localparam addr_t A_P1      = 4'd12;  // e(n)*K
  localparam addr_t A_DU      = 4'd13;  // e(n)*K + e(n-1)*K2
  localparam addr_t A_U       = 4'd14;  // u(n)
  localparam addr_t A_UOUT    = 4'd15;  // u(n) >> 5

  // Saturate a wide signed value to the word width.
  function automatic word_t sat_word(input logic signed [2*DATA_W-1:0] v);
    localparam logic signed [2*DATA_W-1:0] MAXV = (2*DATA_W)'((1 << (DATA_W-1)) - 1);
    localparam logic signed [2*DATA_W-1:0] MINV = -MAXV - 1;
    if (v > MAXV) return word_t'(MAXV);
    else if (v < MINV) return word_t'(MINV);
    else return word_t'(v);
  endfunction

endpackage
