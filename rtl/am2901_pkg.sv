// am2901_pkg: types and constants shared by the AM2901 bit-slice modules.
//
// The 9-bit microinstruction I[8:0] splits into three 3-bit fields: I[2:0]
// selects the ALU source operands, I[5:3] the ALU function and I[8:6] the
// destination (where F goes, how RAM and Q shift, what Y shows). The octal
// codes below are the ones of the source, function and destination tables of
// the AM2901. The slice is 4 bits wide and holds 16 general registers.
package am2901_pkg;

  localparam int unsigned WIDTH = 4;   // data width of one slice
  localparam int unsigned NREGS = 16;  // general registers
  localparam int unsigned AW    = 4;   // register address width

  typedef logic [WIDTH-1:0] word_t;

  // ALU source operand pairs (R, S), I[2:0]
  typedef enum logic [2:0] {
    SRC_AQ = 3'o0,  // R = A, S = Q
    SRC_AB = 3'o1,  // R = A, S = B
    SRC_ZQ = 3'o2,  // R = 0, S = Q
    SRC_ZB = 3'o3,  // R = 0, S = B
    SRC_ZA = 3'o4,  // R = 0, S = A
    SRC_DA = 3'o5,  // R = D, S = A
    SRC_DQ = 3'o6,  // R = D, S = Q
    SRC_DZ = 3'o7   // R = D, S = 0
  } alu_src_e;

  // ALU functions, I[5:3]
  typedef enum logic [2:0] {
    FN_ADD   = 3'o0,  // R + S + Cn
    FN_SUBR  = 3'o1,  // S - R: S + not R + Cn
    FN_SUBS  = 3'o2,  // R - S: R + not S + Cn
    FN_OR    = 3'o3,  // R or S
    FN_AND   = 3'o4,  // R and S
    FN_NOTRS = 3'o5,  // (not R) and S
    FN_EXOR  = 3'o6,  // R xor S
    FN_EXNOR = 3'o7   // R xnor S
  } alu_fn_e;

  // Destinations, I[8:6]
  typedef enum logic [2:0] {
    DST_QREG  = 3'o0,  // Q <- F, Y = F
    DST_NOP   = 3'o1,  // nothing stored, Y = F
    DST_RAMA  = 3'o2,  // B <- F, Y = A
    DST_RAMF  = 3'o3,  // B <- F, Y = F
    DST_RAMQD = 3'o4,  // B <- F/2, Q <- Q/2
    DST_RAMD  = 3'o5,  // B <- F/2
    DST_RAMQU = 3'o6,  // B <- 2F, Q <- 2Q
    DST_RAMU  = 3'o7   // B <- 2F
  } dest_e;

  // What a shifter does with its word
  typedef enum logic [1:0] {
    SH_NONE = 2'd0,  // pass unchanged
    SH_DOWN = 2'd1,  // towards bit 0; bit 3 comes from the upper end pin
    SH_UP   = 2'd2   // towards bit 3; bit 0 comes from the lower end pin
  } shift_e;

  // Control decoded from the destination field
  typedef struct packed {
    logic   ram_we;     // write the shifted F into register B
    shift_e ram_shift;  // RAM shifter operation
    logic   q_we;       // load the Q register
    shift_e q_shift;    // Q shifter operation (SH_NONE with q_we: Q <- F)
    logic   y_sel_a;    // Y shows A instead of F
    logic   ram0_oe;    // RAM0 pin drives out (F[0]), otherwise input
    logic   ram3_oe;    // RAM3 pin drives out (F[3]), otherwise input
    logic   q0_oe;      // Q0 pin drives out (Q[0]), otherwise input
    logic   q3_oe;      // Q3 pin drives out (Q[3]), otherwise input
  } dest_ctrl_t;

  // Status outputs of the ALU that depend on the result (the lookahead
  // outputs p_n and g_n, which do not depend on the carry in, are separate)
  typedef struct packed {
    logic cout;    // Cn+4, carry out of the slice
    logic zero;    // F == 0
    logic sign;    // F[3]
    logic ovr;     // two's complement overflow
  } alu_flags_t;

endpackage
