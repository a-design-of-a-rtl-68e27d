// fp24_pkg: number format, opcodes and control types shared by the 3-stage
// shader FPU.
//
// Number format: 24-bit floating point in the style of IEEE 754, packed as
// {sign, exponent[6:0], mantissa[15:0]} with an exponent bias of 63 and a
// hidden leading one. The 24-bit width is the design's core precision; the
// 1/7/16 split, the bias and the handling of special values are this design's
// choices: an exponent field of 0 means zero (denormals are flushed), there is
// no infinity or NaN, results that overflow saturate to the largest magnitude
// and results that underflow become zero. All arithmetic rounds toward zero.
//
// Opcodes follow the vertex shader 1.1 arithmetic instructions that the FPU
// executes in one pass. Instruction classes: P type needs only the first stage
// (ADD, MUL, MIN, MAX, SLT, SGE, MOV and the special functions), M type needs
// two stages (MAD) and DP type needs all three (DP3, DP4, DPH).
package fp24_pkg;

  localparam int EW   = 7;
  localparam int MW   = 16;
  localparam int FW   = 1 + EW + MW;   // 24
  localparam int BIAS = 63;
  localparam int NLANE = 4;

  typedef logic [FW-1:0] fp24_t;
  typedef fp24_t vec4_t [NLANE];

  localparam fp24_t FP_ZERO = '0;
  localparam fp24_t FP_ONE  = {1'b0, 7'(BIAS), 16'h0000};
  localparam fp24_t FP_MAX  = {1'b0, 7'h7f, 16'hffff};

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_MOV  = 5'd1,
    OP_ADD  = 5'd2,
    OP_MUL  = 5'd3,
    OP_MAD  = 5'd4,
    OP_DP3  = 5'd5,
    OP_DP4  = 5'd6,
    OP_DPH  = 5'd7,
    OP_MIN  = 5'd8,
    OP_MAX  = 5'd9,
    OP_SLT  = 5'd10,
    OP_SGE  = 5'd11,
    OP_RCP  = 5'd12,
    OP_RSQ  = 5'd13,
    OP_EXP  = 5'd14,
    OP_EXPP = 5'd15,
    OP_LOG  = 5'd16,
    OP_LOGP = 5'd17
  } opcode_e;

  // Set/compare function of the per-lane setting and comparison logic.
  typedef enum logic [1:0] {CMP_MIN, CMP_MAX, CMP_SLT, CMP_SGE} cmp_op_e;

  // Special function select.
  typedef enum logic [1:0] {SF_RCP, SF_RSQ, SF_EXP, SF_LOG} sf_op_e;

  // Stage-1 result select per lane.
  typedef enum logic [2:0] {S1_MUL, S1_ADD, S1_CMP, S1_MOVA, S1_SF} s1_sel_e;

  // Second operand of the stage-2 adders.
  //   S2_BYPASS : no addition, stage-1 result is passed on (P type)
  //   S2_SRCC   : lane i adds source C component i (MAD)
  //   S2_DP3    : lane 0 adds lanes 0+1, lane 2 adds lane 2 + 0
  //   S2_DP4    : lane 0 adds lanes 0+1, lane 2 adds lanes 2+3
  //   S2_DPH    : lane 0 adds lanes 0+1, lane 2 adds lane 2 + source B.w
  typedef enum logic [2:0] {S2_BYPASS, S2_SRCC, S2_DP3, S2_DP4, S2_DPH} s2_sel_e;

  typedef struct packed {
    logic     valid;
    s1_sel_e  s1_sel;
    cmp_op_e  cmp_op;
    sf_op_e   sf_op;
    logic     sf_partial;
    s2_sel_e  s2_sel;
    logic     s3_dp;       // stage 3 sums lanes 0 and 2 and broadcasts
  } ctrl_t;

endpackage
