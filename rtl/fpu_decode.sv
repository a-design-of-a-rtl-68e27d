// fpu_decode: instruction decoder of the FPU.
//
// Turns an opcode into the multiplexer and unit selects of the three stages
// (fp24_pkg::ctrl_t). P-type instructions (MOV, ADD, MUL, MIN, MAX, SLT,
// SGE, RCP, RSQ, EXP, EXPP, LOG, LOGP) use only stage 1, the M-type MAD uses
// stages 1 and 2, and the DP-type DP3, DP4 and DPH use all three. EXPP and
// LOGP select the partial-precision special functions. The instruction
// classes follow the document; the encoding is this design's choice.
// OP_NOP and unused codes produce an invalid (bubble) control word.
//
// Interface: valid, op (opcode_e), ctrl (ctrl_t). Purely combinational.
module fpu_decode
  import fp24_pkg::*;
(
  input  logic    valid,
  input  opcode_e op,
  output ctrl_t   ctrl
);
  always_comb begin
    ctrl            = '0;
    ctrl.valid      = valid;
    ctrl.s1_sel     = S1_MOVA;
    ctrl.cmp_op     = CMP_MIN;
    ctrl.sf_op      = SF_RCP;
    ctrl.sf_partial = 1'b0;
    ctrl.s2_sel     = S2_BYPASS;
    ctrl.s3_dp      = 1'b0;
    unique case (op)
      OP_MOV:  ctrl.s1_sel = S1_MOVA;
      OP_ADD:  ctrl.s1_sel = S1_ADD;
      OP_MUL:  ctrl.s1_sel = S1_MUL;
      OP_MAD:  begin ctrl.s1_sel = S1_MUL; ctrl.s2_sel = S2_SRCC; end
      OP_DP3:  begin ctrl.s1_sel = S1_MUL; ctrl.s2_sel = S2_DP3; ctrl.s3_dp = 1'b1; end
      OP_DP4:  begin ctrl.s1_sel = S1_MUL; ctrl.s2_sel = S2_DP4; ctrl.s3_dp = 1'b1; end
      OP_DPH:  begin ctrl.s1_sel = S1_MUL; ctrl.s2_sel = S2_DPH; ctrl.s3_dp = 1'b1; end
      OP_MIN:  begin ctrl.s1_sel = S1_CMP; ctrl.cmp_op = CMP_MIN; end
      OP_MAX:  begin ctrl.s1_sel = S1_CMP; ctrl.cmp_op = CMP_MAX; end
      OP_SLT:  begin ctrl.s1_sel = S1_CMP; ctrl.cmp_op = CMP_SLT; end
      OP_SGE:  begin ctrl.s1_sel = S1_CMP; ctrl.cmp_op = CMP_SGE; end
      OP_RCP:  begin ctrl.s1_sel = S1_SF; ctrl.sf_op = SF_RCP; end
      OP_RSQ:  begin ctrl.s1_sel = S1_SF; ctrl.sf_op = SF_RSQ; end
      OP_EXP:  begin ctrl.s1_sel = S1_SF; ctrl.sf_op = SF_EXP; end
      OP_EXPP: begin ctrl.s1_sel = S1_SF; ctrl.sf_op = SF_EXP; ctrl.sf_partial = 1'b1; end
      OP_LOG:  begin ctrl.s1_sel = S1_SF; ctrl.sf_op = SF_LOG; end
      OP_LOGP: begin ctrl.s1_sel = S1_SF; ctrl.sf_op = SF_LOG; ctrl.sf_partial = 1'b1; end
      default: ctrl.valid = 1'b0;
    endcase
  end
endmodule
