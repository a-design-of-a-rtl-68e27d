// sf_unit: special function module (SF) of the FPU.
//
// Holds the four special function units (reciprocal, reciprocal square root,
// base-2 exponential and base-2 logarithm) and selects the one the
// instruction asks for. It runs on a path of its own, beside the general
// arithmetic of the first stage, and finishes within the first stage's clock
// cycle; its scalar result is offered to every lane's stage-1 result
// multiplexer, so the shader receives it in all four components. "partial"
// selects the partial-precision form (seed or table value without
// refinement), used by the EXPP and LOGP instructions. The four units and the
// full/partial modes follow the document; taking the operand from source
// component x and feeding all four units from it is this design's choice.
//
// Interface: x (fp24_t scalar operand), op (sf_op_e), partial, y (fp24_t).
// Purely combinational.
module sf_unit
  import fp24_pkg::*;
(
  input  fp24_t  x,
  input  sf_op_e op,
  input  logic   partial,
  output fp24_t  y
);
  fp24_t y_rcp, y_rsq, y_exp, y_log;

  sf_rcp u_rcp (.x(x), .partial(partial), .y(y_rcp));
  sf_rsq u_rsq (.x(x), .partial(partial), .y(y_rsq));
  sf_exp u_exp (.x(x), .partial(partial), .y(y_exp));
  sf_log u_log (.x(x), .partial(partial), .y(y_log));

  always_comb begin
    unique case (op)
      SF_RCP: y = y_rcp;
      SF_RSQ: y = y_rsq;
      SF_EXP: y = y_exp;
      SF_LOG: y = y_log;
    endcase
  end
endmodule
