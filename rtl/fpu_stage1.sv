// fpu_stage1: first stage of the cascade FPU.
//
// Each of the four lanes receives component i of source A and of source B
// and has its own multiplier, adder and setting/comparison logic; the
// special function module runs beside them on a separate path and works on
// source component A.x. Per lane, a multiplexer picks the stage-1 result:
// the product (MUL and the first step of MAD and the dot products), the sum
// (ADD), the set/compare result (MIN, MAX, SLT, SGE), source A itself (MOV)
// or the special function result (RCP, RSQ, EXP(P), LOG(P)). This is where
// a P-type instruction completes. The four multipliers, the separate SF path
// and the start of every operation in this stage follow the document; the
// per-lane adder and compare logic in this stage are how this design places
// the document's nine adders and four setting/comparison logics
// (4 + 4 + 1 adders over the three stages).
//
// Interface: a, b (vec4_t), s1_sel, cmp_op, sf_op, sf_partial, r (vec4_t).
// Purely combinational; the top registers r at the end of the cycle.
module fpu_stage1
  import fp24_pkg::*;
(
  input  vec4_t   a,
  input  vec4_t   b,
  input  s1_sel_e s1_sel,
  input  cmp_op_e cmp_op,
  input  sf_op_e  sf_op,
  input  logic    sf_partial,
  output vec4_t   r
);
  fp24_t sf_y;
  vec4_t prod, sum, cmp;

  sf_unit u_sf (.x(a[0]), .op(sf_op), .partial(sf_partial), .y(sf_y));

  for (genvar i = 0; i < NLANE; i++) begin : g_lane
    fp24_mul    u_mul (.a(a[i]), .b(b[i]), .y(prod[i]));
    fp24_add    u_add (.a(a[i]), .b(b[i]), .y(sum[i]));
    fp24_setcmp u_cmp (.a(a[i]), .b(b[i]), .op(cmp_op), .y(cmp[i]));

    always_comb begin
      unique case (s1_sel)
        S1_MUL:  r[i] = prod[i];
        S1_ADD:  r[i] = sum[i];
        S1_CMP:  r[i] = cmp[i];
        S1_MOVA: r[i] = a[i];
        S1_SF:   r[i] = sf_y;
        default: r[i] = a[i];
      endcase
    end
  end
endmodule
