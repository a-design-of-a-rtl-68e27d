// fpu_stage2: second stage of the cascade FPU.
//
// Four adders, one per lane. Adder i always takes the stage-1 result of its
// own lane; a multiplexer in front of its other input selects, by
// instruction:
//   MAD  : source C component i          -> r[i] = A.i*B.i + C.i (M type)
//   DP3  : lane 0 adds stage-1 lane 1, lane 2 adds 0
//   DP4  : lane 0 adds stage-1 lane 1, lane 2 adds stage-1 lane 3
//   DPH  : lane 0 adds stage-1 lane 1, lane 2 adds source B.w
// For P-type instructions, and for lanes 1 and 3 of a dot product, the
// stage-1 result is passed on unchanged. An M-type instruction completes
// here. The four adders, the choice between a stage-1 output and source C,
// and the pairing of partial products for the final adder follow the
// document; the exact assignment of pairs to lanes (0+1, 2+3) and the
// handling of DP3 and DPH in lane 2 are this design's choice.
//
// Interface: s1 (stage-1 results), c (source C), bw (source B.w),
// s2_sel (s2_sel_e), r (vec4_t). Purely combinational.
module fpu_stage2
  import fp24_pkg::*;
(
  input  vec4_t   s1,
  input  vec4_t   c,
  input  fp24_t   bw,
  input  s2_sel_e s2_sel,
  output vec4_t   r
);
  vec4_t opnd, sum;
  logic  dp;

  always_comb begin
    dp = (s2_sel == S2_DP3) || (s2_sel == S2_DP4) || (s2_sel == S2_DPH);
    for (int i = 0; i < NLANE; i++) opnd[i] = c[i];
    if (dp) begin
      opnd[0] = s1[1];
      unique case (s2_sel)
        S2_DP4:  opnd[2] = s1[3];
        S2_DPH:  opnd[2] = bw;
        default: opnd[2] = FP_ZERO;
      endcase
    end
  end

  for (genvar i = 0; i < NLANE; i++) begin : g_lane
    fp24_add u_add (.a(s1[i]), .b(opnd[i]), .y(sum[i]));
    always_comb begin
      if (s2_sel == S2_SRCC)            r[i] = sum[i];
      else if (dp && (i == 0 || i == 2)) r[i] = sum[i];
      else                              r[i] = s1[i];
    end
  end
endmodule
