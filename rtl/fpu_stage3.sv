// fpu_stage3: third stage of the cascade FPU.
//
// A single adder sums the stage-2 outputs of lanes 0 and 2, which for a dot
// product hold the two partial sums, and the result is copied to all four
// components (dest.x = dest.y = dest.z = dest.w), completing DP3, DP4 and
// DPH. For any other instruction the stage-2 results are passed on. The one
// extra adder and the broadcast follow the document.
//
// Interface: s2 (vec4_t), dp (1 for a dot product), r (vec4_t).
// Purely combinational.
module fpu_stage3
  import fp24_pkg::*;
(
  input  vec4_t s2,
  input  logic  dp,
  output vec4_t r
);
  fp24_t dsum;

  fp24_add u_add (.a(s2[0]), .b(s2[2]), .y(dsum));

  always_comb begin
    for (int i = 0; i < NLANE; i++) r[i] = dp ? dsum : s2[i];
  end
endmodule
