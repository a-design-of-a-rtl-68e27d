// fpu3_top: three-stage cascade SIMD floating point unit for a vertex shader.
//
// The FPU takes one instruction per clock: an opcode, three 4-component
// fp24 source vectors A, B and C, and a tag that travels with the
// instruction (for example the destination register of the shader). The
// three arithmetic stages are cascaded so that a whole dot product
// (4 multiplies, then 2 + 1 additions) runs in one pass without macro
// instructions:
//   stage 1 : 4 multipliers, 4 adders, 4 set/compare units, and the special
//             function module on a separate path          (P type done)
//   stage 2 : 4 adders fed by stage-1 results or source C (M type done)
//   stage 3 : 1 adder summing the two partial sums, result broadcast
//                                                        (DP type done)
// Each stage ends in a register, so the FPU issues one instruction per clock
// and every instruction leaves the output register exactly 3 clocks after it
// was presented. Results that complete early (P and M type) are carried
// unchanged through the remaining stages, so a single write port with a
// fixed latency sees all instructions in order. The stall input freezes all
// three stage registers (the shader engine stalls); the instruction presented
// during a stall is not taken.
//
// Follows the document: the 3-stage cascade, 4-wide SIMD over 24-bit floating
// point, the unit counts (9 adders, 4 multipliers, 4 set/compare logics, the
// four special function units), the stage at which each instruction class
// completes and the broadcast of dot products. This design's choices: a
// pipeline register after each stage (the document states one instruction
// per cycle at 100 MHz and a 10 ns budget per unit), the tag, the stall
// input, synchronous active-high reset of the valid bits only. Two
// assertions state the stall and valid rules of the output.
//
// Interface: clk, rst, stall, in_valid, in_op, in_a, in_b, in_c, in_tag;
// out_valid, out_tag, out_res (vec4_t), 3 cycles after the input.
module fpu3_top
  import fp24_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             stall,
  input  logic             in_valid,
  input  opcode_e          in_op,
  input  vec4_t            in_a,
  input  vec4_t            in_b,
  input  vec4_t            in_c,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output vec4_t            out_res
);
  ctrl_t            ctrl0, ctrl1, ctrl2;
  vec4_t            s1_y, s2_y, s3_y;
  vec4_t            s1_q, c_q, s2_q;
  fp24_t            bw_q;
  logic [TAG_W-1:0] tag1, tag2;

  fpu_decode u_dec (.valid(in_valid), .op(in_op), .ctrl(ctrl0));

  fpu_stage1 u_s1 (
    .a(in_a), .b(in_b),
    .s1_sel(ctrl0.s1_sel), .cmp_op(ctrl0.cmp_op),
    .sf_op(ctrl0.sf_op), .sf_partial(ctrl0.sf_partial),
    .r(s1_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl1.valid <= 1'b0;
    end else if (!stall) begin
      ctrl1 <= ctrl0;
      s1_q  <= s1_y;
      c_q   <= in_c;
      bw_q  <= in_b[3];
      tag1  <= in_tag;
    end
  end

  fpu_stage2 u_s2 (.s1(s1_q), .c(c_q), .bw(bw_q), .s2_sel(ctrl1.s2_sel), .r(s2_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl2.valid <= 1'b0;
    end else if (!stall) begin
      ctrl2 <= ctrl1;
      s2_q  <= s2_y;
      tag2  <= tag1;
    end
  end

  fpu_stage3 u_s3 (.s2(s2_q), .dp(ctrl2.s3_dp), .r(s3_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else if (!stall) begin
      out_valid <= ctrl2.valid;
      out_res   <= s3_y;
      out_tag   <= tag2;
    end
  end

  // Handshake rules: a stalled pipeline holds its output, and a result can
  // only appear three non-stalled clocks after a valid instruction entered.
  a_stall_holds: assert property (@(posedge clk) disable iff (rst)
    stall |=> $stable(out_valid) && $stable(out_tag));
  a_valid_from_pipe: assert property (@(posedge clk) disable iff (rst)
    (!stall && !ctrl2.valid) |=> !out_valid);
endmodule
