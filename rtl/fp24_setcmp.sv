// fp24_setcmp: setting and comparison logic of one FPU lane.
//
// The FPU has four of these, one per vector component. For a compare of a
// against b it produces MIN (smaller operand), MAX (larger operand), SLT
// (1.0 if a < b, else 0.0) or SGE (1.0 if a >= b, else 0.0), the shader 1.1
// set and compare instructions. The compare works on sign-magnitude fp24
// values directly: two values of different sign order by sign, two of equal
// sign by their magnitude bits, and +0 equals -0. The document only names
// the unit and the instructions; the circuit is this design's choice.
//
// Interface: a, b (fp24_t), op (cmp_op_e), y (fp24_t). Combinational.
module fp24_setcmp
  import fp24_pkg::*;
(
  input  fp24_t   a,
  input  fp24_t   b,
  input  cmp_op_e op,
  output fp24_t   y
);
  logic a_zero, b_zero, lt;

  always_comb begin
    a_zero = (a[FW-2:MW] == '0);
    b_zero = (b[FW-2:MW] == '0);
    if (a_zero && b_zero)         lt = 1'b0;
    else if (a_zero)              lt = ~b[FW-1];
    else if (b_zero)              lt = a[FW-1];
    else if (a[FW-1] != b[FW-1])  lt = a[FW-1];
    else if (a[FW-1])             lt = (a[FW-2:0] > b[FW-2:0]);
    else                          lt = (a[FW-2:0] < b[FW-2:0]);
    unique case (op)
      CMP_MIN: y = lt ? a : b;
      CMP_MAX: y = lt ? b : a;
      CMP_SLT: y = lt ? FP_ONE : FP_ZERO;
      CMP_SGE: y = lt ? FP_ZERO : FP_ONE;
    endcase
  end
endmodule
