// sf_log: base-2 logarithm unit (SF_LOG) of the special function module.
//
// y = log2(|x|) for a scalar fp24 x, in one combinational pass. With
// x = 1.f * 2^u the result is u + log2(1.f). log2(1.f) comes from a 64-entry
// by 20-bit table (160 bytes, the size the document gives) indexed by the top
// 6 fraction bits; entry i holds log2(1 + i/64) in 0.20 fixed point. A
// full-precision result interpolates linearly between entry i and entry i+1
// using the next 10 fraction bits (entry 64, log2(2) = 1, is a constant); a
// partial-precision result uses entry i alone. The fixed-point sum u + log2
// is then converted back to fp24 with a leading-one search. log2(0) gives the
// most negative value. The table is computed at elaboration.
//
// The document gives the table size and says that partial precision is
// visually sufficient for the colour work these units mostly do; the linear
// interpolation is this design's choice of refinement (Newton-Raphson, which
// the document names for the special function module, applies to the
// reciprocal units).
//
// Interface: x (fp24_t), partial, y (fp24_t). Purely combinational.
module sf_log
  import fp24_pkg::*;
#(
  parameter int LUT_ABITS = 6,    // 64 entries
  parameter int LUT_DBITS = 20    // 64 x 20 bit = 160 bytes
) (
  input  fp24_t x,
  input  logic  partial,
  output fp24_t y
);
  localparam int NENT = 1 << LUT_ABITS;
  localparam int IB   = MW - LUT_ABITS;     // interpolation bits: 10
  localparam int VW   = LUT_DBITS + 10;     // fixed-point width: 30
  typedef logic [LUT_DBITS-1:0] tab_t [NENT];

  function automatic tab_t make_tab();
    tab_t t;
    for (int i = 0; i < NENT; i++) begin
      t[i] = LUT_DBITS'($rtoi($ln(1.0 + real'(i) / real'(NENT)) / $ln(2.0)
                              * (2.0 ** LUT_DBITS) + 0.5));
    end
    return t;
  endfunction
  localparam tab_t LUT = make_tab();

  logic [LUT_ABITS-1:0]    idx;
  logic [IB-1:0]           frac;
  logic [LUT_DBITS:0]      l0, l1;
  logic [LUT_DBITS+IB:0]   dprod;
  logic [LUT_DBITS:0]      lf;
  logic signed [VW-1:0]    v;
  logic [VW-1:0]           mag;
  logic [4:0]              pos;
  logic [VW-1:0]           nm;
  logic [EW:0]             e_res;

  always_comb begin
    idx   = x[MW-1 -: LUT_ABITS];
    frac  = x[IB-1:0];
    l0    = {1'b0, LUT[idx]};
    l1    = (idx == '1) ? (LUT_DBITS+1)'(1 << LUT_DBITS) : {1'b0, LUT[idx + 1'b1]};
    dprod = (LUT_DBITS+IB+1)'(l1 - l0) * (LUT_DBITS+IB+1)'(frac);
    lf    = partial ? l0 : l0 + (LUT_DBITS+1)'(dprod >> IB);
    v     = ($signed(VW'(x[FW-2:MW])) - VW'(BIAS)) * (VW'(1) << LUT_DBITS)
            + $signed(VW'(lf));
    mag   = v[VW-1] ? VW'(-v) : VW'(v);
    pos   = '0;
    for (int i = 0; i < VW; i++) begin
      if (mag[i]) pos = 5'(i);
    end
    nm    = mag << (5'(VW - 1) - pos);
    e_res = 8'(pos) + 8'(BIAS - LUT_DBITS);
    if (x[FW-2:MW] == '0) begin
      y = {1'b1, FP_MAX[FW-2:0]};
    end else if (mag == '0) begin
      y = FP_ZERO;
    end else begin
      y = {v[VW-1], e_res[EW-1:0], nm[VW-2 -: MW]};
    end
  end
endmodule
