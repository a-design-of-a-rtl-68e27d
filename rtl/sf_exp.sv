// sf_exp: base-2 exponential unit (SF_EXP) of the special function module.
//
// y = 2^x for a scalar fp24 x, in one combinational pass. x is converted to
// signed fixed point with 20 fraction bits and split into an integer part i
// (the floor) and a fraction r in [0,1). 2^r - 1 comes from a 64-entry by
// 20-bit table (160 bytes, the size the document gives) indexed by the top 6
// bits of r; entry j holds 2^(j/64) - 1 in 0.20 fixed point. A full-precision
// result interpolates linearly to entry j+1 with the next 10 bits of r
// (entry 64 is the constant 1); a partial-precision result uses entry j
// alone. The result is 1.(table value) * 2^i; i outside the exponent range
// saturates (large x) or gives +0 (very negative x). The table is computed
// at elaboration.
//
// The document gives the table size and the full/partial precision modes;
// the fixed-point split and the interpolation are this design's choices.
//
// Interface: x (fp24_t), partial, y (fp24_t). Purely combinational.
module sf_exp
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
  localparam int FB   = 20;                 // fraction bits of the fixed-point x
  localparam int IB   = FB - LUT_ABITS;     // interpolated bits of r: 14
  localparam int VW   = FB + 9;             // signed fixed-point width: 29
  typedef logic [LUT_DBITS-1:0] tab_t [NENT];

  function automatic tab_t make_tab();
    tab_t t;
    for (int i = 0; i < NENT; i++) begin
      t[i] = LUT_DBITS'($rtoi((2.0 ** (real'(i) / real'(NENT)) - 1.0)
                              * (2.0 ** LUT_DBITS) + 0.5));
    end
    return t;
  endfunction
  localparam tab_t LUT = make_tab();

  logic signed [EW+1:0]   u;
  logic [MW:0]            sig;
  logic [VW-1:0]          mag;
  logic signed [VW-1:0]   v;
  logic signed [VW-FB-1:0] ip;
  logic [FB-1:0]          r;
  logic [LUT_ABITS-1:0]   idx;
  logic [IB-1:0]          frac;
  logic [LUT_DBITS:0]     e0, e1;
  logic [LUT_DBITS+IB:0]  dprod;
  logic [LUT_DBITS:0]     ef;
  logic signed [EW+2:0]   e_res;

  always_comb begin
    u   = $signed({2'b00, x[FW-2:MW]}) - 9'sd63;
    sig = {1'b1, x[MW-1:0]};
    // |x| * 2^FB = sig * 2^(u + FB - MW)
    if (u >= 9'sd7)                   mag = '0;     // handled below
    else if (u >= -9'sd4)             mag = VW'(sig) << (u + 9'sd4);
    else if (u >= -9'sd21)            mag = VW'(sig) >> (-9'sd4 - u);
    else                              mag = '0;
    v     = x[FW-1] ? -$signed(mag) : $signed(mag);
    ip    = v[VW-1:FB];
    r     = v[FB-1:0];
    idx   = r[FB-1 -: LUT_ABITS];
    frac  = r[IB-1:0];
    e0    = {1'b0, LUT[idx]};
    e1    = (idx == '1) ? (LUT_DBITS+1)'(1 << LUT_DBITS) : {1'b0, LUT[idx + 1'b1]};
    dprod = (LUT_DBITS+IB+1)'(e1 - e0) * (LUT_DBITS+IB+1)'(frac);
    ef    = partial ? e0 : e0 + (LUT_DBITS+1)'(dprod >> IB);
    e_res = 10'(ip) + 10'sd63;
    if (x[FW-2:MW] == '0) begin
      y = FP_ONE;
    end else if (u >= 9'sd7) begin
      y = x[FW-1] ? FP_ZERO : FP_MAX;
    end else if (e_res > 10'sd127) begin
      y = FP_MAX;
    end else if (e_res < 10'sd1) begin
      y = FP_ZERO;
    end else begin
      y = {1'b0, e_res[EW-1:0], ef[LUT_DBITS-1 -: MW]};
    end
  end
endmodule
