// sf_rsq: reciprocal square root unit (SF_RSQ) of the special function module.
//
// y = 1/sqrt(|x|) for a scalar fp24 x, in one combinational pass. With
// x = 1.f * 2^u, the significand is taken as mm = 1.f when u is even and
// mm = 2*1.f when u is odd, so that mm is in [1,4) and the result exponent is
// -floor(u/2). A 512-entry by 16-bit seed table (1 KB, the table size the
// document gives), indexed by {u odd, top 8 fraction bits}, holds
// 1/sqrt(mm) at the middle of each interval in 0.16 fixed point. A
// full-precision result applies one Newton-Raphson step
// y1 = y0*(3 - mm*y0^2)/2; a partial-precision result uses the seed alone.
// mm = 1 exactly bypasses the table. The sign of x is ignored, as in the
// shader instruction; 1/sqrt(0) saturates to the largest positive value.
// The table is computed at elaboration from the formula above.
//
// The document gives the method (Newton-Raphson with a look-up table, one
// cycle) and the table size; table layout, one iteration and fixed-point
// widths are this design's choices.
//
// Interface: x (fp24_t), partial, y (fp24_t). Purely combinational.
module sf_rsq
  import fp24_pkg::*;
#(
  parameter int LUT_ABITS = 9,    // 1 exponent-parity bit + 8 fraction bits
  parameter int LUT_DBITS = 16    // 512 x 16 bit = 1024 bytes
) (
  input  fp24_t x,
  input  logic  partial,
  output fp24_t y
);
  localparam int NENT = 1 << LUT_ABITS;
  localparam int FB   = LUT_ABITS - 1;     // fraction bits in the index
  typedef logic [LUT_DBITS-1:0] tab_t [NENT];

  function automatic tab_t make_tab();
    tab_t t;
    real  mm;
    for (int i = 0; i < NENT; i++) begin
      mm = 1.0 + (real'(i % (1 << FB)) + 0.5) / real'(1 << FB);
      if (i >= (1 << FB)) mm = 2.0 * mm;
      t[i] = LUT_DBITS'($rtoi((2.0 ** LUT_DBITS) / $sqrt(mm)));
    end
    return t;
  endfunction
  localparam tab_t LUT = make_tab();

  localparam int D = LUT_DBITS;
  logic signed [EW+1:0]  u;
  logic                  odd;
  logic [MW+1:0]         mm;       // 2.16
  logic [D-1:0]          y0;       // 0.16
  logic [2*D-1:0]        y0sq;     // 0.32
  logic [MW+2*D+1:0]     q;        // 2.48 : mm*y0^2
  logic [MW+2*D+1:0]     t;        // 2.48 : 3 - mm*y0^2
  logic [MW+3*D+1:0]     y1w;      // 2.64 : y0*t
  localparam int RW = MW + 2;
  logic [RW-1:0]         r;        // 0.18 result significand, in (0.5,1)
  logic signed [EW+2:0]  e_res;
  logic [MW-1:0]         man;

  always_comb begin
    u    = $signed({2'b00, x[FW-2:MW]}) - 9'sd63;
    odd  = u[0];
    mm   = odd ? {1'b1, x[MW-1:0], 1'b0} : {2'b01, x[MW-1:0]};
    y0   = LUT[{odd, x[MW-1 -: FB]}];
    y0sq = y0 * y0;
    q    = mm * y0sq;
    t    = {2'b11, {(MW+2*D){1'b0}}} - q;
    y1w  = y0 * t;
    // y1 = y0*t/2 : 2.64 -> drop one more integer bit for the halving
    r    = partial ? {y0, {(RW-D){1'b0}}} : y1w[MW+3*D -: RW];
    e_res = 10'sd62 - $signed({{1{u[EW+1]}}, u >>> 1});
    if (r[RW-1]) begin
      man = r[RW-2 -: MW];
    end else begin
      man = r[RW-3 -: MW];
      e_res = e_res - 10'sd1;
    end
    if (x[FW-2:MW] == '0) begin
      y = FP_MAX;
    end else if (!odd && x[MW-1:0] == '0) begin
      e_res = 10'sd63 - $signed({{1{u[EW+1]}}, u >>> 1});
      y = {1'b0, e_res[EW-1:0], {MW{1'b0}}};
    end else begin
      y = {1'b0, e_res[EW-1:0], man};
    end
  end
endmodule
