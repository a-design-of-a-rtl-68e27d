// sf_rcp: reciprocal unit (SF_RCP) of the special function module.
//
// y = 1/x for a scalar fp24 x, in one combinational pass. The significand
// 1.f is looked up in a 256-entry by 23-bit seed table (736 bytes, the table
// size the document gives), indexed by the top 8 fraction bits; entry i holds
// 1/(1 + (i+0.5)/256) in 0.23 fixed point. A full-precision result applies
// one Newton-Raphson step y1 = y0*(2 - m*y0), which takes the ~9-bit seed to
// about 17 bits. A partial-precision result uses the seed alone. Exact powers
// of two (f = 0) bypass the table. 1/0 saturates to the largest magnitude
// with the sign of x; results below the smallest normal become +0. The table
// is computed at elaboration from the formula above.
//
// The document gives the method (Newton-Raphson with a look-up table, one
// clock cycle) and the table size; the table layout, the single iteration
// and the fixed-point widths are this design's choices.
//
// Interface: x (fp24_t), partial (1 = partial precision), y (fp24_t).
// Purely combinational; the FPU registers it at the end of stage 1.
module sf_rcp
  import fp24_pkg::*;
#(
  parameter int LUT_ABITS = 8,    // 256 entries
  parameter int LUT_DBITS = 23    // 256 x 23 bit = 736 bytes
) (
  input  fp24_t x,
  input  logic  partial,
  output fp24_t y
);
  localparam int NENT = 1 << LUT_ABITS;
  typedef logic [LUT_DBITS-1:0] tab_t [NENT];

  function automatic tab_t make_tab();
    tab_t t;
    for (int i = 0; i < NENT; i++) begin
      t[i] = LUT_DBITS'($rtoi((2.0 ** LUT_DBITS) /
                              (1.0 + (real'(i) + 0.5) / real'(NENT))));
    end
    return t;
  endfunction
  localparam tab_t LUT = make_tab();

  logic [MW:0]               m;       // 1.16
  logic [LUT_DBITS-1:0]      y0;      // 0.23
  logic [MW+LUT_DBITS:0]     p;       // 1.39 : m*y0
  logic [MW+LUT_DBITS:0]     t;       // 1.39 : 2 - m*y0
  logic [MW+2*LUT_DBITS-1:0] y1w;     // 1.62 : y0*t
  logic [LUT_DBITS-1:0]      r;       // 0.23 result significand, in (0.5,1)
  logic signed [EW+2:0]      e_res;
  logic [MW-1:0]             man;

  always_comb begin
    m   = {1'b1, x[MW-1:0]};
    y0  = LUT[x[MW-1 -: LUT_ABITS]];
    p   = m * y0;
    t   = {1'b1, {(MW+LUT_DBITS){1'b0}}} - p + {1'b1, {(MW+LUT_DBITS){1'b0}}};
    y1w = y0 * t;
    r   = partial ? y0 : y1w[MW+2*LUT_DBITS-1 -: LUT_DBITS];
    // r is 0.1xxx (below 1); normalise to 1.xxx * 2^-1, or 2^-2 if it fell below 0.5
    if (r[LUT_DBITS-1]) begin
      man   = r[LUT_DBITS-2 -: MW];
      e_res = 10'sd125 - $signed({3'b000, x[FW-2:MW]});
    end else begin
      man   = r[LUT_DBITS-3 -: MW];
      e_res = 10'sd124 - $signed({3'b000, x[FW-2:MW]});
    end
    if (x[FW-2:MW] == '0) begin
      y = {x[FW-1], FP_MAX[FW-2:0]};
    end else if (x[MW-1:0] == '0) begin
      e_res = 10'sd126 - $signed({3'b000, x[FW-2:MW]});
      y = (e_res < 10'sd1) ? FP_ZERO : {x[FW-1], e_res[EW-1:0], {MW{1'b0}}};
    end else if (e_res < 10'sd1) begin
      y = FP_ZERO;
    end else begin
      y = {x[FW-1], e_res[EW-1:0], man};
    end
  end
endmodule
