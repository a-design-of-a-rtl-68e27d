// fp24_add: combinational 24-bit floating point adder.
//
// One of the nine adders of the FPU (four in the first stage, four in the
// second, one in the third). It computes y = a + b in the fp24 format of
// fp24_pkg. The operand with the larger magnitude is kept, the smaller one is
// shifted right by the exponent difference into a significand extended with
// guard, round and sticky bits, the two are added or subtracted, and the sum
// is normalised with a leading-zero count. The result is truncated (round
// toward zero); with the three extra bits the truncation is exact for every
// exponent difference. Overflow saturates, underflow gives +0, and an exact
// zero result is +0. The internal algorithm is this design's choice: the
// document gives only the unit's function and its 10 ns delay budget.
//
// Interface: a, b, y, all fp24_pkg::fp24_t. Purely combinational.
module fp24_add
  import fp24_pkg::*;
(
  input  fp24_t a,
  input  fp24_t b,
  output fp24_t y
);
  localparam int SW = MW + 1;      // significand with hidden one: 17
  localparam int XW = SW + 3;      // with guard, round, sticky: 20

  logic          a_big;
  fp24_t         big, sml;
  logic [EW-1:0] d;
  logic [SW-1:0] sig_b, sig_s;
  logic [XW-1:0] ext_b, ext_s, shifted;
  logic          sticky;
  logic          sub;
  logic [XW:0]   sum;
  logic [4:0]    lzc;
  logic [XW-1:0] norm;
  logic signed [EW+2:0] e_res;

  always_comb begin
    a_big = (a[FW-2:0] >= b[FW-2:0]);
    big   = a_big ? a : b;
    sml   = a_big ? b : a;
    sig_b = (big[FW-2:MW] != '0) ? {1'b1, big[MW-1:0]} : '0;
    sig_s = (sml[FW-2:MW] != '0) ? {1'b1, sml[MW-1:0]} : '0;
    d     = big[FW-2:MW] - sml[FW-2:MW];
    ext_b = {sig_b, 3'b000};
    ext_s = {sig_s, 3'b000};
    // right shift with sticky collection
    if (d >= EW'(XW)) begin
      shifted = '0;
      sticky  = (ext_s != '0);
    end else begin
      shifted = ext_s >> d;
      sticky  = ((ext_s & ((XW'(1) << d) - XW'(1))) != '0);
    end
    shifted[0] = shifted[0] | sticky;
    sub = big[FW-1] ^ sml[FW-1];
    sum = sub ? ({1'b0, ext_b} - {1'b0, shifted}) : ({1'b0, ext_b} + {1'b0, shifted});

    // normalisation
    lzc = '0;
    for (int i = 0; i < XW; i++) begin
      if (sum[i]) lzc = 5'(XW - 1 - i);
    end
    if (sum[XW]) begin
      norm  = sum[XW:1] | XW'(sum[0]);
      e_res = $signed({3'b000, big[FW-2:MW]}) + 10'sd1;
    end else begin
      norm  = sum[XW-1:0] << lzc;
      e_res = $signed({3'b000, big[FW-2:MW]}) - $signed({5'b00000, lzc});
    end

    if (big[FW-2:MW] == '0 || sum == '0 || e_res < 10'sd1) begin
      y = FP_ZERO;
    end else if (e_res > 10'sd127) begin
      y = {big[FW-1], FP_MAX[FW-2:0]};
    end else begin
      y = {big[FW-1], e_res[EW-1:0], norm[XW-2 -: MW]};
    end
  end
endmodule
