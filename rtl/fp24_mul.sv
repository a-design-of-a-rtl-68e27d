// fp24_mul: combinational 24-bit floating point multiplier.
//
// One of the four first-stage multipliers of the FPU. It computes y = a * b
// in the fp24 format of fp24_pkg: the sign is the XOR of the signs, the
// exponents are added and the bias removed, and the two 17-bit significands
// (hidden one included) are multiplied into a 34-bit product that is
// normalised by at most one position. The product is truncated (round toward
// zero); zero operands give +0, overflow saturates and underflow gives +0.
// The document gives only the unit's function and its 10 ns delay budget;
// the rest is this design's choice.
//
// Interface: a, b, y, all fp24_pkg::fp24_t. Purely combinational.
module fp24_mul
  import fp24_pkg::*;
(
  input  fp24_t a,
  input  fp24_t b,
  output fp24_t y
);
  logic [2*MW+1:0]      prod;
  logic [MW-1:0]        man;
  logic signed [EW+2:0] e_res;
  logic                 sgn;

  always_comb begin
    sgn  = a[FW-1] ^ b[FW-1];
    prod = {1'b1, a[MW-1:0]} * {1'b1, b[MW-1:0]};
    e_res = $signed({3'b000, a[FW-2:MW]}) + $signed({3'b000, b[FW-2:MW]}) - 10'sd63;
    if (prod[2*MW+1]) begin
      man   = prod[2*MW -: MW];
      e_res = e_res + 10'sd1;
    end else begin
      man   = prod[2*MW-1 -: MW];
    end
    if (a[FW-2:MW] == '0 || b[FW-2:MW] == '0 || e_res < 10'sd1) begin
      y = FP_ZERO;
    end else if (e_res > 10'sd127) begin
      y = {sgn, FP_MAX[FW-2:0]};
    end else begin
      y = {sgn, e_res[EW-1:0], man};
    end
  end
endmodule
