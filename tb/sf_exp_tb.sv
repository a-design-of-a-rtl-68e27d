// sf_exp_tb: self-checking test of the base-2 exponential unit.
//
// Random operands over a wide exponent range are applied in full and in
// partial precision and the result is compared with the double-precision
// value of the function, within an error bound for each mode: relative error 2^-14 (full) and 2^-5 (partial).
// Directed cases cover exact and saturating inputs.
module sf_exp_tb;
  import fp24_ref_pkg::*;
  logic [23:0] x, y;
  logic        partial;
  int checks = 0, failures = 0;

  sf_exp dut (.x(x), .partial(partial), .y(y));

  function automatic real refv(real v);
    real r;
    r = $pow(2.0, v);
    return (r < $pow(2.0, -62.0)) ? 0.0 : r;   // below the smallest normal: flushed
  endfunction

  function automatic real errv(real expv);
    real d; d = to_real(y) - expv; if (d < 0.0) d = -d;
    return (expv == 0.0) ? d : d / expv;
  endfunction

  task automatic check_tol(real tol, string what);
    real e;
    #1;
    checks++;
    e = errv(refv(to_real(x)));
    if (e > tol) begin
      failures++;
      $display("FAIL %s: x=%h (%g) y=%h (%g) expected %g err %g", what, x, to_real(x), y,
               to_real(y), refv(to_real(x)), e);
    end
  endtask

  task automatic check_exact(logic [23:0] expv, string what);
    #1;
    checks++;
    if (y !== expv) begin
      failures++;
      $display("FAIL %s: x=%h y=%h expected %h", what, x, y, expv);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6000; n++) begin
      x = rnd(-12, 5);
      partial = 1'b0;
      check_tol(1.0/16384.0, "full");
      partial = 1'b1;
      check_tol(1.0/32.0, "partial");
    end
    partial = 1'b0;
    x = 24'h000000; check_exact(24'h3f0000, "2^0");
    x = 24'h420000; check_exact(24'h470000, "2^8");
    x = 24'hc08000; check_exact(24'h3c0000, "2^-3");
    x = 24'h460000; check_exact(24'h7fffff, "2^128 saturates");
    x = 24'hc5c000; check_exact(24'h000000, "2^-112 underflows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
