// sf_rcp_tb: self-checking test of the reciprocal unit.
//
// Random operands over a wide exponent range are applied in full and in
// partial precision and the result is compared with the double-precision
// value of the function, within an error bound for each mode: relative error 2^-15 (full) and 2^-8 (partial).
// Directed cases cover exact and saturating inputs.
module sf_rcp_tb;
  import fp24_ref_pkg::*;
  logic [23:0] x, y;
  logic        partial;
  int checks = 0, failures = 0;

  sf_rcp dut (.x(x), .partial(partial), .y(y));

  function automatic real refv(real v);
    return 1.0 / v;
  endfunction

  function automatic real errv(real expv);
    real d; d = to_real(y) - expv; if (d < 0.0) d = -d;
    return d / ((expv < 0.0) ? -expv : expv);
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
      x = rnd(-60, 60);
      partial = 1'b0;
      check_tol(1.0/32768.0, "full");
      partial = 1'b1;
      check_tol(1.0/256.0, "partial");
    end
    partial = 1'b0;
    x = 24'h3f0000; check_exact(24'h3f0000, "1/1");
    x = 24'hc10000; check_exact(24'hbd0000, "1/-4");
    x = 24'h000000; check_exact(24'h7fffff, "1/0 saturates");
    x = 24'h7f8000; check_exact(24'h000000, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
