// sf_unit_tb: self-checking test of the special function module.
//
// For random operands it selects each of the four functions in full and in
// partial precision and checks the result against the double-precision
// function value within the bound of the selected mode, so a wrong select
// or a lost precision mode shows as an error far beyond the bound.
module sf_unit_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;
  fp24_t  x, y;
  sf_op_e op;
  logic   partial;
  int checks = 0, failures = 0;

  sf_unit dut (.x(x), .op(op), .partial(partial), .y(y));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, expv, err, tol;
    for (int n = 0; n < 8000; n++) begin
      op      = sf_op_e'(n % 4);
      partial = 1'((n / 4) % 2);
      x       = (op == SF_EXP) ? rnd(-8, 4) : rnd(-30, 30);
      #1;
      v = to_real(x);
      unique case (op)
        SF_RCP: expv = 1.0 / v;
        SF_RSQ: expv = 1.0 / $sqrt((v < 0.0) ? -v : v);
        SF_EXP: expv = $pow(2.0, v);
        SF_LOG: expv = $ln((v < 0.0) ? -v : v) / $ln(2.0);
      endcase
      err = to_real(y) - expv;
      if (err < 0.0) err = -err;
      if (op == SF_LOG) begin
        err = err - ((expv < 0.0) ? -expv : expv) / 32768.0;   // absolute bound
        tol = partial ? 1.0/32.0 : 1.0/8192.0;
      end else begin
        err = err / ((expv < 0.0) ? -expv : expv);             // relative bound
        tol = partial ? ((op == SF_EXP) ? 1.0/32.0 : 1.0/256.0)
                      : ((op == SF_EXP) ? 1.0/16384.0 : 1.0/32768.0);
      end
      checks++;
      if (err > tol) begin
        failures++;
        $display("FAIL %s partial=%0d x=%h (%g) y=%g expected %g", op.name(), partial, x,
                 v, to_real(y), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
