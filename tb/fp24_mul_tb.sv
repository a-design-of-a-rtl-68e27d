// fp24_mul_tb: self-checking test of the fp24 multiplier.
//
// Random products (exact in double) are compared bit for bit with the
// truncated double reference; directed cases cover zero operands, signs,
// overflow saturation and underflow.
module fp24_mul_tb;
  import fp24_ref_pkg::*;
  logic [23:0] a, b, y;
  int checks = 0, failures = 0;

  fp24_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [23:0] expv, string what);
    #1;
    checks++;
    if (y !== expv) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = rnd(-40, 40);
      b = rnd(-40, 40);
      check(ref_mul(a, b), "random");
    end
    a = 24'h3f8000; b = 24'h000000; check(24'h000000, "x * 0");
    a = 24'h400000; b = 24'hbf8000; check(24'hc08000, "2 * -1.5");
    a = 24'h3fffff; b = 24'h3fffff; check(ref_mul(24'h3fffff, 24'h3fffff), "max significands");
    a = 24'h7f0000; b = 24'h410000; check(24'h7fffff, "overflow saturates");
    a = 24'h010000; b = 24'h3e0000; check(24'h000000, "underflow flushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
