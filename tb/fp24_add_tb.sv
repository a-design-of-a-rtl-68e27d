// fp24_add_tb: self-checking test of the fp24 adder.
//
// Random additions and subtractions, first with close exponents (where
// cancellation is frequent) and then with any exponent gap, are compared bit
// for bit with the truncating reference adder. Directed cases cover
// cancellation to zero, zero operands, large exponent differences, overflow
// saturation and underflow.
module fp24_add_tb;
  import fp24_ref_pkg::*;
  logic [23:0] a, b, y;
  int checks = 0, failures = 0;

  fp24_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [23:0] expv, string what);
    #1;
    checks++;
    if (y !== expv) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, expected %h", what, a, b, y, expv);
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
      a = rnd(-20, 20);
      b = rnd(-14, 14);
      if (n % 3 == 0) b[22:16] = a[22:16];          // close exponents, cancellation
      check(ref_add(a, b), "random");
    end
    for (int n = 0; n < 5000; n++) begin                // any exponent gap
      a = rnd(-60, 60);
      b = rnd(-60, 60);
      check(ref_add(a, b), "wide");
    end
    a = 24'h3f8000; b = 24'hbf8000; check(24'h000000, "x - x");
    a = 24'h3f0000; b = 24'h000000; check(24'h3f0000, "x + 0");
    a = 24'h000000; b = 24'hc01234; check(24'hc01234, "0 + x");
    a = 24'h3f0000; b = 24'h3f0000; check(24'h400000, "1 + 1");
    a = 24'h3f0000; b = 24'hbe0000; check(24'h3e0000, "1 - 0.5");
    // 1 - 2^-40: truncation toward zero gives the largest value below 1
    a = 24'h3f0000; b = 24'h970000; check(24'h3effff, "1 - tiny");
    a = 24'h3f0000; b = 24'h170000; check(24'h3f0000, "1 + tiny");
    a = 24'h7fffff; b = 24'h7fffff; check(24'h7fffff, "overflow saturates");
    a = 24'h020000; b = 24'h81ffff; check(24'h000000, "underflow flushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
