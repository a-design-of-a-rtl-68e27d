// fp24_setcmp_tb: self-checking test of the setting and comparison logic.
//
// MIN, MAX, SLT and SGE of random operand pairs (including equal values,
// opposite signs and signed zeros) are compared with a compare of the
// operands' real values.
module fp24_setcmp_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;
  logic [23:0] a, b, y;
  cmp_op_e     op;
  int checks = 0, failures = 0;

  fp24_setcmp dut (.a(a), .b(b), .op(op), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] expv;
    real ra, rb;
    for (int n = 0; n < 8000; n++) begin
      a = rnd(-3, 3);
      b = rnd(-3, 3);
      case (n % 5)
        0: b = a;
        1: b = {~a[23], a[22:0]};
        2: a = {1'($urandom), 23'h0};
        3: b[22:16] = a[22:16];
        default: ;
      endcase
      op = cmp_op_e'(n % 4);
      ra = to_real(a);
      rb = to_real(b);
      case (op)
        CMP_MIN: expv = (ra < rb) ? a : b;
        CMP_MAX: expv = (ra < rb) ? b : a;
        CMP_SLT: expv = (ra < rb) ? 24'h3f0000 : 24'h000000;
        CMP_SGE: expv = (ra >= rb) ? 24'h3f0000 : 24'h000000;
      endcase
      #1;
      checks++;
      if (y !== expv) begin
        failures++;
        $display("FAIL op %s a=%h b=%h y=%h expected %h", op.name(), a, b, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
