// fpu_stage1_tb: self-checking test of the first FPU stage.
//
// Random source vectors are applied with every stage-1 result select: the
// per-lane product and sum are compared bit for bit with the truncated
// double reference, MIN/MAX/SLT/SGE with a real compare, MOV with source A,
// and the special function result (reciprocal of A.x) with its bound in
// all four lanes.
module fpu_stage1_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;
  vec4_t   a, b, r;
  s1_sel_e sel;
  cmp_op_e cmp_op;
  sf_op_e  sf_op;
  logic    sf_partial;
  int checks = 0, failures = 0;

  fpu_stage1 dut (.a(a), .b(b), .s1_sel(sel), .cmp_op(cmp_op), .sf_op(sf_op),
                  .sf_partial(sf_partial), .r(r));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp24_t expv;
    real   e;
    sf_op = SF_RCP;
    sf_partial = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NLANE; i++) begin
        a[i] = rnd(-10, 10);
        b[i] = rnd(-10, 10);
      end
      sel    = s1_sel_e'(n % 5);
      cmp_op = cmp_op_e'((n / 5) % 4);
      #1;
      for (int i = 0; i < NLANE; i++) begin
        checks++;
        if (sel == S1_SF) begin
          e = rel_err(r[i], 1.0 / to_real(a[0]));
          if (e > 1.0/32768.0) begin
            failures++;
            $display("FAIL SF lane %0d: %h for 1/%h", i, r[i], a[0]);
          end
        end else begin
          unique case (sel)
            S1_MUL:  expv = ref_mul(a[i], b[i]);
            S1_ADD:  expv = ref_add(a[i], b[i]);
            S1_MOVA: expv = a[i];
            default: begin
              unique case (cmp_op)
                CMP_MIN: expv = (to_real(a[i]) < to_real(b[i])) ? a[i] : b[i];
                CMP_MAX: expv = (to_real(a[i]) < to_real(b[i])) ? b[i] : a[i];
                CMP_SLT: expv = (to_real(a[i]) < to_real(b[i])) ? FP_ONE : FP_ZERO;
                CMP_SGE: expv = (to_real(a[i]) >= to_real(b[i])) ? FP_ONE : FP_ZERO;
              endcase
            end
          endcase
          if (r[i] !== expv) begin
            failures++;
            $display("FAIL %s lane %0d: a=%h b=%h r=%h expected %h", sel.name(), i, a[i],
                     b[i], r[i], expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
