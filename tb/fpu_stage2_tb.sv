// fpu_stage2_tb: self-checking test of the second FPU stage.
//
// Random stage-1 vectors, source C and B.w are applied under every stage-2
// operand select. MAD must add C lane by lane; DP3, DP4 and DPH must form
// s1.x+s1.y in lane 0 and s1.z+0, s1.z+s1.w or s1.z+B.w in lane 2, leaving
// lanes 1 and 3 as they were; bypass must pass all lanes unchanged. Every
// result is compared bit for bit with the truncated double reference.
module fpu_stage2_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;
  vec4_t   s1, c, r, expv;
  fp24_t   bw;
  s2_sel_e sel;
  int checks = 0, failures = 0;

  fpu_stage2 dut (.s1(s1), .c(c), .bw(bw), .s2_sel(sel), .r(r));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < NLANE; i++) begin
        s1[i] = rnd(-12, 12);
        c[i]  = rnd(-12, 12);
      end
      bw  = rnd(-12, 12);
      sel = s2_sel_e'(n % 5);
      expv = s1;
      unique case (sel)
        S2_SRCC: for (int i = 0; i < NLANE; i++) expv[i] = ref_add(s1[i], c[i]);
        S2_DP3:  begin expv[0] = ref_add(s1[0], s1[1]); expv[2] = s1[2]; end
        S2_DP4:  begin expv[0] = ref_add(s1[0], s1[1]); expv[2] = ref_add(s1[2], s1[3]); end
        S2_DPH:  begin expv[0] = ref_add(s1[0], s1[1]); expv[2] = ref_add(s1[2], bw); end
        default: ;
      endcase
      #1;
      for (int i = 0; i < NLANE; i++) begin
        checks++;
        if (r[i] !== expv[i]) begin
          failures++;
          $display("FAIL %s lane %0d: r=%h expected %h", sel.name(), i, r[i], expv[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
