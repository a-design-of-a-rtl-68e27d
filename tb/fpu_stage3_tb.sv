// fpu_stage3_tb: self-checking test of the third FPU stage.
//
// With dp set, all four outputs must equal the truncated sum of input lanes
// 0 and 2; with dp clear, the inputs must pass unchanged.
module fpu_stage3_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;
  vec4_t s2, r;
  logic  dp;
  int checks = 0, failures = 0;

  fpu_stage3 dut (.s2(s2), .dp(dp), .r(r));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp24_t expv;
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < NLANE; i++) s2[i] = rnd(-12, 12);
      dp = 1'(n % 2);
      #1;
      for (int i = 0; i < NLANE; i++) begin
        expv = dp ? ref_add(s2[0], s2[2]) : s2[i];
        checks++;
        if (r[i] !== expv) begin
          failures++;
          $display("FAIL dp=%0d lane %0d: r=%h expected %h", dp, i, r[i], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
