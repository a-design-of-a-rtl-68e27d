// fpu_decode_tb: self-checking test of the instruction decoder.
//
// Every opcode value (and the invalid ones) is decoded with the valid input
// high and low, and each control field is compared with a table written
// from the instruction definitions: which unit feeds stage 1, which operand
// the stage-2 adders take, whether stage 3 sums, and which special function
// and precision are used.
module fpu_decode_tb;
  import fp24_pkg::*;
  logic    valid;
  opcode_e op;
  ctrl_t   ctrl, expv;
  int checks = 0, failures = 0;

  fpu_decode dut (.valid(valid), .op(op), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t model(logic v, logic [4:0] o);
    ctrl_t c;
    c = '{valid: v, s1_sel: S1_MOVA, cmp_op: CMP_MIN, sf_op: SF_RCP, sf_partial: 1'b0,
          s2_sel: S2_BYPASS, s3_dp: 1'b0};
    case (o)
      5'd1:  ;                                                        // MOV
      5'd2:  c.s1_sel = S1_ADD;
      5'd3:  c.s1_sel = S1_MUL;
      5'd4:  begin c.s1_sel = S1_MUL; c.s2_sel = S2_SRCC; end         // MAD
      5'd5:  begin c.s1_sel = S1_MUL; c.s2_sel = S2_DP3; c.s3_dp = 1; end
      5'd6:  begin c.s1_sel = S1_MUL; c.s2_sel = S2_DP4; c.s3_dp = 1; end
      5'd7:  begin c.s1_sel = S1_MUL; c.s2_sel = S2_DPH; c.s3_dp = 1; end
      5'd8:  begin c.s1_sel = S1_CMP; c.cmp_op = CMP_MIN; end
      5'd9:  begin c.s1_sel = S1_CMP; c.cmp_op = CMP_MAX; end
      5'd10: begin c.s1_sel = S1_CMP; c.cmp_op = CMP_SLT; end
      5'd11: begin c.s1_sel = S1_CMP; c.cmp_op = CMP_SGE; end
      5'd12: begin c.s1_sel = S1_SF; c.sf_op = SF_RCP; end
      5'd13: begin c.s1_sel = S1_SF; c.sf_op = SF_RSQ; end
      5'd14: begin c.s1_sel = S1_SF; c.sf_op = SF_EXP; end
      5'd15: begin c.s1_sel = S1_SF; c.sf_op = SF_EXP; c.sf_partial = 1; end
      5'd16: begin c.s1_sel = S1_SF; c.sf_op = SF_LOG; end
      5'd17: begin c.s1_sel = S1_SF; c.sf_op = SF_LOG; c.sf_partial = 1; end
      default: c.valid = 1'b0;                                        // NOP, unused
    endcase
    return c;
  endfunction

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int o = 0; o < 32; o++) begin
        valid = 1'(v);
        op    = opcode_e'(o);
        #1;
        expv = model(1'(v), 5'(o));
        checks++;
        if (ctrl.valid !== expv.valid || (expv.valid && ctrl !== expv)) begin
          failures++;
          $display("FAIL op %0d valid %0d: ctrl=%h expected %h", o, v, ctrl, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
