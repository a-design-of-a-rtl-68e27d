// fpu3_top_tb: end-to-end test of the 3-stage FPU at its default parameters.
//
// A random instruction stream covering every opcode (P type, MAD, DP3, DP4,
// DPH and the special functions in both precisions) is issued, one
// instruction per clock when the input is valid, with random bubbles, NOP
// opcodes and stall cycles. A reference model computes each result
// independently with double arithmetic, truncated after every operation in
// the order the cascade performs it (products, then the stage-2 sums, then
// the final sum), and queues it with its tag. Each result leaving the FPU is
// checked against the queue head: tag, all four components (bit exact for
// arithmetic, within the error bound for special functions) and latency,
// which must be exactly 3 non-stalled clocks. Every opcode, a stall with
// instructions in flight, a bubble and a dot product directly followed by a
// P-type instruction must each occur at least once, or a failure is counted.
module fpu3_top_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;

  localparam int NINSTR = 4000;

  logic        clk = 1'b0;
  logic        rst, stall, in_valid;
  opcode_e     in_op;
  vec4_t       in_a, in_b, in_c;
  logic [7:0]  in_tag;
  logic        out_valid;
  logic [7:0]  out_tag;
  vec4_t       out_res;

  fpu3_top dut (.clk(clk), .rst(rst), .stall(stall), .in_valid(in_valid), .in_op(in_op),
                .in_a(in_a), .in_b(in_b), .in_c(in_c), .in_tag(in_tag),
                .out_valid(out_valid), .out_tag(out_tag), .out_res(out_res));

  always #5 clk = ~clk;

  typedef struct {
    opcode_e    op;
    logic [7:0] tag;
    vec4_t      res;
    real        sfv;       // special function reference value
    int         issued;    // non-stalled edge count at issue
  } exp_t;

  exp_t expq[$];
  int checks = 0, failures = 0;
  int edges = 0;           // clock edges with stall low
  int issued = 0, retired = 0;
  int op_count[32];
  int stall_inflight = 0, bubbles = 0, dp_then_p = 0;
  logic last_dp = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t model(opcode_e op, vec4_t a, vec4_t b, vec4_t c);
    exp_t  e;
    vec4_t m;
    fp24_t p0, p2, d;
    real   v;
    e.op  = op;
    e.sfv = 0.0;
    for (int i = 0; i < NLANE; i++) m[i] = ref_mul(a[i], b[i]);
    for (int i = 0; i < NLANE; i++) begin
      unique case (op)
        OP_MOV:  e.res[i] = a[i];
        OP_ADD:  e.res[i] = ref_add(a[i], b[i]);
        OP_MUL:  e.res[i] = m[i];
        OP_MAD:  e.res[i] = ref_add(m[i], c[i]);
        OP_MIN:  e.res[i] = (to_real(a[i]) < to_real(b[i])) ? a[i] : b[i];
        OP_MAX:  e.res[i] = (to_real(a[i]) < to_real(b[i])) ? b[i] : a[i];
        OP_SLT:  e.res[i] = (to_real(a[i]) < to_real(b[i])) ? FP_ONE : FP_ZERO;
        OP_SGE:  e.res[i] = (to_real(a[i]) >= to_real(b[i])) ? FP_ONE : FP_ZERO;
        default: e.res[i] = FP_ZERO;
      endcase
    end
    if (op == OP_DP3 || op == OP_DP4 || op == OP_DPH) begin
      p0 = ref_add(m[0], m[1]);
      p2 = (op == OP_DP3) ? m[2] : (op == OP_DP4) ? ref_add(m[2], m[3]) : ref_add(m[2], b[3]);
      d  = ref_add(p0, p2);
      for (int i = 0; i < NLANE; i++) e.res[i] = d;
    end
    v = to_real(a[0]);
    unique case (op)
      OP_RCP:          e.sfv = 1.0 / v;
      OP_RSQ:          e.sfv = 1.0 / $sqrt((v < 0.0) ? -v : v);
      OP_EXP, OP_EXPP: e.sfv = $pow(2.0, v);
      OP_LOG, OP_LOGP: e.sfv = $ln((v < 0.0) ? -v : v) / $ln(2.0);
      default: ;
    endcase
    return e;
  endfunction

  function automatic logic is_sf(opcode_e op);
    return op inside {OP_RCP, OP_RSQ, OP_EXP, OP_EXPP, OP_LOG, OP_LOGP};
  endfunction

  task automatic check_out();
    exp_t e;
    real  err, tol;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected result tag %0d", out_tag);
      return;
    end
    e = expq.pop_front();
    retired++;
    if (out_tag !== e.tag || edges - e.issued != 3) begin
      failures++;
      $display("FAIL tag %0d (expected %0d) latency %0d", out_tag, e.tag, edges - e.issued);
    end
    for (int i = 0; i < NLANE; i++) begin
      checks++;
      if (is_sf(e.op)) begin
        err = to_real(out_res[i]) - e.sfv;
        if (err < 0.0) err = -err;
        if (e.op inside {OP_LOG, OP_LOGP}) begin
          err = err - ((e.sfv < 0.0) ? -e.sfv : e.sfv) / 32768.0;
          tol = (e.op == OP_LOGP) ? 1.0/32.0 : 1.0/8192.0;
        end else begin
          err = err / ((e.sfv < 0.0) ? -e.sfv : e.sfv);
          tol = (e.op == OP_EXPP) ? 1.0/32.0 : (e.op == OP_EXP) ? 1.0/16384.0 : 1.0/32768.0;
        end
        if (err > tol) begin
          failures++;
          $display("FAIL %s lane %0d: %g expected %g", e.op.name(), i, to_real(out_res[i]), e.sfv);
        end
      end else if (out_res[i] !== e.res[i]) begin
        failures++;
        $display("FAIL %s tag %0d lane %0d: %h expected %h", e.op.name(), e.tag, i,
                 out_res[i], e.res[i]);
      end
    end
  endtask

  // drive on the falling edge, check on the rising edge
  initial begin
    opcode_e op;
    exp_t    e;
    rst = 1'b1; stall = 1'b0; in_valid = 1'b0; in_op = OP_NOP; in_tag = '0;
    for (int i = 0; i < NLANE; i++) begin in_a[i] = '0; in_b[i] = '0; in_c[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (issued < NINSTR) begin
      @(negedge clk);
      stall    = ($urandom_range(99) < 12);
      in_valid = ($urandom_range(99) < 85);
      op       = opcode_e'($urandom_range(17));
      if ($urandom_range(99) < 3) op = OP_NOP;
      in_op    = op;
      in_tag   = 8'(issued);
      for (int i = 0; i < NLANE; i++) begin
        in_a[i] = rnd(-6, 6);
        in_b[i] = rnd(-6, 6);
        in_c[i] = rnd(-6, 6);
      end
      if (op == OP_EXP || op == OP_EXPP) in_a[0] = rnd(-8, 4);
      if ($urandom_range(99) < 5) in_b[$urandom_range(3)] = in_a[0];   // equal compare inputs
      @(posedge clk);
      if (!stall) begin
        edges++;
        if (out_valid) check_out();
        if (in_valid && op != OP_NOP) begin
          e = model(op, in_a, in_b, in_c);
          e.tag = in_tag;
          e.issued = edges;
          expq.push_back(e);
          issued++;
          op_count[int'(op)]++;
          if (last_dp && !(op inside {OP_MAD, OP_DP3, OP_DP4, OP_DPH})) dp_then_p++;
          last_dp = op inside {OP_DP3, OP_DP4, OP_DPH};
        end else begin
          bubbles++;
          last_dp = 1'b0;
        end
      end else if (expq.size() > 0) begin
        stall_inflight++;
      end
    end
    // drain
    @(negedge clk);
    stall = 1'b0; in_valid = 1'b0;
    repeat (6) begin
      @(posedge clk);
      edges++;
      if (out_valid) check_out();
      @(negedge clk);
    end
    checks++;
    if (retired != issued || expq.size() != 0) begin
      failures++;
      $display("FAIL issued %0d retired %0d", issued, retired);
    end
    for (int o = 1; o <= 17; o++) begin
      checks++;
      $display("opcode %-5s executed %0d times", opcode_e'(o), op_count[o]);
      if (op_count[o] == 0) begin failures++; $display("FAIL opcode %0d never executed", o); end
    end
    $display("stall cycles with results in flight %0d, bubbles %0d, DP followed by P %0d",
             stall_inflight, bubbles, dp_then_p);
    checks += 3;
    if (stall_inflight == 0) failures++;
    if (bubbles == 0) failures++;
    if (dp_then_p == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
