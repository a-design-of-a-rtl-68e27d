// fpu3_shader_tb: the FPU running two vertex shader programs.
//
// A small in-order shader harness around fpu3_top holds a register file
// (v0-v1 inputs, c0-c15 constants, r0-r7 temporaries, oPos/oT0/oD0
// outputs), issues one instruction per clock with source negation and a
// destination write mask, and holds back an instruction whose source is
// still being computed (a read-after-write interlock, since every result
// takes 3 clocks). Two programs are run:
//   cartoon rendering : 4 x DP4 transform, DP3 N.L, MAX, MIN for the toon
//                       ramp coordinate, DP3 N.V, MAX, ADD for the colour,
//                       over 1197 vertices
//   sphere mapping    : 4 x DP4 transform, 3 x DP4 eye position, 3 x DP3
//                       eye normal, DP3, ADD, MAD for the reflection vector
//                       and MAD to map it into [0,1], over 21458 vertices
// The vertex counts are those of the two test models; the programs are
// written for this test from the instruction types each model is said to
// use. For every vertex the output registers are compared bit for bit with
// a sequential reference interpreter built on the truncating double
// reference. The clocks per vertex are reported.
module fpu3_shader_tb;
  import fp24_pkg::*;
  import fp24_ref_pkg::*;

  localparam int CARTOON_VERTICES = 1197;
  localparam int SPHERE_VERTICES  = 21458;

  localparam int V0 = 0, V1 = 1, C0 = 4, R0 = 20, OPOS = 28, OT0 = 29, OD0 = 30, NREG = 32;

  typedef struct packed {
    opcode_e    op;
    logic [4:0] dst;
    logic [3:0] mask;     // bit i writes component i
    logic [4:0] sa, sb, sc;
    logic       nega;
  } instr_t;

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

  vec4_t  regs [NREG];
  vec4_t  refr [NREG];
  int     pending [NREG];
  instr_t inflight [256];
  instr_t prog [$];
  int checks = 0, failures = 0;
  int interlocks = 0;

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(opcode_e op, int dst, logic [3:0] mask, int sa, int sb,
                                int sc = 0, logic nega = 1'b0);
    return '{op: op, dst: 5'(dst), mask: mask, sa: 5'(sa), sb: 5'(sb), sc: 5'(sc), nega: nega};
  endfunction

  function automatic vec4_t neg(vec4_t v);
    for (int i = 0; i < NLANE; i++) v[i][23] = ~v[i][23];
    return v;
  endfunction

  // sequential reference interpreter
  task automatic ref_exec(instr_t in);
    vec4_t a, b, c, r;
    fp24_t d;
    a = in.nega ? neg(refr[in.sa]) : refr[in.sa];
    b = refr[in.sb];
    c = refr[in.sc];
    for (int i = 0; i < NLANE; i++) begin
      unique case (in.op)
        OP_ADD: r[i] = ref_add(a[i], b[i]);
        OP_MUL: r[i] = ref_mul(a[i], b[i]);
        OP_MAD: r[i] = ref_add(ref_mul(a[i], b[i]), c[i]);
        OP_MIN: r[i] = (to_real(a[i]) < to_real(b[i])) ? a[i] : b[i];
        OP_MAX: r[i] = (to_real(a[i]) < to_real(b[i])) ? b[i] : a[i];
        default: r[i] = a[i];
      endcase
    end
    if (in.op inside {OP_DP3, OP_DP4}) begin
      d = ref_add(ref_add(ref_mul(a[0], b[0]), ref_mul(a[1], b[1])),
                  (in.op == OP_DP3) ? ref_mul(a[2], b[2])
                                    : ref_add(ref_mul(a[2], b[2]), ref_mul(a[3], b[3])));
      for (int i = 0; i < NLANE; i++) r[i] = d;
    end
    for (int i = 0; i < NLANE; i++) if (in.mask[i]) refr[in.dst][i] = r[i];
  endtask

  // retire results on every rising edge
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      instr_t w;
      w = inflight[out_tag];
      for (int i = 0; i < NLANE; i++) if (w.mask[i]) regs[w.dst][i] <= out_res[i];
      pending[w.dst] <= pending[w.dst] - 1;
    end
  end

  task automatic run_vertex(output int cycles);
    int pc, t0;
    instr_t in;
    pc = 0;
    t0 = $time / 10;
    while (pc < prog.size()) begin
      @(negedge clk);
      in = prog[pc];
      if (pending[in.sa] != 0 || pending[in.sb] != 0 ||
          (in.op == OP_MAD && pending[in.sc] != 0) || pending[in.dst] != 0) begin
        in_valid = 1'b0;
        interlocks++;
      end else begin
        in_valid = 1'b1;
        in_op    = in.op;
        in_a     = in.nega ? neg(regs[in.sa]) : regs[in.sa];
        in_b     = regs[in.sb];
        in_c     = regs[in.sc];
        in_tag   = 8'(pc);
        inflight[pc] = in;
        pending[in.dst] = pending[in.dst] + 1;
        pc++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    cycles = $time / 10 - t0;
  endtask

  task automatic run_program(string name, int nvert);
    int cycles, total;
    total = 0;
    for (int n = 0; n < nvert; n++) begin
      // vertex position (w = 1) and unit-range normal
      for (int i = 0; i < NLANE; i++) begin
        regs[V0][i] = (i == 3) ? FP_ONE : rnd(-3, 3);
        regs[V1][i] = (i == 3) ? FP_ZERO : rnd(-4, -1);
      end
      for (int r = R0; r < NREG; r++) for (int i = 0; i < NLANE; i++) regs[r][i] = FP_ZERO;
      refr = regs;
      foreach (prog[k]) ref_exec(prog[k]);
      run_vertex(cycles);
      total += cycles;
      foreach (regs[r]) begin
        checks++;
        if (regs[r] !== refr[r]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s vertex %0d register %0d: %h %h %h %h expected %h %h %h %h",
                     name, n, r, regs[r][0], regs[r][1], regs[r][2], regs[r][3],
                     refr[r][0], refr[r][1], refr[r][2], refr[r][3]);
        end
      end
    end
    $display("%s: %0d vertices, %0d instructions each, %0d clocks (%0.1f per vertex)",
             name, nvert, prog.size(), total, real'(total) / real'(nvert));
  endtask

  initial begin
    rst = 1'b1; stall = 1'b0; in_valid = 1'b0; in_op = OP_NOP; in_tag = '0;
    for (int i = 0; i < NLANE; i++) begin in_a[i] = '0; in_b[i] = '0; in_c[i] = '0; end
    foreach (pending[r]) pending[r] = 0;
    foreach (regs[r]) for (int i = 0; i < NLANE; i++) regs[r][i] = FP_ZERO;
    // constants: matrices c0-c3 and c9-c14, light c4, zero c5, one c6,
    // view c7, ambient c8, one half c15
    for (int k = 0; k < 16; k++)
      for (int i = 0; i < NLANE; i++) regs[C0 + k][i] = rnd(-3, 1);
    for (int i = 0; i < NLANE; i++) begin
      regs[C0 + 5][i]  = FP_ZERO;
      regs[C0 + 6][i]  = FP_ONE;
      regs[C0 + 15][i] = 24'h3e0000;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // cartoon rendering
    for (int k = 0; k < 4; k++) prog.push_back(mk(OP_DP4, OPOS, 4'(1 << k), V0, C0 + k));
    prog.push_back(mk(OP_DP3, R0,     4'hf, V1, C0 + 4));
    prog.push_back(mk(OP_MAX, R0,     4'hf, R0, C0 + 5));
    prog.push_back(mk(OP_MIN, OT0,    4'h1, R0, C0 + 6));
    prog.push_back(mk(OP_DP3, R0 + 1, 4'hf, V1, C0 + 7));
    prog.push_back(mk(OP_MAX, R0 + 1, 4'hf, R0 + 1, C0 + 5));
    prog.push_back(mk(OP_ADD, OD0,    4'hf, R0 + 1, C0 + 8));
    run_program("cartoon rendering", CARTOON_VERTICES);

    // sphere mapping
    prog.delete();
    for (int k = 0; k < 4; k++) prog.push_back(mk(OP_DP4, OPOS, 4'(1 << k), V0, C0 + k));
    for (int k = 0; k < 3; k++) prog.push_back(mk(OP_DP4, R0,     4'(1 << k), V0, C0 + 9 + k));
    for (int k = 0; k < 3; k++) prog.push_back(mk(OP_DP3, R0 + 1, 4'(1 << k), V1, C0 + 12 + k));
    prog.push_back(mk(OP_DP3, R0 + 2, 4'hf, R0 + 1, R0));
    prog.push_back(mk(OP_ADD, R0 + 2, 4'hf, R0 + 2, R0 + 2));
    prog.push_back(mk(OP_MAD, R0 + 3, 4'hf, R0 + 1, R0 + 2, R0, 1'b1));
    prog.push_back(mk(OP_MAD, OT0,    4'h3, R0 + 3, C0 + 15, C0 + 15));
    run_program("sphere mapping", SPHERE_VERTICES);

    checks++;
    if (interlocks == 0) failures++;
    $display("read-after-write interlock cycles: %0d", interlocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
