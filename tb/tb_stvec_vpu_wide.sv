// tb_stvec_vpu_wide: the end-to-end test of tb_stvec_vpu at the size of a
// 256-bit register file: 256 registers of 8 x 32-bit lanes, 8 banks, offsets
// 0..7. The same random instruction stream runs through the one-cycle and
// the two-cycle (READ_CYCLES = 2) datapath and every store is compared with
// the instruction-level model, whose StVEC operand is
//   src2 word k = base word (k+offset)      if k+offset < 8
//               = extension word (k+offset-8) otherwise.
// The stall count of the two-cycle datapath must equal the number of
// instructions with a non-zero offset; every offset must occur.
module tb_stvec_vpu_wide;
  import stvec_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned NR = 256;
  localparam int unsigned L  = 8;
  localparam int unsigned VW = 32 * L;
  localparam int unsigned AW = $clog2(NR);
  localparam int unsigned OW = $clog2(L);
  localparam int NUM_INSTR   = 6000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // shared instruction fields, per-DUT valid
  op_e          op;
  logic [OW-1:0] off;
  logic [AW-1:0] base, ext, dst;
  logic [VW-1:0] ld;
  logic         v1, v2, r1, r2, sv1, sv2;
  logic [VW-1:0] sd1, sd2;

  stvec_vpu #(.NUM_REGS(NR), .LANES(L)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_ready(r1), .in_op(op),
    .in_offset(off), .in_base(base), .in_ext(ext), .in_dst(dst),
    .ld_data(ld), .st_valid(sv1), .st_data(sd1)
  );

  stvec_vpu #(.NUM_REGS(NR), .LANES(L), .READ_CYCLES(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .in_ready(r2), .in_op(op),
    .in_offset(off), .in_base(base), .in_ext(ext), .in_dst(dst),
    .ld_data(ld), .st_valid(sv2), .st_data(sd2)
  );

  // instruction-level model
  logic [31:0]  regs [NR][L];
  logic [VW-1:0] exp_q1 [$], exp_q2 [$];

  function automatic logic [VW-1:0] model_vec(int r);
    logic [VW-1:0] v;
    for (int k = 0; k < L; k++) v[k*32 +: 32] = regs[r][k];
    return v;
  endfunction

  function automatic logic [31:0] model_src2(int o, int b, int e, int k);
    return (k + o < L) ? regs[b][k+o] : regs[e][k+o-L];
  endfunction

  function automatic void model_exec(op_e o, int of, int b, int e, int d, logic [VW-1:0] ldv);
    logic [31:0] res [L];
    for (int k = 0; k < L; k++) begin
      logic [31:0] s2, s1;
      s2 = model_src2(of, b, e, k);
      s1 = regs[d][k];
      unique case (o)
        OP_LD:   res[k] = ldv[k*32 +: 32];
        OP_MOV:  res[k] = s2;
        OP_ADD:  res[k] = f32_add(s1, s2);
        OP_SUB:  res[k] = f32_sub(s1, s2);
        OP_MUL:  res[k] = f32_mul(s2, s1);
        default: res[k] = s1;
      endcase
    end
    if (o == OP_ST) begin
      exp_q1.push_back(model_vec(d));
      exp_q2.push_back(model_vec(d));
    end
    for (int k = 0; k < L; k++) regs[d][k] = res[k];
  endfunction

  // store monitors
  always @(posedge clk) begin
    if (rst_n && sv1) begin
      checks++;
      if (exp_q1.size() == 0 || sd1 !== exp_q1[0]) begin
        failures++;
        $display("FAIL dut1 store: got %h expected %h", sd1, (exp_q1.size() != 0) ? exp_q1[0] : '0);
      end
      if (exp_q1.size() != 0) void'(exp_q1.pop_front());
    end
    if (rst_n && sv2) begin
      checks++;
      if (exp_q2.size() == 0 || sd2 !== exp_q2[0]) begin
        failures++;
        $display("FAIL dut2 store: got %h expected %h", sd2, (exp_q2.size() != 0) ? exp_q2[0] : '0);
      end
      if (exp_q2.size() != 0) void'(exp_q2.pop_front());
    end
  end

  // counters
  int n_off [L];
  int n_op [8];
  int n_dep = 0, stall1 = 0, stall2 = 0, n_slow = 0;

  always @(posedge clk) begin
    if (rst_n && v1 && !r1) stall1++;
    if (rst_n && v2 && !r2) stall2++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [VW-1:0] rand_vec();
    logic [VW-1:0] v;
    for (int k = 0; k < L; k++) v[k*32 +: 32] = rand_f32(122, 132);
    return v;
  endfunction

  function automatic int rand_reg();
    return ($urandom_range(7) == 0) ? int'($urandom_range(NR - 1, NR - 8)) : int'($urandom_range(11));
  endfunction

  // issue one instruction to both DUTs, wait until both have taken it
  task automatic issue(op_e o, int of, int b, int e, int d, logic [VW-1:0] ldv);
    bit a1, a2;
    op = o; off = OW'(of); base = AW'(b); ext = AW'(e); dst = AW'(d); ld = ldv;
    v1 = 1'b1; v2 = 1'b1;
    a1 = 1'b0; a2 = 1'b0;
    model_exec(o, of, b, e, d, ldv);
    n_op[int'(o)]++;
    if (o inside {OP_MOV, OP_ADD, OP_SUB, OP_MUL}) begin
      n_off[of]++;
      if (of != 0) n_slow++;
    end
    while (!(a1 && a2)) begin
      @(posedge clk);
      if (v1 && r1) a1 = 1'b1;
      if (v2 && r2) a2 = 1'b1;
      #1;
      v1 = !a1; v2 = !a2;
    end
  endtask

  int prev_dst = -1;

  initial begin
    rst_n = 1'b0; v1 = 1'b0; v2 = 1'b0;
    op = OP_NOP; off = '0; base = '0; ext = '0; dst = '0; ld = '0;
    foreach (n_off[i]) n_off[i] = 0;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // load every register the stream uses
    for (int r = 0; r < 12; r++) issue(OP_LD, 0, 0, 0, r, rand_vec());
    for (int r = NR - 8; r < NR; r++) issue(OP_LD, 0, 0, 0, r, rand_vec());

    for (int i = 0; i < NUM_INSTR; i++) begin
      int sel, of, b, e, d;
      op_e o;
      sel = int'($urandom_range(99));
      if (sel < 12)      o = OP_LD;
      else if (sel < 24) o = OP_ST;
      else if (sel < 30) o = OP_NOP;
      else               o = op_e'(3 + (sel % 4));
      of = int'($urandom_range(L - 1));
      b = rand_reg(); e = rand_reg(); d = rand_reg();
      // often read the previous destination right away
      if (prev_dst >= 0 && $urandom_range(2) == 0) begin
        if ($urandom_range(1) != 0) b = prev_dst; else e = prev_dst;
        if (of == 0) b = prev_dst;
        n_dep++;
      end
      issue(o, (o inside {OP_MOV, OP_ADD, OP_SUB, OP_MUL}) ? of : 0, b, e, d, rand_vec());
      prev_dst = (o inside {OP_LD, OP_MOV, OP_ADD, OP_SUB, OP_MUL}) ? d : -1;
      // keep magnitudes bounded: reload a register now and then
      if (i % 4 == 0) issue(OP_LD, 0, 0, 0, rand_reg(), rand_vec());
    end

    // final state of every register used
    for (int r = 0; r < 12; r++) issue(OP_ST, 0, 0, 0, r, '0);
    for (int r = NR - 8; r < NR; r++) issue(OP_ST, 0, 0, 0, r, '0);
    v1 = 1'b0; v2 = 1'b0;
    repeat (3) @(posedge clk);

    checks++;
    if (exp_q1.size() != 0 || exp_q2.size() != 0) begin
      failures++;
      $display("FAIL stores missing: %0d / %0d", exp_q1.size(), exp_q2.size());
    end
    checks++;
    if (stall1 != 0) begin
      failures++;
      $display("FAIL dut1 stalled %0d cycles, expected none", stall1);
    end
    checks++;
    if (stall2 != n_slow) begin
      failures++;
      $display("FAIL dut2 stalled %0d cycles, expected %0d (one per StVEC instruction)", stall2, n_slow);
    end

    for (int i = 0; i < L; i++) $display("mechanisms: offset%0d=%0d", i, n_off[i]);
    $display("mechanisms: ld=%0d st=%0d mov=%0d add=%0d sub=%0d mul=%0d dependent=%0d stall_cycles=%0d",
             n_op[OP_LD], n_op[OP_ST], n_op[OP_MOV], n_op[OP_ADD], n_op[OP_SUB], n_op[OP_MUL], n_dep, stall2);
    for (int i = 0; i < L; i++) begin
      checks++;
      if (n_off[i] == 0) begin failures++; $display("FAIL offset %0d never used", i); end
    end
    foreach (n_op[i]) begin
      if (i inside {[1:6]}) begin
        checks++;
        if (n_op[i] == 0) begin failures++; $display("FAIL op %0d never used", i); end
      end
    end
    checks++;
    if (n_dep == 0 || stall2 == 0) begin failures++; $display("FAIL no dependent issue or no stall"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
