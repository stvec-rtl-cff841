// tb_stencil1d: 1-D stencil kernels on the StVEC datapath at its default
// size (128 registers, 4 lanes, one-cycle register read).
//
// Kernels, each over NB aligned blocks of 4 single-precision points:
//   * the running example A[i] += B[i-1] * B[i], one stmulps with offset 3
//     (base = previous block of B, extension = current block);
//   * 1-D Jacobi with 2, 3, 5 and 7 points:
//       out[i] = sum over taps r of c_r * B[i+r]
//     with taps {-1,0}, {-1,0,1}, {-2..2} and {-3..3}. A tap r < 0 is an
//     StVEC multiply with offset 4+r on (previous, current) blocks, a tap
//     r > 0 one with offset r on (current, next) blocks; no unaligned load
//     and no shuffle is needed. The three input blocks are circulated with
//     register moves after each output block.
// Every stored block is compared with a reference computed in the same
// operation order with fp_ref_pkg. The datapath must take one instruction
// per cycle (no stall), and every offset 1..3 must occur.
module tb_stencil1d;
  import stvec_pkg::*;
  import fp_ref_pkg::*;

  localparam int NB = 32;          // output blocks per kernel
  localparam int NPTS = 4 * (NB + 2);

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  op_e          op;
  logic [1:0]   off;
  logic [6:0]   base, ext, dst;
  logic [127:0] ld;
  logic         valid, ready, st_valid;
  logic [127:0] st_data;

  stvec_vpu dut (
    .clk(clk), .rst_n(rst_n), .in_valid(valid), .in_ready(ready), .in_op(op),
    .in_offset(off), .in_base(base), .in_ext(ext), .in_dst(dst),
    .ld_data(ld), .st_valid(st_valid), .st_data(st_data)
  );

  // register names used by the kernels
  localparam int RP = 0, RC = 1, RN = 2, ACC = 8, TMP = 9, RA = 10, COEF = 16;

  logic [31:0]  B [NPTS];
  logic [31:0]  A [NPTS];
  logic [31:0]  c [7];             // c[r+3] is the weight of tap r
  logic [127:0] exp_q [$];
  int n_instr = 0, n_cycles = 0, n_stall = 0;
  int n_off [4];
  bit counting = 1'b0;

  always @(posedge clk) begin
    if (counting) n_cycles++;
    if (rst_n && valid && !ready) n_stall++;
    if (rst_n && st_valid) begin
      checks++;
      if (exp_q.size() == 0 || st_data !== exp_q[0]) begin
        failures++;
        $display("FAIL store: got %h expected %h", st_data, (exp_q.size() != 0) ? exp_q[0] : '0);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(op_e o, int of, int b, int e, int d, logic [127:0] ldv = '0);
    op = o; off = 2'(of); base = 7'(b); ext = 7'(e); dst = 7'(d); ld = ldv; valid = 1'b1;
    n_instr++;
    if (o inside {OP_MOV, OP_ADD, OP_SUB, OP_MUL}) n_off[of]++;
    do @(posedge clk); while (!ready);
    #1 valid = 1'b0;
  endtask

  function automatic logic [127:0] blk(ref logic [31:0] arr [NPTS], input int bidx);
    logic [127:0] v;
    for (int k = 0; k < 4; k++) v[k*32 +: 32] = arr[4*bidx + k];
    return v;
  endfunction

  // operand of tap r for output block v (lanes 4v .. 4v+3)
  task automatic tap_mul(int r);
    if (r < 0) issue(OP_MUL, 4 + r, RP, RC, TMP);
    else       issue(OP_MUL, r, RC, RN, TMP);
  endtask

  task automatic run_jacobi(int lo, int hi);
    int start;
    // coefficients, splat over the lanes
    for (int r = lo; r <= hi; r++) begin
      c[r+3] = {1'b0, 8'(123 + $urandom_range(2)), 23'($urandom)};
      issue(OP_LD, 0, 0, 0, COEF + r + 3, {4{c[r+3]}});
    end
    issue(OP_LD, 0, 0, 0, RP, blk(B, 0));
    issue(OP_LD, 0, 0, 0, RC, blk(B, 1));
    issue(OP_LD, 0, 0, 0, RN, blk(B, 2));
    start = n_instr;
    counting = 1'b1;
    for (int v = 1; v <= NB; v++) begin
      logic [127:0] e;
      // reference, same order: acc = B[i]*c0, then acc += c_r*B[i+r]
      for (int k = 0; k < 4; k++) begin
        int i;
        logic [31:0] acc;
        i = 4 * v + k;
        acc = f32_mul(B[i], c[3]);
        for (int r = lo; r <= hi; r++)
          if (r != 0) acc = f32_add(acc, f32_mul(B[i+r], c[r+3]));
        e[k*32 +: 32] = acc;
      end
      exp_q.push_back(e);
      // StVEC code
      issue(OP_MOV, 0, COEF + 3, 0, ACC);
      issue(OP_MUL, 0, RC, 0, ACC);
      for (int r = lo; r <= hi; r++) begin
        if (r == 0) continue;
        issue(OP_MOV, 0, COEF + r + 3, 0, TMP);
        tap_mul(r);
        issue(OP_ADD, 0, TMP, 0, ACC);
      end
      issue(OP_ST, 0, 0, 0, ACC);
      // circulate the buffers
      issue(OP_MOV, 0, RC, 0, RP);
      issue(OP_MOV, 0, RN, 0, RC);
      issue(OP_LD, 0, 0, 0, RN, blk(B, v + 2));
    end
    @(negedge clk);
    counting = 1'b0;
    checks++;
    if (n_cycles != n_instr - start) begin
      failures++;
      $display("FAIL %0d-point Jacobi took %0d cycles for %0d instructions", hi - lo + 1, n_cycles, n_instr - start);
    end
    $display("%0d-point Jacobi: %0d blocks, %0d instructions, %0d cycles", hi - lo + 1, NB, n_instr - start, n_cycles);
    n_cycles = 0;
  endtask

  task automatic run_example();
    issue(OP_LD, 0, 0, 0, RP, blk(B, 0));
    for (int v = 1; v <= NB; v++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) begin
        int i;
        i = 4 * v + k;
        e[k*32 +: 32] = f32_add(A[i], f32_mul(B[i-1], B[i]));
      end
      exp_q.push_back(e);
      issue(OP_LD, 0, 0, 0, RC, blk(B, v));
      issue(OP_MOV, 0, RC, 0, TMP);
      issue(OP_MUL, 3, RP, RC, TMP);          // stmulps $3, prev, cur, tmp
      issue(OP_LD, 0, 0, 0, RA, blk(A, v));
      issue(OP_ADD, 0, TMP, 0, RA);
      issue(OP_ST, 0, 0, 0, RA);
      issue(OP_MOV, 0, RC, 0, RP);
    end
  endtask

  initial begin
    rst_n = 1'b0; valid = 1'b0;
    op = OP_NOP; off = '0; base = '0; ext = '0; dst = '0; ld = '0;
    foreach (n_off[i]) n_off[i] = 0;
    for (int i = 0; i < NPTS; i++) begin
      B[i] = {1'b0, 8'(126 + $urandom_range(1)), 23'($urandom)};
      A[i] = {1'($urandom), 8'(124 + $urandom_range(4)), 23'($urandom)};
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    run_example();
    run_jacobi(-1, 0);
    run_jacobi(-1, 1);
    run_jacobi(-2, 2);
    run_jacobi(-3, 3);
    repeat (3) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never stored", exp_q.size());
    end
    checks++;
    if (n_stall != 0) begin
      failures++;
      $display("FAIL %0d stall cycles", n_stall);
    end
    $display("StVEC instructions: offset1=%0d offset2=%0d offset3=%0d; aligned=%0d", n_off[1], n_off[2], n_off[3], n_off[0]);
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (n_off[i] == 0) begin failures++; $display("FAIL offset %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
