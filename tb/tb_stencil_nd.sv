// tb_stencil_nd: 2-D and 3-D stencil kernels on the StVEC datapath at its
// default size.
//
// Kernels (weights random, one per tap):
//   * 2-D Jacobi, 5 points  (centre and the four face neighbours),
//   * 2-D Jacobi, 9 points  (the 3 x 3 box),
//   * 3-D Jacobi, 27 points (the 3 x 3 x 3 box),
//   * 3-D heat, 7 points    (centre and the six face neighbours).
// The grid is stored row by row with x as the unit-stride dimension; a row
// holds NBX + 2 aligned blocks of 4 points. For each output block the
// testbench loads, for every row (dz, dy) the kernel touches, the previous,
// current and next block with aligned loads. A tap with dx = -1 is then an
// StVEC multiply with offset 3 on (previous, current), dx = +1 one with
// offset 1 on (current, next), dx = 0 an aligned multiply. Neighbours in y
// and z are plain aligned blocks. Results are compared with a reference in
// the same operation order; the datapath must not stall.
module tb_stencil_nd;
  import stvec_pkg::*;
  import fp_ref_pkg::*;

  localparam int NBX = 4;                  // output blocks per row
  localparam int NX  = 4 * (NBX + 2);
  localparam int NY  = 5;
  localparam int NZ  = 4;

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

  localparam int ACC = 8, TMP = 9, COEF = 10, ROWS = 40;

  logic [31:0]  G [NZ][NY][NX];
  logic [127:0] exp_q [$];
  int n_stall = 0, n_instr = 0, n_cycles = 0;
  int n_off [4];
  bit counting = 1'b0;

  // tap list of the current kernel
  int          ntap;
  int          tdz [27], tdy [27], tdx [27];
  logic [31:0] tw [27];

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
    repeat (200000) @(posedge clk);
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

  function automatic logic [127:0] gblk(int z, int y, int bx);
    logic [127:0] v;
    for (int k = 0; k < 4; k++) v[k*32 +: 32] = G[z][y][4*bx + k];
    return v;
  endfunction

  // register holding block (dx = -1, 0, +1) of row (dz, dy)
  function automatic int row_reg(int dz, int dy, int dx);
    return ROWS + 3 * ((dz + 1) * 3 + (dy + 1)) + (dx + 1);
  endfunction

  task automatic tap_mul(int t, int d);
    int dz, dy, dx;
    dz = tdz[t]; dy = tdy[t]; dx = tdx[t];
    if (dx < 0)      issue(OP_MUL, 3, row_reg(dz, dy, -1), row_reg(dz, dy, 0), d);
    else if (dx > 0) issue(OP_MUL, 1, row_reg(dz, dy, 0), row_reg(dz, dy, 1), d);
    else             issue(OP_MUL, 0, row_reg(dz, dy, 0), 0, d);
  endtask

  task automatic add_tap(int dz, int dy, int dx);
    tdz[ntap] = dz; tdy[ntap] = dy; tdx[ntap] = dx;
    tw[ntap] = {1'b0, 8'(122 + $urandom_range(3)), 23'($urandom)};
    ntap++;
  endtask

  task automatic run_kernel(string name, bit three_d);
    int start, zlo, zhi;
    bit used [3][3];
    foreach (used[i, j]) used[i][j] = 1'b0;
    for (int t = 0; t < ntap; t++) begin
      used[tdz[t]+1][tdy[t]+1] = 1'b1;
      issue(OP_LD, 0, 0, 0, COEF + t, {4{tw[t]}});
    end
    zlo = three_d ? 1 : 0;
    zhi = three_d ? NZ - 2 : 0;
    start = n_instr;
    counting = 1'b1;
    for (int z = zlo; z <= zhi; z++) begin
      for (int y = 1; y < NY - 1; y++) begin
        for (int bx = 1; bx <= NBX; bx++) begin
          logic [127:0] e;
          for (int k = 0; k < 4; k++) begin
            logic [31:0] acc;
            int x;
            x = 4 * bx + k;
            acc = f32_mul(G[z+tdz[0]][y+tdy[0]][x+tdx[0]], tw[0]);
            for (int t = 1; t < ntap; t++)
              acc = f32_add(acc, f32_mul(G[z+tdz[t]][y+tdy[t]][x+tdx[t]], tw[t]));
            e[k*32 +: 32] = acc;
          end
          exp_q.push_back(e);
          // aligned loads of the blocks this output needs
          for (int dz = -1; dz <= 1; dz++)
            for (int dy = -1; dy <= 1; dy++)
              if (used[dz+1][dy+1])
                for (int dx = -1; dx <= 1; dx++)
                  issue(OP_LD, 0, 0, 0, row_reg(dz, dy, dx), gblk(z + dz, y + dy, bx + dx));
          issue(OP_MOV, 0, COEF, 0, ACC);
          tap_mul(0, ACC);
          for (int t = 1; t < ntap; t++) begin
            issue(OP_MOV, 0, COEF + t, 0, TMP);
            tap_mul(t, TMP);
            issue(OP_ADD, 0, TMP, 0, ACC);
          end
          issue(OP_ST, 0, 0, 0, ACC);
        end
      end
    end
    @(negedge clk);
    counting = 1'b0;
    checks++;
    if (n_cycles != n_instr - start) begin
      failures++;
      $display("FAIL %s: %0d cycles for %0d instructions", name, n_cycles, n_instr - start);
    end
    $display("%s: %0d taps, %0d instructions, %0d cycles", name, ntap, n_instr - start, n_cycles);
    n_cycles = 0;
  endtask

  initial begin
    rst_n = 1'b0; valid = 1'b0;
    op = OP_NOP; off = '0; base = '0; ext = '0; dst = '0; ld = '0;
    foreach (n_off[i]) n_off[i] = 0;
    foreach (G[z, y, x]) G[z][y][x] = {1'b0, 8'(126 + $urandom_range(1)), 23'($urandom)};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    ntap = 0;
    add_tap(0, 0, 0); add_tap(0, -1, 0); add_tap(0, 1, 0); add_tap(0, 0, -1); add_tap(0, 0, 1);
    run_kernel("2-D Jacobi 5-point", 1'b0);

    ntap = 0;
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) add_tap(0, dy, dx);
    run_kernel("2-D Jacobi 9-point", 1'b0);

    ntap = 0;
    for (int dz = -1; dz <= 1; dz++) for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
      add_tap(dz, dy, dx);
    run_kernel("3-D Jacobi 27-point", 1'b1);

    ntap = 0;
    add_tap(0, 0, 0); add_tap(-1, 0, 0); add_tap(1, 0, 0); add_tap(0, -1, 0); add_tap(0, 1, 0);
    add_tap(0, 0, -1); add_tap(0, 0, 1);
    run_kernel("3-D heat 7-point", 1'b1);

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
    $display("StVEC instructions: offset1=%0d offset3=%0d; aligned=%0d", n_off[1], n_off[3], n_off[0]);
    checks++;
    if (n_off[1] == 0 || n_off[3] == 0) begin failures++; $display("FAIL an offset was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
