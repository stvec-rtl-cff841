// tb_stvrf: self-checking testbench of the StVEC register file.
// Loads every register with distinct words through the write port, then
// checks the worked examples (base VR1, extension VR14, offsets 0..3) and
// random (offset, base, extension, src1) reads against the definition
//   src2 word k = base word (k+offset)        if k+offset < LANES
//               = extension word (k+offset-LANES) otherwise.
// Runs the default 4-bank file and an 8-bank, 256-register one.
module tb_stvrf;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- 128 x 128-bit, 4 banks ----------------
  logic [6:0]   s1a, base4, ext4, wa4;
  logic [1:0]   off4;
  logic [127:0] s1d4, s2d4, wd4;
  logic         we4;
  logic [31:0]  m4 [128][4];

  stvrf dut4 (
    .clk(clk), .src1_addr(s1a), .src1_data(s1d4),
    .src2_offset(off4), .src2_base(base4), .src2_ext(ext4), .src2_data(s2d4),
    .we(we4), .wr_addr(wa4), .wr_data(wd4)
  );

  // ---------------- 256 x 256-bit, 8 banks ----------------
  logic [7:0]   s1a8, base8, ext8, wa8;
  logic [2:0]   off8;
  logic [255:0] s1d8, s2d8, wd8;
  logic         we8;
  logic [31:0]  m8 [256][8];

  stvrf #(.NUM_REGS(256), .LANES(8)) dut8 (
    .clk(clk), .src1_addr(s1a8), .src1_data(s1d8),
    .src2_offset(off8), .src2_base(base8), .src2_ext(ext8), .src2_data(s2d8),
    .we(we8), .wr_addr(wa8), .wr_data(wd8)
  );

  function automatic logic [127:0] exp4(int off, int b, int e);
    logic [127:0] v;
    for (int k = 0; k < 4; k++)
      v[k*32 +: 32] = (k + off < 4) ? m4[b][k+off] : m4[e][k+off-4];
    return v;
  endfunction

  function automatic logic [255:0] exp8(int off, int b, int e);
    logic [255:0] v;
    for (int k = 0; k < 8; k++)
      v[k*32 +: 32] = (k + off < 8) ? m8[b][k+off] : m8[e][k+off-8];
    return v;
  endfunction

  initial begin
    we4 = 1'b0; we8 = 1'b0; s1a = '0; s1a8 = '0; off4 = '0; off8 = '0;
    base4 = '0; ext4 = '0; base8 = '0; ext8 = '0; wa4 = '0; wa8 = '0; wd4 = '0; wd8 = '0;
    @(negedge clk);
    for (int r = 0; r < 256; r++) begin
      // word j of register r is {r, j} in the top half, random below
      for (int j = 0; j < 8; j++) begin
        m8[r][j] = {8'(r), 8'(j), 16'($urandom)};
        wd8[j*32 +: 32] = m8[r][j];
      end
      we8 = 1'b1; wa8 = 8'(r);
      if (r < 128) begin
        for (int j = 0; j < 4; j++) begin
          m4[r][j] = {8'(r), 8'(j), 16'($urandom)};
          wd4[j*32 +: 32] = m4[r][j];
        end
        we4 = 1'b1; wa4 = 7'(r);
      end else begin
        we4 = 1'b0;
      end
      @(negedge clk);
    end
    we4 = 1'b0; we8 = 1'b0;

    // worked examples: base VR1, extension VR14
    base4 = 7'd1; ext4 = 7'd14;
    off4 = 2'd0; #1; check(256'(s2d4), 256'({m4[1][3], m4[1][2], m4[1][1], m4[1][0]}), "VR1 offset 0");
    off4 = 2'd1; #1; check(256'(s2d4), 256'({m4[14][0], m4[1][3], m4[1][2], m4[1][1]}), "VR1,VR14 offset 1");
    off4 = 2'd2; #1; check(256'(s2d4), 256'({m4[14][1], m4[14][0], m4[1][3], m4[1][2]}), "VR1,VR14 offset 2");
    off4 = 2'd3; #1; check(256'(s2d4), 256'({m4[14][2], m4[14][1], m4[14][0], m4[1][3]}), "VR1,VR14 offset 3");

    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      off4 = 2'($urandom); base4 = 7'($urandom); ext4 = 7'($urandom); s1a = 7'($urandom);
      off8 = 3'($urandom); base8 = 8'($urandom); ext8 = 8'($urandom); s1a8 = 8'($urandom);
      #1;
      check(256'(s2d4), 256'(exp4(int'(off4), int'(base4), int'(ext4))), "src2, 4 banks");
      check(256'(s1d4), 256'({m4[s1a][3], m4[s1a][2], m4[s1a][1], m4[s1a][0]}), "src1, 4 banks");
      check(s2d8, exp8(int'(off8), int'(base8), int'(ext8)), "src2, 8 banks");
      check(s1d8, exp8(0, int'(s1a8), 0), "src1, 8 banks");
      if (i % 7 == 0) begin
        // overwrite a register and read it back through src2 at offset 0
        we4 = 1'b1; wa4 = 7'($urandom);
        for (int j = 0; j < 4; j++) wd4[j*32 +: 32] = $urandom;
        @(negedge clk);
        for (int j = 0; j < 4; j++) m4[wa4][j] = wd4[j*32 +: 32];
        we4 = 1'b0; off4 = '0; base4 = wa4;
        #1;
        check(256'(s2d4), 256'(wd4), "written register");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
