// tb_simd_fu: self-checking testbench of the packed-single execution unit.
// Random operands for MOV, ADD, SUB, MUL against the double-precision
// reference of fp_ref_pkg, plus hand-worked special cases (exact products,
// cancellation to +0, overflow to infinity, underflow flush, inf - inf, NaN).
module tb_simd_fu;
  import stvec_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  op_e          op;
  logic [127:0] a, b, y;

  simd_fu dut (.op(op), .src1(b), .src2(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (a=%h b=%h)", what, got, exp, a[31:0], b[31:0]);
    end
  endtask

  // one special case in lane 0 (other lanes copy it)
  task automatic special(op_e o, logic [31:0] s2, logic [31:0] s1, logic [31:0] exp, string what);
    op = o; a = {4{s2}}; b = {4{s1}};
    #1;
    for (int k = 0; k < 4; k++) check(y[k*32 +: 32], exp, what);
  endtask

  initial begin
    // hand-worked values
    special(OP_MUL, 32'h3FC0_0000, 32'h4050_0000, 32'h409C_0000, "1.5*3.25=4.875");
    special(OP_ADD, 32'h3F80_0000, 32'h4000_0000, 32'h4040_0000, "1+2=3");
    special(OP_SUB, 32'h3F80_0000, 32'h4000_0000, 32'h3F80_0000, "2-1=1");
    special(OP_SUB, 32'h4049_0FDB, 32'h4049_0FDB, 32'h0000_0000, "x-x=+0");
    special(OP_ADD, 32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000, "1+2^-24 ties to even");
    special(OP_ADD, 32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002, "1+ulp+2^-24 ties to even (up)");
    special(OP_MUL, 32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000, "overflow to inf");
    special(OP_MUL, 32'h0080_0000, 32'h3F00_0000, 32'h0000_0000, "underflow flush");
    special(OP_MUL, 32'h7F80_0000, 32'h0000_0000, F32_QNAN, "inf*0");
    special(OP_SUB, 32'h7F80_0000, 32'h7F80_0000, F32_QNAN, "inf-inf");
    special(OP_ADD, 32'h7FC0_1234, 32'h3F80_0000, F32_QNAN, "nan+1");
    special(OP_MUL, 32'hC000_0000, 32'h7F80_0000, 32'hFF80_0000, "-2*inf");
    special(OP_MOV, 32'h1234_5678, 32'h0000_0000, 32'h1234_5678, "mov");
    special(OP_NOP, 32'h1234_5678, 32'h8765_4321, 32'h8765_4321, "nop keeps src1");

    for (int i = 0; i < 4000; i++) begin
      for (int k = 0; k < 4; k++) begin
        a[k*32 +: 32] = rand_f32(110, 140);
        b[k*32 +: 32] = rand_f32(110, 140);
      end
      // sometimes make lanes nearly cancel
      if (i % 5 == 0) b[31:0] = {~a[31], a[30:23], a[22:0] ^ 23'($urandom_range(7))};
      op = op_e'(3 + (i % 4));
      #1;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] s2, s1, e;
        s2 = a[k*32 +: 32];
        s1 = b[k*32 +: 32];
        unique case (op)
          OP_MOV:  e = s2;
          OP_ADD:  e = f32_add(s1, s2);
          OP_SUB:  e = f32_sub(s1, s2);
          default: e = f32_mul(s2, s1);
        endcase
        check(y[k*32 +: 32], e, op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
