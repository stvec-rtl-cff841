// tb_vra: self-checking testbench of the vector register adjustment.
// Checks the worked example (bank outputs D,A,B,C with offset 1 give
// operand words A,B,C,D) and random data at every offset for 4 and 8 lanes.
module tb_vra;
  int checks = 0, failures = 0;

  logic [1:0]  off4;
  logic [2:0]  off8;
  logic [31:0] in4 [4], out4 [4];
  logic [31:0] in8 [8], out8 [8];

  vra #(.LANES(4), .LANE_W(32)) dut4 (.offset(off4), .bank_data(in4), .operand(out4));
  vra #(.LANES(8), .LANE_W(32)) dut8 (.offset(off8), .bank_data(in8), .operand(out8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // banks 3..0 hold C, B, A, D; offset 1
    in4[3] = 32'hC; in4[2] = 32'hB; in4[1] = 32'hA; in4[0] = 32'hD; off4 = 2'd1;
    off8 = '0;
    foreach (in8[k]) in8[k] = '0;
    #1;
    check(out4[0], 32'hA, "example w0");
    check(out4[1], 32'hB, "example w1");
    check(out4[2], 32'hC, "example w2");
    check(out4[3], 32'hD, "example w3");
    for (int i = 0; i < 200; i++) begin
      foreach (in4[k]) in4[k] = $urandom;
      foreach (in8[k]) in8[k] = $urandom;
      off4 = 2'($urandom); off8 = 3'($urandom);
      #1;
      for (int k = 0; k < 4; k++) check(out4[k], in4[(k + int'(off4)) % 4], "4 lanes");
      for (int k = 0; k < 8; k++) check(out8[k], in8[(k + int'(off8)) % 8], "8 lanes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
