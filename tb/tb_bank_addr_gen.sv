// tb_bank_addr_gen: self-checking testbench of the per-bank address logic.
// Checks the worked example (offset 1, base 1, extension 2: R0 = 2,
// R1..R3 = 1) and every offset with random base/extension for 4 and 8 banks.
module tb_bank_addr_gen;
  localparam int unsigned AW = 7;
  int checks = 0, failures = 0;

  logic [1:0]    off4;
  logic [2:0]    off8;
  logic [AW-1:0] base, ext;
  logic [AW-1:0] a4 [4];
  logic [AW-1:0] a8 [8];

  bank_addr_gen #(.LANES(4), .AW(AW)) dut4 (.offset(off4), .base(base), .ext(ext), .bank_addr(a4));
  bank_addr_gen #(.LANES(8), .AW(AW)) dut8 (.offset(off8), .base(base), .ext(ext), .bank_addr(a8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [AW-1:0] got, logic [AW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    off4 = 2'd1; off8 = '0; base = 7'd1; ext = 7'd2;
    #1;
    check(a4[0], 7'd2, "example R0");
    check(a4[1], 7'd1, "example R1");
    check(a4[2], 7'd1, "example R2");
    check(a4[3], 7'd1, "example R3");
    for (int i = 0; i < 200; i++) begin
      off4 = 2'($urandom); off8 = 3'($urandom);
      base = AW'($urandom); ext = AW'($urandom);
      #1;
      // the lowest `offset` banks hold the extension's words
      for (int j = 0; j < 4; j++) check(a4[j], (j < int'(off4)) ? ext : base, "4 banks");
      for (int j = 0; j < 8; j++) check(a8[j], (j < int'(off8)) ? ext : base, "8 banks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
