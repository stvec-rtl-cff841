// tb_stvrf_bank: self-checking testbench of one register-file bank.
// Fills every register through the write port, then reads both read ports
// at random addresses and compares with a model array; also checks that a
// read in the cycle of a write still returns the old word.
module tb_stvrf_bank;
  localparam int unsigned NUM_REGS = 128;
  localparam int unsigned W = 32;
  localparam int unsigned AW = $clog2(NUM_REGS);

  logic clk = 1'b0;
  logic [AW-1:0] ra, rb, wa;
  logic [W-1:0]  da, db, wd;
  logic          we;
  logic [W-1:0]  model [NUM_REGS];
  int checks = 0, failures = 0;

  stvrf_bank #(.NUM_REGS(NUM_REGS), .LANE_W(W)) dut (
    .clk(clk), .rd_a_addr(ra), .rd_a_data(da), .rd_b_addr(rb), .rd_b_data(db),
    .we(we), .wr_addr(wa), .wr_data(wd)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 1'b0; ra = '0; rb = '0; wa = '0; wd = '0;
    @(negedge clk);
    for (int r = 0; r < NUM_REGS; r++) begin
      we = 1'b1; wa = AW'(r); wd = $urandom; model[r] = wd;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra = AW'($urandom); rb = AW'($urandom);
      #1;
      check(da, model[ra], "port A");
      check(db, model[rb], "port B");
      if ($urandom_range(1)) begin
        // write during the cycle: reads show the old word until the edge
        we = 1'b1; wa = ra; wd = $urandom;
        #1;
        check(da, model[ra], "port A before write edge");
        @(negedge clk);
        model[wa] = wd;
        we = 1'b0;
        #1;
        check(da, model[ra], "port A after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
