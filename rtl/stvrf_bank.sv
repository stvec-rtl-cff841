// stvrf_bank: one bank of the StVEC vector register file.
//
// The StVEC register file splits every vector register into LANE_W-bit
// words and keeps word j of all registers in bank j. Each bank has its own
// address decoder, so the banks can be read at different register numbers in
// the same cycle; that is what lets the register file assemble an unaligned
// operand from two registers.
//
// This bank has two combinational read ports and one write port:
//   * port A (rd_a_*) serves the aligned src1 operand, all banks use the
//     same address there;
//   * port B (rd_b_*) serves the StVEC src2 operand, with the bank's own
//     address R_j;
//   * the write port stores wr_data at wr_addr on the rising clock edge when
//     we is high.
// Reads see the contents before a same-cycle write (write-at-edge, read
// during the cycle). The number of read/write ports is this design's choice;
// the storage is a plain array without reset, as for an SRAM macro.
module stvrf_bank #(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned LANE_W   = 32,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic [AW-1:0]     rd_a_addr,
  output logic [LANE_W-1:0] rd_a_data,
  input  logic [AW-1:0]     rd_b_addr,
  output logic [LANE_W-1:0] rd_b_data,
  input  logic              we,
  input  logic [AW-1:0]     wr_addr,
  input  logic [LANE_W-1:0] wr_data
);

  logic [LANE_W-1:0] mem [NUM_REGS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  assign rd_a_data = mem[rd_a_addr];
  assign rd_b_data = mem[rd_b_addr];

endmodule
