// stvrf: StVEC modified vector register file (StVRF).
//
// A vector register file of NUM_REGS registers of LANES x LANE_W bits, split
// into LANES banks (bank j holds word j of every register). Compared with a
// conventional vector register file it has
//   * a separate register address for each bank on the src2 port
//     (bank_addr_gen), and
//   * the vector register adjustment logic (vra), which rotates the bank
//     outputs by the offset.
// Together they build, during the register read, the operand
//   src2 = base{offset : LANES-offset} extension{0 : offset}
// so a stencil's shifted neighbour vector needs neither an unaligned load nor
// a shuffle. Offset 0 yields the aligned register `base`.
//
// Ports: src1 is an ordinary aligned read (all banks at src1_addr); src2 is
// the StVEC read (offset, base, ext); one full-vector write port (we,
// wr_addr, wr_data) updates on the rising clock edge. Reads are
// combinational: the whole read, including the adjustment, fits in one
// cycle, as in the main (optimistic) timing model of the StVEC proposal. Vectors are
// packed with word 0 in bits [LANE_W-1:0].
module stvrf #(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned LANES    = 4,
  parameter int unsigned LANE_W   = 32,
  localparam int unsigned AW      = $clog2(NUM_REGS),
  localparam int unsigned OW      = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned VW      = LANES * LANE_W
) (
  input  logic          clk,
  // aligned src1 read
  input  logic [AW-1:0] src1_addr,
  output logic [VW-1:0] src1_data,
  // StVEC src2 read
  input  logic [OW-1:0] src2_offset,
  input  logic [AW-1:0] src2_base,
  input  logic [AW-1:0] src2_ext,
  output logic [VW-1:0] src2_data,
  // write port
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [VW-1:0] wr_data
);

  logic [AW-1:0]     bank_addr [LANES];
  logic [LANE_W-1:0] bank_b    [LANES];
  logic [LANE_W-1:0] operand   [LANES];

  bank_addr_gen #(.LANES(LANES), .AW(AW)) u_addr (
    .offset   (src2_offset),
    .base     (src2_base),
    .ext      (src2_ext),
    .bank_addr(bank_addr)
  );

  for (genvar j = 0; j < LANES; j++) begin : g_bank
    stvrf_bank #(.NUM_REGS(NUM_REGS), .LANE_W(LANE_W)) u_bank (
      .clk      (clk),
      .rd_a_addr(src1_addr),
      .rd_a_data(src1_data[j*LANE_W +: LANE_W]),
      .rd_b_addr(bank_addr[j]),
      .rd_b_data(bank_b[j]),
      .we       (we),
      .wr_addr  (wr_addr),
      .wr_data  (wr_data[j*LANE_W +: LANE_W])
    );
  end

  vra #(.LANES(LANES), .LANE_W(LANE_W)) u_vra (
    .offset   (src2_offset),
    .bank_data(bank_b),
    .operand  (operand)
  );

  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) src2_data[k*LANE_W +: LANE_W] = operand[k];
  end

endmodule
