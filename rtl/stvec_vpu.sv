// stvec_vpu: vector execution datapath with the StVEC operand path.
//
// Executes SSE-style packed-single register-register instructions and their
// StVEC forms. An StVEC instruction names an offset, a base and an extension
// register in place of the usual second source; its src2 operand is
//   base{offset : LANES-offset} extension{0 : offset}
// and is built while the register file is read (stvrf: per-bank addresses
// plus the vector register adjustment). For example
//   stmulps $1, VR1, VR2, VR3   computes  VR3 = VR1{1:3}VR2{0:1} * VR3.
// An instruction with offset 0 is the ordinary aligned instruction.
//
// Instruction interface (valid/ready): an instruction is taken in a cycle
// with in_valid && in_ready. Fields: in_op (stvec_pkg::op_e), in_offset,
// in_base, in_ext (src2), in_dst (src1 and destination). OP_LD writes ld_data
// (sampled with the instruction) into in_dst; OP_ST presents the old value of
// in_dst on st_data with st_valid one cycle later.
//
// Timing, set by READ_CYCLES:
//   1 (default, the optimistic timing of the StVEC proposal): the StVRF read, the
//     adjustment and the execution fit in one cycle; every instruction
//     writes its result at the end of its issue cycle, so in_ready is always
//     high and a dependent instruction may follow immediately.
//   2 (the pessimistic model, for a clock faster than the StVRF access):
//     an instruction with a non-zero offset registers its adjusted src2
//     operand in the first cycle and executes in the second; in_ready is low
//     during that extra cycle. Aligned instructions keep taking one cycle.
// The valid/ready protocol, the load/store ports and the reset of the
// control state (rst_n, synchronous, active low) are this design's choices;
// the register contents are not reset.
module stvec_vpu #(
  parameter int unsigned NUM_REGS    = 128,
  parameter int unsigned LANES       = 4,
  parameter int unsigned READ_CYCLES = 1,
  localparam int unsigned LANE_W     = stvec_pkg::LANE_W,
  localparam int unsigned AW         = $clog2(NUM_REGS),
  localparam int unsigned OW         = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned VW         = LANES * LANE_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  stvec_pkg::op_e in_op,
  input  logic [OW-1:0]  in_offset,
  input  logic [AW-1:0]  in_base,
  input  logic [AW-1:0]  in_ext,
  input  logic [AW-1:0]  in_dst,
  input  logic [VW-1:0]  ld_data,
  output logic           st_valid,
  output logic [VW-1:0]  st_data
);
  import stvec_pkg::*;

  // second cycle of a two-cycle StVEC instruction (READ_CYCLES == 2 only)
  logic          busy_q;
  op_e           op_q;
  logic [AW-1:0] dst_q;
  logic [VW-1:0] src2_q;

  logic          fire, is_alu, is_st_slow;
  logic [AW-1:0] src1_addr;
  logic [VW-1:0] src1_data, src2_data, fu_src2, fu_y;
  op_e           fu_op;
  logic          rf_we;
  logic [AW-1:0] rf_wa;
  logic [VW-1:0] rf_wd;

  assign in_ready   = !busy_q;
  assign fire       = in_valid && in_ready;
  assign is_alu     = (in_op == OP_MOV) || (in_op == OP_ADD) ||
                      (in_op == OP_SUB) || (in_op == OP_MUL);
  assign is_st_slow = (READ_CYCLES > 1) && is_alu && (in_offset != '0);

  assign src1_addr = busy_q ? dst_q : in_dst;

  stvrf #(.NUM_REGS(NUM_REGS), .LANES(LANES), .LANE_W(LANE_W)) u_rf (
    .clk        (clk),
    .src1_addr  (src1_addr),
    .src1_data  (src1_data),
    .src2_offset(in_offset),
    .src2_base  (in_base),
    .src2_ext   (in_ext),
    .src2_data  (src2_data),
    .we         (rf_we),
    .wr_addr    (rf_wa),
    .wr_data    (rf_wd)
  );

  assign fu_op   = busy_q ? op_q   : in_op;
  assign fu_src2 = busy_q ? src2_q : src2_data;

  simd_fu #(.LANES(LANES)) u_fu (
    .op  (fu_op),
    .src1(src1_data),
    .src2(fu_src2),
    .y   (fu_y)
  );

  always_comb begin
    rf_we = 1'b0;
    rf_wa = in_dst;
    rf_wd = fu_y;
    if (busy_q) begin
      rf_we = 1'b1;
      rf_wa = dst_q;
    end else if (fire) begin
      if (in_op == OP_LD) begin
        rf_we = 1'b1;
        rf_wd = ld_data;
      end else if (is_alu && !is_st_slow) begin
        rf_we = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      op_q     <= OP_NOP;
      dst_q    <= '0;
      src2_q   <= '0;
      st_valid <= 1'b0;
      st_data  <= '0;
    end else begin
      st_valid <= fire && (in_op == OP_ST);
      if (fire && (in_op == OP_ST)) st_data <= src1_data;
      if (busy_q) begin
        busy_q <= 1'b0;
      end else if (fire && is_st_slow) begin
        busy_q <= 1'b1;
        op_q   <= in_op;
        dst_q  <= in_dst;
        src2_q <= src2_data;
      end
    end
  end

  // An offered instruction must stay unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_op) && $stable(in_offset) &&
                                 $stable(in_base) && $stable(in_ext) && $stable(in_dst)))
    else $error("stvec_vpu: instruction changed while stalled");

endmodule
