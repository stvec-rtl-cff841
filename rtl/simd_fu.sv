// simd_fu: packed single-precision SIMD execution unit.
//
// Applies one operation to all LANES 32-bit lanes at once, in the SSE
// operand convention that StVEC keeps: src2 is the (possibly StVEC-built)
// source operand and src1 is the destination's old value.
//   OP_MOV: y = src2            OP_ADD: y = src2 + src1
//   OP_SUB: y = src1 - src2     OP_MUL: y = src2 * src1
// Any other operation returns src1 unchanged. Combinational; one
// fp32_mul and one fp32_add per lane. The StVEC proposal keeps the execution
// unit as the existing SIMD unit of the processor; this is a plain stand-in
// with the same operations, and its arithmetic details (flush-to-zero,
// canonical NaN) are this design's choice.
module simd_fu #(
  parameter int unsigned LANES    = 4,
  localparam int unsigned LANE_W  = stvec_pkg::LANE_W,
  localparam int unsigned VW      = LANES * LANE_W
) (
  input  stvec_pkg::op_e op,
  input  logic [VW-1:0]  src1,
  input  logic [VW-1:0]  src2,
  output logic [VW-1:0]  y
);
  import stvec_pkg::*;

  logic [VW-1:0] prod, sum;

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    fp32_mul u_mul (
      .a(src2[k*LANE_W +: LANE_W]),
      .b(src1[k*LANE_W +: LANE_W]),
      .y(prod[k*LANE_W +: LANE_W])
    );
    // ADD: src1 + src2, SUB: src1 - src2
    fp32_add u_add (
      .a  (src1[k*LANE_W +: LANE_W]),
      .b  (src2[k*LANE_W +: LANE_W]),
      .sub(op == OP_SUB),
      .y  (sum[k*LANE_W +: LANE_W])
    );
  end

  always_comb begin
    unique case (op)
      OP_MOV:         y = src2;
      OP_ADD, OP_SUB: y = sum;
      OP_MUL:         y = prod;
      default:        y = src1;
    endcase
  end

endmodule
