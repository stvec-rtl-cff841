// stvec_pkg: types and constants shared by the StVEC vector datapath.
//
// The datapath works on 32-bit lanes (packed single precision, as in the
// SSE instructions addps/subps/mulps that StVEC extends). The operation
// encoding below is this design's own: the instruction set is described at
// the assembly level only (stmulps offset, base, extension, dst), so the
// binary encoding of the opcode is a local choice.
package stvec_pkg;

  // Width of one lane / one register-file bank.
  localparam int unsigned LANE_W = 32;

  // Vector operations of the datapath. Every register-register operation
  // reads src1 = dst aligned and src2 through the StVEC operand path
  // (offset, base, extension); offset 0 gives the ordinary SSE instruction.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,  // no operation
    OP_LD  = 3'd1,  // dst <- ld_data (aligned vector load, e.g. movaps mem, reg)
    OP_ST  = 3'd2,  // st_data <- dst (aligned vector store)
    OP_MOV = 3'd3,  // dst <- src2            (movaps / stmovps)
    OP_ADD = 3'd4,  // dst <- src2 + dst      (addps  / staddps)
    OP_SUB = 3'd5,  // dst <- dst  - src2     (subps  / stsubps)
    OP_MUL = 3'd6   // dst <- src2 * dst      (mulps  / stmulps)
  } op_e;

  // Canonical quiet NaN returned by the floating-point lanes.
  localparam logic [31:0] F32_QNAN   = 32'h7FC0_0000;

endpackage
