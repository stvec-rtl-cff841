// vra: vector register adjustment logic of the StVEC register file.
//
// After each bank has read its own register, bank j holds word j of either
// the base or the extension register. The operand word w_k must be word
// (k + offset) of the concatenation base{offset:..} extension{0:offset}, which
// lives in bank (k + offset) mod LANES. The adjustment is therefore a rotation
// of the bank outputs by the offset towards lane 0. It is built here as a
// logarithmic rotator (one 2:1 multiplexer stage per offset bit); the
// StVEC proposal gives the function of this block, not its circuit.
// Purely combinational.
module vra #(
  parameter int unsigned LANES  = 4,
  parameter int unsigned LANE_W = 32,
  localparam int unsigned OW    = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic [OW-1:0]     offset,
  input  logic [LANE_W-1:0] bank_data [LANES],
  output logic [LANE_W-1:0] operand   [LANES]
);

  logic [LANE_W-1:0] stage [OW+1][LANES];

  always_comb begin
    for (int unsigned k = 0; k < LANES; k++) stage[0][k] = bank_data[k];
    for (int unsigned s = 0; s < OW; s++) begin
      for (int unsigned k = 0; k < LANES; k++) begin
        stage[s+1][k] = offset[s] ? stage[s][(k + (1 << s)) % LANES] : stage[s][k];
      end
    end
    for (int unsigned k = 0; k < LANES; k++) operand[k] = stage[OW][k];
  end

endmodule
