// bank_addr_gen: per-bank register addresses of the StVEC operand path.
//
// An StVEC src2 operand with offset o is the upper LANES-o words of the base
// register followed by the lower o words of the extension register:
//   VOPR = base{o : LANES-o} extension{0 : o}.
// Word j of a register lives in bank j, so banks j >= o must read the base
// register and banks j < o the extension register (with offset 1, bank 0
// reads the extension and banks 1..3 read the base). This module produces
// those addresses R_0 .. R_{LANES-1}. Offset 0 reads the base register in
// every bank, i.e. an ordinary aligned operand. Purely combinational.
module bank_addr_gen #(
  parameter int unsigned LANES = 4,
  parameter int unsigned AW    = 7,
  localparam int unsigned OW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic [OW-1:0] offset,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] ext,
  output logic [AW-1:0] bank_addr [LANES]
);

  always_comb begin
    for (int unsigned j = 0; j < LANES; j++) begin
      bank_addr[j] = (j >= 32'(offset)) ? base : ext;
    end
  end

endmodule
