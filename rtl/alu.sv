// alu: 32-bit combinational arithmetic and logic unit.
//
// The 4-bit select line S picks one of nine functions, exactly as in the
// processor's ALU function table: 0000 AND, 0001 NAND, 0010 OR, 0011 NOR,
// 0100 XOR, 0101 XNOR, 0110 NOT A, 0111 A + B, 1000 A - B. Addition and
// subtraction wrap modulo 2^32 (no carry or overflow flag is produced: none is
// described). Select codes 1001..1111 are unused; this design returns zero for
// them. There is no clock: ALUOUT follows A, B and S combinationally.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       s,
  output logic [WIDTH-1:0] aluout
);

  always_comb begin
    unique case (s)
      ALU_AND:  aluout = a & b;
      ALU_NAND: aluout = ~(a & b);
      ALU_OR:   aluout = a | b;
      ALU_NOR:  aluout = ~(a | b);
      ALU_XOR:  aluout = a ^ b;
      ALU_XNOR: aluout = ~(a ^ b);
      ALU_NOTA: aluout = ~a;
      ALU_ADD:  aluout = a + b;
      ALU_SUB:  aluout = a - b;
      default:  aluout = '0;
    endcase
  end

endmodule
