// Shared constants and types of the reversible ALU.
//
// The ALU is built only from reversible gates (NOT, Feynman, Double Feynman,
// Fredkin, Toffoli, HNG). Every gate output that no other gate consumes is a
// "garbage" output; the cells bring these out on a garbage bus so that the
// structure stays visible and nothing is silently dropped. The counts below
// follow from the gate netlists of the cells (arithmetic cell: 6, logic cell:
// 7, multiplexer: 5 per bit).
//
// The select encoding {S0,S1} of the logic unit follows the ALU's function
// table: 00 XOR, 01 AND, 10 OR, 11 NOT A. With M = 0 the ALU output is the
// arithmetic unit's sum, with M = 1 the logic unit's result.
package rev_alu_pkg;

  localparam int unsigned ALU_WIDTH   = 16;  // data path width of the ALU
  localparam int unsigned AU_GARBAGE  = 6;   // garbage outputs per arithmetic cell
  localparam int unsigned LU_GARBAGE  = 7;   // garbage outputs per logic cell
  localparam int unsigned MUX_GARBAGE = 5;   // garbage outputs per multiplexer bit

  // Logic unit operation, encoded as {S0, S1}.
  typedef enum logic [1:0] {
    LU_XOR = 2'b00,
    LU_AND = 2'b01,
    LU_OR  = 2'b10,
    LU_NOT = 2'b11
  } lu_op_e;

  // Arithmetic unit operation, encoded as {S0, S1}; Cin adds one more.
  typedef enum logic [1:0] {
    AU_ADD_B    = 2'b00,  // A + B + Cin
    AU_ADD_NOTB = 2'b01,  // A + ~B + Cin (A - B when Cin = 1)
    AU_PASS_A   = 2'b10,  // A + Cin
    AU_DEC_A    = 2'b11   // A + all-ones + Cin (A - 1 when Cin = 0)
  } au_op_e;

endpackage
