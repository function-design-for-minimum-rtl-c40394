// Shared types for the reversible 1-bit arithmetic and logic circuits.
//
// Each circuit is a cascade of multiple-control Toffoli (MCT) gates on a small
// bus of lines. Lines are numbered from 0, and every line bus is declared
// [0:N-1] so that line 0 is the most significant bit of the packed value: a
// circuit's input pattern and output pattern read as the same integers that a
// permutation table of the reversible function uses.
//
// The enums give the operation selected by each ALU's selector lines. The
// codes are those of the circuits built here, which come from choosing the
// operation assignment (which selector code runs which operation) together
// with the gate list so that the circuit is as small as possible.
package rev_pkg;

  // Revised ALU (ADD, OR, AND, SUB): selector (S1,S2)
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_OR  = 2'b01,
    ALU_SUB = 2'b10,
    ALU_AND = 2'b11
  } alu_op_e;

  // Mini-ALU (AND, OR, ADD, ID): selector (S1,S2)
  typedef enum logic [1:0] {
    MINI_OR  = 2'b00,
    MINI_ADD = 2'b01,
    MINI_AND = 2'b10,
    MINI_ID  = 2'b11
  } mini_op_e;

  // Compact logic unit (XOR, OR, AND): selector (S1,S2); 2'b10 is unused
  typedef enum logic [1:0] {
    LU_XOR = 2'b00,
    LU_OR  = 2'b01,
    LU_NA  = 2'b10,
    LU_AND = 2'b11
  } lu_op_e;

  // Gupta's logic unit: (S1,S2) picks the function, S3 inverts the result
  typedef enum logic [1:0] {
    GLU_CONST = 2'b00,
    GLU_AND   = 2'b01,
    GLU_XOR   = 2'b10,
    GLU_OR    = 2'b11
  } glu_op_e;

endpackage
