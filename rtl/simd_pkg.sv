// simd_pkg: types and constants shared by the SIMD MAC array.
//
// The array executes one instruction per cycle, broadcast to every lane. An
// instruction carries an opcode and a field select. The field select picks the
// arithmetic of the whole datapath: prime field (ordinary binary integer
// arithmetic with carries) or binary field (polynomial arithmetic over GF(2),
// where every carry is suppressed so additions become XOR). The opcode set and
// its encoding are this design's own choice; the two fields are the ones the
// dual-field multiplier is named for.
package simd_pkg;

  // Operand width of every lane: the 32x32 Vedic multiplier.
  localparam int unsigned DATA_W = 32;
  // Full product width of the 32x32 multiplier.
  localparam int unsigned PROD_W = 2 * DATA_W;

  // Arithmetic field of the datapath.
  typedef enum logic {
    FIELD_PRIME  = 1'b0,   // integer arithmetic, carries propagate
    FIELD_BINARY = 1'b1    // GF(2) polynomial arithmetic, carries suppressed
  } field_e;

  // Lane operations.
  typedef enum logic [1:0] {
    OP_NOP = 2'b00,        // accumulator holds its value
    OP_CLR = 2'b01,        // accumulator <= 0
    OP_MUL = 2'b10,        // accumulator <= a * b
    OP_MAC = 2'b11         // accumulator <= accumulator + a * b
  } opcode_e;

  // One broadcast instruction.
  typedef struct packed {
    opcode_e op;
    field_e  field;
  } instr_t;

endpackage
