// Shared types and constants of the trial-division divider.
//
// The op code is the 3-bit RISC-V funct3 field of the M-extension division
// instructions: DIV = 3'b100, DIVU = 3'b101, REM = 3'b110, REMU = 3'b111.
// These four codes follow the document; the codes 3'b000..3'b011 are not
// division instructions and this design's choice is to treat them like DIVU
// (see div_op_decode). The control states IDLE, START, CALC and END are the
// four states of the document's state diagram; their binary encoding is a
// free choice.
package div_pkg;

  // Data width of the divider: the document's divider is 32 bits wide.
  parameter int unsigned XLEN_DEFAULT = 32;
  // Register write-address width (a RISC-V register number, x0..x31).
  parameter int unsigned REG_ADDR_W = 5;
  // Width of the op code.
  parameter int unsigned OP_W = 3;

  typedef enum logic [OP_W-1:0] {
    OP_DIV  = 3'b100,
    OP_DIVU = 3'b101,
    OP_REM  = 3'b110,
    OP_REMU = 3'b111
  } div_op_e;

  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_START = 2'd1,
    ST_CALC  = 2'd2,
    ST_END   = 2'd3
  } div_state_e;

  // Decoded operation: signed operands, and result is the remainder.
  typedef struct packed {
    logic is_signed;
    logic is_rem;
  } div_mode_t;

endpackage
