// Op-code decoder of the divider.
//
// Turns the 3-bit op code into the four one-hot instruction strobes div,
// divu, rem and remu, and into the two mode bits the datapath needs: whether
// the operands are signed (div, rem) and whether the result is the remainder
// (rem, remu). Purely combinational.
//
// The codes div = 100, divu = 101, rem = 110, remu = 111 are the document's
// (they equal the RISC-V funct3 field). The document does not say what the
// other four codes do; here only op[1:0] selects the operation once op[2] is
// clear too, so codes 000..011 behave like 100..111 except that no strobe is
// raised (valid = 0). That fallback is this design's own choice.
module div_op_decode
  import div_pkg::*;
(
  input  logic [OP_W-1:0] op_i,
  output logic            op_div_o,
  output logic            op_divu_o,
  output logic            op_rem_o,
  output logic            op_remu_o,
  output logic            valid_o,
  output div_mode_t       mode_o
);

  always_comb begin
    op_div_o  = (op_i == OP_DIV);
    op_divu_o = (op_i == OP_DIVU);
    op_rem_o  = (op_i == OP_REM);
    op_remu_o = (op_i == OP_REMU);
    valid_o   = op_i[2];
    // funct3[0] = 0 -> signed, funct3[1] = 1 -> remainder.
    mode_o.is_signed = ~op_i[0];
    mode_o.is_rem    = op_i[1];
  end

endmodule
