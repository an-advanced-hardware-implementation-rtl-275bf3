// Result stage of the divider (lower half of the structure chart).
//
// Takes the unsigned quotient and remainder from the trial-division core and
// forms the instruction result:
//   div  : quotient, negated when the operand signs differ
//   rem  : remainder, negated when the dividend was negative
//   divu : quotient as is
//   remu : remainder as is
// A multiplexer steered by the decoded op picks one of the four. These signs
// give truncating division (rounding toward zero), as RISC-V defines it.
// Purely combinational; used by the END state.
//
// The two two's-complement units and the four-way op multiplexer are the
// document's structure; the conditions under which each complement applies
// are this design's reading of the RISC-V rules the document cites.
module div_result_sel
  import div_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] quotient_i,
  input  logic [XLEN-1:0] remainder_i,
  input  div_mode_t       mode_i,
  input  logic            dividend_neg_i,
  input  logic            divisor_neg_i,
  output logic [XLEN-1:0] result_o
);

  logic [XLEN-1:0] div_res, rem_res;

  always_comb begin
    div_res = (dividend_neg_i ^ divisor_neg_i) ? (~quotient_i + 1'b1) : quotient_i;
    rem_res = dividend_neg_i ? (~remainder_i + 1'b1) : remainder_i;
    unique case ({mode_i.is_signed, mode_i.is_rem})
      2'b10:   result_o = div_res;      // div
      2'b11:   result_o = rem_res;      // rem
      2'b00:   result_o = quotient_i;   // divu
      default: result_o = remainder_i;  // remu
    endcase
  end

endmodule
