// Operand sign stage of the divider (upper half of the structure chart).
//
// For a signed operation the sign bit (MSB) of dividend and divisor each
// steers a 2:1 multiplexer between the operand and its two's complement, so
// the unsigned trial-division core always sees magnitudes. For an unsigned
// operation both operands pass unchanged. The stage also reports the two
// operand signs, which the result stage needs to restore the result's sign.
// Purely combinational; used by the START state.
//
// The structure (sign bit, two's complement, 1/0 mux per operand) follows the
// document. Gating the sign bit with the signed-mode flag is implied by the
// RISC-V definition of DIVU/REMU and is spelled out here. The most negative
// value -2^(XLEN-1) has no positive counterpart; its two's complement is the
// same bit pattern, which read as an unsigned magnitude is exactly 2^(XLEN-1),
// so it needs no special case.
module div_operand_abs #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] dividend_i,
  input  logic [XLEN-1:0] divisor_i,
  input  logic            is_signed_i,
  output logic [XLEN-1:0] dividend_mag_o,
  output logic [XLEN-1:0] divisor_mag_o,
  output logic            dividend_neg_o,
  output logic            divisor_neg_o
);

  always_comb begin
    dividend_neg_o = is_signed_i & dividend_i[XLEN-1];
    divisor_neg_o  = is_signed_i & divisor_i[XLEN-1];
    dividend_mag_o = dividend_neg_o ? (~dividend_i + 1'b1) : dividend_i;
    divisor_mag_o  = divisor_neg_o  ? (~divisor_i  + 1'b1) : divisor_i;
  end

endmodule
