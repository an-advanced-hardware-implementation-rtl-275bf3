// Trial-division datapath: the registers and the subtractor of the divider.
//
// Four XLEN-bit registers: divisor, remain, dividend and quotient. The
// dividend register shifts left into the remain register, so that each step
// brings the next dividend bit (MSB first) into the LSB of the partial
// remainder {remain, dividend MSB}. The subtractor forms
// partial - divisor; when it does not borrow (partial >= divisor) the
// difference becomes the new remain and a 1 is shifted into the quotient,
// otherwise the shifted remain is kept and a 0 is shifted in. After XLEN
// steps the quotient register holds dividend / divisor and the remain
// register holds dividend % divisor, both unsigned.
//
// Interface: load_i (one cycle) loads the operand magnitudes and clears
// remain and quotient; step_i performs one iteration per clock. Outputs are
// the register contents, valid the cycle after the XLEN-th step. Reset is
// active low and asynchronous, like the control unit's.
//
// Registers, their widths, the zero initial remain and the compare /
// subtract / shift-in of the next dividend bit follow the document. The
// document's flow chart compares before it shifts; here the dividend bit is
// shifted in first and then compared, so that XLEN steps give an exact
// result. The subtractor is XLEN+1 bits wide because the shifted partial
// remainder can reach 2*divisor-1.
module div_datapath #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_i,
  input  logic            step_i,
  input  logic [XLEN-1:0] dividend_i,
  input  logic [XLEN-1:0] divisor_i,
  output logic [XLEN-1:0] quotient_o,
  output logic [XLEN-1:0] remainder_o
);

  logic [XLEN-1:0] divisor_q, dividend_q, remain_q, quotient_q;
  logic [XLEN:0]   partial, diff;
  logic            fits;

  // One trial: shift in the next dividend bit, try to subtract the divisor.
  always_comb begin
    partial = {remain_q, dividend_q[XLEN-1]};
    diff    = partial - {1'b0, divisor_q};
    fits    = ~diff[XLEN];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divisor_q  <= '0;
      dividend_q <= '0;
      remain_q   <= '0;
      quotient_q <= '0;
    end else if (load_i) begin
      divisor_q  <= divisor_i;
      dividend_q <= dividend_i;
      remain_q   <= '0;
      quotient_q <= '0;
    end else if (step_i) begin
      dividend_q <= {dividend_q[XLEN-2:0], 1'b0};
      quotient_q <= {quotient_q[XLEN-2:0], fits};
      remain_q   <= fits ? diff[XLEN-1:0] : partial[XLEN-1:0];
    end
  end

  assign quotient_o  = quotient_q;
  assign remainder_o = remain_q;

endmodule
