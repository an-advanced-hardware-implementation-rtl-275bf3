// Trial-division divider for the RISC-V M-extension division instructions
// DIV, DIVU, REM and REMU.
//
// A request is the op code (RISC-V funct3), dividend (rs1), divisor (rs2)
// and the destination register number. The divider works on magnitudes:
// in START the sign stage takes the two's complement of negative signed
// operands and loads them into the datapath; CALC then produces one quotient
// bit per clock by restoring trial division (compare, subtract, shift);
// in END the result stage picks quotient or remainder and restores its sign,
// and the result register is written.
//
// Interface (names as on the divider's block symbol):
//   clk, rst (active low, asynchronous clear), start_i, op_i[2:0],
//   dividend_i, divisor_i, reg_waddr_i[4:0]  ->  result_o, ready_o, busy_o,
//   reg_waddr_o.
// start_i is a level: it must stay high for the whole operation (dropping it
// aborts), and if it is still high when the result appears the divider at
// once captures its inputs again and starts the next operation.
//
// Timing: result_o, ready_o and reg_waddr_o are registers. With XLEN = 32 the
// result is on result_o 35 clocks (XLEN+3) after the clock edge that first
// samples start_i, together with ready_o = 1 and busy_o = 0; busy_o is high
// from the edge after start_i is sampled until then. A zero divisor ends in
// START after 2 clocks with the RISC-V results: all ones for div/divu and the
// dividend for rem/remu. Signed overflow (-2^31 / -1) needs no special case
// and gives quotient -2^31 and remainder 0, as RISC-V requires.
//
// The block boundary, the port list, the four states, the 32-bit width, the
// op codes and the structure (sign stage, trial-division logic, result stage)
// follow the document. The zero-divisor result values, the start_i level
// protocol details and the registered outputs are this design's choices,
// matched to the document's simulation waveforms where those show them.
module trial_divider
  import div_pkg::*;
#(
  parameter int unsigned XLEN = XLEN_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [XLEN-1:0]       dividend_i,
  input  logic [XLEN-1:0]       divisor_i,
  input  logic                  start_i,
  input  logic [OP_W-1:0]       op_i,
  input  logic [REG_ADDR_W-1:0] reg_waddr_i,
  output logic [XLEN-1:0]       result_o,
  output logic                  ready_o,
  output logic                  busy_o,
  output logic [REG_ADDR_W-1:0] reg_waddr_o
);


  // Operands captured on leaving IDLE.
  logic [OP_W-1:0] op_r;
  logic [XLEN-1:0] dividend_r, divisor_r;
  logic            dividend_neg_r, divisor_neg_r;

  logic            latch, load, step, finish, dbz, abort;
  div_mode_t       mode;
  logic            op_div, op_divu, op_rem, op_remu, op_valid;
  logic [XLEN-1:0] dividend_mag, divisor_mag;
  logic            dividend_neg, divisor_neg;
  logic [XLEN-1:0] quotient, remainder, result_d;

  div_op_decode u_decode (
    .op_i     (op_r),
    .op_div_o (op_div),
    .op_divu_o(op_divu),
    .op_rem_o (op_rem),
    .op_remu_o(op_remu),
    .valid_o  (op_valid),
    .mode_o   (mode)
  );

  div_ctrl #(.XLEN(XLEN)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst),
    .start_i       (start_i),
    .divisor_zero_i(divisor_r == '0),
    .state_o       (),
    .latch_o       (latch),
    .load_o        (load),
    .step_o        (step),
    .finish_o      (finish),
    .dbz_o         (dbz),
    .abort_o       (abort),
    .busy_o        (busy_o),
    .ready_o       (ready_o),
    .count_o       ()
  );

  div_operand_abs #(.XLEN(XLEN)) u_abs (
    .dividend_i    (dividend_r),
    .divisor_i     (divisor_r),
    .is_signed_i   (mode.is_signed),
    .dividend_mag_o(dividend_mag),
    .divisor_mag_o (divisor_mag),
    .dividend_neg_o(dividend_neg),
    .divisor_neg_o (divisor_neg)
  );

  div_datapath #(.XLEN(XLEN)) u_dp (
    .clk        (clk),
    .rst_n      (rst),
    .load_i     (load),
    .step_i     (step),
    .dividend_i (dividend_mag),
    .divisor_i  (divisor_mag),
    .quotient_o (quotient),
    .remainder_o(remainder)
  );

  div_result_sel #(.XLEN(XLEN)) u_res (
    .quotient_i    (quotient),
    .remainder_i   (remainder),
    .mode_i        (mode),
    .dividend_neg_i(dividend_neg_r),
    .divisor_neg_i (divisor_neg_r),
    .result_o      (result_d)
  );

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      op_r           <= OP_DIVU;
      dividend_r     <= '0;
      divisor_r      <= '0;
      dividend_neg_r <= 1'b0;
      divisor_neg_r  <= 1'b0;
      reg_waddr_o    <= '0;
      result_o       <= '0;
    end else begin
      if (latch) begin
        op_r        <= op_i;
        dividend_r  <= dividend_i;
        divisor_r   <= divisor_i;
        reg_waddr_o <= reg_waddr_i;
      end
      if (load) begin
        dividend_neg_r <= dividend_neg;
        divisor_neg_r  <= divisor_neg;
      end
      if (finish)   result_o <= result_d;
      else if (dbz) result_o <= mode.is_rem ? dividend_r : '1;
    end
  end

  // Exactly one of the four instruction strobes is set for a valid op.
  a_op_onehot: assert property (@(posedge clk) disable iff (!rst)
    op_valid |-> $onehot({op_div, op_divu, op_rem, op_remu}));
  // A result is only written by a finished or a zero-divisor operation.
  a_result_src: assert property (@(posedge clk) disable iff (!rst)
    (finish || dbz) |-> !abort);

endmodule
