// Control unit of the divider: the four-state machine IDLE, START, CALC, END
// and the iteration counter.
//
//   IDLE  : waits for start_i. When start_i is high it raises latch_o so the
//           operands, op code and write address are captured, sets busy_o and
//           moves to START. When start_i is low it clears ready_o.
//   START : if the captured divisor is zero, raises dbz_o, sets ready_o,
//           clears busy_o and returns to IDLE. Otherwise raises load_o (the
//           sign stage's magnitudes are loaded into the datapath), loads the
//           counter with XLEN and moves to CALC. Dropping start_i here also
//           returns to IDLE.
//   CALC  : one datapath step per clock (step_i high) while start_i stays
//           high, counting down; the step that brings the counter to zero
//           moves to END, so CALC lasts exactly XLEN cycles. start_i low
//           aborts to IDLE (busy_o cleared, no result).
//   END   : raises finish_o (result register is written), sets ready_o,
//           clears busy_o and returns to IDLE whatever start_i is.
//
// Timing: with start_i held high, a divide takes 1 (IDLE) + 1 (START) + XLEN
// (CALC) + 1 (END) = XLEN+3 clocks, and the result is on the outputs XLEN+3
// clocks after the edge that first sampled start_i. busy_o and ready_o are
// registers: busy_o is low for exactly one cycle between back-to-back
// operations, and ready_o stays high until the unit is idle with start_i low.
//
// The states, their order and the transition conditions follow the
// document's state diagram (including the start_i-low abort from CALC and the
// zero-divisor exit from START). The one-step-earlier exit from CALC, the
// busy_o/ready_o behaviour and the asynchronous active-low reset are this
// design's reading of the document's waveforms and its own choices.
module div_ctrl
  import div_pkg::*;
#(
  parameter int unsigned XLEN = 32,
  localparam int unsigned CW  = $clog2(XLEN + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  logic       divisor_zero_i,
  output div_state_e state_o,
  output logic       latch_o,
  output logic       load_o,
  output logic       step_o,
  output logic       finish_o,
  output logic       dbz_o,
  output logic       abort_o,
  output logic       busy_o,
  output logic       ready_o,
  output logic [CW-1:0] count_o
);

  div_state_e state_q, state_d;
  logic [CW-1:0] count_q, count_d;
  logic          busy_d, ready_d;

  always_comb begin
    state_d  = state_q;
    count_d  = count_q;
    busy_d   = busy_o;
    ready_d  = ready_o;
    latch_o  = 1'b0;
    load_o   = 1'b0;
    step_o   = 1'b0;
    finish_o = 1'b0;
    dbz_o    = 1'b0;
    abort_o  = 1'b0;
    unique case (state_q)
      ST_IDLE: begin
        if (start_i) begin
          latch_o = 1'b1;
          busy_d  = 1'b1;
          state_d = ST_START;
        end else begin
          ready_d = 1'b0;
        end
      end
      ST_START: begin
        if (!start_i) begin
          abort_o = 1'b1;
          busy_d  = 1'b0;
          state_d = ST_IDLE;
        end else if (divisor_zero_i) begin
          dbz_o   = 1'b1;
          busy_d  = 1'b0;
          ready_d = 1'b1;
          state_d = ST_IDLE;
        end else begin
          load_o  = 1'b1;
          count_d = CW'(XLEN);
          state_d = ST_CALC;
        end
      end
      ST_CALC: begin
        if (!start_i) begin
          abort_o = 1'b1;
          busy_d  = 1'b0;
          state_d = ST_IDLE;
        end else begin
          step_o  = 1'b1;
          count_d = count_q - 1'b1;
          if (count_d == '0) state_d = ST_END;
        end
      end
      default: begin // ST_END
        finish_o = 1'b1;
        busy_d   = 1'b0;
        ready_d  = 1'b1;
        state_d  = ST_IDLE;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      count_q <= '0;
      busy_o  <= 1'b0;
      ready_o <= 1'b0;
    end else begin
      state_q <= state_d;
      count_q <= count_d;
      busy_o  <= busy_d;
      ready_o <= ready_d;
    end
  end

  assign state_o = state_q;
  assign count_o = count_q;

  // The counter never exceeds XLEN and is non-zero throughout CALC.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_CALC) |-> (count_q != '0 && count_q <= CW'(XLEN)));
  // A datapath step is only ever issued in CALC, and busy is high then.
  a_step_busy: assert property (@(posedge clk) disable iff (!rst_n)
    step_o |-> (state_q == ST_CALC && busy_o));

endmodule
