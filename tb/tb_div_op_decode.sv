// Self-checking testbench of div_op_decode: all eight op codes, compared with
// the RISC-V funct3 meaning of each bit (bit 2 = M-extension divide group,
// bit 1 = remainder, bit 0 = unsigned).
module tb_div_op_decode;
  import div_pkg::*;

  logic [2:0] op;
  logic d, du, r, ru, v;
  div_mode_t m;
  int checks = 0, failures = 0;

  div_op_decode dut (.op_i(op), .op_div_o(d), .op_divu_o(du), .op_rem_o(r),
                     .op_remu_o(ru), .valid_o(v), .mode_o(m));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%b %s got %b exp %b", op, what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      op = 3'(i);
      #1;
      check(d,  i == 4, "div");
      check(du, i == 5, "divu");
      check(r,  i == 6, "rem");
      check(ru, i == 7, "remu");
      check(v,  i >= 4, "valid");
      check(m.is_signed, (i % 2) == 0, "signed");
      check(m.is_rem, ((i / 2) % 2) == 1, "rem mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
