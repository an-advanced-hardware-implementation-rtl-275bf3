// Self-checking testbench of div_result_sel at 32 bits. Random quotient and
// remainder magnitudes with every combination of mode and operand signs; the
// expected result negates with 64-bit arithmetic: the quotient when signed
// and the signs differ, the remainder when signed and the dividend is
// negative.
module tb_div_result_sel;
  import div_pkg::*;
  logic [31:0] q, r, res;
  div_mode_t m;
  logic dn, vn;
  int checks = 0, failures = 0;

  div_result_sel #(.XLEN(32)) dut (
    .quotient_i(q), .remainder_i(r), .mode_i(m),
    .dividend_neg_i(dn), .divisor_neg_i(vn), .result_o(res));

  initial begin
    for (int n = 0; n < 400; n++) begin
      longint e;
      q = $urandom; r = $urandom;
      if (n % 4 == 0) begin q = 32'h0; r = 32'h8000_0000; end
      for (int k = 0; k < 16; k++) begin
        m.is_signed = k[0]; m.is_rem = k[1];
        // Unsigned operations never see negative operands.
        dn = k[2] & k[0]; vn = k[3] & k[0];
        #1;
        if (m.is_rem) e = (m.is_signed && dn) ? -longint'(r) : longint'(r);
        else          e = (m.is_signed && (dn != vn)) ? -longint'(q) : longint'(q);
        checks++;
        if (res !== e[31:0]) begin
          failures++;
          $display("FAIL q=%h r=%h mode=%b%b dn=%b vn=%b res=%h exp=%h",
                   q, r, m.is_signed, m.is_rem, dn, vn, res, e[31:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
