// Self-checking testbench of div_operand_abs at 32 bits: corner values and
// random operands in signed and unsigned mode. The expected magnitude is
// computed with 64-bit signed arithmetic (|x| of the sign-extended operand).
module tb_div_operand_abs;
  logic [31:0] a, b, am, bm;
  logic sgn, an, bn;
  int checks = 0, failures = 0;

  div_operand_abs #(.XLEN(32)) dut (
    .dividend_i(a), .divisor_i(b), .is_signed_i(sgn),
    .dividend_mag_o(am), .divisor_mag_o(bm),
    .dividend_neg_o(an), .divisor_neg_o(bn));

  function automatic logic [31:0] mag(input logic [31:0] x, input logic s);
    longint v;
    v = s ? longint'(signed'(x)) : longint'(x);
    if (v < 0) v = -v;
    return v[31:0];
  endfunction

  task automatic one(input logic [31:0] x, input logic [31:0] y, input logic s);
    a = x; b = y; sgn = s;
    #1;
    checks += 4;
    if (am !== mag(x, s)) begin failures++; $display("FAIL dividend %h s=%b -> %h", x, s, am); end
    if (bm !== mag(y, s)) begin failures++; $display("FAIL divisor %h s=%b -> %h", y, s, bm); end
    if (an !== (s && signed'(x) < 0)) begin failures++; $display("FAIL dividend sign %h", x); end
    if (bn !== (s && signed'(y) < 0)) begin failures++; $display("FAIL divisor sign %h", y); end
  endtask

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hffff_fff8, 32'h8000_0000, 32'h7fff_ffff, 32'hffff_ffff};
    foreach (corners[i]) foreach (corners[j]) begin
      one(corners[i], corners[j], 1'b1);
      one(corners[i], corners[j], 1'b0);
    end
    repeat (500) one($urandom, $urandom, 1'($urandom));
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
