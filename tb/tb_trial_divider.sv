// End-to-end self-checking testbench of the trial_divider top at its default
// size (32-bit). It runs
//   - the four-instruction sequence divu 8/3, div -8/3, rem -8/3, remu 8/3
//     with start_i held high throughout (back-to-back operations),
//   - corner cases: zero divisor for every op, -2^31 / -1, +-1 divisors,
//     divisor larger than dividend, most negative values,
//   - an operation aborted by dropping start_i,
//   - 400 random operations, some back-to-back, some separated,
// and compares every result with a reference computed from the RISC-V
// definition using 64-bit arithmetic. It also checks the latency (35 clocks
// from the edge that samples start_i to the result, 2 for a zero divisor),
// the write-address passthrough, busy_o/ready_o, and counts how often each
// mechanism of the design was exercised; a mechanism never hit is a failure.
module tb_trial_divider;
  import div_pkg::*;

  logic        clk = 0, rst = 0, start = 0;
  logic [31:0] dividend = '0, divisor = '0, result;
  logic [2:0]  op = 3'b101;
  logic [4:0]  waddr_i = '0, waddr_o;
  logic        ready, busy;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_neg_dividend = 0, n_neg_divisor = 0, n_neg_quot = 0, n_neg_rem = 0;
  int n_dbz = 0, n_overflow = 0, n_abort = 0, n_back2back = 0, n_ready_clear = 0;
  int n_op[4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  trial_divider dut (
    .clk(clk), .rst(rst), .dividend_i(dividend), .divisor_i(divisor),
    .start_i(start), .op_i(op), .reg_waddr_i(waddr_i),
    .result_o(result), .ready_o(ready), .busy_o(busy), .reg_waddr_o(waddr_o));

  function automatic logic [31:0] ref_result(input logic [2:0] o,
                                             input logic [31:0] a, input logic [31:0] b);
    longint sa, sb, ua, ub;
    sa = longint'(signed'(a)); sb = longint'(signed'(b));
    ua = longint'(a);          ub = longint'(b);
    case (o)
      3'b100: return (b == 0) ? 32'hffff_ffff : 32'(sa / sb);  // div
      3'b101: return (b == 0) ? 32'hffff_ffff : 32'(ua / ub);  // divu
      3'b110: return (b == 0) ? a : 32'(sa % sb);              // rem
      default: return (b == 0) ? a : 32'(ua % ub);             // remu
    endcase
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (op=%b a=%h b=%h result=%h)", what, op, dividend, divisor, result);
    end
  endtask

  // Issue one operation at a negedge and wait for its result. hold_after
  // leaves start_i high so the divider restarts on whatever is driven next.
  task automatic run(input logic [2:0] o, input logic [31:0] a, input logic [31:0] b,
                     input bit hold_after);
    int cyc = 0, busy_cycles = 0;
    logic [31:0] exp;
    logic [4:0] w;
    op = o; dividend = a; divisor = b; w = 5'($urandom); waddr_i = w;
    if (start) n_back2back++;
    start = 1;
    exp = ref_result(o, a, b);
    // Wait for busy to rise, then to fall.
    do begin
      @(negedge clk); cyc++;
      if (busy) busy_cycles++;
    end while (!(busy_cycles > 0 && !busy) && cyc < 100);
    chk(cyc == ((b == 0) ? 2 : 35), $sformatf("latency %0d", cyc));
    chk(busy_cycles == ((b == 0) ? 1 : 34), $sformatf("busy cycles %0d", busy_cycles));
    chk(result == exp, $sformatf("result, expected %h", exp));
    chk(ready, "ready");
    chk(waddr_o == w, "reg_waddr_o");
    if (b == 0) n_dbz++;
    if (o == 3'b100 || o == 3'b110) begin
      if (signed'(a) < 0 && b != 0) n_neg_dividend++;
      if (signed'(b) < 0) n_neg_divisor++;
      if (o == 3'b100 && b != 0 && (a[31] ^ b[31]) && exp != 0) n_neg_quot++;
      if (o == 3'b110 && b != 0 && a[31] && exp != 0) n_neg_rem++;
      if (o == 3'b100 && a == 32'h8000_0000 && b == 32'hffff_ffff) n_overflow++;
    end
    n_op[o[1:0]]++;
    if (!hold_after) begin
      start = 0;
      @(negedge clk);
      chk(ready == 1'b0 && busy == 1'b0, "ready cleared when idle");
      chk(result == exp, "result held while idle");
      n_ready_clear++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1;
    @(negedge clk);
    chk(!busy && !ready && result == 0, "reset state");

    // The document's four-instruction sequence, start_i held high.
    run(3'b101, 32'd8, 32'd3, 1);            // divu -> 2
    chk(result == 32'h2, "divu 8/3 = 2");
    run(3'b100, 32'hffff_fff8, 32'd3, 1);    // div  -> -2
    chk(result == 32'hffff_fffe, "div -8/3 = fffffffe");
    run(3'b110, 32'hffff_fff8, 32'd3, 1);    // rem  -> -2
    chk(result == 32'hffff_fffe, "rem -8,3 = fffffffe");
    run(3'b111, 32'd8, 32'd3, 0);            // remu -> 2
    chk(result == 32'h2, "remu 8,3 = 2");

    // Corner cases.
    for (int o = 4; o < 8; o++) begin
      run(3'(o), 32'd1234, 32'd0, 0);
      run(3'(o), 32'h8000_0000, 32'd0, 1);
      run(3'(o), 32'h8000_0000, 32'hffff_ffff, 1);
      run(3'(o), 32'h8000_0000, 32'd1, 0);
      run(3'(o), 32'hffff_ffff, 32'hffff_ffff, 1);
      run(3'(o), 32'd7, 32'hffff_fffe, 1);
      run(3'(o), 32'hffff_fff9, 32'd2, 1);
      run(3'(o), 32'd3, 32'd100, 0);
      run(3'(o), 32'h7fff_ffff, 32'h8000_0000, 0);
    end

    // Abort: drop start_i in the middle of CALC.
    begin
      logic [31:0] old;
      old = result;
      op = 3'b101; dividend = 32'd1000; divisor = 32'd7; start = 1;
      repeat (12) @(negedge clk);
      chk(busy, "busy during calculation");
      start = 0;
      @(negedge clk);
      chk(!busy, "abort clears busy");
      repeat (40) @(negedge clk);
      chk(result == old && !ready, "aborted operation writes no result");
      n_abort++;
    end

    // Random operations.
    repeat (400) begin
      logic [2:0]  o;
      logic [31:0] a, b;
      o = 3'(4 + $urandom % 4);
      a = $urandom;
      b = $urandom >> ($urandom % 32);
      if ($urandom % 4 == 0) b = -b;
      if ($urandom % 50 == 0) b = 0;
      run(o, a, b, ($urandom % 2) == 1);
    end
    start = 0;
    repeat (3) @(negedge clk);

    // Every mechanism must have happened.
    chk(n_neg_dividend > 0, "negative dividend complemented");
    chk(n_neg_divisor > 0,  "negative divisor complemented");
    chk(n_neg_quot > 0,     "quotient sign restored");
    chk(n_neg_rem > 0,      "remainder sign restored");
    chk(n_dbz > 0,          "zero divisor");
    chk(n_overflow > 0,     "signed overflow");
    chk(n_abort > 0,        "abort");
    chk(n_back2back > 0,    "back-to-back");
    chk(n_ready_clear > 0,  "ready cleared");
    foreach (n_op[i]) chk(n_op[i] > 0, $sformatf("op %0d used", i));
    $display("mechanisms: neg_dividend=%0d neg_divisor=%0d neg_quot=%0d neg_rem=%0d dbz=%0d overflow=%0d abort=%0d back2back=%0d ready_clear=%0d",
             n_neg_dividend, n_neg_divisor, n_neg_quot, n_neg_rem, n_dbz, n_overflow,
             n_abort, n_back2back, n_ready_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
