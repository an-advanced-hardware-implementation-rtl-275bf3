// Directed testbench of the trial_divider top at its default 32-bit size that
// replays the four-instruction test sequence the divider is demonstrated
// with: a 10 ns clock; rst (active low) and start_i rise together; start_i then
// stays high while op_i and the operands change between operations:
//   divu 8 / 3 -> 00000002
//   div  -8 / 3 -> fffffffe
//   rem  -8 , 3 -> fffffffe
//   remu 8 , 3 -> 00000002
// with destination register 5 throughout. New inputs are applied in the one
// cycle where busy_o is low after each result. Each result, ready_o and
// reg_waddr_o are checked, as is the 35-clock latency of every operation.
module tb_div_instr_sequence;
  logic        clk = 0, rst = 0, start = 0;
  logic [31:0] dividend = '0, divisor = '0, result;
  logic [2:0]  op = 3'd5;
  logic [4:0]  waddr = 5'd5, waddr_o;
  logic        ready, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trial_divider dut (
    .clk(clk), .rst(rst), .dividend_i(dividend), .divisor_i(divisor),
    .start_i(start), .op_i(op), .reg_waddr_i(waddr),
    .result_o(result), .ready_o(ready), .busy_o(busy), .reg_waddr_o(waddr_o));

  task automatic step(input logic [2:0] o, input logic [31:0] a, input logic [31:0] b,
                      input logic [31:0] exp, input string name);
    int cyc = 0;
    op = o; dividend = a; divisor = b;
    // Wait until busy_o falls again: that is the cycle the result appears.
    @(negedge clk); cyc++;
    while (busy && cyc < 100) begin @(negedge clk); cyc++; end
    checks += 4;
    if (result !== exp) begin failures++; $display("FAIL %s: result %h, expected %h", name, result, exp); end
    if (!ready)         begin failures++; $display("FAIL %s: ready_o low", name); end
    if (waddr_o !== 5'd5) begin failures++; $display("FAIL %s: reg_waddr_o %h", name, waddr_o); end
    if (cyc != 35)      begin failures++; $display("FAIL %s: latency %0d clocks, expected 35", name, cyc); end
    $display("%s: result_o = %h after %0d clocks", name, result, cyc);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1; start = 1;
    step(3'b101, 32'd8,          32'd3, 32'h0000_0002, "divu");
    step(3'b100, 32'hffff_fff8,  32'd3, 32'hffff_fffe, "div");
    step(3'b110, 32'hffff_fff8,  32'd3, 32'hffff_fffe, "rem");
    step(3'b111, 32'd8,          32'd3, 32'h0000_0002, "remu");
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
