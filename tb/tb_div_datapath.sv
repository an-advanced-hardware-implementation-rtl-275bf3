// Self-checking testbench of div_datapath at 32 bits: load two magnitudes,
// issue exactly 32 steps (one per clock) and compare quotient and remain
// registers with the simulator's unsigned / and %. Corner values and random
// operands, including small divisors and divisors larger than the dividend.
module tb_div_datapath;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [W-1:0] a, b, q, r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  div_datapath #(.XLEN(W)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .step_i(step),
    .dividend_i(a), .divisor_i(b), .quotient_o(q), .remainder_o(r));

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    @(negedge clk);
    a = x; b = y; load = 1;
    @(negedge clk);
    load = 0; step = 1;
    repeat (W) @(negedge clk);
    step = 0;
    // Extra idle cycles must not disturb the result.
    @(negedge clk);
    checks += 2;
    if (q !== x / y) begin failures++; $display("FAIL %h / %h: q=%h exp %h", x, y, q, x / y); end
    if (r !== x % y) begin failures++; $display("FAIL %h %% %h: r=%h exp %h", x, y, r, x % y); end
  endtask

  initial begin
    a = '0; b = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(32'd8, 32'd3);
    run(32'hffff_ffff, 32'd1);
    run(32'hffff_ffff, 32'hffff_ffff);
    run(32'h8000_0000, 32'd1);
    run(32'd5, 32'd7);
    run(32'h0, 32'd9);
    run(32'hffff_fffe, 32'hffff_ffff);
    run(32'h8000_0000, 32'h8000_0001);
    repeat (300) begin
      logic [W-1:0] x, y;
      x = $urandom;
      y = $urandom >> ($urandom % 32);
      if (y == 0) y = 1;
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
