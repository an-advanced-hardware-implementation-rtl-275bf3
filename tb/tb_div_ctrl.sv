// Self-checking testbench of div_ctrl at XLEN = 32. It drives start_i and the
// zero-divisor flag and checks, cycle by cycle, the expected schedule worked
// out by hand from the state machine description:
//   cycle 0 (IDLE, start_i high)      latch_o
//   cycle 1 (START)                   load_o, busy_o
//   cycles 2..33 (CALC)               step_o, 32 in all
//   cycle 34 (END)                    finish_o
//   cycle 35 (IDLE)                   ready_o = 1, busy_o = 0
// and the zero-divisor, abort and back-to-back (start held high) cases.
module tb_div_ctrl;
  import div_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, start = 0, dz = 0;
  div_state_e st;
  logic latch, load, step, finish, dbz, abort, busy, ready;
  logic [5:0] count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  div_ctrl #(.XLEN(W)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .divisor_zero_i(dz),
    .state_o(st), .latch_o(latch), .load_o(load), .step_o(step),
    .finish_o(finish), .dbz_o(dbz), .abort_o(abort), .busy_o(busy),
    .ready_o(ready), .count_o(count));

  task automatic chk(input logic got, input logic exp, input string what, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b exp %b (state %s)", what, cyc, got, exp, st.name());
    end
  endtask

  // One full operation. start_i rises before cycle 0 and, if hold is set,
  // stays high afterwards (back-to-back); otherwise it falls after cycle 34.
  task automatic full_op(input bit hold);
    int steps = 0;
    start = 1;
    for (int c = 0; c <= 35; c++) begin
      #1;  // signals settled after the negedge update
      chk(latch,  c == 0 || (c == 35 && hold), "latch", c);
      chk(load,   c == 1, "load", c);
      chk(step,   c >= 2 && c <= 33, "step", c);
      chk(finish, c == 34, "finish", c);
      chk(busy,   c >= 1 && c <= 34, "busy", c);
      if (c == 35) chk(ready, 1'b1, "ready", c);
      chk(dbz || abort, 1'b0, "no dbz/abort", c);
      if (step) steps++;
      if (c == 34 && !hold) start = 0;
      @(negedge clk);
    end
    checks++;
    if (steps != W) begin failures++; $display("FAIL %0d steps, exp %0d", steps, W); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(busy, 1'b0, "busy after reset", -1);
    chk(ready, 1'b0, "ready after reset", -1);

    // 1. Single operation, then start_i low clears ready_o.
    full_op(1'b0);
    #1 chk(ready, 1'b0, "ready cleared when idle", 36);

    // 2. Back-to-back: start_i held, busy_o low for exactly one cycle.
    @(negedge clk);
    full_op(1'b1);
    // cycle 35 of the first op was cycle 0 of the second: now in cycle 1.
    #1 chk(busy, 1'b1, "busy back after one-cycle gap", 1);
    chk(load, 1'b1, "second load", 1);
    chk(ready, 1'b1, "ready stays high while start held", 1);
    repeat (33) @(negedge clk);
    #1 chk(finish, 1'b1, "second finish", 34);
    start = 0;
    repeat (3) @(negedge clk);

    // 3. Zero divisor: START returns to IDLE with ready_o set.
    dz = 1; start = 1;
    #1 chk(latch, 1'b1, "dbz latch", 0);
    @(negedge clk);
    #1 chk(dbz, 1'b1, "dbz", 1);
    chk(load, 1'b0, "no load on dbz", 1);
    start = 0;
    // start_i falls in the same cycle: dbz has priority only if start high.
    #1 chk(abort, 1'b1, "start low in START aborts", 1);
    start = 1;
    #1;
    @(negedge clk);
    #1 chk(busy, 1'b0, "dbz busy", 2);
    chk(ready, 1'b1, "dbz ready", 2);
    chk(st == ST_IDLE, 1'b1, "dbz back to IDLE", 2);
    start = 0; dz = 0;
    repeat (2) @(negedge clk);

    // 4. Abort: start_i dropped in CALC.
    start = 1;
    repeat (10) @(negedge clk);
    #1 chk(step, 1'b1, "calc running", 10);
    start = 0;
    #1 chk(abort, 1'b1, "abort", 10);
    chk(step, 1'b0, "no step when aborted", 10);
    @(negedge clk);
    #1 chk(busy, 1'b0, "abort clears busy", 11);
    chk(st == ST_IDLE, 1'b1, "abort to IDLE", 11);
    repeat (40) begin
      @(negedge clk);
      #1 chk(finish, 1'b0, "no finish after abort", 12);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
