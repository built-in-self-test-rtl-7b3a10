// Self-checking testbench for bist_ctrl: one init cycle, exactly T_LEN step
// cycles with t = 0..T_LEN-1, then done; restart from DONE; early stop when
// fail rises with stop_on_fail set, and no stop with it clear. Run with
// the default T_LEN = 5 and with T_LEN = 12.
module bist_ctrl_tb;
  logic clk = 0, rst_n = 0, start = 0, stop_on_fail = 0, fail = 0;
  logic init, step, busy, done, aborted;
  logic [2:0] t;
  logic init12, step12, busy12, done12, aborted12;
  logic [3:0] t12;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_ctrl dut (.clk, .rst_n, .start, .stop_on_fail, .fail, .init, .step, .t,
                 .busy, .done, .aborted);
  bist_ctrl #(.T_LEN(12)) dut12 (.clk, .rst_n, .start, .stop_on_fail, .fail,
                 .init(init12), .step(step12), .t(t12), .busy(busy12),
                 .done(done12), .aborted(aborted12));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps, steps12, inits, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done && !step && !init, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      start = 1; @(negedge clk); start = 0;
      steps = 0; steps12 = 0; inits = 0; cyc = 0;
      while (!done12 && cyc < 100) begin
        if (init) inits++;
        if (step) begin chk(t == 3'(steps), "t counts steps"); steps++; end
        if (step12) begin chk(t12 == 4'(steps12), "t counts steps (12)"); steps12++; end
        chk(!(init && step), "init and step exclusive");
        @(negedge clk); cyc++;
      end
      chk(inits == 1, "one init pulse");
      chk(steps == 5, $sformatf("5 steps, got %0d", steps));
      chk(steps12 == 12, $sformatf("12 steps, got %0d", steps12));
      chk(cyc == 13, $sformatf("12 steps + init = 13 cycles, got %0d", cyc));
      chk(done && !aborted && !busy, "done, not aborted");
    end
    // early stop
    stop_on_fail = 1;
    start = 1; @(negedge clk); start = 0;
    @(negedge clk); @(negedge clk); @(negedge clk);   // init, t=0, t=1
    chk(step && t == 3'd2, "running at t=2");
    fail = 1; #1;
    chk(!step, "step withheld on fail");
    @(negedge clk);
    chk(done && aborted && done12 && aborted12, "aborted");
    // no stop when disabled
    stop_on_fail = 0;
    start = 1; @(negedge clk); start = 0;
    steps = 0; cyc = 0;
    while (!done && cyc < 100) begin
      if (step) steps++;
      @(negedge clk); cyc++;
    end
    chk(steps == 5 && !aborted, "full run despite fail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
