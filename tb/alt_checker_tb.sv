// Self-checking testbench for alt_checker: the example's fault-free phi
// (0,1,0,1,0) must pass; its faulty phi (0,0,0,1,0) must fail with the first
// deviation at step 1; steps with valid low are ignored; then random phi
// streams against a separately written reference (expected phi = count of
// checked steps mod 2).
module alt_checker_tb;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, phi = 0;
  logic err, fail;
  logic [7:0] first_t, dev_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alt_checker #(.TW(8)) dut (.clk, .rst_n, .clear, .valid, .phi, .err, .fail,
                             .first_t, .dev_count);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic pc[5] = '{0, 1, 0, 1, 0};
    static logic pk[5] = '{0, 0, 0, 1, 0};
    int n, devs, first;
    bit ffail;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!fail && dev_count == 0, "reset");
    for (int t = 0; t < 5; t++) begin
      valid = 1; phi = pc[t]; #1;
      chk(!err, "fault-free step no err");
      @(negedge clk);
      // a gap with valid low and a wrong-looking phi must not count
      valid = 0; phi = !pc[t]; #1;
      chk(!err, "gap no err");
      @(negedge clk);
    end
    chk(!fail && dev_count == 0, "fault-free passes");
    clear = 1; @(negedge clk); clear = 0;
    for (int t = 0; t < 5; t++) begin
      valid = 1; phi = pk[t]; #1;
      chk(err == (t == 1), $sformatf("faulty err(%0d)", t));
      @(negedge clk);
      chk(fail == (t >= 1), $sformatf("faulty fail after %0d", t));
    end
    chk(first_t == 1 && dev_count == 1, "first deviation at t=1");
    // random
    for (int r = 0; r < 20; r++) begin
      valid = 0;
      clear = 1; @(negedge clk); clear = 0;
      n = 0; devs = 0; first = 0; ffail = 0;
      for (int c = 0; c < 40; c++) begin
        valid = 1'($urandom);
        phi = ($urandom % 8 == 0) ? 1'(~n) : 1'(n);
        #1;
        chk(err == (valid && phi != 1'(n)), "random err");
        if (valid) begin
          if (phi != 1'(n)) begin
            if (!ffail) first = n;
            ffail = 1; devs++;
          end
          n++;
        end
        @(negedge clk);
        chk(fail == ffail, "random fail");
      end
      chk(dev_count == 8'(devs), "random dev_count");
      if (ffail) chk(first_t == 8'(first), "random first_t");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
