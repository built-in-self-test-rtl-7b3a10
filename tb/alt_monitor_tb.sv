// Self-checking testbench for alt_monitor with the example covers
// (C0 = x2, C1 = x1): all vectors and both values of g against
// phi = C0&g | C1&~g and active = C0 != C1; then the example's fault-free
// and faulty columns (x, g) -> phi from the worked tables.
module alt_monitor_tb;
  logic [2:0] x;
  logic g, c0, c1, phi, active;
  int checks = 0, failures = 0;

  alt_monitor dut (.x, .g, .c0, .c1, .phi, .active);

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
    // example: x as x1x2x3 -> {x3,x2,x1}
    static logic [2:0] xs[5] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100};
    static logic gc[5]   = '{0, 0, 0, 1, 0};
    static logic phic[5] = '{0, 1, 0, 1, 0};
    static logic gk[5]   = '{1, 1, 0, 0, 1};
    static logic phik[5] = '{0, 0, 0, 1, 0};
    for (int i = 0; i < 16; i++) begin
      {g, x} = 4'(i); #1;
      chk(c0 == x[1] && c1 == x[0], "cover outputs");
      chk(phi == (g ? x[1] : x[0]), "phi");
      chk(active == (x[1] != x[0]), "active");
    end
    for (int t = 0; t < 5; t++) begin
      x = xs[t]; g = gc[t]; #1;
      chk(phi == phic[t], $sformatf("fault-free phi(%0d)", t));
      g = gk[t]; #1;
      chk(phi == phik[t], $sformatf("faulty phi(%0d)", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
