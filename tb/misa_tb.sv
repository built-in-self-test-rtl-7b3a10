// Self-checking testbench for misa: replays the CUT output sequences of the
// worked example (fault-free and with x3 stuck-at-1) and compares state and
// g = z1(t+1) with the published state tables; then random inputs against a
// separately written model, for the default and for a 4-stage register with
// 3 inputs. Also checks hold (en low) and init.
module misa_tb;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [1:0] y2, z2;
  logic [2:0] y4;
  logic [3:0] z4;
  logic g2, g4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misa dut (.clk, .rst_n, .init, .en, .y(y2), .z(z2), .g(g2));
  misa #(.NIN(3), .NZ(4), .FB(4'b1001), .Z0(4'b0101)) dut4
      (.clk, .rst_n, .init, .en, .y(y4), .z(z4), .g(g4));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // "ab" written as y1y2 / z1z2 -> vector with [0] = first character
  function automatic logic [1:0] v2(input string s);
    return {s[1] == "1", s[0] == "1"};
  endfunction

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string yc[5] = '{"00", "00", "00", "10", "11"};
    static string zc[5] = '{"00", "00", "00", "10", "00"};
    static string yk[5] = '{"11", "11", "10", "10", "11"};
    static string zk[5] = '{"11", "10", "01", "00", "11"};
    logic [3:0] m4;
    logic [3:0] nx;
    y2 = 0; y4 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(z2 == 2'b00 && z4 == 4'b0101, "reset state z(0)");
    en = 1;
    for (int t = 0; t < 5; t++) begin
      y2 = v2(yc[t]); #1;
      chk(g2 == v2(zc[t])[0], $sformatf("fault-free g(%0d)", t));
      @(negedge clk);
      chk(z2 == v2(zc[t]), $sformatf("fault-free z(%0d)", t + 1));
    end
    init = 1; @(negedge clk); init = 0;
    chk(z2 == 2'b00, "init loads z(0)");
    for (int t = 0; t < 5; t++) begin
      y2 = v2(yk[t]); #1;
      chk(g2 == v2(zk[t])[0], $sformatf("faulty g(%0d)", t));
      @(negedge clk);
      chk(z2 == v2(zk[t]), $sformatf("faulty z(%0d)", t + 1));
    end
    en = 0; y2 = 2'b11; @(negedge clk);
    chk(z2 == v2(zk[4]), "hold when en low");
    // random, 4-stage model: z1' = y1^z1^z4, zi' = yi^z(i-1), z4' = z3
    init = 1; @(negedge clk); init = 0; en = 1;
    m4 = 4'b0101;
    for (int t = 0; t < 200; t++) begin
      y4 = 3'($urandom);
      nx[0] = y4[0] ^ m4[0] ^ m4[3];
      nx[1] = y4[1] ^ m4[0];
      nx[2] = y4[2] ^ m4[1];
      nx[3] = m4[2];
      #1 chk(g4 == nx[0], "4-stage g");
      @(negedge clk);
      m4 = nx;
      chk(z4 == m4, "4-stage state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
