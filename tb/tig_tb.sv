// Self-checking testbench for tig: the example counter sequence
// 000,100,010,110,001 (x1x2x3), wrap-around, hold when not stepping, init
// reload; and LFSR flavour at M=3 and M=8, checked against a separately
// written shift model and for a full period of distinct non-zero vectors.
module tig_tb;
  import bist_alt_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [2:0] xc, xl3;
  logic [7:0] xl8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tig #(.M(3)) u_cnt (.clk, .rst_n, .init, .step, .x(xc));
  tig #(.M(3), .MODE(TIG_LFSR), .SEED(3'b001), .TAPS(3'b110)) u_l3
      (.clk, .rst_n, .init, .step, .x(xl3));
  tig #(.M(8), .MODE(TIG_LFSR), .SEED(8'h01), .TAPS(8'b1011_1000)) u_l8
      (.clk, .rst_n, .init, .step, .x(xl8));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // x1x2x3 strings of the example sequence -> vector with x[0]=x1
  function automatic logic [2:0] from_x1x2x3(input string s);
    return {s[2] == "1", s[1] == "1", s[0] == "1"};
  endfunction

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string ex[5] = '{"000", "100", "010", "110", "001"};
    logic [2:0] m3;
    logic [7:0] m8;
    bit seen8[256];
    bit seen3[8];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(xc == 3'b000 && xl3 == 3'b001 && xl8 == 8'h01, "reset state");
    // counter: example sequence
    step = 1;
    for (int t = 0; t < 5; t++) begin
      chk(xc == from_x1x2x3(ex[t]), $sformatf("example x(%0d)", t));
      @(negedge clk);
    end
    // continue to wrap
    for (int t = 5; t < 8; t++) begin
      chk(xc == 3'(t), "counter value");
      @(negedge clk);
    end
    chk(xc == 3'd0, "counter wraps mod 8");
    // hold
    step = 0;
    @(negedge clk); @(negedge clk);
    chk(xc == 3'd0, "counter holds");
    step = 1; @(negedge clk); @(negedge clk); step = 0;
    chk(xc == 3'd2, "counter advanced twice");
    init = 1; @(negedge clk); init = 0;
    chk(xc == 3'd0 && xl3 == 3'b001 && xl8 == 8'h01, "init reload");
    // LFSRs: model m_next = {m[M-2:0], fb}, fb = XOR over taps, written per tap
    m3 = 3'b001; m8 = 8'h01;
    step = 1;
    for (int t = 0; t < 255; t++) begin
      chk(xl8 == m8, $sformatf("lfsr8 step %0d", t));
      chk(!seen8[xl8] && xl8 != 0, "lfsr8 no repetition");
      seen8[xl8] = 1;
      if (t < 7) begin
        chk(xl3 == m3, $sformatf("lfsr3 step %0d", t));
        chk(!seen3[xl3] && xl3 != 0, "lfsr3 no repetition");
        seen3[xl3] = 1;
      end
      m3 = {m3[1:0], m3[2] ^ m3[1]};
      m8 = {m8[6:0], m8[7] ^ m8[5] ^ m8[4] ^ m8[3]};
      @(negedge clk);
    end
    chk(xl8 == 8'h01, "lfsr8 period 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
