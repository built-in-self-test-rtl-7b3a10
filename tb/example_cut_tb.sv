// Self-checking testbench for example_cut: fault-free truth table against the
// two output equations, the published faulty behaviour of x3 stuck-at-1
// (y1 = 1, y2 = ~x2), and every single stuck-at fault against a separately
// written gate-level model.
module example_cut_tb;
  import bist_alt_pkg::*;

  logic [2:0] x;
  logic fault_en, fault_val;
  fault_site_e fault_site;
  logic [1:0] y;
  int checks = 0, failures = 0;

  example_cut dut (.x, .fault_en, .fault_site, .fault_val, .y);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: evaluate the schematic with one line forced.
  function automatic logic [1:0] ref_cut(input logic [2:0] xv, input bit en,
                                         input int site, input logic v);
    logic a, b, c, b_and, b_inv, c_or, c_and, n1, n2, o1, o2;
    a = xv[0]; b = xv[1]; c = xv[2];
    if (en && site == 0) a = v;
    if (en && site == 1) b = v;
    if (en && site == 4) c = v;
    b_and = (en && site == 2) ? v : b;
    b_inv = (en && site == 3) ? v : b;
    c_or  = (en && site == 5) ? v : c;
    c_and = (en && site == 6) ? v : c;
    n1 = (en && site == 7) ? v : (a & b_and);
    n2 = (en && site == 8) ? v : !b_inv;
    o1 = (en && site == 9) ? v : (n1 | c_or);
    o2 = (en && site == 10) ? v : (n2 & c_and);
    return {o2, o1};
  endfunction

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_en = 0; fault_site = FS_X1; fault_val = 0;
    for (int i = 0; i < 8; i++) begin
      x = 3'(i); #1;
      chk(y[0] == ((x[0] & x[1]) | x[2]), "y1 fault-free");
      chk(y[1] == (!x[1] & x[2]), "y2 fault-free");
    end
    // x3 stuck-at-1
    fault_en = 1; fault_site = FS_X3; fault_val = 1;
    for (int i = 0; i < 8; i++) begin
      x = 3'(i); #1;
      chk(y == {!x[1], 1'b1}, "x3 s-a-1 gives y1=1, y2=~x2");
    end
    for (int s = 0; s < NUM_FAULT_SITES; s++)
      for (int v = 0; v < 2; v++)
        for (int i = 0; i < 8; i++) begin
          fault_site = fault_site_e'(s); fault_val = 1'(v); x = 3'(i); #1;
          chk(y == ref_cut(x, 1, s, 1'(v)), $sformatf("fault site %0d/%0d x=%b", s, v, x));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
