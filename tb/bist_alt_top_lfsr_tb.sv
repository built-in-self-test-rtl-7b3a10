// End-to-end testbench for bist_alt_top with a pseudorandom (LFSR) test
// input generator, the kind of TIG used for the benchmark experiments, on the
// example circuit. The 3-bit LFSR (x^3+x^2+1, seed x1=1) gives 7 distinct
// vectors, so T = 7. Covers rebuilt for this sequence by the construction
// rule (the cover selected by the fault-free g must equal t mod 2), with x
// written {x3,x2,x1}:
//   required C1: x=001 -> 0, x=010 -> 1
//   required C0: 101,111,100 -> 0; 011,110 -> 1
// The don't-cares (C0 at 001/010, C1 at the five g=1 vectors, both at 000)
// were filled by hand to make C0 != C1 on as many applied vectors as a
// one-cube C1 allows:
//   C1 = ~x1&~x3,  C0 = x1&~x3 | ~x1&x2&x3
// which makes 4 of the 7 steps active (001, 010, 011, 110).
// The testbench checks the vector sequence against its own LFSR model, that
// the covers meet the construction rule, that the fault-free session passes
// in T+2 cycles, and every single stuck-at fault against a reference model.
module bist_alt_top_lfsr_tb;
  import bist_alt_pkg::*;

  localparam int T = 7;

  logic clk = 0, rst_n = 0, start = 0, stop_on_fail = 0;
  logic fault_en = 0, fault_val = 0;
  fault_site_e fault_site = FS_X1;
  logic busy, done, pass, fail, aborted, step, g, c0, c1, phi, active, err;
  logic [2:0] t, first_t, dev_count;
  logic [2:0] x;
  logic [1:0] y, signature;
  int checks = 0, failures = 0;
  int n_excited = 0, n_covered = 0, n_active = 0;

  always #5 clk = ~clk;

  bist_alt_top #(
    .T_LEN(T), .TIG_MODE(TIG_LFSR), .TIG_SEED(3'b001), .TIG_TAPS(3'b110),
    .K0(2), .CARE0({3'b111, 3'b101}), .VAL0({3'b110, 3'b001}),
    .K1(1), .CARE1(3'b101), .VAL1(3'b000)
  ) dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [2:0] lfsr_vec(input int i);
    logic [2:0] s = 3'b001;
    for (int k = 0; k < i; k++) s = {s[1:0], s[2] ^ s[1]};
    return s;
  endfunction

  function automatic logic [1:0] ref_cut(input logic [2:0] xv, input bit en,
                                         input int site, input logic v);
    logic a, b, c, b_and, b_inv, c_or, c_and, n1, n2;
    a = (en && site == 0) ? v : xv[0];
    b = (en && site == 1) ? v : xv[1];
    c = (en && site == 4) ? v : xv[2];
    b_and = (en && site == 2) ? v : b;
    b_inv = (en && site == 3) ? v : b;
    c_or  = (en && site == 5) ? v : c;
    c_and = (en && site == 6) ? v : c;
    n1 = (en && site == 7) ? v : (a & b_and);
    n2 = (en && site == 8) ? v : !b_inv;
    return {(en && site == 10) ? v : (n2 & c_and),
            (en && site == 9) ? v : (n1 | c_or)};
  endfunction

  function automatic logic ref_c0(input logic [2:0] xv);
    return (xv[0] & !xv[2]) | (!xv[0] & xv[1] & xv[2]);
  endfunction

  function automatic logic ref_c1(input logic [2:0] xv);
    return !xv[0] & !xv[2];
  endfunction

  task automatic run(input bit en, input int site, input logic v, input string tag);
    logic [1:0] z = 2'b00, zc = 2'b00;
    logic [1:0] yv, yc;
    logic gv, gc, pv;
    bit excited = 0, detect = 0;
    int first = 0, s = 0, cycles = 1;
    fault_en = en; fault_site = fault_site_e'(site); fault_val = v;
    start = 1; @(negedge clk); start = 0;
    while (!done && cycles < 50) begin
      if (step) begin
        logic [2:0] xv = lfsr_vec(s);
        yv = ref_cut(xv, en, site, v);
        yc = ref_cut(xv, 0, 0, 0);
        gv = yv[0] ^ z[0] ^ z[1];
        gc = yc[0] ^ zc[0] ^ zc[1];
        pv = gv ? ref_c0(xv) : ref_c1(xv);
        if (!en) begin
          chk((gc ? ref_c0(xv) : ref_c1(xv)) == 1'(s % 2), $sformatf("construction rule t=%0d", s));
          if (ref_c0(xv) != ref_c1(xv)) n_active++;
          chk(active == (ref_c0(xv) != ref_c1(xv)), "active flag");
        end
        if (yv != yc) excited = 1;
        if (pv != 1'(s % 2) && !detect) begin detect = 1; first = s; end
        chk(x == xv, $sformatf("%s x(%0d)", tag, s));
        chk(y == yv && g == gv && phi == pv, $sformatf("%s y/g/phi(%0d)", tag, s));
        z  = {yv[1] ^ z[0], gv};
        zc = {yc[1] ^ zc[0], gc};
        s++;
      end
      @(negedge clk); cycles++;
    end
    chk(s == T && cycles == T + 2, {tag, " T steps in T+2 cycles"});
    chk(signature == z, {tag, " signature"});
    chk(fail == detect && pass == !detect, {tag, " verdict"});
    if (detect) chk(first_t == 3'(first), {tag, " first deviation"});
    if (excited) n_excited++;
    if (excited && detect) n_covered++;
  endtask

  initial begin
    #500000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, 0, 0, "fault-free");
    chk(pass, "fault-free session passes");
    chk(n_active == 4, "covers actively check 4 of the 7 steps");
    for (int site = 0; site < NUM_FAULT_SITES; site++)
      for (int v = 0; v < 2; v++)
        run(1, site, 1'(v), $sformatf("site %0d s-a-%0d", site, v));
    $display("active steps %0d of %0d; faults producing a wrong CUT output: %0d, detected: %0d",
             n_active, T, n_excited, n_covered);
    chk(n_covered > 0, "a fault was detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
