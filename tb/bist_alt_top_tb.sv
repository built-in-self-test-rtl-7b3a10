// End-to-end testbench for bist_alt_top at its default parameters (the worked
// example: 3-input/2-output CUT, mod-8 counter TIG, 2-stage MISA, T = 5,
// covers C0 = x2, C1 = x1).
//
// 1. Fault-free session: x, y, z, g, phi of every step against the published
//    fault-free table; pass; session length T+2 cycles from start to done (start, init, T steps).
// 2. x3 stuck-at-1: every step against the published faulty table; the
//    alternation breaks at t = 1.
// 3. All 22 single stuck-at faults: a reference model written here (its own
//    gate evaluation, MISA equations and covers) predicts per step y, g, phi
//    and the verdict; the design must agree. Fault coverage of the test and
//    of the alternating output is printed.
// 4. Early stop: with stop_on_fail the session ends right after the first
//    deviation.
// Mechanisms counted (each must occur): passing session, detected fault,
// step where the MISA output is wrong but C0 = C1 masks it, early abort.
module bist_alt_top_tb;
  import bist_alt_pkg::*;

  localparam int T = 5;

  logic clk = 0, rst_n = 0, start = 0, stop_on_fail = 0;
  logic fault_en = 0, fault_val = 0;
  fault_site_e fault_site = FS_X1;
  logic busy, done, pass, fail, aborted, step, g, c0, c1, phi, active, err;
  logic [2:0] t, first_t, dev_count;
  logic [2:0] x;
  logic [1:0] y, signature;
  int checks = 0, failures = 0;
  int n_pass = 0, n_detect = 0, n_masked = 0, n_abort = 0;
  int n_excited = 0, n_covered = 0;

  always #5 clk = ~clk;

  bist_alt_top dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference CUT with an optional stuck line (site numbering as fault_site_e).
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

  // Reference run: per-step y, g, phi; returns the verdict.
  typedef struct {
    logic [1:0] y[T];
    logic       g[T];
    logic       phi[T];
    logic [1:0] sig;
    bit         detect;
    int         first;
    int         devs;
    bit         excited;
    int         masked;
  } ref_run_t;

  function automatic ref_run_t ref_model(input bit en, input int site, input logic v);
    ref_run_t r;
    logic [1:0] z = 2'b00, zc = 2'b00;
    logic gc;
    r.detect = 0; r.first = 0; r.devs = 0; r.excited = 0; r.masked = 0;
    for (int i = 0; i < T; i++) begin
      logic [2:0] xv = 3'(i);
      logic [1:0] yc = ref_cut(xv, 0, 0, 0);
      r.y[i] = ref_cut(xv, en, site, v);
      if (r.y[i] != yc) r.excited = 1;
      r.g[i] = r.y[i][0] ^ z[0] ^ z[1];
      gc     = yc[0] ^ zc[0] ^ zc[1];
      z  = {r.y[i][1] ^ z[0], r.g[i]};
      zc = {yc[1] ^ zc[0], gc};
      r.phi[i] = r.g[i] ? xv[1] : xv[0];
      if (r.g[i] != gc && xv[1] == xv[0]) r.masked++;
      if (r.phi[i] != 1'(i % 2)) begin
        if (!r.detect) r.first = i;
        r.detect = 1; r.devs++;
      end
    end
    r.sig = z;
    return r;
  endfunction

  // Runs one session, compares every step with the reference, returns the
  // number of cycles from start to done.
  task automatic run(input bit en, input int site, input logic v,
                     input string tag, output int cycles);
    ref_run_t r = ref_model(en, site, v);
    int s = 0;
    fault_en = en; fault_site = fault_site_e'(site); fault_val = v;
    start = 1; @(negedge clk); start = 0; cycles = 1;
    while (!done && cycles < 50) begin
      if (step) begin
        chk(t == 3'(s) && x == 3'(s), {tag, " x(t)"});
        chk(y == r.y[s], $sformatf("%s y(%0d)", tag, s));
        chk(g == r.g[s], $sformatf("%s g(%0d)", tag, s));
        chk(phi == r.phi[s], $sformatf("%s phi(%0d)", tag, s));
        chk(err == (r.phi[s] != 1'(s % 2)), $sformatf("%s err(%0d)", tag, s));
        s++;
      end
      @(negedge clk); cycles++;
    end
    chk(done, {tag, " done"});
    if (!stop_on_fail) begin
      chk(s == T, {tag, " T steps"});
      chk(signature == r.sig, {tag, " signature"});
      chk(dev_count == 3'(r.devs), {tag, " deviation count"});
    end
    chk(fail == r.detect && pass == !r.detect, {tag, " verdict"});
    if (r.detect) chk(first_t == 3'(r.first), {tag, " first deviation"});
    if (pass) n_pass++;
    if (fail && r.excited) n_detect++;
    n_masked += r.masked;
    if (r.excited) n_excited++;
    if (r.excited && r.detect) n_covered++;
    if (aborted) begin
      n_abort++;
      chk(s == r.first + 1, {tag, " stopped right after first deviation"});
    end
  endtask

  initial begin
    #500000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published tables (z written z1z2 -> {z2,z1}; y written y1y2 -> {y2,y1})
    static logic [1:0] y_c[T] = '{2'b00, 2'b00, 2'b00, 2'b01, 2'b11};
    static logic [1:0] z_c[T] = '{2'b00, 2'b00, 2'b00, 2'b01, 2'b00};
    static logic       p_c[T] = '{0, 1, 0, 1, 0};
    static logic [1:0] y_k[T] = '{2'b11, 2'b11, 2'b01, 2'b01, 2'b11};
    static logic [1:0] z_k[T] = '{2'b11, 2'b01, 2'b10, 2'b00, 2'b11};
    static logic       p_k[T] = '{0, 0, 0, 1, 0};
    int cycles, s;

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done, "idle after reset");

    // 1. fault-free, against the published table
    start = 1; @(negedge clk); start = 0;
    cycles = 1; s = 0;
    while (!done && cycles < 50) begin
      if (step) begin
        chk(y == y_c[s] && g == z_c[s][0] && phi == p_c[s],
            $sformatf("fault-free table row %0d", s));
        @(negedge clk); cycles++;
        if (s < T - 1 || done || busy) chk(signature == z_c[s], $sformatf("fault-free z(%0d)", s + 1));
        s++;
      end else begin
        @(negedge clk); cycles++;
      end
    end
    chk(cycles == T + 2, $sformatf("start, init and T steps = %0d cycles, got %0d", T + 2, cycles));
    chk(pass && !fail, "fault-free session passes");

    // 2. x3 stuck-at-1, against the published table
    fault_en = 1; fault_site = FS_X3; fault_val = 1;
    start = 1; @(negedge clk); start = 0;
    s = 0;
    while (!done) begin
      if (step) begin
        chk(y == y_k[s] && g == z_k[s][0] && phi == p_k[s],
            $sformatf("x3 s-a-1 table row %0d", s));
        chk(err == (s == 1), $sformatf("x3 s-a-1 err(%0d)", s));
        @(negedge clk);
        chk(signature == z_k[s], $sformatf("x3 s-a-1 z(%0d)", s + 1));
        s++;
      end else @(negedge clk);
    end
    chk(fail && first_t == 3'd1, "x3 s-a-1 detected at t=1");

    // 3. every single stuck-at fault, and the fault-free case, vs reference
    run(0, 0, 0, "fault-free", cycles);
    for (int site = 0; site < NUM_FAULT_SITES; site++)
      for (int v = 0; v < 2; v++)
        run(1, site, 1'(v), $sformatf("site %0d s-a-%0d", site, v), cycles);
    $display("faults producing a wrong CUT output: %0d of %0d, detected by the alternating output: %0d",
             n_excited, 2 * NUM_FAULT_SITES, n_covered);

    // 4. early stop
    stop_on_fail = 1;
    run(1, int'(FS_X3), 1'b1, "x3 s-a-1 early stop", cycles);
    chk(cycles < T + 2, "early stop shortens the session");
    run(0, 0, 0, "fault-free with early stop enabled", cycles);
    chk(cycles == T + 2, "no early stop without a fault");
    stop_on_fail = 0;

    $display("mechanisms: pass=%0d detect=%0d masked_steps=%0d abort=%0d",
             n_pass, n_detect, n_masked, n_abort);
    chk(n_pass > 0, "a session passed");
    chk(n_detect > 0, "a fault was detected");
    chk(n_masked > 0, "a wrong MISA output was masked by C0 = C1");
    chk(n_abort > 0, "a session was aborted early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
