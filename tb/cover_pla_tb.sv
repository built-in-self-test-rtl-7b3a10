// Self-checking testbench for cover_pla: the default cover (x2) and C1 = x1
// of the worked example over all 3-bit vectors, and a 3-cube cover over 6
// inputs against a separately written sum of products, on random vectors.
module cover_pla_tb;
  logic [2:0] x3;
  logic [5:0] x6;
  logic c_def, c_x1, c_6;
  int checks = 0, failures = 0;

  cover_pla u_def (.x(x3), .c(c_def));
  cover_pla #(.M(3), .K(1), .CARE(3'b001), .VAL(3'b001)) u_x1 (.x(x3), .c(c_x1));
  // cubes: x1 & ~x3 | x2 & x5 & ~x6 | ~x4
  cover_pla #(.M(6), .K(3),
              .CARE({6'b001000, 6'b110010, 6'b000101}),
              .VAL ({6'b000000, 6'b010010, 6'b000001})) u_6 (.x(x6), .c(c_6));

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
    for (int i = 0; i < 8; i++) begin
      x3 = 3'(i); #1;
      chk(c_def == x3[1], "default cover is x2");
      chk(c_x1 == x3[0], "cover x1");
    end
    for (int i = 0; i < 64; i++) begin
      x6 = 6'(i); #1;
      chk(c_6 == ((x6[0] & !x6[2]) | (x6[1] & x6[4] & !x6[5]) | !x6[3]),
          $sformatf("3-cube cover x=%b", x6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
