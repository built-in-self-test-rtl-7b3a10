// Cover circuit (C0 or C1) as a two-level sum of products.
//
// A cover is a combinational function of the test vector x(t), specified only
// on the vectors the test applies (cover value t mod 2 where the MISA output
// g selects this cover, don't-care elsewhere) and completed by a two-level
// minimiser. This module holds the minimised result as K product terms
// (cubes): cube k is true when (x & CARE[k]) == (VAL[k] & CARE[k]), i.e.
// CARE selects the literals of the cube and VAL their polarity, and the
// output is the OR of all cubes. K must be at least 1; a cover that is 0 on
// every applied vector is written as a cube that matches none of them.
//
// The cover rule and the defaults (C0 = x2, the optimised C0 of the worked
// example) follow the scheme; holding a cover as parameterised cubes, so one
// module serves every CUT, is this design's choice. Purely combinational.
module cover_pla #(
  parameter int unsigned          M    = 3,
  parameter int unsigned          K    = 1,
  parameter logic [K-1:0][M-1:0]  CARE = {K{M'(3'b010)}},
  parameter logic [K-1:0][M-1:0]  VAL  = {K{M'(3'b010)}}
) (
  input  logic [M-1:0] x,
  output logic         c
);

  logic [K-1:0] cube;

  always_comb begin
    for (int k = 0; k < int'(K); k++)
      cube[k] = ((x ^ VAL[k]) & CARE[k]) == '0;
    c = |cube;
  end

endmodule
