// Monitoring circuit M: the two covers and the gating that merges them with
// the MISA output into the alternating signal.
//
//   phi(t) = C0(x(t)) & g(t)  |  C1(x(t)) & ~g(t)
//
// C0 is consulted when the MISA output g = z1(t+1) is 1, C1 when it is 0; the
// covers were built so that the consulted one equals t mod 2, so a fault-free
// run gives phi = 0,1,0,1,... A wrong g flips phi exactly when C0 != C1 at
// that vector; `active` reports that condition (the step actually checks
// the MISA output). The AND-OR-inverter structure is that of the scheme's
// block diagram; the covers are cover_pla instances whose cubes are
// parameters (defaults: C0 = x2, C1 = x1, the example's optimised covers).
// Purely combinational.
module alt_monitor #(
  parameter int unsigned          M     = 3,
  parameter int unsigned          K0    = 1,
  parameter logic [K0-1:0][M-1:0] CARE0 = {K0{M'(3'b010)}},
  parameter logic [K0-1:0][M-1:0] VAL0  = {K0{M'(3'b010)}},
  parameter int unsigned          K1    = 1,
  parameter logic [K1-1:0][M-1:0] CARE1 = {K1{M'(3'b001)}},
  parameter logic [K1-1:0][M-1:0] VAL1  = {K1{M'(3'b001)}}
) (
  input  logic [M-1:0] x,
  input  logic         g,
  output logic         c0,
  output logic         c1,
  output logic         phi,
  output logic         active
);

  cover_pla #(.M(M), .K(K0), .CARE(CARE0), .VAL(VAL0)) u_c0 (.x(x), .c(c0));
  cover_pla #(.M(M), .K(K1), .CARE(CARE1), .VAL(VAL1)) u_c1 (.x(x), .c(c1));

  assign phi    = (c0 & g) | (c1 & ~g);
  assign active = c0 ^ c1;

endmodule
