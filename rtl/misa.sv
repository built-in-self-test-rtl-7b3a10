// Multiple-input signature analyzer (MISA).
//
// An NZ-stage multiple-input LFSR, NZ >= NIN (the number of CUT outputs).
// Stage i (z_i, i = 1..NZ, held in z[i-1]) takes input y_i, stages above NIN
// take 0:
//   z1(t+1) = y1(t) ^ XOR{ z_j(t) : FB[j-1] = 1 }
//   z_i(t+1) = y_i(t) ^ z_{i-1}(t)          for i > 1
// The defaults (NZ=2, FB=2'b11) are the two-stage register of the worked
// example, z1' = y1^z1^z2, z2' = y2^z1; these equations reproduce the
// example's fault-free and faulty state tables. For other sizes FB is the
// designer's feedback polynomial.
//
// g is the D input of stage 1, i.e. z1(t+1), combinational in step t: it is
// the one-bit MISA output the monitor checks. z is the current state; after
// the last step it is the ordinary signature.
//
// Interface: `init` loads Z0 (the initial state z(0)) synchronously and has
// priority; `en` clocks in y. Asynchronous active-low reset also loads Z0.
module misa #(
  parameter int unsigned   NIN = 2,
  parameter int unsigned   NZ  = 2,
  parameter logic [NZ-1:0] FB  = NZ'(2'b11),
  parameter logic [NZ-1:0] Z0  = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           en,
  input  logic [NIN-1:0] y,
  output logic [NZ-1:0]  z,
  output logic           g
);

  if (NZ < NIN) begin : g_bad_size
    $error("misa: needs at least as many stages as inputs");
  end

  logic [NZ-1:0] y_ext, z_next;

  always_comb begin
    y_ext     = NZ'(y);
    z_next[0] = y_ext[0] ^ (^(z & FB));
    for (int i = 1; i < int'(NZ); i++) z_next[i] = y_ext[i] ^ z[i-1];
  end

  assign g = z_next[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    z <= Z0;
    else if (init) z <= Z0;
    else if (en)   z <= z_next;
  end

endmodule
