// Test input generator (TIG).
//
// Produces one m-bit test vector x(t) per step, with no repetition within a
// test, as the alternating-output scheme requires (each vector must map to a
// single cover value). Bit x[i-1] is input x_i of the circuit under test.
//
// Two flavours, chosen by MODE:
//  * TIG_COUNTER: a mod-2^M binary counter with x1 as the least significant
//    bit, starting at SEED. With M=3 and SEED=0 this gives 000,100,010,110,001
//    written as x1x2x3, the sequence of the worked example. Period 2^M.
//  * TIG_LFSR: a Fibonacci LFSR for pseudorandom vectors, as used for the
//    benchmark experiments. The state shifts towards the MSB and the new LSB
//    is the XOR of the state bits selected by TAPS. With a primitive
//    polynomial and a non-zero SEED the period is 2^M-1. The polynomial is
//    not fixed by the scheme; the default TAPS (x^3+x^2+1) is this design's
//    choice.
//
// Interface: `init` loads SEED (synchronous, has priority over `step`);
// `step` advances to the next vector at the clock edge. x is the registered
// state, so x(t) is stable for the whole step t. Active-low asynchronous reset
// also loads SEED.
module tig
  import bist_alt_pkg::*;
#(
  parameter int unsigned  M    = 3,
  parameter tig_mode_e    MODE = TIG_COUNTER,
  parameter logic [M-1:0] SEED = '0,
  parameter logic [M-1:0] TAPS = M'(3'b110)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         step,
  output logic [M-1:0] x
);

  if (MODE == TIG_LFSR && SEED == '0) begin : g_bad_seed
    $error("tig: an LFSR needs a non-zero SEED");
  end

  logic [M-1:0] x_next;

  always_comb begin
    if (MODE == TIG_COUNTER) x_next = x + 1'b1;
    else                     x_next = {x[M-2:0], ^(x & TAPS)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     x <= SEED;
    else if (init)  x <= SEED;
    else if (step)  x <= x_next;
  end

endmodule
