// Shared types and constants of the alternating-output BIST.
//
// The scheme: a test input generator (TIG) drives an m-input combinational
// circuit under test (CUT); the CUT outputs are compacted by a multiple-input
// signature analyzer (MISA). Instead of comparing the final signature, the
// next value of the MISA's first stage, g(t) = z1(t+1), is merged with two
// cover circuits C0(x(t)), C1(x(t)) into phi(t) = C0&g | C1&~g, which is
// 0,1,0,1,... in a fault-free run. A checker flags the first break in that
// alternation.
//
// This package holds the TIG mode, the sizes of the worked example circuit
// (3 inputs, 2 outputs) and the single stuck-at fault sites of that circuit,
// which the example CUT can inject for demonstration and coverage runs. The
// fault-site list follows the lines drawn in the example schematic; making
// faults injectable is a choice of this design, not part of the scheme.
package bist_alt_pkg;

  // Test input generator flavours: the example uses a binary counter, the
  // benchmark experiments a pseudorandom LFSR.
  typedef enum logic {
    TIG_COUNTER = 1'b0,
    TIG_LFSR    = 1'b1
  } tig_mode_e;

  // Example circuit C: x1..x3 in, y1..y2 out.
  localparam int unsigned EX_M = 3;
  localparam int unsigned EX_N = 2;

  // Lines of the example circuit that can carry a stuck-at fault. A stem
  // fault (x2, x3) hits every branch; a branch fault hits one gate input.
  typedef enum logic [3:0] {
    FS_X1     = 4'd0,   // input x1 (single fanout, into the AND of y1)
    FS_X2     = 4'd1,   // input x2 stem
    FS_X2_AND = 4'd2,   // x2 branch into the AND of y1
    FS_X2_INV = 4'd3,   // x2 branch into the inverter
    FS_X3     = 4'd4,   // input x3 stem
    FS_X3_OR  = 4'd5,   // x3 branch into the OR of y1
    FS_X3_AND = 4'd6,   // x3 branch into the AND of y2
    FS_AND1   = 4'd7,   // output of the AND x1&x2
    FS_INV    = 4'd8,   // output of the inverter ~x2
    FS_Y1     = 4'd9,   // output y1
    FS_Y2     = 4'd10   // output y2
  } fault_site_e;

  localparam int unsigned NUM_FAULT_SITES = 11;

endpackage
