// Example circuit under test C (3 inputs, 2 outputs).
//
// y1 = (x1 & x2) | x3
// y2 = ~x2 & x3
// x[0]=x1, x[1]=x2, x[2]=x3; y[0]=y1, y[1]=y2. The gate structure (one AND
// and one OR for y1, an inverter and an AND for y2, with x2 and x3 fanning
// out) is the worked example's schematic.
//
// For demonstration and fault-coverage runs the circuit can carry one single
// stuck-at fault: when fault_en is high, the line named by fault_site is
// forced to fault_val. The site list (bist_alt_pkg::fault_site_e) names
// every line of the schematic, with stems and fanout branches separately.
// This injection hook is this design's addition; with fault_en low the
// circuit is exactly the example's function. Purely combinational.
module example_cut
  import bist_alt_pkg::*;
(
  input  logic [EX_M-1:0] x,
  input  logic            fault_en,
  input  fault_site_e     fault_site,
  input  logic            fault_val,
  output logic [EX_N-1:0] y
);

  // Returns v, or the stuck value when this line is the faulty one.
  function automatic logic line(input logic v, input fault_site_e site,
                                input logic en, input fault_site_e sel,
                                input logic sv);
    return (en && sel == site) ? sv : v;
  endfunction

  logic x1, x2, x3, x2_and, x2_inv, x3_or, x3_and;
  logic and1, inv, y1, y2;

  always_comb begin
    x1     = line(x[0],   FS_X1,     fault_en, fault_site, fault_val);
    x2     = line(x[1],   FS_X2,     fault_en, fault_site, fault_val);
    x3     = line(x[2],   FS_X3,     fault_en, fault_site, fault_val);
    x2_and = line(x2,     FS_X2_AND, fault_en, fault_site, fault_val);
    x2_inv = line(x2,     FS_X2_INV, fault_en, fault_site, fault_val);
    x3_or  = line(x3,     FS_X3_OR,  fault_en, fault_site, fault_val);
    x3_and = line(x3,     FS_X3_AND, fault_en, fault_site, fault_val);
    and1   = line(x1 & x2_and, FS_AND1, fault_en, fault_site, fault_val);
    inv    = line(~x2_inv,     FS_INV,  fault_en, fault_site, fault_val);
    y1     = line(and1 | x3_or, FS_Y1,  fault_en, fault_site, fault_val);
    y2     = line(inv & x3_and, FS_Y2,  fault_en, fault_site, fault_val);
    y      = {y2, y1};
  end

endmodule
