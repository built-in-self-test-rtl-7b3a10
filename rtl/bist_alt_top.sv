// BIST with an alternating output, built around the worked example circuit.
//
// Structure (the scheme's block diagram): the TIG drives x(t) into the CUT and
// into the two cover circuits; the CUT output y(t) goes to the MISA; the
// MISA's next first-stage value g(t) = z1(t+1) and the cover outputs form
// phi(t) = C0&g | C1&~g in the monitoring circuit M. The checker and the
// session controller, which the scheme describes only by their function, turn
// phi into a pass/fail verdict with the step of the first deviation.
//
// Defaults are the example: 3-input/2-output CUT, mod-8 counter TIG from 000,
// two-stage MISA from 00 with z1' = y1^z1^z2, z2' = y2^z1, test length T=5,
// covers C0 = x2 and C1 = x1. Other covers, TIG settings and MISA feedback can
// be given as parameters; the covers must then be rebuilt for them (for each
// applied x(t): the cover selected by the fault-free g must equal t mod 2).
//
// Timing: `start` -> one INIT cycle -> T_LEN cycles with one vector each ->
// done. phi, err and x are those of the current step; fail is sticky from the
// edge after the first deviation; pass = done & ~fail. stop_on_fail ends the
// test at the first deviation (early fault notification). fault_en,
// fault_site and fault_val inject one single stuck-at fault into the example
// CUT for demonstration; tie fault_en low for normal use.
module bist_alt_top
  import bist_alt_pkg::*;
#(
  parameter int unsigned              T_LEN    = 5,
  parameter tig_mode_e                TIG_MODE = TIG_COUNTER,
  parameter logic [EX_M-1:0]          TIG_SEED = '0,
  parameter logic [EX_M-1:0]          TIG_TAPS = 3'b110,
  parameter int unsigned              NZ       = 2,
  parameter logic [NZ-1:0]            MISA_FB  = NZ'(2'b11),
  parameter logic [NZ-1:0]            MISA_Z0  = '0,
  parameter int unsigned              K0       = 1,
  parameter logic [K0-1:0][EX_M-1:0]  CARE0    = {K0{3'b010}},
  parameter logic [K0-1:0][EX_M-1:0]  VAL0     = {K0{3'b010}},
  parameter int unsigned              K1       = 1,
  parameter logic [K1-1:0][EX_M-1:0]  CARE1    = {K1{3'b001}},
  parameter logic [K1-1:0][EX_M-1:0]  VAL1     = {K1{3'b001}},
  localparam int unsigned             TW       = (T_LEN > 1) ? $clog2(T_LEN) : 1,
  localparam int unsigned             CW       = $clog2(T_LEN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            stop_on_fail,
  input  logic            fault_en,
  input  fault_site_e     fault_site,
  input  logic            fault_val,
  output logic            busy,
  output logic            done,
  output logic            pass,
  output logic            fail,
  output logic            aborted,
  output logic            step,
  output logic [TW-1:0]   t,
  output logic [EX_M-1:0] x,
  output logic [EX_N-1:0] y,
  output logic            g,
  output logic            c0,
  output logic            c1,
  output logic            phi,
  output logic            active,
  output logic            err,
  output logic [CW-1:0]   first_t,
  output logic [CW-1:0]   dev_count,
  output logic [NZ-1:0]   signature
);

  logic init;

  bist_ctrl #(.T_LEN(T_LEN), .TW(TW)) u_ctrl (
    .clk, .rst_n, .start, .stop_on_fail, .fail,
    .init, .step, .t, .busy, .done, .aborted
  );

  tig #(.M(EX_M), .MODE(TIG_MODE), .SEED(TIG_SEED), .TAPS(TIG_TAPS)) u_tig (
    .clk, .rst_n, .init, .step, .x
  );

  example_cut u_cut (
    .x, .fault_en, .fault_site, .fault_val, .y
  );

  misa #(.NIN(EX_N), .NZ(NZ), .FB(MISA_FB), .Z0(MISA_Z0)) u_misa (
    .clk, .rst_n, .init, .en(step), .y, .z(signature), .g
  );

  alt_monitor #(
    .M(EX_M), .K0(K0), .CARE0(CARE0), .VAL0(VAL0),
    .K1(K1), .CARE1(CARE1), .VAL1(VAL1)
  ) u_mon (
    .x, .g, .c0, .c1, .phi, .active
  );

  alt_checker #(.TW(CW)) u_chk (
    .clk, .rst_n, .clear(init), .valid(step), .phi,
    .err, .fail, .first_t, .dev_count
  );

  assign pass = done && !fail;

endmodule
