// ader_ext: function address decoding with the ADER registers.
//
// A function access is an A32 cycle whose A[31:25] and AM equal those stored
// in ADER0 (function 0) or ADER1 (function 1) while the module is enabled in
// the CSR. The board therefore answers in a 32 MiB window (A24..A1 are passed
// on as local address). A matching cycle is a single transfer when the AM is
// an A32 data code (AM[1:0] = 01: 0x09, 0x0D) and a block transfer when it is
// an A32 BLT code (AM[1:0] = 11: 0x0B, 0x0F); other AM codes never match.
// Purely combinational.
//
// From the document: comparison of A31-A25 and the AM code with ADER0/ADER1
// (function 0 decodes A31-A25, AM 0x0D and 0x09), and the signal names
// SINGLE_ACCESS and BLT_ACCESS. The document's schematic of this block is not
// available; the equality compare, the gating with the module-enable bit and
// the AM classification are this design's own, simplest choice.
module ader_ext
  import vme64x_pkg::*;
(
  input  logic [31:25] a,
  input  logic [5:0]   am,
  input  logic [31:25] ader0_a,
  input  logic [5:0]   ader0_am,
  input  logic [31:25] ader1_a,
  input  logic [5:0]   ader1_am,
  input  logic         mod_enabled,
  output logic         f0_sel,
  output logic         f1_sel,
  output logic         single_access,
  output logic         blt_access
);

  logic any_sel;

  assign f0_sel  = mod_enabled && (a == ader0_a) && (am == ader0_am);
  assign f1_sel  = mod_enabled && (a == ader1_a) && (am == ader1_am);
  assign any_sel = f0_sel | f1_sel;

  assign single_access = any_sel && (am[5:3] == 3'b001) && (am[1:0] == AM_CLASS_SINGLE);
  assign blt_access    = any_sel && (am[5:3] == 3'b001) && (am[1:0] == AM_CLASS_BLT);

endmodule
