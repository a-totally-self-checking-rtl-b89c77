// lfdad_pkg: shared constants and types of the latch-free dynamic asynchronous
// datapath (LFDAD) and its self-checking divider.
//
// Every datapath signal is dual-rail: a pair (t, f) where 10 means logic 1,
// 01 means logic 0, 00 is the spacer a precharged DCVSL gate shows, and 11 is
// never produced by a fault-free gate. The pair code below names those four
// values; the divider word layout gives the field positions of one stage's
// 4*W-pair data word. Both are choices of this implementation.
package lfdad_pkg;

  // Default operand width of the divider; the divider has one stage per
  // quotient bit, so this is also the stage count (8 in the design).
  localparam int unsigned DIV_W = 8;

  // Value of one dual-rail pair {t, f}.
  typedef enum logic [1:0] {
    DR_SPACER = 2'b00,
    DR_ZERO   = 2'b01,
    DR_ONE    = 2'b10,
    DR_ERROR  = 2'b11
  } dr_code_e;

  // Field numbers of a divider stage word of 4 fields, W pairs each.
  // Field k occupies pairs [k*W +: W].
  typedef enum int unsigned {
    FLD_QUO = 0,  // quotient bits produced so far, newest in bit 0
    FLD_DVS = 1,  // divisor, passed on unchanged
    FLD_DVD = 2,  // dividend bits not yet consumed, next one in the MSB
    FLD_REM = 3   // partial remainder
  } div_field_e;

endpackage
