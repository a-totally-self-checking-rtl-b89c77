// tsc_divider: totally self-checking asynchronous divider, W-bit unsigned
// dividend by W-bit unsigned divisor, built as a latch-free dynamic
// asynchronous datapath (LFDAD) of W DCVSL stages with one dual-rail code
// checker on the last stage.
//
// Structure (one quotient bit per stage):
//   operands -> div_stage 1 -> div_stage 2 -> ... -> div_stage W -> quotient,
//                                                                   remainder
//   each stage: a completion detector on its outputs; a handshake cell in
//   the ring of lfdad_control gives it its local clock cp;
//   the DDCC (ddcc), clocked by the last stage's cp, checks the W quotient
//   pairs and drives the error indicator (z, z_n).
// A fault either yields a non-code word at the last stage, shown as 00 or
// 11 on (z, z_n), or stops the pipeline. A stop usually leaves the stages
// behind it precharged and (z, z_n) at 00; it can also leave the last stage
// holding the last correct result, so the stop shows only as a missing
// out_valid. A wrong quotient never appears under a code word. No per-stage
// time-out is needed.
//
// The stage count, the handshake ring, the completion detectors and the
// single checker on the last stage follow the published divider; the
// restoring-division stages, the operand and result protocols, the remainder
// output and the fault-experiment ports are this implementation's choices.
//
// Operand interface (four-phase, return to zero, a choice of this design):
// drive the dividend and divisor dual-rail (every pair 01 or 10); the first
// stage evaluates once it is enabled and in_ack (its completion) rises; then
// return every pair to 00; in_ack falls when the first stage has precharged,
// after which the next operands may be driven.
// Result interface: out_valid is the last stage's completion. While it is
// high, out_quo/out_rem hold the dual-rail result; they stay valid until the
// first stage has accepted the next operands. The result is not
// back-pressured: it must be taken while out_valid is high.
// (z, z_n) is 01 or 10 while a correct quotient is held, 00 while the last
// stage is precharged or evaluating, and 00 or 11 when something is wrong;
// z = 1 means odd quotient parity.
//
// Fault-experiment inputs, all tied low in normal use. Each is an error
// insertion point (an XOR) on a signal:
//   err_c[i]       completion signal of stage i (control signal)
//   err_cp[i]      local clock of stage i (handshake signal)
//   err_dat_sel[i] enables err_dat_t/err_dat_f on the output rails of stage i
//   err_dat_after  0: inserted before the completion detector, which then
//                  sees the error; 1: inserted after it, so only the next
//                  stage or the checker sees it
//   stall[i]       postpones the evaluation of stage i (a slow block)
// Timing: all nodes are modelled as registers of one model step (clk); the
// circuit itself has no clock, and clk only sets the time grain.
module tsc_divider
  import lfdad_pkg::*;
#(
  parameter int unsigned W = DIV_W
) (
  input  logic           clk,
  input  logic           rst_n,
  // operands
  input  logic [W-1:0]   in_dvd_t,
  input  logic [W-1:0]   in_dvd_f,
  input  logic [W-1:0]   in_dvs_t,
  input  logic [W-1:0]   in_dvs_f,
  output logic           in_ack,
  // result
  output logic [W-1:0]   out_quo_t,
  output logic [W-1:0]   out_quo_f,
  output logic [W-1:0]   out_rem_t,
  output logic [W-1:0]   out_rem_f,
  output logic           out_valid,
  // error indicator
  output logic           z,
  output logic           z_n,
  // monitor: local clocks and completion signals of all stages
  output logic [W-1:0]   cp_mon,
  output logic [W-1:0]   c_mon,
  // fault experiments and delay variation
  input  logic [W-1:0]   stall,
  input  logic [W-1:0]   err_c,
  input  logic [W-1:0]   err_cp,
  input  logic [W-1:0]   err_dat_sel,
  input  logic           err_dat_after,
  input  logic [4*W-1:0] err_dat_t,
  input  logic [4*W-1:0] err_dat_f
);

  localparam int unsigned DW = 4 * W;  // pairs per stage word

  logic [DW-1:0] st_t [W];   // stage outputs, raw
  logic [DW-1:0] st_f [W];
  logic [DW-1:0] cd_t [W];   // what the completion detectors see
  logic [DW-1:0] cd_f [W];
  logic [DW-1:0] nx_t [W];   // what the next stage (or the checker) sees
  logic [DW-1:0] nx_f [W];
  logic [DW-1:0] si_t [W];   // stage inputs
  logic [DW-1:0] si_f [W];
  logic [W-1:0]  c_raw, c, cp_raw, cp;
  logic [DW-1:0] op_t, op_f;

  // First stage input: dividend and divisor; remainder and quotient fields
  // are constants inside stage 1 and are left at 00 here.
  always_comb begin
    op_t = '0;
    op_f = '0;
    op_t[FLD_DVD*W +: W] = in_dvd_t;
    op_f[FLD_DVD*W +: W] = in_dvd_f;
    op_t[FLD_DVS*W +: W] = in_dvs_t;
    op_f[FLD_DVS*W +: W] = in_dvs_f;
  end

  always_comb begin
    si_t[0] = op_t;
    si_f[0] = op_f;
    for (int i = 1; i < W; i++) begin
      si_t[i] = nx_t[i-1];
      si_f[i] = nx_f[i-1];
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_stage
    logic [DW-1:0] e_t, e_f, pre_t, pre_f, post_t, post_f;

    always_comb begin
      e_t = err_dat_sel[i] ? err_dat_t : '0;
      e_f = err_dat_sel[i] ? err_dat_f : '0;
      pre_t  = err_dat_after ? '0 : e_t;
      pre_f  = err_dat_after ? '0 : e_f;
      post_t = err_dat_after ? e_t : '0;
      post_f = err_dat_after ? e_f : '0;
    end

    div_stage #(.W(W), .FIRST(i == 0)) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .cp   (cp[i]),
      .stall(stall[i]),
      .in_t (si_t[i]),
      .in_f (si_f[i]),
      .out_t(st_t[i]),
      .out_f(st_f[i])
    );

    // Data error before completion generation.
    error_insert #(.W(DW)) u_ei_pre_t (.sig_in(st_t[i]), .err(pre_t), .sig_out(cd_t[i]));
    error_insert #(.W(DW)) u_ei_pre_f (.sig_in(st_f[i]), .err(pre_f), .sig_out(cd_f[i]));
    // Data error after completion generation.
    error_insert #(.W(DW)) u_ei_post_t (.sig_in(cd_t[i]), .err(post_t), .sig_out(nx_t[i]));
    error_insert #(.W(DW)) u_ei_post_f (.sig_in(cd_f[i]), .err(post_f), .sig_out(nx_f[i]));

    completion_detector #(.W(DW)) u_cd (
      .clk  (clk),
      .rst_n(rst_n),
      .d_t  (cd_t[i]),
      .d_f  (cd_f[i]),
      .c    (c_raw[i])
    );
  end

  // Control-signal error insertion points.
  error_insert #(.W(W)) u_ei_c  (.sig_in(c_raw),  .err(err_c),  .sig_out(c));
  error_insert #(.W(W)) u_ei_cp (.sig_in(cp_raw), .err(err_cp), .sig_out(cp));

  lfdad_control #(.N(W)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .c    (c),
    .cp   (cp_raw)
  );

  ddcc #(.W(W)) u_ddcc (
    .clk  (clk),
    .rst_n(rst_n),
    .cp   (cp[W-1]),
    .d_t  (nx_t[W-1][FLD_QUO*W +: W]),
    .d_f  (nx_f[W-1][FLD_QUO*W +: W]),
    .z    (z),
    .z_n  (z_n)
  );

  always_comb begin
    in_ack    = c[0];
    out_valid = c[W-1];
    out_quo_t = nx_t[W-1][FLD_QUO*W +: W];
    out_quo_f = nx_f[W-1][FLD_QUO*W +: W];
    out_rem_t = nx_t[W-1][FLD_REM*W +: W];
    out_rem_f = nx_f[W-1][FLD_REM*W +: W];
    cp_mon    = cp;
    c_mon     = c;
  end

endmodule
