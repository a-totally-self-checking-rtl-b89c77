// div_stage: DCVSL function block of one stage of the self-checking divider.
//
// The stage works on a dual-rail word of four W-pair fields (see
// lfdad_pkg::div_field_e): partial remainder, remaining dividend bits,
// divisor and quotient bits so far. Each stage performs one step of restoring
// division and so produces one quotient bit, most significant first:
//   t       = {rem, dvd[W-1]}              (shift in the next dividend bit)
//   q       = (t >= dvs)
//   rem'    = q ? t - dvs : t
//   dvd'    = dvd << 1,  dvs' = dvs,  quo' = {quo[W-2:0], q}
// After W stages quo holds the quotient and rem the remainder. The division
// algorithm is this implementation's choice; the stage behaviour around it
// (precharge, evaluation as soon as the inputs are valid, hold) is that of a
// DCVSL gate.
//
// DCVSL behaviour, one model step per evaluation or precharge:
//   cp = 0  Precharge: every output pair goes to 00 whatever the inputs.
//   cp = 1  Enable & Evaluation: nothing happens while any used input pair is
//           still 00; once all are valid the outputs take the dual-rail code
//           of the result. Output rails are only ever set, never cleared,
//           until the next precharge (a discharged dynamic node stays so), so
//           the result is held through Evaluation Hold even when the inputs
//           return to 00.
//   An input pair at 11 (a fault) conducts both ways; it is modelled by
//   driving every output pair to 11.
//   stall = 1 postpones the evaluation by a step; it models a slow function
//   block and is tied low in normal use.
// The first stage (FIRST = 1) takes only dividend and divisor from its
// input; its remainder and quotient inputs are the constant 0.
module div_stage
  import lfdad_pkg::*;
#(
  parameter int unsigned W     = DIV_W,
  parameter bit          FIRST = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cp,
  input  logic           stall,
  input  logic [4*W-1:0] in_t,
  input  logic [4*W-1:0] in_f,
  output logic [4*W-1:0] out_t,
  output logic [4*W-1:0] out_f
);

  // Input pairs the stage actually reads.
  localparam logic [4*W-1:0] USED = FIRST ? {{W{1'b0}}, {(2*W){1'b1}}, {W{1'b0}}}
                                          : {(4*W){1'b1}};

  logic           any_spacer, any_error;
  logic [W-1:0]   rem_i, dvd_i, dvs_i;
  logic [W-2:0]   quo_i;  // its MSB is shifted out unused
  logic [W:0]     trial;
  logic           q;
  logic [W-1:0]   rem_o;
  logic [4*W-1:0] res;

  always_comb begin
    any_spacer = |(~in_t & ~in_f & USED);
    any_error  = |(in_t & in_f & USED);

    rem_i = FIRST ? '0 : in_t[FLD_REM*W +: W];
    dvd_i = in_t[FLD_DVD*W +: W];
    dvs_i = in_t[FLD_DVS*W +: W];
    quo_i = FIRST ? '0 : in_t[FLD_QUO*W +: W-1];

    trial = {rem_i, dvd_i[W-1]};
    q     = (trial >= {1'b0, dvs_i});
    rem_o = q ? W'(trial - {1'b0, dvs_i}) : trial[W-1:0];

    res = '0;
    res[FLD_REM*W +: W] = rem_o;
    res[FLD_DVD*W +: W] = dvd_i << 1;
    res[FLD_DVS*W +: W] = dvs_i;
    res[FLD_QUO*W +: W] = {quo_i, q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_t <= '0;
      out_f <= '0;
    end else if (!cp) begin
      out_t <= '0;
      out_f <= '0;
    end else if (!stall && !any_spacer) begin
      if (any_error) begin
        out_t <= '1;
        out_f <= '1;
      end else begin
        out_t <= out_t | res;
        out_f <= out_f | ~res;
      end
    end
  end

endmodule
