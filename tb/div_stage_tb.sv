// div_stage_tb: checks one DCVSL divider stage, both the first-stage variant
// (remainder and quotient inputs are constant 0) and a middle stage.
// Each trial: precharge gives 00; with cp high, spacer or partly valid inputs
// leave the outputs at 00; all inputs valid give the dual-rail code of one
// restoring-division step computed here with integer arithmetic; inputs back
// at 00 leave the result held; a stall postpones evaluation; an input pair
// at 11 drives every output pair to 11.
module div_stage_tb;
  import lfdad_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned DW = 4 * W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cp, stall;
  logic [DW-1:0] in_t, in_f;
  logic [DW-1:0] o1_t, o1_f, o2_t, o2_f;
  int checks = 0, failures = 0;

  div_stage #(.W(W), .FIRST(1'b1)) u_first (
    .clk, .rst_n, .cp, .stall, .in_t, .in_f, .out_t(o1_t), .out_f(o1_f));
  div_stage #(.W(W), .FIRST(1'b0)) u_mid (
    .clk, .rst_n, .cp, .stall, .in_t, .in_f, .out_t(o2_t), .out_f(o2_f));

  always #5 clk = ~clk;

  // Reference division step on plain integers.
  function automatic logic [DW-1:0] ref_step(input int unsigned rem, input int unsigned dvd,
                                             input int unsigned dvs, input int unsigned quo);
    int unsigned t, q, r;
    t = rem * 2 + ((dvd >> (W - 1)) & 1);
    if (t >= dvs) begin q = 1; r = t - dvs; end
    else begin q = 0; r = t; end
    return {W'(r), W'(dvd << 1), W'(dvs), W'((quo << 1) | q)};
  endfunction

  task automatic step_and_check(input logic [DW-1:0] e1_t, input logic [DW-1:0] e1_f,
                                input logic [DW-1:0] e2_t, input logic [DW-1:0] e2_f,
                                input string what);
    @(posedge clk); #1;
    checks += 2;
    if (o1_t !== e1_t || o1_f !== e1_f) begin
      failures++;
      $display("FAIL first (%s): got %h/%h expected %h/%h", what, o1_t, o1_f, e1_t, e1_f);
    end
    if (o2_t !== e2_t || o2_f !== e2_f) begin
      failures++;
      $display("FAIL middle (%s): got %h/%h expected %h/%h", what, o2_t, o2_f, e2_t, e2_f);
    end
  endtask

  initial begin
    cp = 1'b0; stall = 1'b0; in_t = '0; in_f = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      int unsigned rem, dvd, dvs, quo;
      logic [DW-1:0] w, r1, r2, zero;
      zero = '0;
      dvs = $urandom_range(0, 255);
      rem = (dvs == 0) ? 0 : $urandom_range(0, dvs - 1);
      dvd = $urandom_range(0, 255);
      quo = $urandom_range(0, 127);
      w = {W'(rem), W'(dvd), W'(dvs), W'(quo)};
      r1 = ref_step(0, dvd, dvs, 0);
      r2 = ref_step(rem, dvd, dvs, quo);

      // Precharge, with garbage at the inputs.
      @(negedge clk); cp = 1'b0; in_t = DW'($urandom); in_f = DW'($urandom);
      step_and_check(zero, zero, zero, zero, "precharge");
      // Enabled, inputs still spacer.
      @(negedge clk); cp = 1'b1; in_t = '0; in_f = '0;
      step_and_check(zero, zero, zero, zero, "spacer");
      // Divisor pairs valid, dividend still spacer: no evaluation.
      @(negedge clk);
      in_t[FLD_DVS*W +: W] = w[FLD_DVS*W +: W];
      in_f[FLD_DVS*W +: W] = ~w[FLD_DVS*W +: W];
      step_and_check(zero, zero, zero, zero, "partial");
      // Optional stall with all inputs valid.
      @(negedge clk);
      in_t = w; in_f = ~w;
      if (k % 2 == 1) begin
        stall = 1'b1;
        step_and_check(zero, zero, zero, zero, "stall");
        @(negedge clk); stall = 1'b0;
      end
      step_and_check(r1, ~r1, r2, ~r2, "evaluate");
      // Inputs return to spacer: held.
      @(negedge clk); in_t = '0; in_f = '0;
      step_and_check(r1, ~r1, r2, ~r2, "hold");
      // Fault: a pair at 11 in a fresh evaluation.
      if (k % 5 == 0) begin
        int unsigned p;
        @(negedge clk); cp = 1'b0;
        step_and_check(zero, zero, zero, zero, "precharge");
        @(negedge clk); cp = 1'b1;
        p = $urandom_range(W, 3 * W - 1);  // a dividend or divisor pair
        in_t = w; in_f = ~w; in_t[p] = 1'b1; in_f[p] = 1'b1;
        step_and_check('1, '1, '1, '1, "input 11");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
