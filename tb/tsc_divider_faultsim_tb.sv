// tsc_divider_faultsim_tb: transient-error campaign on the 8-bit divider.
//
// Errors are short pulses (2 model steps, against an operand period of 7)
// applied through the divider's XOR insertion points. The experiments cover
//   error value : the pulse drives the signal to 0 or to 1,
//   location    : a control signal (completion C or local clock cp of a
//                 stage) or a data rail of a stage's output,
//   instance    : before the stage's completion signal rises for an operand
//                 (while it evaluates) or after it (while it holds),
// for every stage and several operands of a fixed 12-operand sequence.
// Each run is compared with a fault-free reference run of the same sequence
// and timing, and sorted into one of four outcomes:
//   no effect  - every completion and local clock trace is unchanged;
//   tolerated  - internal traces differ, results and their timing do not;
//   delayed    - the same correct results, some of them later;
//   detected   - the checker showed 11, or results are missing (the ring
//                stopped), or a result came with a non-code checker output.
// A wrong quotient under a code word (an undetected error) is a failure.
// An error on a remainder rail of the last stage can change the remainder
// without detection, because the checker covers the quotient only; such runs
// are counted separately.
// Each outcome class must occur at least once except "tolerated", which is
// only reported.
module tsc_divider_faultsim_tb;
  localparam int unsigned W = 8;
  localparam int unsigned DW = 4 * W;
  localparam int unsigned N_OPS = 12;
  localparam int unsigned RUN_STEPS = 260;

  logic clk = 1'b0;
  logic rst_n;
  logic [W-1:0] in_dvd_t, in_dvd_f, in_dvs_t, in_dvs_f;
  logic in_ack;
  logic [W-1:0] out_quo_t, out_quo_f, out_rem_t, out_rem_f;
  logic out_valid, z, z_n;
  logic [W-1:0] cp_mon, c_mon;
  logic [W-1:0] stall, err_c, err_cp, err_dat_sel;
  logic err_dat_after;
  logic [DW-1:0] err_dat_t, err_dat_f;

  tsc_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_noeffect = 0, n_tolerated = 0, n_delayed = 0, n_detected = 0, n_skipped = 0;
  int n_unchecked = 0;  // errors in the unchecked remainder of the last stage

  logic [W-1:0] op_a [N_OPS];
  logic [W-1:0] op_b [N_OPS];

  // Recorded run.
  int unsigned  rstep;
  logic [2*W-1:0] trace [RUN_STEPS];
  int unsigned  res_step [$];
  logic [W-1:0] res_q [$];
  logic [W-1:0] res_r [$];
  bit           saw11, saw_bad_result, saw_undetected;
  logic         prev_valid;
  logic [W-1:0] prev_qt, prev_qf;
  bit           recording = 1'b0;

  // Reference run.
  logic [2*W-1:0] ref_trace [RUN_STEPS];
  int unsigned  ref_step [$];
  logic [W-1:0] ref_q [$];
  logic [W-1:0] ref_r [$];

  function automatic bit q_known(input logic [W-1:0] q);
    for (int i = 0; i < N_OPS; i++)
      if (W'(op_a[i] / op_b[i]) == q) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    if (recording && rst_n && rstep < RUN_STEPS) begin
      trace[rstep] = {c_mon, cp_mon};
      if (z && z_n) saw11 = 1'b1;
      if (z != z_n) begin
        // Code word: the quotient the checker evaluated must be correct.
        if ((prev_qt ^ prev_qf) != '1 || z != ^prev_qt || !q_known(prev_qt))
          saw_undetected = 1'b1;
      end
      if (out_valid && !prev_valid) begin
        res_step.push_back(rstep);
        res_q.push_back(out_quo_t);
        res_r.push_back(out_rem_t);
        if ((out_quo_t ^ out_quo_f) != '1) saw_bad_result = 1'b1;
      end
      prev_valid = out_valid;
      prev_qt = out_quo_t;
      prev_qf = out_quo_f;
      rstep++;
    end
  end

  task automatic clear_errors();
    stall = '0; err_c = '0; err_cp = '0; err_dat_sel = '0; err_dat_after = 1'b0;
    err_dat_t = '0; err_dat_f = '0;
  endtask

  // Operand source, four-phase, answering in one step.
  task automatic source();
    for (int k = 0; k < N_OPS; k++) begin
      while (in_ack) @(posedge clk);
      #1;
      in_dvd_t = op_a[k]; in_dvd_f = ~op_a[k]; in_dvs_t = op_b[k]; in_dvs_f = ~op_b[k];
      @(posedge clk);
      while (!in_ack) @(posedge clk);
      #1;
      in_dvd_t = '0; in_dvd_f = '0; in_dvs_t = '0; in_dvs_f = '0;
      @(posedge clk);
    end
  endtask

  task automatic start_run();
    rst_n = 1'b0;
    in_dvd_t = '0; in_dvd_f = '0; in_dvs_t = '0; in_dvs_f = '0;
    clear_errors();
    res_step.delete(); res_q.delete(); res_r.delete();
    saw11 = 0; saw_bad_result = 0; saw_undetected = 0;
    prev_valid = 1'b0; prev_qt = '0; prev_qf = '0;
    rstep = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    recording = 1'b1;
  endtask

  // Injects one error. kind: 0 completion, 1 local clock, 2 data rail.
  // Returns 0 when no moment with the wanted signal value was found.
  task automatic inject(input int kind, input int s, input logic v, input bit after,
                        input int tok, output bit done);
    int seen = 0;
    int guard = 0;
    logic prev_c = 1'b0;
    done = 1'b0;
    // Find the tok-th operand at stage s: "before" is a step where the stage
    // is enabled and not complete, "after" a step where it has completed.
    while (guard < RUN_STEPS - 20) begin
      @(negedge clk);
      guard++;
      if (c_mon[s] && !prev_c) seen++;
      prev_c = c_mon[s];
      if (after && seen == tok + 1 && c_mon[s]) break;
      if (!after && seen == tok && cp_mon[s] && !c_mon[s]) break;
    end
    if (guard >= RUN_STEPS - 20) return;
    case (kind)
      0: if (c_mon[s] != v) begin err_c[s] = 1'b1; done = 1'b1; end
      1: if (cp_mon[s] != v) begin err_cp[s] = 1'b1; done = 1'b1; end
      default: begin
        // A rail of stage s that currently differs from v.
        logic [DW-1:0] rt, rf;
        int p;
        if (s == W - 1) begin
          rt = '0; rf = '0;
          rt[W-1:0] = out_quo_t; rf[W-1:0] = out_quo_f;
          rt[3*W +: W] = out_rem_t; rf[3*W +: W] = out_rem_f;
        end else begin
          rt = dut.st_t[s]; rf = dut.st_f[s];
        end
        p = $urandom_range(0, 2 * DW - 1);
        for (int n = 0; n < 2 * DW && !done; n++) begin
          int q = (p + n) % (2 * DW);
          logic cur = (q < DW) ? rt[q] : rf[q - DW];
          if (s == W - 1 && (q % DW) >= W && (q % DW) < 3 * W) continue;
          if (cur != v) begin
            err_dat_sel[s] = 1'b1;
            err_dat_after = 1'($urandom);
            if (q < DW) err_dat_t[q] = 1'b1; else err_dat_f[q - DW] = 1'b1;
            done = 1'b1;
          end
        end
      end
    endcase
    if (done) begin
      repeat (2) @(negedge clk);
      clear_errors();
    end
  endtask

  int unsigned n_exp = 0;

  initial begin
    for (int i = 0; i < N_OPS; i++) begin
      op_a[i] = W'($urandom);
      op_b[i] = W'($urandom_range(1, 255));
      if (i % 4 == 1) op_b[i] = W'($urandom_range(1, 15));
    end

    // Reference run.
    start_run();
    source();
    while (rstep < RUN_STEPS) @(posedge clk);
    recording = 1'b0;
    ref_trace = trace;
    ref_step = res_step; ref_q = res_q; ref_r = res_r;
    checks++;
    if (ref_q.size() != N_OPS) begin
      failures++; $display("FAIL: reference run gave %0d results", ref_q.size());
    end
    for (int i = 0; i < ref_q.size() && i < N_OPS; i++) begin
      checks++;
      if (ref_q[i] != W'(op_a[i] / op_b[i]) || ref_r[i] != W'(op_a[i] % op_b[i])) begin
        failures++; $display("FAIL: reference result %0d wrong", i);
      end
    end
    if (saw11 || saw_undetected) begin
      failures++; $display("FAIL: reference run not clean");
    end

    // Campaign.
    for (int kind = 0; kind < 3; kind++)
      for (int s = 0; s < W; s++)
        for (int v = 0; v < 2; v++)
          for (int after = 0; after < 2; after++)
            for (int tok = 1; tok <= 3; tok += 2) begin
              bit done;
              bit same_res, same_time, same_trace;
              start_run();
              fork
                source();
                inject(kind, s, 1'(v), after != 0, tok, done);
              join_none
              while (rstep < RUN_STEPS) @(posedge clk);
              disable fork;
              recording = 1'b0;
              clear_errors();
              if (!done) begin n_skipped++; continue; end
              n_exp++;
              checks++;
              if (saw_undetected) begin
                failures++;
                $display("FAIL: undetected error (kind %0d stage %0d value %0d after %0d op %0d)",
                         kind, s, v, after, tok);
                continue;
              end
              same_res = (res_q.size() == ref_q.size());
              for (int i = 0; i < res_q.size() && same_res; i++)
                if (res_q[i] != ref_q[i] || res_r[i] != ref_r[i]) same_res = 0;
              same_time = same_res;
              for (int i = 0; i < res_step.size() && same_time; i++)
                if (res_step[i] != ref_step[i]) same_time = 0;
              same_trace = (trace == ref_trace);
              if (saw11 || saw_bad_result || res_q.size() < ref_q.size()) n_detected++;
              else if (!same_res) begin
                // Every result present: the quotients must match, since they
                // are checked; a remainder of the last stage is not checked.
                bit q_same;
                q_same = 1'b1;
                foreach (res_q[i]) if (res_q[i] != ref_q[i]) q_same = 1'b0;
                if (q_same && kind == 2 && s == W - 1) n_unchecked++;
                else begin
                  failures++;
                  $display("FAIL: wrong result without detection (kind %0d stage %0d)", kind, s);
                end
              end
              else if (!same_time) n_delayed++;
              else if (!same_trace) n_tolerated++;
              else n_noeffect++;
            end

    $display("experiments %0d (skipped %0d): no effect %0d, tolerated %0d, delayed %0d, detected %0d, remainder-only %0d",
             n_exp, n_skipped, n_noeffect, n_tolerated, n_delayed, n_detected, n_unchecked);
    checks++; if (n_detected == 0) begin failures++; $display("FAIL: nothing detected"); end
    checks++; if (n_delayed == 0)  begin failures++; $display("FAIL: no delayed outcome"); end
    checks++; if (n_noeffect == 0) begin failures++; $display("FAIL: no outcome without effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
