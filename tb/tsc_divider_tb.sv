// tsc_divider_tb: end-to-end test of the self-checking divider.
//
// An operand source drives dual-rail dividend/divisor pairs with the
// four-phase return-to-zero protocol on in_ack; a result monitor takes each
// result when out_valid rises and compares it with the integer quotient and
// remainder computed here. The DDCC output (z, z_n) is checked at every step:
// whenever it shows a code word, the quotient held by the last stage must be
// correct and z must equal its parity. Phases:
//   1. fault-free run, fixed timing: results, latency and throughput;
//   2. fault-free run with random stalls of every stage (delay variation),
//      then results held inside the ring and flushed by further operands;
//   3. permanent data error on a quotient rail after completion generation
//      (must never show a code word);
//   4. permanent data error before completion generation in a middle stage
//      (the pipeline must stop);
//   5. stuck completion signal (the pipeline must stop);
//   6. stuck local clock of a stage (the pipeline must stop);
//   7. short transient errors on completion, clock and data signals
//      (results may be delayed, lost or flagged, never wrong under a code
//      word).
// A stopped pipeline leaves the checker at 00 or 11, or still showing the
// last correct result. Every mechanism (precharge, evaluation hold, the last
// stage held for the first stage, stalls, detection by 11, pipeline stop,
// a stop showing 00, a flush) is counted and must occur.
module tsc_divider_tb;
  localparam int unsigned W = 8;
  localparam int unsigned DW = 4 * W;

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
  int unsigned step = 0;

  // Mechanism counters.
  int n_precharge = 0, n_hold = 0, n_ring_hold = 0, n_stall = 0;
  int n_det11 = 0, n_stop = 0, n_stop00 = 0, n_results = 0, n_code = 0;

  // Operands sent, for the monitor.
  logic [W-1:0] sent_dvd [$];
  logic [W-1:0] sent_dvs [$];
  logic [W-1:0] hist_q [$];   // quotients of all operands sent since reset
  int unsigned  sent_step [$];
  int unsigned  n_sent = 0;
  int unsigned  n_taken = 0;

  // Monitor modes.
  bit strict = 1'b1;     // results must arrive in order, one per operand
  bit expect_code = 1'b1; // a fault-free phase: (z,z_n) must never be 11

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", step, msg);
  endtask

  function automatic logic [W-1:0] parity_ok(input logic [W-1:0] q);
    return {{(W-1){1'b0}}, ^q};
  endfunction

  function automatic logic [W-1:0] q_of(input logic [W-1:0] a, input logic [W-1:0] b);
    return (b == 0) ? '1 : W'(a / b);
  endfunction

  // ---------------------------------------------------------------- source
  bit src_run = 1'b0;
  bit src_random = 1'b0;
  int src_limit = 0;

  task automatic drive_spacer();
    in_dvd_t = '0; in_dvd_f = '0; in_dvs_t = '0; in_dvs_f = '0;
  endtask

  // Wait for in_ack == v, at most max_steps; returns 0 on time-out.
  task automatic wait_ack(input logic v, input int max_steps, output bit ok);
    ok = 1'b0;
    for (int i = 0; i < max_steps; i++) begin
      if (in_ack == v) begin ok = 1'b1; return; end
      @(posedge clk);
    end
  endtask

  task automatic send(input logic [W-1:0] a, input logic [W-1:0] b, output bit ok);
    wait_ack(1'b0, 400, ok);
    if (!ok) return;
    if (src_random) repeat (int'($urandom_range(0, 3))) @(posedge clk);
    #1;
    in_dvd_t = a; in_dvd_f = ~a; in_dvs_t = b; in_dvs_f = ~b;
    sent_dvd.push_back(a); sent_dvs.push_back(b); sent_step.push_back(step);
    hist_q.push_back(q_of(a, b));
    n_sent++;
    @(posedge clk);
    wait_ack(1'b1, 400, ok);
    if (!ok) return;
    if (src_random) repeat (int'($urandom_range(0, 3))) @(posedge clk);
    #1;
    drive_spacer();
    @(posedge clk);
  endtask

  // ---------------------------------------------------------------- monitor
  logic prev_valid = 1'b0;
  logic [W-1:0] prev_quo_t = '0, prev_quo_f = '0;  // rails the checker saw
  logic [W-1:0] prev_cp = '1, prev_c = '0;
  int unsigned last_result_step = 0;
  int unsigned first_latency = 0;
  int unsigned periods [$];


  // Is q the quotient of one of the last few operands sent?
  function automatic bit q_recent(input logic [W-1:0] q);
    int n = hist_q.size();
    for (int i = (n > 12 ? n - 12 : 0); i < n; i++)
      if (hist_q[i] == q) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) begin
    step++;
    if (rst_n) begin
      // Phase counters.
      for (int i = 0; i < W; i++) begin
        if (prev_cp[i] && !cp_mon[i]) n_precharge++;
        if (stall[i] && cp_mon[i] && !c_mon[i]) n_stall++;
      end
      // Evaluation hold: a stage still completed and enabled while its
      // input pairs are back at 00 (stage 2..W).
      for (int i = 1; i < W; i++)
        if (cp_mon[i] && c_mon[i] && !c_mon[i-1] && !cp_mon[i-1]) n_hold++;
      // Ring: last stage holds its result while the first stage has not yet
      // taken the next operands.
      if (out_valid && cp_mon[W-1] && !c_mon[0]) n_ring_hold++;

      // Checker output.
      if (z && z_n) begin
        n_det11++;
        if (expect_code) fail("checker shows 11 in a fault-free run");
      end
      if (z != z_n) begin
        n_code++;
        checks++;
        if ((prev_quo_t ^ prev_quo_f) != '1) begin
          fail($sformatf("checker shows a code word but quotient rails %h/%h are not valid",
                         prev_quo_t, prev_quo_f));
        end else if (z != ^prev_quo_t) begin
          fail("checker parity differs from the quotient");
        end else if (!q_recent(prev_quo_t)) begin
          fail($sformatf("undetected error: quotient %h under a code word", prev_quo_t));
        end
      end

      // Results.
      if (out_valid && !prev_valid) begin
        n_results++;
        if (strict) begin
          checks++;
          if (sent_dvd.size() == 0) begin
            fail("result without operands");
          end else begin
            logic [W-1:0] a, b, eq, er;
            int unsigned s0;
            a = sent_dvd.pop_front(); b = sent_dvs.pop_front(); s0 = sent_step.pop_front();
            eq = q_of(a, b);
            er = (b == 0) ? out_rem_t : W'(a % b);
            n_taken++;
            if ((out_quo_t ^ out_quo_f) != '1 || (out_rem_t ^ out_rem_f) != '1)
              fail("result rails not all valid");
            else if (out_quo_t !== eq || out_rem_t !== er)
              fail($sformatf("%0d / %0d gave q=%0d r=%0d, expected q=%0d r=%0d",
                             a, b, out_quo_t, out_rem_t, eq, er));
            if (first_latency == 0) first_latency = step - s0;
            if (last_result_step != 0) periods.push_back(step - last_result_step);
          end
        end
        last_result_step = step;
      end
      prev_valid = out_valid;
      prev_quo_t = out_quo_t;
      prev_quo_f = out_quo_f;
      prev_cp = cp_mon;
      prev_c = c_mon;
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic do_reset();
    rst_n = 1'b0;
    drive_spacer();
    stall = '0; err_c = '0; err_cp = '0; err_dat_sel = '0; err_dat_after = 1'b0;
    err_dat_t = '0; err_dat_f = '0;
    sent_dvd.delete(); sent_dvs.delete(); sent_step.delete(); hist_q.delete();
    n_taken = 0;
    prev_valid = 1'b0; prev_cp = '1; prev_c = '0; last_result_step = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
  endtask

  function automatic logic [W-1:0] rnd();
    return W'($urandom);
  endfunction

  // Send up to n random operands; returns how many were accepted.
  task automatic run_ops(input int n, output int accepted);
    bit ok;
    accepted = 0;
    for (int k = 0; k < n; k++) begin
      logic [W-1:0] a, b;
      a = rnd(); b = rnd();
      if (k % 7 == 3) b = 8'd1;
      if (k % 11 == 5) b = a;
      if (k % 13 == 6) b = 8'd0;
      if (k % 5 == 2 && b > a) {a, b} = {b, a};
      send(a, b, ok);
      if (!ok) return;
      accepted++;
    end
  endtask

  task automatic drain(input int n);
    repeat (n) @(posedge clk);
  endtask

  // Fault phase: run operands with the monitor in non-strict mode and report
  // whether the pipeline stopped and whether the checker rests at 00.
  task automatic fault_phase(input string name, input int n_ops, output int accepted);
    strict = 1'b0; expect_code = 1'b0;
    run_ops(n_ops, accepted);
    drain(60);
    $display("%s: %0d of %0d operands accepted, z/z_n=%b%b", name, accepted, n_ops, z, z_n);
  endtask

  // ---------------------------------------------------------------- main
  int acc;
  int res0;
  int n_flush, n_flushed_runs = 0;
  int unsigned p_min, p_max;

  initial begin
    do_reset();

    // 1. Fault-free, fixed timing.
    strict = 1'b1; expect_code = 1'b1; src_random = 1'b0;
    run_ops(200, acc);
    drain(60);
    checks++;
    if (acc != 200 || sent_dvd.size() != 0) fail($sformatf("phase 1: %0d accepted, %0d results pending",
                                                           acc, sent_dvd.size()));
    begin
      bit ok;
      // Latency and period (see the README for the step count).
      p_min = 1000; p_max = 0;
      foreach (periods[i]) if (i > 4) begin
        if (periods[i] < p_min) p_min = periods[i];
        if (periods[i] > p_max) p_max = periods[i];
      end
      $display("latency %0d steps, period %0d..%0d steps", first_latency, p_min, p_max);
      checks++;
      if (first_latency != EXP_LATENCY) fail($sformatf("latency %0d, expected %0d", first_latency, EXP_LATENCY));
      checks++;
      if (p_min != EXP_PERIOD || p_max != EXP_PERIOD)
        fail($sformatf("period %0d..%0d, expected %0d", p_min, p_max, EXP_PERIOD));
    end

    // 2. Random stalls and random source timing.
    do_reset();
    strict = 1'b1; expect_code = 1'b1; src_random = 1'b1;
    fork
      begin
        run_ops(150, acc);
      end
      begin
        repeat (6000) begin
          @(negedge clk);
          stall = W'($urandom) & W'($urandom);
        end
      end
    join_any
    disable fork;
    @(negedge clk) stall = '0;
    drain(60);
    checks++;
    // Results can wait inside the ring until later operands push them out:
    // feed flush operands until every result of the 150 has appeared.
    n_flush = 0;
    while (n_taken < 150 && n_flush < 2 * W) begin
      bit ok;
      send(rnd(), 8'd3, ok);
      drain(20);
      n_flush++;
    end
    if (n_flush > 0) n_flushed_runs++;
    $display("phase 2: %0d flush operands", n_flush);
    if (acc != 150 || n_taken < 150) fail($sformatf("phase 2: %0d accepted, %0d results",
                                                    acc, n_taken));
    src_random = 1'b0;

    // 2b. Tokens packed two stages apart stay inside the ring until later
    //     operands push them out. Stall the back half while two operands
    //     enter, release, and flush.
    do_reset();
    strict = 1'b1; expect_code = 1'b1; src_random = 1'b0;
    @(negedge clk) stall[W-1:W/2] = '1;
    run_ops(2, acc);
    drain(10);
    @(negedge clk) stall = '0;
    drain(60);
    $display("phase 2b: %0d of 2 results before flushing", n_taken);
    checks++;
    if (acc != 2) fail("phase 2b: operands not accepted");
    n_flush = 0;
    while (n_taken < 2 && n_flush < 2 * W) begin
      bit ok;
      send(rnd(), 8'd5, ok);
      drain(20);
      n_flush++;
    end
    if (n_flush > 0) n_flushed_runs++;
    checks++;
    if (n_taken < 2) fail("phase 2b: results not flushed out");

    // 3. Permanent error on the true rail of quotient bit 0 after the
    //    completion detector of the last stage.
    do_reset();
    err_dat_sel[W-1] = 1'b1; err_dat_after = 1'b1; err_dat_t[0] = 1'b1;
    res0 = n_results;
    fault_phase("quotient rail error", 20, acc);

    // 4. Permanent error on the false rail of a remainder bit of stage 4,
    //    before its completion detector.
    do_reset();
    err_dat_sel[3] = 1'b1; err_dat_after = 1'b0; err_dat_f[3*W + 2] = 1'b1;
    res0 = n_results;
    fault_phase("stage 4 data error", 20, acc);
    checks++;
    if (acc == 20) fail("stage 4 data error: pipeline did not stop");
    if (!z && !z_n) n_stop00++;
    if (acc < 20) n_stop++;

    // 5. Completion signal of stage 5 inverted (stuck).
    do_reset();
    err_c[4] = 1'b1;
    fault_phase("stuck completion", 20, acc);
    checks++;
    if (acc == 20) fail("stuck completion: pipeline did not stop");
    if (!z && !z_n) n_stop00++;
    if (acc < 20) n_stop++;

    // 6. Local clock of stage 6 inverted (stuck).
    do_reset();
    err_cp[5] = 1'b1;
    fault_phase("stuck local clock", 20, acc);
    checks++;
    if (acc == 20) fail("stuck local clock: pipeline did not stop");
    if (!z && !z_n) n_stop00++;
    if (acc < 20) n_stop++;

    // 7. Transient errors: one-step pulses on random control or data points.
    for (int e = 0; e < 40; e++) begin
      do_reset();
      strict = 1'b0; expect_code = 1'b0;
      fork
        run_ops(12, acc);
        begin
          repeat ($urandom_range(20, 120)) @(negedge clk);
          case ($urandom_range(0, 2))
            0: err_c[$urandom_range(0, W-1)] = 1'b1;
            1: begin
                 err_dat_sel[$urandom_range(0, W-1)] = 1'b1;
                 err_dat_after = 1'($urandom);
                 if (($urandom & 1) != 0) err_dat_t[$urandom_range(0, DW-1)] = 1'b1;
                 else              err_dat_f[$urandom_range(0, DW-1)] = 1'b1;
               end
            default: err_cp[$urandom_range(0, W-1)] = 1'b1;
          endcase
          repeat ($urandom_range(1, 3)) @(negedge clk);
          err_c = '0; err_cp = '0; err_dat_sel = '0; err_dat_t = '0; err_dat_f = '0;
        end
      join
      drain(40);
    end

    // Every mechanism must have occurred.
    checks++; if (n_precharge == 0) fail("no precharge phase seen");
    checks++; if (n_hold == 0)      fail("no evaluation hold seen");
    checks++; if (n_ring_hold == 0) fail("last stage never held for the first stage");
    checks++; if (n_stall == 0)     fail("no stall seen");
    checks++; if (n_det11 == 0)     fail("no 11 detection seen");
    checks++; if (n_stop == 0)      fail("no pipeline stop seen");
    checks++; if (n_code == 0)      fail("checker never showed a code word");
    checks++; if (n_stop00 == 0)    fail("no stopped pipeline left the checker at 00");
    checks++; if (n_flushed_runs == 0) fail("no result ever needed flush operands");
    $display("precharge=%0d hold=%0d ring_hold=%0d stall=%0d det11=%0d stop=%0d stop00=%0d code=%0d results=%0d",
             n_precharge, n_hold, n_ring_hold, n_stall, n_det11, n_stop, n_stop00, n_code, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected timing with a source that answers in one step. Operands driven
  // in step s reach the stage-1 outputs in s+1 and its completion in s+2;
  // every further stage adds one step, so the last completion is seen W+2
  // steps after the operands. Period: in_ack rises at s+2, the source returns
  // to 00 at s+3; stage 2 completes at s+3, cp1 falls at s+4, stage 1 is
  // precharged at s+5, in_ack falls at s+6 and the next operands follow at
  // s+7 (cp1 has risen again by then, stage 3 having completed at s+4).
  localparam int unsigned EXP_LATENCY = W + 2;
  localparam int unsigned EXP_PERIOD  = 7;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
