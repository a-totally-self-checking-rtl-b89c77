// lfdad_control_tb: checks the handshake ring of a four-stage latch-free
// pipeline, the structure of the generic datapath.
// Part 1 applies random completion vectors and compares every local clock
// with the handshake-cell rule applied to stage i, i+1 and i+2 modulo 4.
// Part 2 closes the loop with a token model of four DCVSL stages (a stage
// with cp high and valid input evaluates, with cp low precharges; each
// completion follows its stage by one step) fed by a four-phase source, and
// checks that every token reaches the last stage, that each stage goes
// through Evaluation, Evaluation Hold and Precharge, and that no stage is
// asked to evaluate a new token while it still holds the previous one.
module lfdad_control_tb;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] c, cp;
  int checks = 0, failures = 0;

  lfdad_control #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] exp_cp;
  logic [N-1:0] v;        // token model: stage output valid
  int tok [N];            // token number held by each stage
  logic src_valid;
  int src_tok;
  int n_out, last_out, n_hold;

  initial begin
    c = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (cp !== '1) begin failures++; $display("FAIL: cp not all 1 after reset"); end
    rst_n = 1'b1;
    exp_cp = '1;
    // Part 1.
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      c = N'($urandom);
      for (int i = 0; i < N; i++) begin
        if (c[i] && c[(i + 1) % N])       exp_cp[i] = 1'b0;
        else if (!c[i] && c[(i + 2) % N]) exp_cp[i] = 1'b1;
      end
      @(posedge clk); #1;
      checks++;
      if (cp !== exp_cp) begin
        failures++; $display("FAIL: c=%b gave cp=%b, expected %b", c, cp, exp_cp);
      end
    end

    // Part 2.
    @(negedge clk);
    rst_n = 1'b0; c = '0; v = '0;
    @(negedge clk);
    rst_n = 1'b1;
    src_valid = 1'b0; src_tok = 0; n_out = 0; last_out = 0; n_hold = 0;
    foreach (tok[i]) tok[i] = 0;
    for (int k = 0; k < 4000; k++) begin
      logic [N-1:0] v_n;
      int tok_n [N];
      @(negedge clk);
      // Source: four-phase on stage 0's completion.
      if (!src_valid && !c[0] && src_tok < 300 && ($urandom_range(0, 2) == 0)) begin
        src_valid = 1'b1; src_tok++;
      end else if (src_valid && c[0]) begin
        src_valid = 1'b0;
      end
      // Stage model.
      for (int i = 0; i < N; i++) begin
        logic in_v;
        int in_tok;
        in_v   = (i == 0) ? src_valid : v[i-1];
        in_tok = (i == 0) ? src_tok : tok[i-1];
        v_n[i] = v[i];
        tok_n[i] = tok[i];
        if (!cp[i]) v_n[i] = 1'b0;
        else if (in_v && !v[i] && ($urandom_range(0, 3) != 0)) begin
          v_n[i] = 1'b1; tok_n[i] = in_tok;
        end else if (in_v && v[i] && in_tok != tok[i]) begin
          checks++; failures++;
          $display("FAIL: stage %0d sees token %0d while holding %0d", i, in_tok, tok[i]);
        end
        if (cp[i] && v[i] && !in_v) n_hold++;
      end
      if (v_n[N-1] && !v[N-1]) begin
        checks++;
        if (tok_n[N-1] != last_out + 1) begin
          failures++;
          $display("FAIL: token %0d left the pipeline after %0d", tok_n[N-1], last_out);
        end
        last_out = tok_n[N-1];
        n_out++;
      end
      @(posedge clk);
      v = v_n;
      foreach (tok[i]) tok[i] = tok_n[i];
      #1 c = v;
    end
    checks++;
    if (n_out < 290) begin failures++; $display("FAIL: only %0d tokens delivered", n_out); end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL: no evaluation hold"); end
    $display("tokens delivered %0d, hold steps %0d", n_out, n_hold);
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
